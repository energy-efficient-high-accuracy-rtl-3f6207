// tb_truncation_unit -- checks the truncated fraction (Y)t for operands both
// shorter and longer than T bits below their leading one. The one-hot input is
// formed by the testbench itself.
module tb_truncation_unit;
  import approx_ref_pkg::*;
  logic [14:0] m, onehot;
  logic [6:0] y_t;
  int checks = 0, failures = 0, n_short = 0, n_long = 0;

  truncation_unit dut (.m(m), .onehot(onehot), .y_t(y_t));

  task automatic check();
    int k;
    longint e;
    k = ref_lead(longint'(m));
    onehot = (m == 0) ? '0 : (15'(1) << k);
    #1;
    e = ref_trunc(longint'(m), 7);
    checks++;
    if (m != 0) begin if (k <= 7) n_short++; else n_long++; end
    if (y_t !== 7'(e)) begin
      failures++;
      $display("FAIL m=%b y_t=%b expected %b", m, y_t, 7'(e));
    end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = 0; check();
    m = 15'h7FFF; check();
    m = 15'b100_0000_1010_0101; check();
    m = 15'b000_0000_0001_0110; check();
    repeat (3000) begin m = 15'($urandom) >> ($urandom % 15); check(); end
    if (n_short == 0 || n_long == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
