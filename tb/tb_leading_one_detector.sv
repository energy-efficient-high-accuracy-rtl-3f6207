// tb_leading_one_detector -- checks the one-hot and binary leading-one position
// for every single-bit input, every prefix pattern and random values.
module tb_leading_one_detector;
  import approx_ref_pkg::*;
  logic [14:0] m, onehot;
  logic [3:0] k;
  int checks = 0, failures = 0;

  leading_one_detector dut (.m(m), .onehot(onehot), .k(k));

  task automatic check();
    int kr;
    #1;
    checks++;
    if (m == 0) begin
      if (onehot !== '0 || k !== '0) begin failures++; $display("FAIL zero input"); end
    end else begin
      kr = ref_lead(longint'(m));
      if (k !== 4'(kr) || onehot !== (15'(1) << kr)) begin
        failures++;
        $display("FAIL m=%b onehot=%b k=%0d expected %0d", m, onehot, k, kr);
      end
    end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = 0; check();
    for (int i = 0; i < 15; i++) begin m = 15'(1) << i; check(); m = (15'(1) << i) | ((15'(1) << i) - 1); check(); end
    repeat (2000) begin m = 15'($urandom) >> ($urandom % 15); check(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
