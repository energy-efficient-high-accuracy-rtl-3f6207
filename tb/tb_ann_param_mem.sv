// tb_ann_param_mem -- checks the reset values of all 42 words, that writes land
// in the right matrix element, and that out-of-range writes change nothing.
module tb_ann_param_mem;
  import ann_pkg::*;
  logic clk = 0, rst, we;
  logic [PARAM_AW-1:0] waddr;
  q8_8_t wdata;
  q8_8_t w1 [L1_OUT][L1_IN];
  q8_8_t w2 [L2_OUT][L1_OUT];
  q8_8_t w3 [L3_OUT][L2_OUT];
  q8_8_t b1 [L1_OUT];
  q8_8_t b2 [L2_OUT];
  q8_8_t b3 [L3_OUT];
  int checks = 0, failures = 0;
  int model [64];

  ann_param_mem dut (.clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata),
                     .w1(w1), .w2(w2), .w3(w3), .b1(b1), .b2(b2), .b3(b3));

  always #5 clk = ~clk;

  function automatic int word(int a);
    if (a < 16) return int'(w1[a / 4][a % 4]);
    if (a < 24) return int'(w2[(a - 16) / 4][(a - 16) % 4]);
    if (a < 32) return int'(w3[(a - 24) / 2][(a - 24) % 2]);
    if (a < 36) return int'(b1[a - 32]);
    if (a < 38) return int'(b2[a - 36]);
    return int'(b3[a - 38]);
  endfunction

  task automatic compare_all();
    for (int a = 0; a < 42; a++) begin
      checks++;
      if (word(a) != model[a]) begin
        failures++;
        $display("FAIL word %0d = %0d expected %0d", a, word(a), model[a]);
      end
    end
  endtask

  // Built-in values in quarters, listed independently of the package.
  int quarters [42] = '{4, 2, -1, 3, -2, 4, 2, -1, 1, -3, 4, 2, 2, 1, -2, 4,
                        2, -1, 3, 1, -2, 3, 1, 2,
                        4, -3, -3, 4, 2, 1, 1, 2,
                        1, -1, 0, 2, 0, 1, 0, 0, 2, 1};

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; waddr = 0; wdata = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int a = 0; a < 42; a++) model[a] = quarters[a] * 64;
    compare_all();
    repeat (200) begin
      int a;
      a = $urandom_range(0, 63);
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = q8_8_t'($urandom);
      if (a < 42) model[a] = int'(wdata);
      @(negedge clk);
      we = 0;
      compare_all();
    end
    rst = 1; @(negedge clk); rst = 0;
    for (int a = 0; a < 42; a++) model[a] = quarters[a] * 64;
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
