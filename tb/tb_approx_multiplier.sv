// tb_approx_multiplier -- checks the signed approximate product against the
// reference model (bit exact) and against the exact product (relative error
// of a positive product within 15 %, mean error reported), over corner values,
// small operands (no truncation), large operands and random signed operands.
module tb_approx_multiplier;
  import approx_ref_pkg::*;
  logic signed [15:0] a, b;
  logic signed [31:0] prod;
  int checks = 0, failures = 0;
  int n_zero = 0, n_neg = 0, n_trunc = 0, n_small = 0;
  real err_sum = 0.0;
  int err_n = 0;

  approx_multiplier dut (.a(a), .b(b), .prod(prod));

  task automatic check();
    longint e, ex;
    real rel;
    #1;
    e = ref_mul(longint'(a), longint'(b), 16, 7, 3);
    checks++;
    if (longint'(prod) != e) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d prod=%0d expected %0d", a, b, prod, e);
    end
    if (e == 0) n_zero++;
    else if (e < 0) n_neg++;
    if (ref_lead(ref_abs(longint'(a), 16)) > 7 || ref_lead(ref_abs(longint'(b), 16)) > 7) n_trunc++;
    else n_small++;
    if (a > 0 && b > 0) begin
      ex  = longint'(a) * longint'(b);
      rel = (real'(ex) - real'(prod)) / real'(ex);
      if (rel < 0) rel = -rel;
      err_sum += rel; err_n++;
      checks++;
      if (rel > 0.15) begin
        failures++;
        $display("FAIL accuracy a=%0d b=%0d prod=%0d exact=%0d", a, b, prod, ex);
      end
    end
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'sd42; b = 16'sd11; check();              // 101010 x 1011
    a = 16'sd0; b = 16'sd1234; check();
    a = -16'sd1; b = 16'sd77; check();
    a = 16'sh7FFF; b = 16'sh7FFF; check();
    a = -16'sd32768; b = 16'sh7FFF; check();
    a = -16'sd32768; b = -16'sd32768; check();
    a = 16'sd256; b = 16'sd256; check();
    for (int i = 1; i < 64; i++) for (int j = 1; j < 64; j++) begin a = 16'(i); b = 16'(j); check(); end
    repeat (5000) begin a = 16'($urandom); b = 16'($urandom); check(); end
    repeat (5000) begin
      a = $signed(16'($urandom)) >>> ($urandom % 16); b = $signed(16'($urandom)) >>> ($urandom % 16); check();
    end
    if (n_zero == 0 || n_neg == 0 || n_trunc == 0 || n_small == 0) begin
      failures++;
      $display("FAIL coverage zero=%0d neg=%0d trunc=%0d small=%0d", n_zero, n_neg, n_trunc, n_small);
    end
    $display("mean relative error of positive products: %f over %0d", err_sum / err_n, err_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
