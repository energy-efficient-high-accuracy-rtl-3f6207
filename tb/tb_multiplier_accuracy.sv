// tb_multiplier_accuracy -- error statistics of the 16-bit approximate
// multiplier against the exact product.
//
// Three operand sets, 100 000 pairs each: uniformly random signed 16-bit
// operands, random operands of random magnitude (shifted down by 0..15 bits)
// and small positive operands (at most T = 7 bits below the leading one, so
// nothing is truncated). For each set it reports the mean relative error
// distance (MRED), the largest relative error and the mean signed error, and
// checks them against fixed limits: MRED below 2 % for the uniform and the
// small set and below 10 % for the log-scale set, where small negative
// operands are frequent and the one's-complement magnitude costs most; and
// every relative error
// below 15 % plus 1/|x| for each negative operand x. The added term is the
// one's-complement magnitude, which is one below the true one. Products that
// this rule sets to zero (an operand of -1) are counted apart and left out of
// the statistics.
module tb_multiplier_accuracy;
  logic signed [15:0] a, b;
  logic signed [31:0] prod;
  int checks = 0, failures = 0;
  real sum_red, max_red, sum_bias, bound;
  int n, n_minus_one;

  approx_multiplier dut (.a(a), .b(b), .prod(prod));

  task automatic run_set(string name, int mode, real mred_limit);
    sum_red = 0.0; max_red = 0.0; sum_bias = 0.0;
    n = 0; n_minus_one = 0;
    for (int i = 0; i < 100000; i++) begin
      longint ex;
      real red;
      case (mode)
        0: begin a = 16'($urandom); b = 16'($urandom); end
        1: begin
          a = $signed(16'($urandom)) >>> $urandom_range(0, 15);
          b = $signed(16'($urandom)) >>> $urandom_range(0, 15);
        end
        default: begin a = 16'($urandom_range(1, 255)); b = 16'($urandom_range(1, 255)); end
      endcase
      #1;
      ex = longint'(a) * longint'(b);
      if (a == -1 || b == -1) n_minus_one++;
      if (ex != 0 && a != -1 && b != -1) begin
        bound = 0.15;
        if (a < 0) bound += 1.0 / (-real'(a));
        if (b < 0) bound += 1.0 / (-real'(b));
        red = (real'(prod) - real'(ex)) / real'(ex);
        sum_bias += red;
        if (red < 0) red = -red;
        sum_red += red;
        if (red > max_red) max_red = red;
        n++;
        checks++;
        if (red > bound) begin
          failures++;
          if (failures < 10) $display("FAIL %s: a=%0d b=%0d prod=%0d exact=%0d", name, a, b, prod, ex);
        end
      end
    end
    $display("%s: pairs=%0d MRED=%.4f%% max=%.3f%% mean signed error=%.4f%% (operand -1: %0d)",
             name, n, 100.0 * sum_red / n, 100.0 * max_red, 100.0 * sum_bias / n, n_minus_one);
    checks++;
    if (sum_red / n > mred_limit) begin failures++; $display("FAIL %s: MRED too large", name); end
  endtask

  initial begin
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_set("uniform", 0, 0.02);
    run_set("log-scale", 1, 0.10);
    run_set("small", 2, 0.02);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
