// tb_activation_unit -- checks both activations over a sweep of the input
// range (every segment and breakpoint of the sigmoid, both ReLU limits) and
// random wide inputs. Two instances: ReLU and sigmoid.
module tb_activation_unit;
  import ann_pkg::*;
  import approx_ref_pkg::*;
  logic signed [37:0] s;
  q8_8_t y_relu, y_sig;
  int checks = 0, failures = 0;

  activation_unit #(.AW(38), .ACT(ACT_RELU))    u_relu (.s(s), .y(y_relu));
  activation_unit #(.AW(38), .ACT(ACT_SIGMOID)) u_sig  (.s(s), .y(y_sig));

  task automatic check();
    longint er;
    bit c, t;
    #1;
    er = (s < 0) ? 0 : ((s > 32767) ? 32767 : longint'(s));
    checks += 2;
    if (longint'(y_relu) != er) begin
      failures++; $display("FAIL relu s=%0d y=%0d expected %0d", s, y_relu, er);
    end
    if (longint'(y_sig) != ref_sigmoid(longint'(s))) begin
      failures++; $display("FAIL sigmoid s=%0d y=%0d expected %0d", s, y_sig, ref_sigmoid(longint'(s)));
    end
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -2000; v <= 2000; v++) begin s = 38'(v); check(); end
    for (int v = 32760; v <= 32780; v++) begin s = 38'(v); check(); end
    repeat (2000) begin s = 38'({$urandom, $urandom}) >>> $urandom_range(0, 37); check(); end
    // Monotonic and symmetric sigmoid: f(v) + f(-v) = 1.0.
    for (int v = 0; v < 1500; v++) begin
      q8_8_t yp;
      s = 38'(v); #1 yp = y_sig;
      s = -38'(v); #1;
      checks++;
      if (int'(yp) + int'(y_sig) != 256 && v != 0) begin failures++; $display("FAIL symmetry at %0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
