// tb_output_classifier -- checks the arg-max index and the LED coding for
// random output values, ties included.
module tb_output_classifier;
  import ann_pkg::*;
  q8_8_t y [L3_OUT];
  logic [1:0] cls;
  logic led_out1, led_out2;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  output_classifier dut (.y(y), .cls(cls), .led_out1(led_out1), .led_out2(led_out2));

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) begin
      int best;
      for (int i = 0; i < 4; i++) y[i] = q8_8_t'($urandom_range(0, 7) * 1000);
      #1;
      best = 0;
      for (int i = 1; i < 4; i++) if (y[i] > y[best]) best = i;
      seen[best]++;
      checks++;
      if (int'(cls) != best || led_out1 != best[0] || led_out2 != best[1]) begin
        failures++;
        $display("FAIL y=%0d %0d %0d %0d cls=%0d expected %0d", y[0], y[1], y[2], y[3], cls, best);
      end
    end
    foreach (seen[i]) if (seen[i] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
