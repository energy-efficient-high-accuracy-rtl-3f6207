// tb_top_ann_with_proposed_mul -- end-to-end test of the character classifier
// at its default size.
//
// Feeds the letters a-z (and then random 9-bit codes) through the network and
// compares the 4 output-neuron values, the LEDs, char_rec and the counter with
// a reference evaluation of the whole network. It checks the accept-to-done
// latency of 3 cycles and one character per 4 cycles under back-to-back
// traffic. It then rewrites the weights and biases through the parameter port
// (random sets, and one set large enough to saturate) and repeats, and finally
// resets. Every mechanism is counted and must occur at least once: a stalled
// offer, a parameter write, a ReLU clip, a saturation, a multiplier operand
// long enough to be truncated, a zero operand, a negative product, and at
// least two different winning classes.
module tb_top_ann_with_proposed_mul;
  import ann_pkg::*;
  import approx_ref_pkg::*;

  logic clk = 0, rst;
  logic [8:0] data_in;
  logic data_valid, data_ready, param_we;
  logic [PARAM_AW-1:0] param_addr;
  q8_8_t param_wdata;
  logic [8:0] char_rec;
  q8_8_t y [L3_OUT];
  logic led_out1, led_out2, done;
  logic [4:0] counter;

  top_ann_with_proposed_mul dut (
    .clk(clk), .rst(rst), .data_in(data_in), .data_valid(data_valid), .data_ready(data_ready),
    .param_we(param_we), .param_addr(param_addr), .param_wdata(param_wdata),
    .char_rec(char_rec), .y(y), .led_out1(led_out1), .led_out2(led_out2), .done(done),
    .counter(counter)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_write = 0, n_clip = 0, n_sat = 0, n_trunc = 0, n_zero = 0, n_neg = 0;
  int class_seen [4] = '{0, 0, 0, 0};
  int expected_count = 0;
  longint prm [42];

  int quarters [42] = '{4, 2, -1, 3, -2, 4, 2, -1, 1, -3, 4, 2, 2, 1, -2, 4,
                        2, -1, 3, 1, -2, 3, 1, 2,
                        4, -3, -3, 4, 2, 1, 1, 2,
                        1, -1, 0, 2, 0, 1, 0, 0, 2, 1};

  // Operand statistics of the first layer's multipliers for one character.
  task automatic count_operands(int c);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      longint xv, wv, xe [4];
      ref_encode(c, xe);
      xv = xe[j];
      wv = prm[i * 4 + j];
      if (xv == 0 || ref_abs(wv, 16) == 0) n_zero++;
      else begin
        if ((wv < 0)) n_neg++;
        if (ref_lead(ref_abs(xv, 16)) > 7 || ref_lead(ref_abs(wv, 16)) > 7) n_trunc++;
      end
    end
  endtask

  task automatic classify(int c, bit stall_probe);
    longint yo [4];
    int best, lat;
    ref_ann(c, prm, yo, n_clip, n_sat);
    count_operands(c);
    @(negedge clk);
    while (!data_ready) @(negedge clk);
    data_in = 9'(c); data_valid = 1;
    @(posedge clk); #1;
    if (!stall_probe) data_valid = 0;
    lat = 0;
    while (!done) begin
      if (data_valid && !data_ready) n_stall++;
      @(posedge clk); #1 lat++;
    end
    data_valid = 0;
    expected_count = (expected_count + 1) % 32;
    checks++;
    if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
    best = 0;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (longint'(y[i]) != yo[i]) begin
        failures++;
        $display("FAIL char %0d output %0d = %0d expected %0d", c, i, y[i], yo[i]);
      end
      if (yo[i] > yo[best]) best = i;
    end
    class_seen[best]++;
    checks++;
    if ({led_out2, led_out1} != 2'(best) || char_rec != 9'(c) || int'(counter) != expected_count) begin
      failures++;
      $display("FAIL char %0d leds=%b%b expected class %0d char_rec=%0d counter=%0d", c,
               led_out2, led_out1, best, char_rec, counter);
    end
  endtask

  task automatic write_param(int a, longint v);
    @(negedge clk);
    param_we = 1; param_addr = 6'(a); param_wdata = q8_8_t'(v);
    @(negedge clk);
    param_we = 0;
    prm[a] = longint'(q8_8_t'(v));
    n_write++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, n0;
    rst = 1; data_in = 0; data_valid = 0; param_we = 0; param_addr = 0; param_wdata = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int a = 0; a < 42; a++) prm[a] = quarters[a] * 64;

    // The alphabet with the built-in parameters; every other letter is held
    // valid through the pass to probe the stall.
    for (int c = "a"; c <= "z"; c++) classify(c, c[0]);

    // Throughput: valid held high for 40 cycles gives 10 characters.
    @(negedge clk);
    n0 = int'(counter);
    data_in = 9'("m"); data_valid = 1;
    for (t0 = 0; t0 < 40; t0++) @(negedge clk);
    data_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if ((int'(counter) - n0 + 32) % 32 != 10) begin
      failures++; $display("FAIL throughput: %0d characters in 40 cycles", (int'(counter) - n0 + 32) % 32);
    end
    expected_count = int'(counter);

    // Random parameter sets and random codes.
    repeat (6) begin
      for (int a = 0; a < 42; a++) write_param(a, longint'($urandom_range(0, 1023)) - 512);
      repeat (20) classify($urandom_range(90, 130), 1'($urandom));
    end

    // Large weights: drive the outputs into saturation.
    for (int a = 0; a < 42; a++) write_param(a, (a < 32) ? 16'sh3000 : 16'sh0100);
    for (int c = "a"; c <= "z"; c++) classify(c, 0);

    // Reset restores the built-in parameters and clears the outputs.
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    for (int a = 0; a < 42; a++) prm[a] = quarters[a] * 64;
    expected_count = 0;
    checks++;
    if (counter != 0 || char_rec != 0 || y[0] != 0 || !data_ready) begin
      failures++; $display("FAIL reset state");
    end
    for (int c = "a"; c <= "e"; c++) classify(c, 0);

    $display("mechanisms: stall=%0d write=%0d relu_clip=%0d saturate=%0d truncated_operand=%0d zero_operand=%0d negative_product=%0d",
             n_stall, n_write, n_clip, n_sat, n_trunc, n_zero, n_neg);
    $display("classes won: %0d %0d %0d %0d", class_seen[0], class_seen[1], class_seen[2], class_seen[3]);
    if (n_stall == 0)  begin failures++; $display("FAIL no stall"); end
    if (n_write == 0)  begin failures++; $display("FAIL no parameter write"); end
    if (n_clip == 0)   begin failures++; $display("FAIL no ReLU clip"); end
    if (n_sat == 0)    begin failures++; $display("FAIL no saturation"); end
    if (n_trunc == 0)  begin failures++; $display("FAIL no truncated operand"); end
    if (n_zero == 0)   begin failures++; $display("FAIL no zero operand"); end
    if (n_neg == 0)    begin failures++; $display("FAIL no negative product"); end
    begin
      automatic int k = 0;
      foreach (class_seen[i]) if (class_seen[i] > 0) k++;
      if (k < 2) begin failures++; $display("FAIL only one class ever won"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
