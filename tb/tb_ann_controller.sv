// tb_ann_controller -- checks the layer enable sequence, the 4-cycle pass, the
// done pulse, the counter (including its wrap at 32), stalls of a character
// offered while busy, and reset in the middle of a pass.
module tb_ann_controller;
  logic clk = 0, rst, valid, ready, load, en1, en2, en3, done;
  logic [4:0] counter;
  int checks = 0, failures = 0, n_stall = 0, passes = 0;

  ann_controller dut (.clk(clk), .rst(rst), .valid(valid), .ready(ready), .load(load),
                      .en1(en1), .en2(en2), .en3(en3), .done(done), .counter(counter));

  always #5 clk = ~clk;

  // Cycle-level model: phase 0 idle, 1..3 layer enables.
  int phase = 0, cnt = 0;
  bit done_m = 0;

  always @(posedge clk) begin
    if (rst) begin phase <= 0; cnt <= 0; done_m <= 0; end
    else begin
      done_m <= (phase == 3);
      if (phase == 0) begin if (valid) phase <= 1; end
      else if (phase == 3) begin phase <= 0; cnt <= (cnt + 1) % 32; end
      else phase <= phase + 1;
    end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (ready != (phase == 0) || load != (phase == 0 && valid) || en1 != (phase == 1) ||
        en2 != (phase == 2) || en3 != (phase == 3) || done != done_m || int'(counter) != cnt) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t phase=%0d ready=%b en=%b%b%b done=%b cnt=%0d", $time,
                                  phase, ready, en1, en2, en3, done, counter);
    end
    if (valid && phase != 0) n_stall++;
    if (done) passes++;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    rst = 1; valid = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // One pass with a measured latency from accept to done.
    @(negedge clk) valid = 1;
    @(posedge clk); t0 = 0; #1 valid = 0;
    while (!done) begin @(posedge clk); #1 t0++; end
    checks++;
    if (t0 != 3) begin failures++; $display("FAIL latency %0d", t0); end
    // Continuous and random traffic.
    repeat (1500) begin @(negedge clk) valid = 1'($urandom); end
    // Reset in the middle of a pass.
    @(negedge clk) valid = 1;
    @(negedge clk) valid = 0; rst = 1;
    @(negedge clk) rst = 0;
    checks++;
    if (!ready || counter != 0) failures++;
    repeat (10) @(negedge clk);
    if (n_stall == 0 || passes < 40) failures++;
    $display("passes=%0d stalls=%0d", passes, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
