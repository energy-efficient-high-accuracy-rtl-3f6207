// tb_ann_layer -- checks a 4-input, 2-neuron layer: outputs follow the
// reference one cycle after an enabled edge, hold while en is low, and clear
// on reset.
module tb_ann_layer;
  import approx_ref_pkg::*;
  logic clk = 0, rst, en;
  logic signed [15:0] x [4], w [2][4], b [2], y [2];
  longint expd [2];
  int checks = 0, failures = 0, n_hold = 0;

  ann_layer #(.NIN(4), .NOUT(2)) dut (.clk(clk), .rst(rst), .en(en), .x(x), .w(w), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0;
    foreach (x[i]) x[i] = 0;
    foreach (b[i]) b[i] = 0;
    foreach (w[i, j]) w[i][j] = 0;
    @(posedge clk); #1;
    for (int o = 0; o < 2; o++) begin checks++; if (y[o] != 0) failures++; expd[o] = 0; end
    rst = 0;
    repeat (1000) begin
      @(negedge clk);
      en = 1'($urandom);
      for (int i = 0; i < 4; i++) x[i] = 16'($urandom_range(0, 1023));
      for (int o = 0; o < 2; o++) begin
        for (int i = 0; i < 4; i++) w[o][i] = $signed(16'($urandom)) >>> $urandom_range(4, 15);
        b[o] = $signed(16'($urandom)) >>> $urandom_range(4, 15);
      end
      if (en) begin
        for (int o = 0; o < 2; o++) begin
          longint xi[], wi[];
          bit c, s;
          xi = new[4]; wi = new[4];
          for (int i = 0; i < 4; i++) begin xi[i] = longint'(x[i]); wi[i] = longint'(w[o][i]); end
          expd[o] = ref_neuron(xi, wi, longint'(b[o]), c, s);
        end
      end else n_hold++;
      @(posedge clk); #1;
      for (int o = 0; o < 2; o++) begin
        checks++;
        if (longint'(y[o]) != expd[o]) begin
          failures++;
          if (failures < 10) $display("FAIL neuron %0d y=%0d expected %0d", o, y[o], expd[o]);
        end
      end
    end
    @(negedge clk); rst = 1; @(posedge clk); #1;
    for (int o = 0; o < 2; o++) begin checks++; if (y[o] != 0) failures++; end
    if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
