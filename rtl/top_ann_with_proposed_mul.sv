// top_ann_with_proposed_mul -- character classifier built on the approximate
// multiplier with adaptive truncation.
//
// A 9-bit character code (ASCII a-z) is offered on data_in with data_valid and
// accepted when data_ready is high; it is held in char_rec. The character
// encoder turns it into 4 Q8.8 inputs, which pass through a 4-neuron input
// layer, a 2-neuron hidden layer and a 4-neuron output layer, one layer per
// clock. Every product in every neuron (32 in all) is formed by the signed
// 16 x 16 approximate multiplier. ReLU follows each neuron (a piecewise-linear
// sigmoid with ACT = ACT_SIGMOID). The output layer
// values appear on y[0..3]; the index of the largest drives led_out1/led_out2.
// `done` pulses once per classified character and `counter` counts them.
// Weights and biases live in a register file loaded with built-in values at
// reset and rewritable through param_we / param_addr / param_wdata.
// Timing: data_in accepted at clock edge 0, y and the LEDs updated at edge 3,
// done high in the following cycle; one character per 4 cycles.
// The network shape, the approximate multiplier, reset and the port names
// clk, rst, data_in, char_rec, led_out1, led_out2 and counter follow the
// design's description and simulation; the handshake, the parameter write
// port and the number format are this design's own.
module top_ann_with_proposed_mul
  import ann_pkg::*;
#(
  parameter act_t ACT = ACT_RELU   // activation of every neuron
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [8:0]          data_in,
  input  logic                data_valid,
  output logic                data_ready,
  input  logic                param_we,
  input  logic [PARAM_AW-1:0] param_addr,
  input  q8_8_t               param_wdata,
  output logic [8:0]          char_rec,
  output q8_8_t               y [L3_OUT],
  output logic                led_out1,
  output logic                led_out2,
  output logic                done,
  output logic [4:0]          counter
);

  logic  load, en1, en2, en3;
  logic  [1:0] cls;
  q8_8_t x  [L1_IN];
  q8_8_t h1 [L1_OUT];
  q8_8_t h2 [L2_OUT];
  q8_8_t w1 [L1_OUT][L1_IN];
  q8_8_t w2 [L2_OUT][L1_OUT];
  q8_8_t w3 [L3_OUT][L2_OUT];
  q8_8_t b1 [L1_OUT];
  q8_8_t b2 [L2_OUT];
  q8_8_t b3 [L3_OUT];

  ann_controller u_ctrl (
    .clk(clk), .rst(rst), .valid(data_valid), .ready(data_ready), .load(load),
    .en1(en1), .en2(en2), .en3(en3), .done(done), .counter(counter)
  );

  always_ff @(posedge clk) begin
    if (rst)       char_rec <= '0;
    else if (load) char_rec <= data_in;
  end

  ann_param_mem u_params (
    .clk(clk), .rst(rst), .we(param_we), .waddr(param_addr), .wdata(param_wdata),
    .w1(w1), .w2(w2), .w3(w3), .b1(b1), .b2(b2), .b3(b3)
  );

  char_encoder u_enc (.data_in(char_rec), .x(x));

  ann_layer #(.NIN(L1_IN), .NOUT(L1_OUT), .ACT(ACT)) u_layer1 (
    .clk(clk), .rst(rst), .en(en1), .x(x), .w(w1), .b(b1), .y(h1)
  );

  ann_layer #(.NIN(L1_OUT), .NOUT(L2_OUT), .ACT(ACT)) u_layer2 (
    .clk(clk), .rst(rst), .en(en2), .x(h1), .w(w2), .b(b2), .y(h2)
  );

  ann_layer #(.NIN(L2_OUT), .NOUT(L3_OUT), .ACT(ACT)) u_layer3 (
    .clk(clk), .rst(rst), .en(en3), .x(h2), .w(w3), .b(b3), .y(y)
  );

  output_classifier u_cls (.y(y), .cls(cls), .led_out1(led_out1), .led_out2(led_out2));

endmodule
