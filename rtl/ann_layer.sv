// ann_layer -- a fully connected layer of NOUT neurons with NIN inputs each.
//
// All neurons of the layer work in parallel (NOUT*NIN approximate
// multipliers). Their outputs are captured in the layer's output register on
// a clock edge where `en` is high and held otherwise; a synchronous,
// active-high `rst` clears them. One layer evaluation therefore takes one clock
// cycle. Weights arrive as w[neuron][input], biases as b[neuron]. ACT selects
// the neurons' activation (ReLU by default, or the piecewise-linear sigmoid).
// One module per layer follows the design's description; the single-cycle
// parallel evaluation and the output register are this design's choice.
module ann_layer #(
  parameter int unsigned NIN  = ann_pkg::L1_IN,
  parameter int unsigned NOUT = ann_pkg::L1_OUT,
  parameter int unsigned N    = approx_mul_pkg::MUL_N,
  parameter int unsigned T    = approx_mul_pkg::MUL_T,
  parameter int unsigned H    = approx_mul_pkg::MUL_H,
  parameter ann_pkg::act_t ACT = ann_pkg::ACT_RELU
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [N-1:0] x [NIN],
  input  logic signed [N-1:0] w [NOUT][NIN],
  input  logic signed [N-1:0] b [NOUT],
  output logic signed [N-1:0] y [NOUT]
);

  logic signed [N-1:0] y_next [NOUT];

  for (genvar o = 0; o < NOUT; o++) begin : g_neuron
    ann_neuron #(.NIN(NIN), .N(N), .T(T), .H(H), .ACT(ACT)) u_neuron (
      .x(x), .w(w[o]), .bias(b[o]), .y(y_next[o])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int o = 0; o < NOUT; o++) y[o] <= '0;
    end else if (en) begin
      y <= y_next;
    end
  end

endmodule
