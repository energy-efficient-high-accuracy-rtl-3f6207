// ann_neuron -- one neuron: weighted sum, bias and ReLU.
//
// Every input is multiplied by its weight in its own approximate multiplier
// (NIN multipliers in parallel). The Q16.16 products are summed with the bias
// (aligned from Q8.8), the sum is brought back to Q8.8 by dropping 8 fraction
// bits (rounding toward minus infinity) and passed to the activation unit:
// ReLU by default (negative values clipped to 0, values above the Q8.8
// maximum saturated to 0x7FFF) or, with ACT = ACT_SIGMOID, a piecewise-linear
// sigmoid. Combinational; the layer around it registers the result.
// That a neuron forms a weighted sum through the approximate multiplier and
// applies an activation follows the design's description, which names ReLU
// or sigmoid; ReLU as default, the number format and saturation are this
// design's choice.
module ann_neuron #(
  parameter int unsigned NIN = ann_pkg::L1_IN,
  parameter int unsigned N   = approx_mul_pkg::MUL_N,
  parameter int unsigned T   = approx_mul_pkg::MUL_T,
  parameter int unsigned H   = approx_mul_pkg::MUL_H,
  parameter ann_pkg::act_t ACT = ann_pkg::ACT_RELU
) (
  input  logic signed [N-1:0] x [NIN],
  input  logic signed [N-1:0] w [NIN],
  input  logic signed [N-1:0] bias,
  output logic signed [N-1:0] y
);

  localparam int unsigned AW = 2 * N + $clog2(NIN + 1) + 1;  // accumulator
  localparam int unsigned FB = ann_pkg::QF;

  logic signed [2*N-1:0] prod [NIN];
  logic signed [AW-1:0]  acc;
  logic signed [AW-1:0]  scaled;

  for (genvar i = 0; i < NIN; i++) begin : g_mul
    approx_multiplier #(.N(N), .T(T), .H(H)) u_mul (.a(x[i]), .b(w[i]), .prod(prod[i]));
  end

  always_comb begin
    acc = AW'(bias) <<< FB;
    for (int i = 0; i < NIN; i++) acc = acc + AW'(prod[i]);
    scaled = acc >>> FB;
  end

  activation_unit #(.AW(AW), .ACT(ACT)) u_act (
    .s(scaled), .y(y)
  );

endmodule
