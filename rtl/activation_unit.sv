// activation_unit -- neuron activation on a wide Q8.8 sum.
//
// Input `s` is the neuron's sum already scaled to Q8.8 but still AW bits wide;
// output `y` is a 16-bit Q8.8 activation.
//   ACT_RELU:    y = 0 for s < 0, s up to the Q8.8 maximum 0x7FFF, saturated
//                above it.
//   ACT_SIGMOID: a four-segment piecewise-linear sigmoid of |s| built from
//                shifts and adds (slopes 1/4, 1/8, 1/32 with breakpoints at
//                1, 2.375 and 5, constant 1 beyond), mirrored as 1 - f(|s|)
//                for negative s. Results lie in 0 .. 1.0 (0x0100). Fractions
//                of the shifted terms are truncated.
// Combinational.
// The design's description names ReLU or sigmoid, built from lookup tables
// or polynomial approximations; the choice of ReLU as default, the segment
// breakpoints and slopes are this design's own.
module activation_unit
  import ann_pkg::*;
#(
  parameter int unsigned AW  = 38,
  parameter act_t        ACT = ACT_RELU
) (
  input  logic signed [AW-1:0] s,
  output q8_8_t                y
);

  localparam logic signed [AW-1:0] YMAX  = AW'((1 << (QW - 1)) - 1);
  localparam logic signed [AW-1:0] ONE   = AW'(1 << QF);   // 1.0
  localparam logic signed [AW-1:0] BP1   = AW'(256);       // 1.0
  localparam logic signed [AW-1:0] BP2   = AW'(608);       // 2.375
  localparam logic signed [AW-1:0] BP3   = AW'(1280);      // 5.0

  logic signed [AW-1:0] ax, f;

  always_comb begin
    ax = (s < 0) ? -s : s;
    if (ax >= BP3)      f = ONE;
    else if (ax >= BP2) f = (ax >>> 5) + AW'(216);   // |s|/32 + 0.84375
    else if (ax >= BP1) f = (ax >>> 3) + AW'(160);   // |s|/8  + 0.625
    else                f = (ax >>> 2) + AW'(128);   // |s|/4  + 0.5
    if (ACT == ACT_SIGMOID) begin
      y = (s < 0) ? q8_8_t'(ONE - f) : q8_8_t'(f);
    end else if (s < 0) begin
      y = '0;
    end else if (s > YMAX) begin
      y = YMAX[QW-1:0];
    end else begin
      y = s[QW-1:0];
    end
  end

endmodule
