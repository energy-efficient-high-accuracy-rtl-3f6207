// approx_multiplier -- signed approximate multiplier with adaptive truncation.
//
// Each N-bit two's-complement operand is reduced to an approximate magnitude,
// its leading one is found (k), and the T bits right below it are kept as the
// truncated fraction (Y)t. The product magnitude is approximated as
//     2^(kA+kB) * (1 + (YA)t + (YB)t + (YA)APX * (YB)APX)
// where (Y)APX is (Y)t cut to H bits and rounded to the nearest odd value by a
// trailing 1. Small operands lose nothing to truncation; large ones keep only
// T significant fraction bits, so the precision adapts to operand magnitude.
// The sign and zero flags are then applied. Interface: a, b (N bits, signed),
// prod (2N bits, signed). Purely combinational, no clock.
// Structure (absolute, leading-one, truncation, arithmetic, shift and sign/zero
// units) and the 16 x 16 -> 32 bit size follow the design's block diagrams;
// H = 3 and T = 7 are this design's choice.
module approx_multiplier #(
  parameter int unsigned N = approx_mul_pkg::MUL_N,
  parameter int unsigned T = approx_mul_pkg::MUL_T,
  parameter int unsigned H = approx_mul_pkg::MUL_H,
  localparam int unsigned F  = approx_mul_pkg::frac_bits(T, H),
  localparam int unsigned KW = $clog2(N)
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] prod
);

  logic [N-2:0]   abs_a, abs_b, oh_a, oh_b;
  logic [KW-1:0]  ka, kb;
  logic [T-1:0]   ya_t, yb_t;
  logic [F+1:0]   p;
  logic [2*N-1:0] mag, prod_u;
  logic           zero, sign;

  approx_abs_unit #(.N(N)) u_abs (
    .a(a), .b(b), .abs_a(abs_a), .abs_b(abs_b), .zero(zero), .sign(sign)
  );

  leading_one_detector #(.N(N)) u_lod_a (.m(abs_a), .onehot(oh_a), .k(ka));
  leading_one_detector #(.N(N)) u_lod_b (.m(abs_b), .onehot(oh_b), .k(kb));

  truncation_unit #(.N(N), .T(T)) u_trunc_a (.m(abs_a), .onehot(oh_a), .y_t(ya_t));
  truncation_unit #(.N(N), .T(T)) u_trunc_b (.m(abs_b), .onehot(oh_b), .y_t(yb_t));

  arithmetic_unit #(.T(T), .H(H)) u_arith (.ya_t(ya_t), .yb_t(yb_t), .p(p));

  shift_unit #(.N(N), .T(T), .H(H)) u_shift (.p(p), .ka(ka), .kb(kb), .mag(mag));

  sign_zero_detector #(.N(N)) u_sz (.mag(mag), .zero(zero), .sign(sign), .prod(prod_u));

  assign prod = signed'(prod_u);

endmodule
