// arithmetic_unit -- the fixed-point core of the approximate multiplier.
//
// Computes 1 + (YA)t + (YB)t + (YA)APX * (YB)APX, where (Y)APX is the H most
// significant bits of (Y)t followed by a 1 (rounding the fraction to the
// nearest odd value on H+1 bits). The expression and its width,
// 2 + max(T, 2H+2) bits of which F = max(T, 2H+2) are fraction, are those of
// the design's block diagram. Only an (H+1) x (H+1) bit product is needed, which
// is where the energy saving of the multiplier comes from. Combinational.
module arithmetic_unit #(
  parameter int unsigned T = approx_mul_pkg::MUL_T,
  parameter int unsigned H = approx_mul_pkg::MUL_H,
  localparam int unsigned F = approx_mul_pkg::frac_bits(T, H)
) (
  input  logic [T-1:0] ya_t,
  input  logic [T-1:0] yb_t,
  output logic [F+1:0] p      // unsigned, F fraction bits
);

  if (H < 1 || H > T) begin : g_bad_params
    $error("arithmetic_unit: H must satisfy 1 <= H <= T");
  end

  logic [H:0]       ya_apx, yb_apx;
  logic [2*H+1:0]   apx_prod;

  always_comb begin
    ya_apx   = {ya_t[T-1 -: H], 1'b1};
    yb_apx   = {yb_t[T-1 -: H], 1'b1};
    apx_prod = ya_apx * yb_apx;
    p = (F + 2)'(1) << F;
    p = p + ((F + 2)'(ya_t) << (F - T));
    p = p + ((F + 2)'(yb_t) << (F - T));
    p = p + ((F + 2)'(apx_prod) << (F - (2 * H + 2)));
  end

endmodule
