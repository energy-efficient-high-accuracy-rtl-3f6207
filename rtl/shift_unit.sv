// shift_unit -- scales the arithmetic unit result back to an integer product.
//
// Shifts the (F+2)-bit fixed-point value p left by kA + kB and drops its F
// fraction bits, giving the 2N-bit product magnitude. Fraction bits that fall
// below the binary point are truncated. Combinational barrel shift. The unit
// and its 2N-bit output follow the design's block diagram.
module shift_unit #(
  parameter int unsigned N = approx_mul_pkg::MUL_N,
  parameter int unsigned T = approx_mul_pkg::MUL_T,
  parameter int unsigned H = approx_mul_pkg::MUL_H,
  localparam int unsigned F = approx_mul_pkg::frac_bits(T, H),
  localparam int unsigned KW = $clog2(N)
) (
  input  logic [F+1:0]  p,
  input  logic [KW-1:0] ka,
  input  logic [KW-1:0] kb,
  output logic [2*N-1:0] mag
);

  localparam int unsigned WW = 2 * N + F;  // wide enough for the whole shift

  logic [KW:0]   kab;
  logic [WW-1:0] wide;

  always_comb begin
    kab  = {1'b0, ka} + {1'b0, kb};
    wide = WW'(p) << kab;
    mag  = wide[F +: 2*N];
  end

endmodule
