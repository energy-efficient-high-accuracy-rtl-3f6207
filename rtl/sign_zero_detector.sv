// sign_zero_detector -- applies the zero flag and the sign to the magnitude.
//
// A zero flag forces the product to 0. Otherwise a negative product is formed
// as the one's complement of the magnitude (XOR with the sign), mirroring the
// approximate absolute unit; this is at most one LSB away from the two's
// complement. Combinational. The unit and its 2N-bit output follow the block
// diagram; the XOR negation is this design's choice.
module sign_zero_detector #(
  parameter int unsigned N = approx_mul_pkg::MUL_N
) (
  input  logic [2*N-1:0] mag,
  input  logic           zero,
  input  logic           sign,
  output logic [2*N-1:0] prod
);

  always_comb begin
    if (zero) prod = '0;
    else      prod = mag ^ {(2*N){sign}};
  end

endmodule
