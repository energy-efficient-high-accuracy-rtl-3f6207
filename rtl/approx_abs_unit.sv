// approx_abs_unit -- approximate absolute value of both operands, product sign
// and zero flag.
//
// The magnitude of a negative two's-complement operand is taken as its one's
// complement (each bit XORed with the sign bit), which saves the +1 carry chain
// and is off by one LSB. The result drops the sign bit, so it is N-1 bits wide.
// `sign` is the XOR of the operand signs. `zero` is set when either approximate
// magnitude is 0; the leading-one path cannot represent 0, so the product is
// forced to zero downstream. Note that with the one's-complement magnitude an
// operand of -1 also has magnitude 0.
// Purely combinational. The unit's name and its outputs (|A|app, |B|app on n-1
// bits, zero, sign) follow the design's block diagram; the XOR form of the
// magnitude and the zero test on the magnitudes are this design's choices.
module approx_abs_unit #(
  parameter int unsigned N = approx_mul_pkg::MUL_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-2:0] abs_a,
  output logic [N-2:0] abs_b,
  output logic         zero,
  output logic         sign
);

  always_comb begin
    abs_a = a[N-2:0] ^ {(N-1){a[N-1]}};
    abs_b = b[N-2:0] ^ {(N-1){b[N-1]}};
    sign  = a[N-1] ^ b[N-1];
    zero  = (abs_a == '0) || (abs_b == '0);
  end

endmodule
