// truncation_unit -- keeps the T bits right below the leading one.
//
// With the leading one of magnitude m at position k (given one-hot), bit j of
// the truncated fraction (Y)t is m[k-1-j], for j = 0 .. T-1 counted from the
// fraction's MSB. Positions below bit 0 read as 0, so an operand with fewer
// than T bits under its leading one passes through exactly: truncation only
// removes bits from operands that are large, which is the adaptive part of the
// multiplier. Built as an AND-OR selection over the one-hot position; purely
// combinational. Output `y_t[T-1]` has weight 1/2, `y_t[0]` weight 2^-T.
// The unit, its one-hot input and its T-bit output follow the block diagram.
module truncation_unit #(
  parameter int unsigned N = approx_mul_pkg::MUL_N,
  parameter int unsigned T = approx_mul_pkg::MUL_T
) (
  input  logic [N-2:0] m,
  input  logic [N-2:0] onehot,
  output logic [T-1:0] y_t
);

  always_comb begin
    y_t = '0;
    for (int i = 1; i < N - 1; i++) begin
      for (int j = 0; j < T; j++) begin
        if (i - 1 - j >= 0) begin
          y_t[T-1-j] = y_t[T-1-j] | (onehot[i] & m[i-1-j]);
        end
      end
    end
  end

endmodule
