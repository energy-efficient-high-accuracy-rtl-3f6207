// leading_one_detector -- finds the most significant 1 of an N-1 bit magnitude.
//
// Outputs the position both as a one-hot vector `onehot` (N-1 bits, used by the
// truncation unit to select the fraction) and as a binary index `k`
// (ceil(log2 N) bits, used by the shift unit). For an all-zero input both are
// 0; the product is then forced to zero by the zero flag, so the value is
// never used. Combinational: a priority scan from the MSB down.
// The two outputs and their widths follow the design's block diagram; the scan
// is this design's own.
module leading_one_detector #(
  parameter int unsigned N = approx_mul_pkg::MUL_N
) (
  input  logic [N-2:0]         m,
  output logic [N-2:0]         onehot,
  output logic [$clog2(N)-1:0] k
);

  always_comb begin
    onehot = '0;
    k      = '0;
    for (int i = 0; i < N - 1; i++) begin
      if (m[i]) begin
        onehot = '0;
        onehot[i] = 1'b1;
        k = i[$clog2(N)-1:0];
      end
    end
  end

endmodule
