// approx_mul_pkg -- shared sizes of the adaptive-truncation approximate multiplier.
//
// The multiplier writes each operand magnitude as 2^k * (1 + Y), with k the
// position of its leading one and Y the fraction below it. Y is truncated to
// T bits, (Y)t, and a shorter copy, (Y)APX, keeps the H top bits of (Y)t and
// appends a 1, i.e. rounds the fraction to the nearest odd value on H+1 bits.
// The product is then approximated by
//     2^(kA+kB) * (1 + (YA)t + (YB)t + (YA)APX * (YB)APX).
// The 16-bit operand width and the 32-bit product come from the design's
// description; the truncation lengths H = 3 and T = 7 are this design's own
// choice (H + 1 = 4 matches the 4-bit approximate operand of the description).
package approx_mul_pkg;

  localparam int unsigned MUL_N = 16;  // operand width, two's complement
  localparam int unsigned MUL_H = 3;   // bits kept before the odd-rounding 1
  localparam int unsigned MUL_T = 7;   // bits of the truncated fraction

  // Fraction bits of the arithmetic unit result: max(t, 2h+2).
  function automatic int unsigned frac_bits(int unsigned t, int unsigned h);
    return (t > 2 * h + 2) ? t : 2 * h + 2;
  endfunction

  // Bits of the binary leading-one position: ceil(log2 n).
  function automatic int unsigned pos_bits(int unsigned n);
    return $clog2(n);
  endfunction

endpackage
