// char_encoder -- turns a 9-bit character code into the network's 4 inputs.
//
// A lower-case letter (ASCII 'a' .. 'z') is first mapped to its index
// c = code - 'a' (0..25, 5 bits). The index is spread over the four inputs
// as small integers in Q8.8: x[0] = c[1:0], x[1] = c[3:2], x[2] = c[4], and
// x[3] = 1 marks that a letter is present. Any other code gives all-zero
// inputs. Combinational.
// The 9-bit character input, the letters a-z and the 4 input neurons follow
// the design's description; the mapping of a letter onto the 4 inputs is not
// specified there and is this design's choice.
module char_encoder
  import ann_pkg::*;
(
  input  logic [8:0] data_in,
  output q8_8_t      x [L1_IN]
);

  localparam logic [8:0] CODE_A = 9'h061;
  localparam logic [8:0] CODE_Z = 9'h07A;

  logic       is_letter;
  logic [4:0] idx;   // 0..25 for a letter

  always_comb begin
    is_letter = (data_in >= CODE_A) && (data_in <= CODE_Z);
    idx       = 5'(data_in - CODE_A);
    for (int j = 0; j < L1_IN; j++) x[j] = '0;
    if (is_letter) begin
      x[0] = q8_8_t'({idx[1:0], QF'(0)});
      x[1] = q8_8_t'({idx[3:2], QF'(0)});
      x[2] = q8_8_t'({idx[4],   QF'(0)});
      x[3] = q8_8_t'({1'b1,     QF'(0)});
    end
  end

endmodule
