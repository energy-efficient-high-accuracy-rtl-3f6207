// ann_pkg -- sizes, number format and built-in parameters of the character
// classification network.
//
// The network has 4 input-layer neurons (4x4 weights w1), 2 hidden neurons
// (2x4 weights w2) and 4 output neurons (4x2 weights w3); these sizes follow
// the design's description. All activations, weights and biases are signed
// Q8.8 fixed point (16 bits, 8 fraction bits), the operand width of the
// 16-bit approximate multiplier. The format and the built-in weight and bias
// values are this design's own: they are a placeholder set that the parameter
// memory loads at reset and that can be rewritten at run time.
//
// Parameter memory address map (one 16-bit word each):
//   0..15  w1[i][j] at i*4+j     (neuron i of layer 1, input j)
//   16..23 w2[i][j] at 16+i*4+j
//   24..31 w3[i][j] at 24+i*2+j
//   32..35 b1[i], 36..37 b2[i], 38..41 b3[i]
package ann_pkg;

  localparam int unsigned QW = 16;  // data word width
  localparam int unsigned QF = 8;   // fraction bits

  typedef logic signed [QW-1:0] q8_8_t;

  // Neuron activation: ReLU (the default) or a piecewise-linear sigmoid.
  typedef enum logic {ACT_RELU, ACT_SIGMOID} act_t;

  localparam int unsigned L1_IN  = 4;
  localparam int unsigned L1_OUT = 4;
  localparam int unsigned L2_OUT = 2;
  localparam int unsigned L3_OUT = 4;

  localparam int unsigned W1_BASE = 0;
  localparam int unsigned W2_BASE = W1_BASE + L1_OUT * L1_IN;
  localparam int unsigned W3_BASE = W2_BASE + L2_OUT * L1_OUT;
  localparam int unsigned B1_BASE = W3_BASE + L3_OUT * L2_OUT;
  localparam int unsigned B2_BASE = B1_BASE + L1_OUT;
  localparam int unsigned B3_BASE = B2_BASE + L2_OUT;
  localparam int unsigned PARAM_WORDS = B3_BASE + L3_OUT;   // 42
  localparam int unsigned PARAM_AW = $clog2(PARAM_WORDS);   // 6

  // Built-in values, in units of 1/4 (Q8.8 value = quarters * 64).
  function automatic q8_8_t param_default(int unsigned addr);
    int quarters;
    case (addr)
      // w1: four input-layer neurons
      0:  quarters =  4;  1:  quarters =  2;  2:  quarters = -1;  3:  quarters =  3;
      4:  quarters = -2;  5:  quarters =  4;  6:  quarters =  2;  7:  quarters = -1;
      8:  quarters =  1;  9:  quarters = -3;  10: quarters =  4;  11: quarters =  2;
      12: quarters =  2;  13: quarters =  1;  14: quarters = -2;  15: quarters =  4;
      // w2: two hidden neurons
      16: quarters =  2;  17: quarters = -1;  18: quarters =  3;  19: quarters =  1;
      20: quarters = -2;  21: quarters =  3;  22: quarters =  1;  23: quarters =  2;
      // w3: four output neurons
      24: quarters =  4;  25: quarters = -3;
      26: quarters = -3;  27: quarters =  4;
      28: quarters =  2;  29: quarters =  1;
      30: quarters =  1;  31: quarters =  2;
      // biases
      32: quarters =  1;  33: quarters = -1;  34: quarters =  0;  35: quarters =  2;
      36: quarters =  0;  37: quarters =  1;
      38: quarters =  0;  39: quarters =  0;  40: quarters =  2;  41: quarters =  1;
      default: quarters = 0;
    endcase
    return q8_8_t'(quarters * 64);
  endfunction

endpackage
