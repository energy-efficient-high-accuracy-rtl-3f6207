// ann_param_mem -- weight and bias storage of the network.
//
// A register file of PARAM_WORDS 16-bit words (the address map is in ann_pkg)
// whose every word is wired out in parallel, arranged as the weight matrices
// w1[4][4], w2[2][4], w3[4][2] and the bias vectors b1, b2, b3. A synchronous,
// active-high `rst` loads the built-in values of ann_pkg::param_default; a
// write (`we` high at a clock edge) replaces word `waddr` by `wdata`, visible
// from the next cycle. Writes to addresses beyond the map are ignored.
// That weights and biases are stored in memory or registers and can be
// adjusted follows the design's description; the write port, the address map
// and the built-in values are this design's own.
module ann_param_mem
  import ann_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                we,
  input  logic [PARAM_AW-1:0] waddr,
  input  q8_8_t               wdata,
  output q8_8_t               w1 [L1_OUT][L1_IN],
  output q8_8_t               w2 [L2_OUT][L1_OUT],
  output q8_8_t               w3 [L3_OUT][L2_OUT],
  output q8_8_t               b1 [L1_OUT],
  output q8_8_t               b2 [L2_OUT],
  output q8_8_t               b3 [L3_OUT]
);

  q8_8_t mem [PARAM_WORDS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int a = 0; a < PARAM_WORDS; a++) mem[a] <= param_default(a);
    end else if (we && (int'(waddr) < PARAM_WORDS)) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int i = 0; i < L1_OUT; i++)
      for (int j = 0; j < L1_IN; j++) w1[i][j] = mem[W1_BASE + i * L1_IN + j];
    for (int i = 0; i < L2_OUT; i++)
      for (int j = 0; j < L1_OUT; j++) w2[i][j] = mem[W2_BASE + i * L1_OUT + j];
    for (int i = 0; i < L3_OUT; i++)
      for (int j = 0; j < L2_OUT; j++) w3[i][j] = mem[W3_BASE + i * L2_OUT + j];
    for (int i = 0; i < L1_OUT; i++) b1[i] = mem[B1_BASE + i];
    for (int i = 0; i < L2_OUT; i++) b2[i] = mem[B2_BASE + i];
    for (int i = 0; i < L3_OUT; i++) b3[i] = mem[B3_BASE + i];
  end

endmodule
