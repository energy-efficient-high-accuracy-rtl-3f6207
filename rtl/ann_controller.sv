// ann_controller -- data-flow control of the network.
//
// A four-state machine. In IDLE it raises `ready`; a cycle with `valid` high
// accepts a character (`load` pulses so the top captures it) and starts the
// pass. The next three cycles enable layer 1, layer 2 and layer 3 in turn
// (en1, en2, en3), so data moves through the layers one per clock. In the
// cycle after layer 3 has been written, `done` is high for one cycle, the
// 5-bit `counter` of classified characters has advanced (it wraps), and the
// machine is back in IDLE. A character offered while a pass is running is
// held off by `ready` low (a stall). The synchronous, active-high `rst` returns
// to IDLE and clears `counter` and `done`.
// Timing: accept at edge 0, results in the layer-3 register after edge 3,
// done high during the cycle after edge 3; a new character every 4 cycles.
// The layer order and the reset follow the design's description; the
// handshake, the state machine and the counter's meaning are this design's.
module ann_controller (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid,
  output logic       ready,
  output logic       load,
  output logic       en1,
  output logic       en2,
  output logic       en3,
  output logic       done,
  output logic [4:0] counter
);

  typedef enum logic [1:0] {S_IDLE, S_L1, S_L2, S_L3} state_t;
  state_t state;

  always_comb begin
    ready = (state == S_IDLE);
    load  = ready && valid;
    en1   = (state == S_L1);
    en2   = (state == S_L2);
    en3   = (state == S_L3);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      done    <= 1'b0;
      counter <= '0;
    end else begin
      done <= (state == S_L3);
      unique case (state)
        S_IDLE: if (valid) state <= S_L1;
        S_L1:   state <= S_L2;
        S_L2:   state <= S_L3;
        S_L3: begin
          state   <= S_IDLE;
          counter <= counter + 5'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Exactly one of idle / layer 1 / layer 2 / layer 3 at any time.
  a_one_phase: assert property (@(posedge clk) disable iff (rst)
    (32'(ready) + 32'(en1) + 32'(en2) + 32'(en3)) == 1);
  // The layers follow each other, and done follows layer 3.
  a_l1_l2:   assert property (@(posedge clk) disable iff (rst) en1 |=> en2);
  a_l2_l3:   assert property (@(posedge clk) disable iff (rst) en2 |=> en3);
  a_l3_done: assert property (@(posedge clk) disable iff (rst) en3 |=> done && ready);
  // A character is only taken while idle.
  a_load:    assert property (@(posedge clk) disable iff (rst) load |-> ready && valid);

endmodule
