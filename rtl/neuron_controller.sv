// neuron_controller: sequencing of the serial multiply-accumulate neuron.
//
// A one-hot state machine (states in mdo_pkg::ctrl_state_e):
//   IDLE  - counter and accumulator held clear; waits for en.
//   CLEAR - one clock of counter_rst when a new evaluation starts.
//   RUN   - N_TERMS clocks of counter_en; the counter walks the input slots.
//   DRAIN - one clock that adds the last product (the weight ROM has one
//           clock of read latency, so accu_en is counter_en delayed by one).
//   DONE  - out_ready is high and the sum is held until a new evaluation.
// An evaluation starts on a rising clock edge when en is high and the state
// is IDLE, or the state is DONE and x differs from the x of the last
// evaluation. Once started it runs to DONE whatever en does. out_ready rises
// N_TERMS + 2 clocks after the starting edge. t_state shows the state and
// t_bit_count the number of products added so far.
// The ports are those of the FPGA neuron's control unit; the states, the
// start rule and the timing are this design's own.
module neuron_controller
  import mdo_pkg::*;
#(
  parameter int unsigned N_TERMS = N_SLOTS
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic [COUNT_W-1:0] counter_val,
  input  logic [N_IN-1:0]    x,
  output logic               counter_en,
  output logic               counter_rst,
  output logic               accu_en,
  output logic               out_ready,
  output logic [3:0]         t_bit_count,
  output logic [7:0]         t_state
);

  ctrl_state_e state, state_n;
  logic [N_IN-1:0] x_last;
  logic            start;

  always_comb begin
    start = en && ((state == S_IDLE) || (state == S_DONE && x != x_last));
    state_n = state;
    unique case (state)
      S_IDLE:  if (start) state_n = S_CLEAR;
      S_CLEAR: state_n = S_RUN;
      S_RUN:   if (counter_val == COUNT_W'(N_TERMS - 1)) state_n = S_DRAIN;
      S_DRAIN: state_n = S_DONE;
      S_DONE:  if (start) state_n = S_CLEAR;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state       <= S_IDLE;
      x_last      <= '0;
      accu_en     <= 1'b0;
      t_bit_count <= '0;
    end else begin
      state   <= state_n;
      accu_en <= counter_en;
      if (start) x_last <= x;
      if (counter_rst)  t_bit_count <= '0;
      else if (accu_en) t_bit_count <= t_bit_count + 1'b1;
    end
  end

  always_comb begin
    counter_rst = (state == S_IDLE) || (state == S_CLEAR);
    counter_en  = (state == S_RUN);
    out_ready   = (state == S_DONE);
    t_state     = state;
  end

  // The counter must never run past the last slot.
  a_run_bound: assert property (@(posedge clk) disable iff (rst)
    counter_en |-> counter_val < COUNT_W'(N_TERMS));
  // Products are only added after a CLEAR/IDLE and before DONE.
  a_no_acc_done: assert property (@(posedge clk) disable iff (rst)
    out_ready |-> !accu_en);

endmodule
