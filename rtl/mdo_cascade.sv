// mdo_cascade: cascade network of multiplexed dual-output perceptrons.
//
// N_STAGES stages share the input x. Stage j's multiplexer is selected by
// the output of stage j+1 and the last stage's selector is 0, so
//   u[N_STAGES-1] = z_m,  u[j] = z_(j+1) xor u[j+1],  y = u[0],
// i.e. y is the xor of all neuron outputs. Off-line training chooses each
// neuron so that the stages behind it mark exactly the inputs it gets
// wrong; the hardware only evaluates the trained network.
// All neurons run in parallel, each with its own multiplier and
// accumulator. STAGE_WEIGHTS[j] holds the weights of stage j (slot 4 is the
// threshold weight). The default weights are this design's own 4-neuron
// solution of 4-bit parity: neuron k fires when at least k inputs are 1,
// so y = 1 for an odd number of ones.
//
// Interface: clk, a_clr (asynchronous, active high), en, x; outputs y, the
// stage outputs u (u[0] = y) and out_ready. Timing: an evaluation starts on
// the edge where en is high and the network is idle, or done with a new x;
// out_ready rises N_TERMS + 3 clocks later (the neurons' out_ready delayed
// one clock so that their output registers have loaded), and y is then
// valid until the next evaluation starts.
module mdo_cascade
  import mdo_pkg::*;
#(
  parameter int unsigned N_STAGES = 4,
  parameter int unsigned N_TERMS  = N_SLOTS,
  parameter weight_vec_t STAGE_WEIGHTS [N_STAGES] = '{
    parity_weights(1), parity_weights(2), parity_weights(3), parity_weights(4)
  }
) (
  input  logic                clk,
  input  logic                a_clr,
  input  logic                en,
  input  logic [N_IN-1:0]     x,
  output logic                y,
  output logic [N_STAGES-1:0] u,
  output logic                out_ready
);

  logic [N_STAGES-1:0] sel, ready;
  logic                all_ready_q;

  for (genvar j = 0; j < N_STAGES; j++) begin : g_stage
    if (j == N_STAGES - 1) begin : g_last
      assign sel[j] = 1'b0;   // u_m = 0
    end else begin : g_mid
      assign sel[j] = u[j+1];
    end
    mdo_stage #(.WEIGHTS(STAGE_WEIGHTS[j]), .N_TERMS(N_TERMS)) u_stage (
      .clk(clk), .a_clr(a_clr), .en(en), .x(x), .u(sel[j]), .y(u[j]),
      .out_ready(ready[j])
    );
  end

  always_ff @(posedge clk or posedge a_clr) begin
    if (a_clr) all_ready_q <= 1'b0;
    else       all_ready_q <= &ready;
  end

  always_comb begin
    y         = u[0];
    out_ready = all_ready_q & (&ready);
  end

endmodule
