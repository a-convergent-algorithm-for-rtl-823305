// mdo_stage: one multiplexed dual-output discrete perceptron.
//
// The neuron's output z and its complement are the two outputs of the
// perceptron; a 2:1 multiplexer picks z when the selector u is 0 and not z
// when u is 1, so y = z xor u. In the cascade u is the output of the next
// stage, which has learned exactly where this neuron is wrong. The
// complement stands for stp(-w^T x); the two differ only when w^T x = 0,
// where this stage gives 0. y is combinational in u and follows the timing
// of the neuron (valid from one clock after out_ready rises).
module mdo_stage
  import mdo_pkg::*;
#(
  parameter weight_vec_t WEIGHTS = parity_weights(1),
  parameter int unsigned N_TERMS = N_SLOTS
) (
  input  logic            clk,
  input  logic            a_clr,
  input  logic            en,
  input  logic [N_IN-1:0] x,
  input  logic            u,
  output logic            y,
  output logic            out_ready
);

  logic z;

  neuron #(.WEIGHTS(WEIGHTS), .N_TERMS(N_TERMS)) u_neuron (
    .master_clk(clk), .master_rst(a_clr), .en(en), .x(x), .y(z),
    .out_ready(out_ready)
  );

  always_comb y = u ? ~z : z;

endmodule
