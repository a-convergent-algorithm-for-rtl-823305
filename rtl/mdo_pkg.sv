// mdo_pkg: shared widths, types and constants of the multiplexed dual-output
// (MDO) perceptron cascade.
//
// The cascade evaluates y = z1 xor z2 xor ... xor zm, where each zj is a
// discrete perceptron stp(wj^T x) built as a serial multiply-accumulate
// neuron. Widths follow the FPGA neuron: 16-bit signed integer weights, a
// 32-bit accumulator, an 8-bit term counter, an 8:1 input multiplexer and a
// 5-bit ROM address. The controller state encoding and the default weight
// sets are this design's own: the default weights make the 4-neuron cascade
// compute 4-bit odd parity, neuron k firing when at least k inputs are 1.
package mdo_pkg;

  localparam int unsigned WEIGHT_W = 16;  // signed integer weight width
  localparam int unsigned ACC_W    = 32;  // accumulator width
  localparam int unsigned COUNT_W  = 8;   // term counter width
  localparam int unsigned N_IN     = 4;   // binary inputs x[3:0]
  localparam int unsigned SEL_W    = 3;   // mux select / used ROM address bits
  localparam int unsigned N_SLOTS  = 8;   // mux inputs = ROM words
  localparam int unsigned ROM_AW   = 5;   // ROM address width

  typedef logic signed [WEIGHT_W-1:0] weight_t;
  typedef logic signed [ACC_W-1:0]    acc_t;
  // One weight per mux slot: slots 0..3 weigh x[0..3], slot 4 is the
  // threshold weight (its input is tied to 1), slots 5..7 are unused.
  typedef weight_t [N_SLOTS-1:0] weight_vec_t;

  // One-hot controller states; the state vector is also the t_state output.
  typedef enum logic [7:0] {
    S_IDLE  = 8'b0000_0001,
    S_CLEAR = 8'b0000_0010,
    S_RUN   = 8'b0000_0100,
    S_DRAIN = 8'b0000_1000,
    S_DONE  = 8'b0001_0000
  } ctrl_state_e;

  // Weights of neuron k (k = 1..N_IN) of the parity cascade:
  // z_k = stp(x0 + x1 + x2 + x3 - k) = [popcount(x) >= k].
  function automatic weight_vec_t parity_weights(int k);
    weight_vec_t w;
    w = '0;
    for (int i = 0; i < int'(N_IN); i++) w[i] = weight_t'(1);
    w[N_IN] = weight_t'(-k);
    return w;
  endfunction

endpackage
