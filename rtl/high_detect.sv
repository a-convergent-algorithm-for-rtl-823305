// high_detect: rising-edge detector.
//
// y is high for the one clock in which x is 1 after having been 0 at the
// previous rising clock edge. In the neuron it watches out_ready and
// enables the output register once per result. The previous value of x is
// held in one flip-flop, cleared by rst (asynchronous), so an x that is
// already high when reset ends still gives one pulse. Function and timing
// are this design's reading of the block's name.
module high_detect (
  input  logic clk,
  input  logic rst,
  input  logic x,
  output logic y
);

  logic x_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) x_q <= 1'b0;
    else     x_q <= x;
  end

  always_comb y = x & ~x_q;

endmodule
