// mux8_1: 8-to-1 one-bit multiplexer of the serial neuron.
//
// Purely combinational: muxout = data[s]. In the neuron, data[3:0] carries
// the binary inputs x[3:0], data[4] the constant 1 that multiplies the
// threshold weight and data[7:5] zeros, so one input bit per clock is fed
// to the multiplier.
module mux8_1 (
  input  logic [7:0] data,
  input  logic [2:0] s,
  output logic       muxout
);

  always_comb muxout = data[s];

endmodule
