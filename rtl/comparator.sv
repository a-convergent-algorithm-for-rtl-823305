// comparator: the neuron's hard limiter.
//
// AgeB = 1 when the signed WIDTH-bit sum `data` is greater than or equal to
// the constant B, else 0 (combinational). With the threshold folded into
// the weights, B = 0 and AgeB = stp(w^T x) with stp(0) = 1; the value of B
// is this design's reading.
module comparator #(
  parameter int unsigned WIDTH = 32,
  parameter longint      B     = 0
) (
  input  logic [WIDTH-1:0] data,
  output logic             AgeB
);

  localparam logic signed [WIDTH-1:0] B_VAL = WIDTH'(B);

  always_comb AgeB = (signed'(data) >= B_VAL);

endmodule
