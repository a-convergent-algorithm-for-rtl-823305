// mult16_1: multiplies a signed WIDTH-bit weight by a one-bit input.
//
// The network inputs are binary, so the product is the weight itself when
// mult_in is 1 and zero otherwise: a row of AND gates, combinational. The
// product port is called output_val because `output` is a keyword.
module mult16_1 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             mult_in,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] output_val
);

  always_comb output_val = data_in & {WIDTH{mult_in}};

endmodule
