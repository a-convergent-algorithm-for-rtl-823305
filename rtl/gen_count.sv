// gen_count: the neuron's term counter.
//
// An up counter that advances by one on each rising clock edge while count_en
// is high and returns to zero at once when a_clr is high (asynchronous
// clear). Its three low bits pick the input bit in the 8:1 multiplexer and
// address the weight ROM; the whole value goes to the controller. The width
// (8 bits) is the FPGA neuron's; counting up and wrapping at 2^WIDTH are this
// design's choice.
module gen_count #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             a_clr,
  input  logic             count_en,
  output logic [WIDTH-1:0] c2_out
);

  always_ff @(posedge clk or posedge a_clr) begin
    if (a_clr)         c2_out <= '0;
    else if (count_en) c2_out <= c2_out + 1'b1;
  end

endmodule
