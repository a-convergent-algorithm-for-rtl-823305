// accumulator: signed running sum of the neuron's products.
//
// On each rising clock edge with clken high, the signed IN_W-bit `data` is
// sign-extended and added to the OUT_W-bit `result` register. aclr clears
// the sum asynchronously. 16-bit addends and a 32-bit sum follow the FPGA
// neuron; signed arithmetic follows its signed integer weights.
module accumulator #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic             clock,
  input  logic             aclr,
  input  logic             clken,
  input  logic [IN_W-1:0]  data,
  output logic [OUT_W-1:0] result
);

  logic signed [OUT_W-1:0] addend;

  always_comb addend = OUT_W'(signed'(data));

  always_ff @(posedge clock or posedge aclr) begin
    if (aclr)       result <= '0;
    else if (clken) result <= result + addend;
  end

endmodule
