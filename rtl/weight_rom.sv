// weight_rom: the neuron's weight memory.
//
// Holds DEPTH signed integer weights of DATA_W bits, given by the CONTENTS
// parameter (the output of off-line training). The read is synchronous: the
// word at `address` appears on q after the next rising clock edge. Addresses
// at or above DEPTH read as zero. The 16-bit width, 5-bit address and 8-word
// depth (128 bits) follow the FPGA neuron; the registered read and the
// parameter form of the contents are this design's choices.
module weight_rom
  import mdo_pkg::*;
#(
  parameter int unsigned ADDR_W   = ROM_AW,
  parameter int unsigned DATA_W   = WEIGHT_W,
  parameter int unsigned DEPTH    = N_SLOTS,
  parameter weight_vec_t CONTENTS = parity_weights(1)
) (
  input  logic              clock,
  input  logic [ADDR_W-1:0] address,
  output logic [DATA_W-1:0] q
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_comb begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = DATA_W'(CONTENTS[i]);
  end

  always_ff @(posedge clock) begin
    if (32'(address) < DEPTH) q <= mem[address[$clog2(DEPTH)-1:0]];
    else                      q <= '0;
  end

endmodule
