// tb_weight_rom: loads a set of test weights through the CONTENTS parameter
// and reads every address of the 5-bit space in random order, checking the
// word one clock after the address is presented and zero beyond the depth.
module tb_weight_rom;
  import mdo_pkg::*;
  localparam weight_vec_t W = '{16'sh7fff, -16'sd32768, 16'sd1234, -16'sd1,
                                16'sd0, 16'sd77, -16'sd300, 16'sd5};
  logic        clock = 0;
  logic [4:0]  address;
  logic [15:0] q;
  int checks = 0, failures = 0;

  weight_rom #(.ADDR_W(5), .DATA_W(16), .DEPTH(8), .CONTENTS(W)) dut (
    .clock(clock), .address(address), .q(q));

  always #5 clock = ~clock;

  initial begin
    logic [4:0] a;
    logic [15:0] expected;
    address = 0;
    for (int i = 0; i < 500; i++) begin
      a = (i < 32) ? 5'(i) : 5'($urandom);
      @(negedge clock) address = a;
      expected = (a < 8) ? W[a] : 16'd0;
      @(posedge clock); #1;
      address = ~a;   // the next address must not show before the next edge
      #1;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("FAIL addr=%0d q=%h expected=%h", a, q, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
