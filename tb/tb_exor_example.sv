// tb_exor_example: the two-neuron EXOR network. Stage 1 fires on the
// half-plane x0 + x1 >= 1, which holds 01, 10 and 11 and so is wrong only
// for 11; stage 2 (x0 + x1 >= 2) learns that selector and fires for 11
// alone. The cascade runs with two stages and x[3:2] = 0. The testbench
// checks y = x0 xor x1 and that the selector u[1] is 1 for input 11 only.
module tb_exor_example;
  import mdo_pkg::*;
  localparam weight_vec_t W1 = '{16'sd0, 16'sd0, 16'sd0, -16'sd1,
                                 16'sd0, 16'sd0, 16'sd1, 16'sd1};
  localparam weight_vec_t W2 = '{16'sd0, 16'sd0, 16'sd0, -16'sd2,
                                 16'sd0, 16'sd0, 16'sd1, 16'sd1};
  localparam weight_vec_t W [2] = '{W1, W2};

  logic       clk = 0, a_clr, en, y, out_ready;
  logic [3:0] x;
  logic [1:0] u;
  int checks = 0, failures = 0;

  mdo_cascade #(.N_STAGES(2), .STAGE_WEIGHTS(W)) dut (
    .clk(clk), .a_clr(a_clr), .en(en), .x(x), .y(y), .u(u), .out_ready(out_ready));

  always #5 clk = ~clk;

  initial begin
    a_clr = 1; en = 0; x = 0;
    #12 a_clr = 0;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk) begin x = 4'(i); en = 1; end
      @(posedge clk); #1 en = 0;
      while (!out_ready) @(posedge clk);
      #1;
      checks++;
      if (y !== (x[0] ^ x[1])) begin failures++; $display("FAIL x=%b y=%b", x[1:0], y); end
      checks++;
      if (u[1] !== (x[1:0] == 2'b11)) begin failures++; $display("FAIL x=%b selector=%b", x[1:0], u[1]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
