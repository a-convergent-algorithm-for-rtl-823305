// tb_mdo_stage: for every input vector and both selector values, checks that
// the stage gives the neuron's stp(w^T x) when u = 0 and its complement
// when u = 1, with the parity neuron k = 2 (fires for two or more ones).
module tb_mdo_stage;
  import mdo_pkg::*;
  logic       clk = 0, a_clr, en, u, y, out_ready;
  logic [3:0] x;
  int checks = 0, failures = 0;

  mdo_stage #(.WEIGHTS(parity_weights(2))) dut (
    .clk(clk), .a_clr(a_clr), .en(en), .x(x), .u(u), .y(y), .out_ready(out_ready));

  always #5 clk = ~clk;

  initial begin
    logic z;
    a_clr = 1; en = 0; x = 0; u = 0;
    #12 a_clr = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) begin x = 4'(i); en = 1; end
      @(posedge clk); #1 en = 0;
      while (!out_ready) @(posedge clk);
      @(posedge clk); #1;
      z = ($countones(4'(i)) >= 2);
      u = 0; #1;
      checks++;
      if (y !== z) begin failures++; $display("FAIL x=%b u=0 y=%b", x, y); end
      u = 1; #1;
      checks++;
      if (y !== ~z) begin failures++; $display("FAIL x=%b u=1 y=%b", x, y); end
      u = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
