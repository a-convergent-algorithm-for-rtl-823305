// tb_mdo_cascade: end-to-end test of the 4-stage cascade with its default
// parameters (the 4-bit parity network). Every input vector is evaluated,
// in order and at random, and y is compared with the parity of x worked out
// here; each stage output u[j] is compared with the xor of the threshold
// functions [popcount(x) >= k], k > j. It checks the latency to out_ready
// (N_TERMS + 3 clocks) and counts the mechanisms of the design, failing if
// one never happens: a selector at 1 and at 0 on each multiplexed stage,
// each neuron firing and not firing, a weighted sum exactly at the
// threshold, a restart on a new x, a hold on an unchanged x, a start
// blocked by en low, and a reset in the middle of an evaluation.
module tb_mdo_cascade;
  localparam int N_STAGES = 4;
  localparam int N_TERMS  = 8;

  logic                clk = 0, a_clr, en, y, out_ready;
  logic [3:0]          x;
  logic [N_STAGES-1:0] u;
  int checks = 0, failures = 0;
  int sel1 [N_STAGES], sel0 [N_STAGES], fire [N_STAGES], quiet [N_STAGES];
  int at_threshold = 0, restarts = 0, holds = 0, en_blocked = 0, mid_resets = 0;
  logic [4:0] last_x = 5'h10;

  mdo_cascade dut (.clk(clk), .a_clr(a_clr), .en(en), .x(x), .y(y), .u(u),
                   .out_ready(out_ready));

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s (t=%0t)", msg, $time);
  endtask

  // Expected stage outputs: u[j] = xor of z_k for k > j, z_k = [ones >= k].
  function automatic logic [N_STAGES-1:0] expected_u(logic [3:0] xv);
    logic [N_STAGES-1:0] e;
    logic acc = 1'b0;
    int ones = $countones(xv);
    for (int j = N_STAGES - 1; j >= 0; j--) begin
      acc ^= (ones >= j + 1);
      e[j] = acc;
    end
    return e;
  endfunction

  task automatic eval(input logic [3:0] xv);
    int cycles = 0;
    logic [N_STAGES-1:0] e;
    logic same;
    same = ({1'b0, xv} == last_x);
    @(negedge clk) begin x = xv; en = 1; end
    @(posedge clk); #1;
    en = 0;
    while (!out_ready && cycles < 100) begin
      @(posedge clk); #1;
      cycles++;
    end
    checks++;
    if (cycles != (same ? 0 : N_TERMS + 3)) fail($sformatf("latency %0d x=%b", cycles, xv));
    if (same) holds++; else if (last_x != 5'h10) restarts++;
    last_x = {1'b0, xv};
    e = expected_u(xv);
    checks++;
    if (y !== ^xv) fail($sformatf("parity x=%b y=%b", xv, y));
    checks++;
    if (u !== e) fail($sformatf("stage outputs x=%b u=%b expected %b", xv, u, e));
    for (int j = 0; j < N_STAGES; j++) begin
      if (j < N_STAGES - 1) begin
        if (u[j+1]) sel1[j]++; else sel0[j]++;
      end
      if ($countones(xv) >= j + 1) fire[j]++; else quiet[j]++;
      if ($countones(xv) == j + 1) at_threshold++;
    end
  endtask

  initial begin
    for (int j = 0; j < N_STAGES; j++) begin sel1[j] = 0; sel0[j] = 0; fire[j] = 0; quiet[j] = 0; end
    a_clr = 1; en = 0; x = 0;
    #12 a_clr = 0;
    checks++;
    if (out_ready !== 1'b0 || y !== 1'b0) fail("reset state");
    // en low: nothing starts
    repeat (20) @(posedge clk);
    #1;
    checks++;
    if (out_ready) fail("started without en"); else en_blocked++;
    for (int i = 0; i < 16; i++) eval(4'(i));
    eval(4'hf);                                  // unchanged x: held
    // new x while done but en low: the old result stays
    @(negedge clk) x = 4'h0;
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (!out_ready || y !== 1'b0) fail("result not held with en low"); else en_blocked++;
    last_x = 5'h0f;
    for (int i = 0; i < 60; i++) eval(4'($urandom));
    // reset in the middle of an evaluation
    @(negedge clk) begin x = 4'h7; en = 1; end
    repeat (4) @(posedge clk);
    #2 a_clr = 1; #1;
    checks++;
    if (out_ready || y !== 1'b0) fail("mid-run reset"); else mid_resets++;
    #4 a_clr = 0; en = 0;
    last_x = 5'h10;
    eval(4'h7);
    eval(4'h8);
    // every mechanism must have happened
    for (int j = 0; j < N_STAGES; j++) begin
      checks++;
      if (fire[j] == 0 || quiet[j] == 0) fail($sformatf("neuron %0d never toggled", j));
      if (j < N_STAGES - 1) begin
        checks++;
        if (sel1[j] == 0 || sel0[j] == 0) fail($sformatf("stage %0d selector never both", j));
      end
    end
    checks++; if (at_threshold == 0) fail("no sum at threshold");
    checks++; if (restarts == 0) fail("no restart");
    checks++; if (holds == 0) fail("no hold");
    checks++; if (en_blocked < 2) fail("en gating not seen");
    checks++; if (mid_resets == 0) fail("no mid-run reset");
    $display("mechanisms: sel1=%0d/%0d/%0d threshold=%0d restarts=%0d holds=%0d en_blocked=%0d resets=%0d",
             sel1[0], sel1[1], sel1[2], at_threshold, restarts, holds, en_blocked, mid_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
