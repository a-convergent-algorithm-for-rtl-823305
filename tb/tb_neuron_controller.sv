// tb_neuron_controller: runs the controller against a reference counter in
// the testbench. For each evaluation it checks the latency to out_ready
// (N_TERMS + 2 clocks), that exactly N_TERMS accumulate enables occur, one
// per counter value 0..N_TERMS-1 delayed by one clock, that the counter is
// cleared before the run, and the start rules: en low blocks a start, an
// unchanged x in DONE does not restart, a new x does.
module tb_neuron_controller;
  localparam int N = 8;
  logic       clk = 0, rst, en;
  logic [7:0] counter_val;
  logic [3:0] x;
  logic       counter_en, counter_rst, accu_en, out_ready;
  logic [3:0] t_bit_count;
  logic [7:0] t_state;
  int checks = 0, failures = 0;
  int acc_mask, prev_count;
  logic prev_counter_en;

  neuron_controller #(.N_TERMS(N)) dut (
    .clk(clk), .rst(rst), .en(en), .counter_val(counter_val), .x(x),
    .counter_en(counter_en), .counter_rst(counter_rst), .accu_en(accu_en),
    .out_ready(out_ready), .t_bit_count(t_bit_count), .t_state(t_state));

  always #5 clk = ~clk;

  // reference counter, as gen_count
  always_ff @(posedge clk or posedge counter_rst)
    if (counter_rst)     counter_val <= '0;
    else if (counter_en) counter_val <= counter_val + 1'b1;

  // record which counter values got an accumulate enable one clock later
  always @(posedge clk) begin
    if (accu_en && prev_counter_en) acc_mask |= (1 << prev_count);
    else if (accu_en) acc_mask |= 32'h100;   // enable without a preceding count
    prev_counter_en <= counter_en;
    prev_count      <= int'(counter_val);
  end

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, want, $time);
    end
  endtask

  // Counts clocks from the starting edge until out_ready is high.
  task automatic run_eval(input logic [3:0] xv, input string what);
    int cycles;
    @(negedge clk);
    x = xv; en = 1;
    acc_mask = 0;
    @(posedge clk); #1;          // starting edge
    en = 0;
    expect_eq({what, " out_ready drops"}, int'(out_ready), 0);
    expect_eq({what, " cleared"}, int'(counter_rst), 1);
    cycles = 0;
    while (!out_ready && cycles < 100) begin
      @(posedge clk); #1;
      cycles++;
      checks++;
      if (!$onehot(t_state)) begin failures++; $display("FAIL state not one-hot %b", t_state); end
    end
    expect_eq({what, " latency"}, cycles, N + 2);
    expect_eq({what, " accumulated slots"}, acc_mask, (1 << N) - 1);
    expect_eq({what, " t_bit_count"}, int'(t_bit_count), N);
  endtask

  initial begin
    rst = 1; en = 0; x = 0; prev_counter_en = 0; prev_count = 0; acc_mask = 0;
    #12 rst = 0;
    expect_eq("idle clears", int'(counter_rst), 1);
    expect_eq("idle not ready", int'(out_ready), 0);
    repeat (5) @(posedge clk);
    #1 expect_eq("no start without en", int'(t_state), 1);
    run_eval(4'h3, "first");
    // same x with en high: must stay done
    @(negedge clk) en = 1;
    repeat (5) begin
      @(posedge clk); #1;
      expect_eq("hold same x", int'(out_ready), 1);
    end
    // new x with en low: must stay done
    @(negedge clk) begin en = 0; x = 4'ha; end
    repeat (5) begin
      @(posedge clk); #1;
      expect_eq("hold en low", int'(out_ready), 1);
    end
    for (int i = 0; i < 20; i++) run_eval(4'(i) ^ 4'h5, "restart");
    // reset in the middle of a run
    @(negedge clk) begin x = 4'h1; en = 1; end
    repeat (4) @(posedge clk);
    #1 rst = 1; #1;
    expect_eq("reset to idle", int'(t_state), 1);
    expect_eq("reset clears", int'(counter_rst), 1);
    #5 rst = 0; en = 0;
    run_eval(4'h1, "after reset");
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
