// tb_gen_count: random count enables and asynchronous clears; the counter is
// compared every clock with a reference count kept in the testbench,
// including the wrap from 255 to 0.
module tb_gen_count;
  logic       clk = 0, a_clr, count_en;
  logic [7:0] c2_out;
  int         model;
  int checks = 0, failures = 0;

  gen_count #(.WIDTH(8)) dut (.clk(clk), .a_clr(a_clr), .count_en(count_en), .c2_out(c2_out));

  always #5 clk = ~clk;

  task automatic compare(input string what);
    checks++;
    if (int'(c2_out) != model) begin
      failures++;
      $display("FAIL %s: c2_out=%0d expected=%0d", what, c2_out, model);
    end
  endtask

  initial begin
    a_clr = 1; count_en = 0; model = 0;
    #12;
    compare("reset");
    a_clr = 0;
    // long enabled run to pass the wrap point
    count_en = 1;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #1;
      model = (model + 1) % 256;
      compare("run");
    end
    for (int i = 0; i < 2000; i++) begin
      count_en = 1'($urandom);
      if ($urandom % 50 == 0) begin
        // asynchronous clear between edges
        #2 a_clr = 1; #1;
        model = 0;
        compare("async clear");
        a_clr = 0;
        @(posedge clk); #1;
        if (count_en) model = (model + 1) % 256;
        compare("after clear");
      end else begin
        @(posedge clk); #1;
        if (count_en) model = (model + 1) % 256;
        compare("random");
      end
    end
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
