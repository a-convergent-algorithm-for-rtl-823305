// tb_accumulator: random signed 16-bit addends with random clock enables and
// occasional asynchronous clears; the 32-bit sum is compared every clock
// with a reference sum, and a long run of extreme addends checks sign
// extension.
module tb_accumulator;
  logic        clock = 0, aclr, clken;
  logic [15:0] data;
  logic [31:0] result;
  int          model;
  int checks = 0, failures = 0;

  accumulator #(.IN_W(16), .OUT_W(32)) dut (
    .clock(clock), .aclr(aclr), .clken(clken), .data(data), .result(result));

  always #5 clock = ~clock;

  task automatic compare(input string what);
    checks++;
    if (int'(signed'(result)) != model) begin
      failures++;
      $display("FAIL %s: result=%0d expected=%0d", what, signed'(result), model);
    end
  endtask

  initial begin
    aclr = 1; clken = 0; data = 0; model = 0;
    #12;
    compare("reset");
    aclr = 0;
    for (int i = 0; i < 200; i++) begin
      clken = 1; data = 16'h8000;
      @(posedge clock); #1;
      model += -32768;
      compare("min run");
    end
    #2 aclr = 1; #1 model = 0; compare("clear"); aclr = 0;
    for (int i = 0; i < 3000; i++) begin
      clken = 1'($urandom); data = 16'($urandom);
      @(posedge clock); #1;
      if (clken) model += int'(signed'(data));
      compare("random");
      if ($urandom % 100 == 0) begin
        #2 aclr = 1; #1 model = 0; compare("clear"); aclr = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
