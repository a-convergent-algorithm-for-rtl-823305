// tb_high_detect: drives a random waveform and checks that y is high exactly
// in the clocks where x is 1 and was 0 at the previous edge, including
// after reset.
module tb_high_detect;
  logic clk = 0, rst, x, y, x_prev;
  int checks = 0, failures = 0, pulses = 0;

  high_detect dut (.clk(clk), .rst(rst), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    rst = 1; x = 1; x_prev = 0;
    #12;
    checks++;
    if (y !== 1'b1) begin failures++; $display("FAIL high x after reset gives no pulse"); end
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      x_prev = x;
      #1;
      x = ($urandom % 3 == 0) ? ~x : x;
      #1;
      checks++;
      if (y !== (x & ~x_prev)) begin
        failures++;
        $display("FAIL i=%0d x=%b prev=%b y=%b", i, x, x_prev, y);
      end
      if (y) pulses++;
    end
    checks++;
    if (pulses < 100) begin failures++; $display("FAIL too few pulses %0d", pulses); end
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
