// tb_mult16_1: the 1-bit by 16-bit product is checked against an integer
// multiplication for random weights, both bit values and the extremes.
module tb_mult16_1;
  logic        mult_in;
  logic [15:0] data_in, output_val;
  int checks = 0, failures = 0;

  mult16_1 #(.WIDTH(16)) dut (.mult_in(mult_in), .data_in(data_in), .output_val(output_val));

  task automatic check(input logic b, input logic [15:0] w);
    int expected;
    mult_in = b; data_in = w;
    #1;
    expected = int'(b) * int'(signed'(w));
    checks++;
    if (int'(signed'(output_val)) != expected) begin
      failures++;
      $display("FAIL b=%b w=%0d out=%0d expected=%0d", b, signed'(w), signed'(output_val), expected);
    end
  endtask

  initial begin
    check(1'b1, 16'h8000); check(1'b1, 16'h7fff); check(1'b1, 16'hffff);
    check(1'b0, 16'h8000); check(1'b0, 16'hffff);
    for (int i = 0; i < 2000; i++) check(1'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
