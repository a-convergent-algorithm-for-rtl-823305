// tb_comparator: the hard limiter must give 1 exactly for signed sums >= 0.
// Edge values (0, -1, the extremes) and random sums are checked.
module tb_comparator;
  logic [31:0] data;
  logic        AgeB;
  int checks = 0, failures = 0;

  comparator #(.WIDTH(32), .B(0)) dut (.data(data), .AgeB(AgeB));

  task automatic check(input logic [31:0] v);
    logic expected;
    data = v;
    #1;
    expected = (longint'(signed'(v)) >= 0);
    checks++;
    if (AgeB !== expected) begin
      failures++;
      $display("FAIL data=%0d AgeB=%b", signed'(v), AgeB);
    end
  endtask

  initial begin
    check(32'd0); check(32'hffff_ffff); check(32'd1);
    check(32'h8000_0000); check(32'h7fff_ffff);
    for (int i = 0; i < 2000; i++) check($urandom);
    for (int i = -20; i < 20; i++) check(32'(i));
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
