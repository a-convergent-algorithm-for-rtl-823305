// tb_mux8_1: exhaustive check of the 8:1 multiplexer, every data byte with
// every select value, against data >> s.
module tb_mux8_1;
  logic [7:0] data;
  logic [2:0] s;
  logic       muxout;
  int checks = 0, failures = 0;

  mux8_1 dut (.data(data), .s(s), .muxout(muxout));

  initial begin
    for (int d = 0; d < 256; d++) begin
      for (int k = 0; k < 8; k++) begin
        data = 8'(d); s = 3'(k);
        #1;
        checks++;
        if (muxout !== ((d >> k) & 1)) begin
          failures++;
          $display("FAIL data=%h s=%0d muxout=%b", data, s, muxout);
        end
      end
    end
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
