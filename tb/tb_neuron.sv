// tb_neuron: evaluates the serial neuron on all 16 input vectors for several
// weight sets (the parity neuron and a set with large signed weights that
// exercise sign extension and sums near zero) and compares y with
// stp(w^T x) computed in the testbench. Also checks the latency: out_ready
// N_TERMS + 2 clocks after the start, y loaded one clock later.
module tb_neuron;
  import mdo_pkg::*;
  localparam weight_vec_t WA = parity_weights(2);
  localparam weight_vec_t WB = '{16'sd0, 16'sd0, 16'sd0, -16'sd3,
                                 -16'sd32768, 16'sd32767, 16'sd3, -16'sd1};
  localparam weight_vec_t WC = '{16'sd0, 16'sd0, 16'sd0, 16'sd4,
                                 16'sd3, -16'sd2, -16'sd2, 16'sd1};
  localparam int N = 8;

  logic       clk = 0, rst, en;
  logic [3:0] x;
  logic [2:0] y, rdy;
  int checks = 0, failures = 0, ones = 0, zeros = 0;
  logic [4:0] last_x = 5'h10;  // no evaluation yet

  neuron #(.WEIGHTS(WA)) da (.master_clk(clk), .master_rst(rst), .en(en), .x(x), .y(y[0]), .out_ready(rdy[0]));
  neuron #(.WEIGHTS(WB)) db (.master_clk(clk), .master_rst(rst), .en(en), .x(x), .y(y[1]), .out_ready(rdy[1]));
  neuron #(.WEIGHTS(WC)) dc (.master_clk(clk), .master_rst(rst), .en(en), .x(x), .y(y[2]), .out_ready(rdy[2]));

  always #5 clk = ~clk;

  function automatic logic stp(weight_vec_t w, logic [3:0] xv);
    longint s = 0;
    for (int i = 0; i < 4; i++) if (xv[i]) s += longint'(w[i]);
    s += longint'(w[4]);
    return s >= 0;
  endfunction

  task automatic eval(input logic [3:0] xv);
    int cycles = 0;
    logic [2:0] want;
    want = {stp(WC, xv), stp(WB, xv), stp(WA, xv)};
    @(negedge clk) begin x = xv; en = 1; end
    @(posedge clk); #1;
    en = 0;
    while (rdy !== 3'b111 && cycles < 100) begin
      @(posedge clk); #1;
      cycles++;
    end
    checks++;
    // an unchanged x does not start a new evaluation: the result is held
    if (cycles != (({1'b0, xv} == last_x) ? 0 : N + 2)) begin
      failures++;
      $display("FAIL latency %0d x=%b", cycles, xv);
    end
    last_x = {1'b0, xv};
    @(posedge clk); #1;
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (y[k] !== want[k]) begin
        failures++;
        $display("FAIL neuron %0d x=%b y=%b expected=%b", k, xv, y[k], want[k]);
      end
      if (want[k]) ones++; else zeros++;
    end
  endtask

  initial begin
    rst = 1; en = 0; x = 0;
    #12 rst = 0;
    checks++;
    if (y !== 3'b000) begin failures++; $display("FAIL y not cleared by reset"); end
    for (int i = 0; i < 16; i++) eval(4'(i));
    for (int i = 0; i < 40; i++) eval(4'($urandom));
    checks++;
    if (ones == 0 || zeros == 0) begin failures++; $display("FAIL outputs never vary"); end
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
