// tb_random_boolean: random 4-bit Boolean functions on the default 4-stage
// cascade. Ten truth tables, drawn at random with each output 0 or 1 with
// equal probability, were turned into cascade weights off line by the
// stage-by-stage construction: each stage takes the semicorrect separation
// (no false 1s or no false 0s) with the fewest errors, here searched
// exhaustively over integer weights in [-3, 3] and thresholds in [-10, 10],
// and the next stage learns u_j = u_(j-1) xor z_j. Networks shorter than
// four stages are padded with a stage that never fires (all weights 0,
// threshold weight -1), which leaves the xor unchanged. Each network is
// evaluated on all 16 inputs and compared with its truth table; the mean
// network size is printed.
module tb_random_boolean;
  import mdo_pkg::*;
  localparam int NF = 10;
  localparam weight_vec_t NULL_STAGE = '{16'sd0, 16'sd0, 16'sd0, -16'sd1,
                                          16'sd0, 16'sd0, 16'sd0, 16'sd0};
  localparam logic [15:0] TRUTH [NF] = '{16'h1845, 16'h4c21, 16'h3f84, 16'h6a7c, 16'hf33e, 16'h724d, 16'h03ee, 16'he734, 16'h121b, 16'hcf44};
  localparam int USED [NF] = '{3, 3, 3, 3, 2, 3, 2, 3, 2, 2};
  // Weights of stage st of network f.
  function automatic weight_vec_t net_weights(int f, int st);
    weight_vec_t w;
    w = NULL_STAGE;
    unique case (f)
      0: begin
        if (st == 0) w = '{16'sd0, 16'sd0, 16'sd0, 16'sd1, -16'sd3, -16'sd2, 16'sd1, -16'sd3};
        if (st == 1) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd2, 16'sd1, 16'sd1, -16'sd3, -16'sd3};
        if (st == 2) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd3, 16'sd1, -16'sd3, 16'sd1, 16'sd1};
      end
      1: begin
        if (st == 0) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd4, 16'sd3, -16'sd2, 16'sd3, -16'sd2};
        if (st == 1) w = '{16'sd0, 16'sd0, 16'sd0, 16'sd0, -16'sd3, -16'sd3, -16'sd3, -16'sd3};
        if (st == 2) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd2, -16'sd3, 16'sd1, -16'sd3, 16'sd1};
      end
      2: begin
        if (st == 0) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd1, 16'sd3, -16'sd2, -16'sd2, 16'sd0};
        if (st == 1) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd1, -16'sd3, -16'sd3, 16'sd1, -16'sd3};
        if (st == 2) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd3, -16'sd3, 16'sd1, 16'sd1, 16'sd1};
      end
      3: begin
        if (st == 0) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd1, -16'sd1, 16'sd1, 16'sd1, 16'sd2};
        if (st == 1) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd3, 16'sd0, 16'sd1, 16'sd1, 16'sd1};
        if (st == 2) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd1, -16'sd3, -16'sd3, -16'sd3, 16'sd1};
      end
      4: begin
        if (st == 0) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd1, 16'sd2, 16'sd2, -16'sd3, 16'sd1};
        if (st == 1) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd1, -16'sd3, -16'sd3, 16'sd3, -16'sd2};
      end
      5: begin
        if (st == 0) w = '{16'sd0, 16'sd0, 16'sd0, 16'sd1, -16'sd3, -16'sd2, 16'sd1, -16'sd2};
        if (st == 1) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd4, 16'sd3, 16'sd3, -16'sd2, -16'sd2};
        if (st == 2) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd2, 16'sd1, -16'sd3, -16'sd3, 16'sd1};
      end
      6: begin
        if (st == 0) w = '{16'sd0, 16'sd0, 16'sd0, 16'sd4, -16'sd3, -16'sd2, -16'sd2, 16'sd0};
        if (st == 1) w = '{16'sd0, 16'sd0, 16'sd0, 16'sd2, -16'sd3, -16'sd2, -16'sd3, -16'sd3};
      end
      7: begin
        if (st == 0) w = '{16'sd0, 16'sd0, 16'sd0, 16'sd2, 16'sd2, 16'sd1, -16'sd2, -16'sd3};
        if (st == 1) w = '{16'sd0, 16'sd0, 16'sd0, 16'sd1, -16'sd2, 16'sd1, -16'sd2, -16'sd3};
        if (st == 2) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd1, -16'sd3, 16'sd1, -16'sd3, -16'sd3};
      end
      8: begin
        if (st == 0) w = '{16'sd0, 16'sd0, 16'sd0, 16'sd1, -16'sd2, -16'sd3, -16'sd2, 16'sd1};
        if (st == 1) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd1, 16'sd0, 16'sd1, -16'sd3, -16'sd3};
      end
      9: begin
        if (st == 0) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd1, 16'sd3, -16'sd1, 16'sd2, -16'sd2};
        if (st == 1) w = '{16'sd0, 16'sd0, 16'sd0, -16'sd2, 16'sd1, 16'sd1, -16'sd3, -16'sd3};
      end
      default: ;
    endcase
    return w;
  endfunction

  logic       clk = 0, a_clr, en;
  logic [3:0] x;
  logic [NF-1:0] y, rdy;
  int checks = 0, failures = 0;

  for (genvar f = 0; f < NF; f++) begin : g_net
    localparam weight_vec_t WF [4] = '{net_weights(f, 0), net_weights(f, 1),
                                       net_weights(f, 2), net_weights(f, 3)};
    mdo_cascade #(.N_STAGES(4), .STAGE_WEIGHTS(WF)) dut (
      .clk(clk), .a_clr(a_clr), .en(en), .x(x), .y(y[f]), .u(), .out_ready(rdy[f]));
  end

  always #5 clk = ~clk;

  initial begin
    int total = 0;
    a_clr = 1; en = 0; x = 0;
    #12 a_clr = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) begin x = 4'(i); en = 1; end
      @(posedge clk); #1 en = 0;
      while (rdy !== '1) @(posedge clk);
      #1;
      for (int f = 0; f < NF; f++) begin
        checks++;
        if (y[f] !== TRUTH[f][i]) begin
          failures++;
          $display("FAIL function %0d (%h) x=%b y=%b", f, TRUTH[f], x, y[f]);
        end
      end
    end
    for (int f = 0; f < NF; f++) total += USED[f];
    $display("random 4-bit Boolean functions: %0d networks, mean size %0d.%0d neurons",
             NF, total / NF, (total * 10 / NF) % 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
