// neuron: serial discrete perceptron z = stp(w^T x) with one multiplier and
// one accumulator.
//
// Datapath: the counter (gen_count) steps the 8:1 multiplexer over the slots
// {0,0,0,1,x[3:0]} - the four binary inputs and a constant 1 that carries
// the threshold weight - and addresses the weight ROM with the same three
// bits. Each selected bit gates its 16-bit signed weight (mult16_1) and the
// product is added into a 32-bit accumulator. When the controller raises
// out_ready, the comparator (sum >= 0) is the perceptron output, and a
// rising-edge detector on out_ready loads it into the output register y.
// Because the ROM read is registered, the multiplexer bit is registered
// once too, so that bit and weight of the same slot meet at the multiplier.
//
// Interface: master_clk, master_rst (asynchronous, active high), en, x;
// outputs y and out_ready. Timing: an evaluation starts on the clock edge
// where en is high and the neuron is idle, or done with an x different from
// the last one; out_ready rises N_TERMS + 2 clocks later and y holds the
// new result from one clock after that. x must stay stable in between.
// The block structure, widths and names follow the FPGA neuron; the
// read latency, the output-register timing and the comparator threshold
// of 0 are this design's choices.
module neuron
  import mdo_pkg::*;
#(
  parameter weight_vec_t WEIGHTS = parity_weights(1),
  parameter int unsigned N_TERMS = N_SLOTS
) (
  input  logic            master_clk,
  input  logic            master_rst,
  input  logic            en,
  input  logic [N_IN-1:0] x,
  output logic            y,
  output logic            out_ready
);

  logic               counter_en, counter_rst, accu_en, age_b, load_y;
  logic [COUNT_W-1:0] count;
  logic [7:0]         mux_data;
  logic               mux_bit, mux_bit_q;
  logic [WEIGHT_W-1:0] weight, product;
  logic [ACC_W-1:0]   sum;

  neuron_controller #(.N_TERMS(N_TERMS)) c2 (
    .clk(master_clk), .rst(master_rst), .en(en), .counter_val(count), .x(x),
    .counter_en(counter_en), .counter_rst(counter_rst), .accu_en(accu_en),
    .out_ready(out_ready), .t_bit_count(), .t_state()
  );

  gen_count #(.WIDTH(COUNT_W)) c3 (
    .clk(master_clk), .a_clr(counter_rst), .count_en(counter_en), .c2_out(count)
  );

  always_comb mux_data = {4'b0001, x};

  mux8_1 c4 (.data(mux_data), .s(count[SEL_W-1:0]), .muxout(mux_bit));

  weight_rom #(.CONTENTS(WEIGHTS)) c5 (
    .clock(master_clk), .address({2'b00, count[SEL_W-1:0]}), .q(weight)
  );

  // Aligns the input bit with the registered ROM word.
  always_ff @(posedge master_clk or posedge master_rst) begin
    if (master_rst) mux_bit_q <= 1'b0;
    else            mux_bit_q <= mux_bit;
  end

  mult16_1 #(.WIDTH(WEIGHT_W)) c6 (
    .mult_in(mux_bit_q), .data_in(weight), .output_val(product)
  );

  accumulator #(.IN_W(WEIGHT_W), .OUT_W(ACC_W)) c7 (
    .clock(master_clk), .aclr(counter_rst), .clken(accu_en), .data(product),
    .result(sum)
  );

  comparator #(.WIDTH(ACC_W), .B(0)) c8 (.data(sum), .AgeB(age_b));

  high_detect c9 (.clk(master_clk), .rst(master_rst), .x(out_ready), .y(load_y));

  // Output register: enabled by the rising edge of out_ready.
  always_ff @(posedge master_clk or posedge master_rst) begin
    if (master_rst)  y <= 1'b0;
    else if (load_y) y <= age_b;
  end

endmodule
