// spike_converter12: counts up to twelve simultaneous spikes into a 4-bit
// binary number.
//
// The same idea as the six-input converter, grown to twelve inputs: 1-bit
// spike adders (an odd neuron for the weight-w bit, an even neuron for the
// weight-2w carry) reduce the spikes of each weight three at a time, and
// pairs of delay units keep all bits of one input set aligned. Five adder
// levels of two cycles each:
//   1  four adders on inputs 0-2, 3-5, 6-8, 9-11  -> four weight-1, four weight-2 bits
//   2  weight 1: three bits into one adder; weight 2: three bits into one adder
//   3  weight 1: the two remaining bits -> final weight-1 bit
//      weight 2: three bits into one adder
//   4  weight 2: the two remaining bits -> final weight-2 bit
//      weight 4: two bits into one adder
//   5  weight 4: the two remaining bits -> final weight-4 bit
// Two weight-8 bits are left over, one from level 4 and one from level 5. At
// most one of them can be set, since twelve is the largest count, so a
// two-input LP neuron, which fires for exactly one input spike, merges them
// in one more cycle; the other bits pass through delay units to match.
//
// Outputs: a0 is the most significant bit (weight 8) and a3 the least
// significant, the naming the six-input converter uses. The document gives
// only this converter's function (twelve inputs to a 4-bit code a0a1a2a3);
// the adder tree above is this design's own arrangement.
//
// beta: [5k+4:5k] 1-bit adder k (k = 0..10, in level order as listed above),
// [72:55] delay units and the merging LP neuron, in the order they are
// instantiated below.
// Timing: latency 11 cycles, a new set of inputs every cycle.
module spike_converter12 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] in,
  input  logic [snp_pkg::CONVERTER12_NEURONS-1:0] beta,
  output logic        a0,
  output logic        a1,
  output logic        a2,
  output logic        a3
);
  import snp_pkg::*;
  localparam int unsigned W = ADDER1B_NEURONS;
  localparam int unsigned D = 11 * W;  // first delay-unit beta bit

  // Level 1: s* weight 1, c* weight 2.
  logic s0, s1, s2, s3, c0, c1, c2, c3;
  // Level 2: s4 weight 1, c4 weight 2, s5 weight 2, c5 weight 4.
  logic s4, c4, s5, c5;
  // Level 3: s6 weight 1, c6 weight 2, s7 weight 2, c7 weight 4.
  logic s6, c6, s7, c7;
  // Level 4: s8 weight 2, c8 weight 4, s9 weight 4, c9 weight 8.
  logic s8, c8, s9, c9;
  // Level 5: s10 weight 4, c10 weight 8.
  logic s10, c10;
  // Delay-unit chains.
  logic [1:0] s3_d, c3_d, c5_d, c9_d;
  logic [4:0] s6_d;
  logic [2:0] s8_d;

  spike_adder_1bit u_l1_0 (.clk, .rst_n, .in(in[2:0]),   .beta(beta[0*W +: W]), .o(s0), .e(c0));
  spike_adder_1bit u_l1_1 (.clk, .rst_n, .in(in[5:3]),   .beta(beta[1*W +: W]), .o(s1), .e(c1));
  spike_adder_1bit u_l1_2 (.clk, .rst_n, .in(in[8:6]),   .beta(beta[2*W +: W]), .o(s2), .e(c2));
  spike_adder_1bit u_l1_3 (.clk, .rst_n, .in(in[11:9]),  .beta(beta[3*W +: W]), .o(s3), .e(c3));

  spike_adder_1bit u_l2_w1 (.clk, .rst_n, .in({s2, s1, s0}), .beta(beta[4*W +: W]), .o(s4), .e(c4));
  spike_adder_1bit u_l2_w2 (.clk, .rst_n, .in({c2, c1, c0}), .beta(beta[5*W +: W]), .o(s5), .e(c5));

  spike_adder_1bit u_l3_w1 (.clk, .rst_n, .in({1'b0, s3_d[1], s4}), .beta(beta[6*W +: W]), .o(s6), .e(c6));
  spike_adder_1bit u_l3_w2 (.clk, .rst_n, .in({c3_d[1], s5, c4}),   .beta(beta[7*W +: W]), .o(s7), .e(c7));

  spike_adder_1bit u_l4_w2 (.clk, .rst_n, .in({1'b0, s7, c6}),      .beta(beta[8*W +: W]), .o(s8), .e(c8));
  spike_adder_1bit u_l4_w4 (.clk, .rst_n, .in({1'b0, c5_d[1], c7}), .beta(beta[9*W +: W]), .o(s9), .e(c9));

  spike_adder_1bit u_l5_w4 (.clk, .rst_n, .in({1'b0, c8, s9}),      .beta(beta[10*W +: W]), .o(s10), .e(c10));

  // Level-1 leftovers wait one adder level (two cycles).
  lp_neuron #(.N_IN(1)) u_s3_d0 (.clk, .rst_n, .in(s3),      .beta(beta[D+0]), .out(s3_d[0]));
  lp_neuron #(.N_IN(1)) u_s3_d1 (.clk, .rst_n, .in(s3_d[0]), .beta(beta[D+1]), .out(s3_d[1]));
  lp_neuron #(.N_IN(1)) u_c3_d0 (.clk, .rst_n, .in(c3),      .beta(beta[D+2]), .out(c3_d[0]));
  lp_neuron #(.N_IN(1)) u_c3_d1 (.clk, .rst_n, .in(c3_d[0]), .beta(beta[D+3]), .out(c3_d[1]));
  // Level-2 weight-4 carry waits for level 4.
  lp_neuron #(.N_IN(1)) u_c5_d0 (.clk, .rst_n, .in(c5),      .beta(beta[D+4]), .out(c5_d[0]));
  lp_neuron #(.N_IN(1)) u_c5_d1 (.clk, .rst_n, .in(c5_d[0]), .beta(beta[D+5]), .out(c5_d[1]));
  // Final weight-1 bit: ready after level 3, five cycles to the output.
  lp_neuron #(.N_IN(1)) u_s6_d0 (.clk, .rst_n, .in(s6),      .beta(beta[D+6]),  .out(s6_d[0]));
  lp_neuron #(.N_IN(1)) u_s6_d1 (.clk, .rst_n, .in(s6_d[0]), .beta(beta[D+7]),  .out(s6_d[1]));
  lp_neuron #(.N_IN(1)) u_s6_d2 (.clk, .rst_n, .in(s6_d[1]), .beta(beta[D+8]),  .out(s6_d[2]));
  lp_neuron #(.N_IN(1)) u_s6_d3 (.clk, .rst_n, .in(s6_d[2]), .beta(beta[D+9]),  .out(s6_d[3]));
  lp_neuron #(.N_IN(1)) u_s6_d4 (.clk, .rst_n, .in(s6_d[3]), .beta(beta[D+10]), .out(s6_d[4]));
  // Final weight-2 bit: ready after level 4, three cycles to the output.
  lp_neuron #(.N_IN(1)) u_s8_d0 (.clk, .rst_n, .in(s8),      .beta(beta[D+11]), .out(s8_d[0]));
  lp_neuron #(.N_IN(1)) u_s8_d1 (.clk, .rst_n, .in(s8_d[0]), .beta(beta[D+12]), .out(s8_d[1]));
  lp_neuron #(.N_IN(1)) u_s8_d2 (.clk, .rst_n, .in(s8_d[1]), .beta(beta[D+13]), .out(s8_d[2]));
  // Final weight-4 bit: ready after level 5, one cycle to the output.
  lp_neuron #(.N_IN(1)) u_s10_d (.clk, .rst_n, .in(s10),     .beta(beta[D+14]), .out(a1));
  // Level-4 weight-8 bit waits for the level-5 one, then both merge.
  lp_neuron #(.N_IN(1)) u_c9_d0 (.clk, .rst_n, .in(c9),      .beta(beta[D+15]), .out(c9_d[0]));
  lp_neuron #(.N_IN(1)) u_c9_d1 (.clk, .rst_n, .in(c9_d[0]), .beta(beta[D+16]), .out(c9_d[1]));
  lp_neuron #(.N_IN(2)) u_w8    (.clk, .rst_n, .in({c10, c9_d[1]}), .beta(beta[D+17]), .out(a0));

  assign a2 = s8_d[2];
  assign a3 = s6_d[4];

endmodule
