// spike_converter: counts up to six simultaneous spikes into a binary number.
//
// Two 1-bit spike adders count inputs 1-3 and 4-6 (each gives a weight-1 bit
// O and a weight-2 bit E). A third adder adds the two weight-1 bits: its O is
// the least significant bit and its E a weight-2 carry. A fourth adder adds
// the three weight-2 bits (the two first-level E bits, delayed two cycles to
// stay aligned, and the third adder's E): its O is the weight-2 bit and its E
// the weight-4 bit. The LSB is delayed two cycles to come out with them.
//
// Outputs follow the document's naming: a0 is the most significant bit
// (weight 4), a1 weight 2, a2 the least significant bit. The structure is the
// document's; only the bit naming had to be settled (see the design notes).
//
// beta: [4:0] first adder, [9:5] second, [14:10] third, [19:15] fourth,
// [21:20] delays of the first E, [23:22] delays of the second E,
// [25:24] delays of the LSB.
// Timing: latency 6 cycles, a new set of inputs every cycle.
module spike_converter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] in,
  input  logic [snp_pkg::CONVERTER_NEURONS-1:0] beta,
  output logic       a0,
  output logic       a1,
  output logic       a2
);
  import snp_pkg::*;
  localparam int unsigned W = ADDER1B_NEURONS;

  logic o1, e1, o2, e2, o3, e3;
  logic e1_d1, e1_d2, e2_d1, e2_d2, o3_d1;

  spike_adder_1bit u_add_lo (.clk, .rst_n, .in(in[2:0]), .beta(beta[0*W +: W]), .o(o1), .e(e1));
  spike_adder_1bit u_add_hi (.clk, .rst_n, .in(in[5:3]), .beta(beta[1*W +: W]), .o(o2), .e(e2));
  spike_adder_1bit u_add_w1 (.clk, .rst_n, .in({1'b0, o2, o1}), .beta(beta[2*W +: W]), .o(o3), .e(e3));
  spike_adder_1bit u_add_w2 (.clk, .rst_n, .in({e2_d2, e3, e1_d2}), .beta(beta[3*W +: W]), .o(a1), .e(a0));

  lp_neuron #(.N_IN(1)) u_e1_d1 (.clk, .rst_n, .in(e1),    .beta(beta[4*W+0]), .out(e1_d1));
  lp_neuron #(.N_IN(1)) u_e1_d2 (.clk, .rst_n, .in(e1_d1), .beta(beta[4*W+1]), .out(e1_d2));
  lp_neuron #(.N_IN(1)) u_e2_d1 (.clk, .rst_n, .in(e2),    .beta(beta[4*W+2]), .out(e2_d1));
  lp_neuron #(.N_IN(1)) u_e2_d2 (.clk, .rst_n, .in(e2_d1), .beta(beta[4*W+3]), .out(e2_d2));
  lp_neuron #(.N_IN(1)) u_o3_d1 (.clk, .rst_n, .in(o3),    .beta(beta[4*W+4]), .out(o3_d1));
  lp_neuron #(.N_IN(1)) u_o3_d2 (.clk, .rst_n, .in(o3_d1), .beta(beta[4*W+5]), .out(a2));

endmodule
