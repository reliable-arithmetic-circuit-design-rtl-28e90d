// snp_ruler: rule-decision network of the representative complex neuron.
//
// From the binary spike count (a0 weight 4, a1 weight 2, a2 weight 1) the
// ruler applies the rules a -> a, a^3 -> lambda, a^4 -> a, a^5 -> lambda,
// a^6 -> a and the do-nothing rule a^2. Level 1 passes each bit through a
// delay LP and detects each pair of bits with an HP neuron (3, 5 and 6
// spikes). Level 2 turns each single bit into its rule only when no pair that
// contains it is present (an LP sees the bit plus the pair detectors that must
// deactivate it), and delays the pair detectors. Level 3 merges the firing
// rules (1, 4, 6 spikes) into out and delays the do-nothing rule (2 spikes)
// into feedback. The detectors of 3 and 5 spikes end in LP neurons whose
// output is unused: they only stand for the forgetting rules and deactivate
// others. The wiring is the document's.
//
// beta: [0] LP(a2), [1] HP(a2,a1), [2] LP(a1), [3] HP(a2,a0), [4] LP(a0),
// [5] HP(a1,a0), [11:6] the six level-2 LP neurons in the same order,
// [12] feedback LP, [13] output LP.
// Timing: latency 3 cycles, a new count every cycle.
module snp_ruler (
  input  logic clk,
  input  logic rst_n,
  input  logic a0,
  input  logic a1,
  input  logic a2,
  input  logic [snp_pkg::RULER_NEURONS-1:0] beta,
  output logic out,
  output logic feedback
);
  logic l_a2, h_21, l_a1, h_20, l_a0, h_10;     // level 1
  logic r1, forget3, dn2, forget5, r4, r6;       // level 2
  logic unused_forget;

  lp_neuron #(.N_IN(1)) u_l_a2 (.clk, .rst_n, .in(a2),       .beta(beta[0]), .out(l_a2));
  hp_neuron #(.N_IN(2)) u_h_21 (.clk, .rst_n, .in({a1, a2}), .beta(beta[1]), .out(h_21));
  lp_neuron #(.N_IN(1)) u_l_a1 (.clk, .rst_n, .in(a1),       .beta(beta[2]), .out(l_a1));
  hp_neuron #(.N_IN(2)) u_h_20 (.clk, .rst_n, .in({a0, a2}), .beta(beta[3]), .out(h_20));
  lp_neuron #(.N_IN(1)) u_l_a0 (.clk, .rst_n, .in(a0),       .beta(beta[4]), .out(l_a0));
  hp_neuron #(.N_IN(2)) u_h_10 (.clk, .rst_n, .in({a0, a1}), .beta(beta[5]), .out(h_10));

  // a -> a: one spike, deactivated by 3 and 5 spikes.
  lp_neuron #(.N_IN(3)) u_r1  (.clk, .rst_n, .in({h_20, h_21, l_a2}), .beta(beta[6]),  .out(r1));
  // a^3 -> lambda.
  lp_neuron #(.N_IN(1)) u_f3  (.clk, .rst_n, .in(h_21),               .beta(beta[7]),  .out(forget3));
  // do-nothing a^2: deactivated by 3 and 6 spikes.
  lp_neuron #(.N_IN(3)) u_dn2 (.clk, .rst_n, .in({h_10, h_21, l_a1}), .beta(beta[8]),  .out(dn2));
  // a^5 -> lambda.
  lp_neuron #(.N_IN(1)) u_f5  (.clk, .rst_n, .in(h_20),               .beta(beta[9]),  .out(forget5));
  // a^4 -> a: deactivated by 5 and 6 spikes.
  lp_neuron #(.N_IN(3)) u_r4  (.clk, .rst_n, .in({h_10, l_a0, h_20}), .beta(beta[10]), .out(r4));
  // a^6 -> a.
  lp_neuron #(.N_IN(1)) u_r6  (.clk, .rst_n, .in(h_10),               .beta(beta[11]), .out(r6));

  lp_neuron #(.N_IN(1)) u_fb  (.clk, .rst_n, .in(dn2),            .beta(beta[12]), .out(feedback));
  lp_neuron #(.N_IN(3)) u_out (.clk, .rst_n, .in({r6, r4, r1}),   .beta(beta[13]), .out(out));

  // The forgetting-rule neurons drive nothing, as in the network they model.
  assign unused_forget = forget3 ^ forget5;

endmodule
