// motif_comparator: threshold comparator of two spike trains, protected by
// motifs.
//
// Same function as snp_comparator: one output spike when |in1 - in2| >=
// THRESHOLD. Each critical neuron of the plain comparator is replaced by a
// small motif, following the document's network:
//  - subtraction: the LP motif, S = LP(LP(in1), HP(in1, in2), LP(in2));
//  - comparison: S runs through a chain of THRESHOLD delay units D1..DT;
//    HPa = HP(S, D[T-1]) keeps the overlap of S and its delayed copy, and
//    HPb = HP(HPa, D1, DT) repeats that decision as a vote of three, so that
//    one threshold error in HPa or HPb does not change the result;
//  - conversion: C1, C2 delay HPb; HPc = HP(HPb, C1) marks all spikes after
//    the first; HPd and HPe, both HP(HPc, C1, C2), repeat that mark; the output
//    LP(HPd, HPe, C2) fires on the first spike only.
// The wiring for THRESHOLD = 3 is the document's; other thresholds lengthen
// the chain in the same pattern (this design's generalisation).
//
// beta: [0] LP(in1), [1] HP(in1,in2), [2] LP(in2), [3] S, [4] HPa, [5] HPb,
// [6] C1, [7] C2, [8] HPc, [9] HPd, [10] HPe, [11] output LP,
// [11+i] delay unit Di (i = 1 .. THRESHOLD).
// Timing: S(t) = in1(t-2) ^ in2(t-2) (error-free), HPb(t) = S(t-2) &
// S(t-1-THRESHOLD), out(t) = HPb(t-3) & !HPb(t-4). For trains of 7 and 2
// spikes from cycle 1, out fires in cycle 12. Trains of successive
// comparisons must be separated by at least THRESHOLD idle cycles.
module motif_comparator #(
  parameter int unsigned THRESHOLD = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in1,
  input  logic in2,
  input  logic [THRESHOLD+11:0] beta,
  output logic out
);
  logic l1, h1, l2, s;
  logic hpa, hpb;
  logic c1, c2, hpc, hpd, hpe;
  logic [THRESHOLD:0] d;

  initial assert (THRESHOLD >= 2) else $fatal(1, "motif_comparator needs THRESHOLD >= 2");

  // Subtraction motif.
  lp_neuron #(.N_IN(1)) u_l1 (.clk, .rst_n, .in(in1),          .beta(beta[0]), .out(l1));
  hp_neuron #(.N_IN(2)) u_h1 (.clk, .rst_n, .in({in2, in1}),   .beta(beta[1]), .out(h1));
  lp_neuron #(.N_IN(1)) u_l2 (.clk, .rst_n, .in(in2),          .beta(beta[2]), .out(l2));
  lp_neuron #(.N_IN(3)) u_s  (.clk, .rst_n, .in({l2, h1, l1}), .beta(beta[3]), .out(s));

  // Comparison.
  assign d[0] = s;
  for (genvar i = 1; i <= THRESHOLD; i++) begin : g_dly
    lp_neuron #(.N_IN(1)) u_d (.clk, .rst_n, .in(d[i-1]), .beta(beta[11+i]), .out(d[i]));
  end
  hp_neuron #(.N_IN(2)) u_hpa (.clk, .rst_n, .in({d[THRESHOLD-1], s}),   .beta(beta[4]), .out(hpa));
  hp_neuron #(.N_IN(3)) u_hpb (.clk, .rst_n, .in({d[THRESHOLD], d[1], hpa}), .beta(beta[5]), .out(hpb));

  // Conversion.
  lp_neuron #(.N_IN(1)) u_c1  (.clk, .rst_n, .in(hpb),            .beta(beta[6]),  .out(c1));
  lp_neuron #(.N_IN(1)) u_c2  (.clk, .rst_n, .in(c1),             .beta(beta[7]),  .out(c2));
  hp_neuron #(.N_IN(2)) u_hpc (.clk, .rst_n, .in({c1, hpb}),      .beta(beta[8]),  .out(hpc));
  hp_neuron #(.N_IN(3)) u_hpd (.clk, .rst_n, .in({c2, c1, hpc}),  .beta(beta[9]),  .out(hpd));
  hp_neuron #(.N_IN(3)) u_hpe (.clk, .rst_n, .in({c2, c1, hpc}),  .beta(beta[10]), .out(hpe));
  lp_neuron #(.N_IN(3)) u_out (.clk, .rst_n, .in({c2, hpe, hpd}), .beta(beta[11]), .out(out));

endmodule
