// snp_comparator: one output spike when two spike trains differ by THRESHOLD
// or more.
//
// Part 1 (subtraction): an LP neuron turns two aligned trains into a train of
// |in1 - in2| spikes, d1. Part 2 (comparison): d1 runs through a chain of
// THRESHOLD-1 LP delay units; an HP neuron fires only while d1 and its delayed
// copy overlap, so its train d3 is THRESHOLD-1 spikes shorter than d1. Part 3
// (conversion): d4 = d3 delayed one cycle, d5 = HP(d3, d4) marks every spike
// of d3 after the first, and out = LP(d4, d5) fires once, on the first spike
// of d3. The three parts and the chain length come from the document; the
// neuron-level wiring of parts 2 and 3 is reconstructed from the document's
// waveforms and its motif-improved version of this circuit. With THRESHOLD = 1
// part 2 is left out, as the document allows.
//
// beta: [0] subtraction LP, [1] comparison HP, [2] d4 LP, [3] d5 HP,
// [4] output LP, [4+i] the i-th chain delay unit (i = 1 .. THRESHOLD-1).
// Timing: one cycle per neuron, a spike per cycle on each input. With
// d1(t) = in1(t-1) ^ in2(t-1), d3(t) = d1(t-1) & d1(t-THRESHOLD) (or d1(t-1)
// when THRESHOLD = 1) and out(t) = d3(t-2) & !d3(t-3). For the two trains
// 7 and 2 spikes from cycle 1, out fires in cycle 9. Trains of successive
// comparisons must be separated by at least THRESHOLD idle cycles.
module snp_comparator #(
  parameter int unsigned THRESHOLD = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in1,
  input  logic in2,
  input  logic [THRESHOLD+3:0] beta,
  output logic out
);
  logic d1, d3, d4, d5;

  // Part 1: subtraction.
  lp_neuron #(.N_IN(2)) u_sub (.clk, .rst_n, .in({in2, in1}), .beta(beta[0]), .out(d1));

  // Part 2: comparison.
  if (THRESHOLD > 1) begin : g_cmp
    logic [THRESHOLD-1:0] chain;
    assign chain[0] = d1;
    for (genvar i = 1; i < THRESHOLD; i++) begin : g_dly
      lp_neuron #(.N_IN(1)) u_dly (.clk, .rst_n, .in(chain[i-1]), .beta(beta[4+i]), .out(chain[i]));
    end
    hp_neuron #(.N_IN(2)) u_hp (.clk, .rst_n, .in({chain[THRESHOLD-1], d1}), .beta(beta[1]), .out(d3));
  end else begin : g_nocmp
    assign d3 = d1;
  end

  // Part 3: conversion to one spike.
  lp_neuron #(.N_IN(1)) u_d4  (.clk, .rst_n, .in(d3),       .beta(beta[2]), .out(d4));
  hp_neuron #(.N_IN(2)) u_d5  (.clk, .rst_n, .in({d4, d3}), .beta(beta[3]), .out(d5));
  lp_neuron #(.N_IN(2)) u_out (.clk, .rst_n, .in({d5, d4}), .beta(beta[4]), .out(out));

endmodule
