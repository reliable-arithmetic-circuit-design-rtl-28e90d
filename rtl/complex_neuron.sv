// complex_neuron: a neuron with arbitrary rules built from LP and HP neurons.
//
// It realises the representative neuron with rules a -> a, a^3 -> lambda,
// a^4 -> a, a^5 -> lambda, a^6 -> a and the do-nothing rule a^2 (two spikes
// are kept for the next step). A six-input converter counts the four external
// input spikes plus the two inputs driven by the ruler's feedback; the ruler
// fires the output for 1, 4 or 6 spikes, forgets 3 or 5, and for exactly 2
// spikes emits a feedback spike that re-enters the converter on two inputs,
// i.e. the two spikes are remembered. Structure as in the document.
//
// beta: [25:0] converter, [39:26] ruler (see those modules).
// Timing: latency 9 cycles (converter 6, ruler 3). The feedback returns 9
// cycles after the step that produced it, so consecutive steps of one neuron
// are applied 9 cycles apart; the pipeline can hold up to 9 interleaved,
// independent step sequences.
module complex_neuron (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] in,
  input  logic [snp_pkg::COMPLEX_NEURONS-1:0] beta,
  output logic       out
);
  import snp_pkg::*;

  logic a0, a1, a2, feedback;

  spike_converter u_conv (
    .clk, .rst_n,
    .in   ({feedback, feedback, in}),
    .beta (beta[CONVERTER_NEURONS-1:0]),
    .a0, .a1, .a2
  );

  snp_ruler u_ruler (
    .clk, .rst_n, .a0, .a1, .a2,
    .beta (beta[COMPLEX_NEURONS-1:CONVERTER_NEURONS]),
    .out, .feedback
  );

endmodule
