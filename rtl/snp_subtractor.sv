// snp_subtractor: absolute difference of two spike trains in one LP neuron.
//
// Two trains that start in the same cycle overlap for min(in1, in2) cycles;
// during the overlap the LP neuron sees two spikes and forgets them, after it
// sees one and fires. The output train therefore holds |in1 - in2| spikes.
// This is the document's design: a single LP neuron.
//
// beta = threshold-shift error injection of the neuron.
// Timing: latency 1 cycle, one spike per cycle on each input.
module snp_subtractor (
  input  logic clk,
  input  logic rst_n,
  input  logic in1,
  input  logic in2,
  input  logic beta,
  output logic out
);
  lp_neuron #(.N_IN(2)) u_lp (.clk, .rst_n, .in({in2, in1}), .beta, .out);
endmodule
