// odd_neuron: odd-type neuron built from three LP neurons.
//
// The odd type fires when one or three of its three inputs spike: it is the
// sum bit of a 1-bit full adder acting on spikes. As in the document, it is
// made of LP neurons only: B = LP(in1, in2), C = LP(in3) (a delay unit) and
// A = LP(B, C). One spike passes straight through; two spikes either kill B
// or make B and C both fire so that A forgets; three spikes kill B and let C
// alone reach A.
//
// beta[0] = A, beta[1] = B, beta[2] = C (threshold-shift error injection).
// Timing: latency 2 cycles, a new set of inputs every cycle.
module odd_neuron (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] in,
  input  logic [snp_pkg::ODD_NEURONS-1:0] beta,
  output logic       out
);
  logic b_out, c_out;

  lp_neuron #(.N_IN(2)) u_b (.clk, .rst_n, .in(in[1:0]),        .beta(beta[1]), .out(b_out));
  lp_neuron #(.N_IN(1)) u_c (.clk, .rst_n, .in(in[2]),          .beta(beta[2]), .out(c_out));
  lp_neuron #(.N_IN(2)) u_a (.clk, .rst_n, .in({c_out, b_out}), .beta(beta[0]), .out(out));

endmodule
