// even_neuron: even-type neuron built from an HP neuron and a delay unit.
//
// The even type fires when two or three of its three inputs spike: the carry
// bit of a 1-bit full adder acting on spikes. The HP neuron with threshold 2
// does exactly that; the one-input LP neuron behind it is a delay unit that
// gives the even type the same two-cycle latency as the odd type, so that the
// two can be used side by side.
//
// beta[0] = HP neuron, beta[1] = delay unit (threshold-shift error injection).
// Timing: latency 2 cycles, a new set of inputs every cycle.
module even_neuron (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] in,
  input  logic [snp_pkg::EVEN_NEURONS-1:0] beta,
  output logic       out
);
  logic hp_out;

  hp_neuron #(.N_IN(3)) u_hp  (.clk, .rst_n, .in(in),     .beta(beta[0]), .out(hp_out));
  lp_neuron #(.N_IN(1)) u_dly (.clk, .rst_n, .in(hp_out), .beta(beta[1]), .out(out));

endmodule
