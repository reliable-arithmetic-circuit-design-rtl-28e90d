// snp_adder: adder on unary spike trains with a carry feedback neuron.
//
// Numbers are trains of spikes. In each step neuron 1, an LP neuron, and
// neuron 2, an HP neuron, both see in1, in2 and the fed-back carry: a single
// spike passes through neuron 1, two spikes fire neuron 2. Neuron 3 (LP)
// merges both into the SUM train; neuron 4 (an LP delay unit) turns the output
// of neuron 2 into the carry, which re-enters neurons 1 and 2 one step later.
// Over a whole computation SUM carries in1 + in2 spikes. Network as in the
// document, including its restriction that at most one of the two trains has
// more than one spike.
//
// beta[0..3] = neurons 1..4 (threshold-shift error injection).
// Timing: SUM follows the inputs by 2 cycles. The carry loop is 2 cycles
// long, so spikes of an input train are applied every second cycle and the
// result spikes come out every second cycle.
module snp_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic in1,
  input  logic in2,
  input  logic [snp_pkg::ADDER_NEURONS-1:0] beta,
  output logic sum,
  output logic cout
);
  logic n1, n2;

  lp_neuron #(.N_IN(3)) u_n1 (.clk, .rst_n, .in({cout, in2, in1}), .beta(beta[0]), .out(n1));
  hp_neuron #(.N_IN(3)) u_n2 (.clk, .rst_n, .in({cout, in2, in1}), .beta(beta[1]), .out(n2));
  lp_neuron #(.N_IN(2)) u_n3 (.clk, .rst_n, .in({n2, n1}),         .beta(beta[2]), .out(sum));
  lp_neuron #(.N_IN(1)) u_n4 (.clk, .rst_n, .in(n2),               .beta(beta[3]), .out(cout));

endmodule
