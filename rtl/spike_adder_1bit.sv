// spike_adder_1bit: 1-bit spikes adder (odd and even neuron side by side).
//
// The number of spikes on the three inputs in one step (0..3) comes out as a
// two-bit binary number: e (even output, weight 2) and o (odd output,
// weight 1), like the carry and sum of a full adder. It is the building block
// of the multi-input converter.
//
// beta[2:0] = odd neuron (A, B, C), beta[4:3] = even neuron (HP, delay).
// Timing: latency 2 cycles, a new set of inputs every cycle.
module spike_adder_1bit (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] in,
  input  logic [snp_pkg::ADDER1B_NEURONS-1:0] beta,
  output logic       o,
  output logic       e
);
  import snp_pkg::*;

  odd_neuron  u_odd  (.clk, .rst_n, .in, .beta(beta[ODD_NEURONS-1:0]),               .out(o));
  even_neuron u_even (.clk, .rst_n, .in, .beta(beta[ADDER1B_NEURONS-1:ODD_NEURONS]), .out(e));

endmodule
