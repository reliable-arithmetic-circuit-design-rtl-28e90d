// lp_motif: motif-improved LP neuron, tolerant of a threshold-shift error.
//
// A plain LP neuron with two inputs fails under a threshold shift exactly in
// the two-spike case. The motif never lets its output neuron see two spikes:
// in1 and in2 each pass through a one-input LP neuron (which cannot suffer the
// error) and ORDER HP neurons detect the two-spike case. With two input spikes
// the output LP neuron receives ORDER + 2 >= 3 spikes and forgets; with one it
// receives one and fires. The output goes wrong only if the output LP neuron
// and every HP neuron fail together. ORDER = 1 is the first-order motif, more
// HP neurons in parallel give higher orders; both are the document's.
//
// beta: [0] output LP, [ORDER:1] HP neurons, [ORDER+1] LP(in1), [ORDER+2] LP(in2).
// Timing: latency 2 cycles (independent of ORDER), new inputs every cycle.
module lp_motif #(
  parameter int unsigned ORDER = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in1,
  input  logic in2,
  input  logic [ORDER+2:0] beta,
  output logic out
);
  logic             l1, l2;
  logic [ORDER-1:0] h;

  lp_neuron #(.N_IN(1)) u_l1 (.clk, .rst_n, .in(in1), .beta(beta[ORDER+1]), .out(l1));
  lp_neuron #(.N_IN(1)) u_l2 (.clk, .rst_n, .in(in2), .beta(beta[ORDER+2]), .out(l2));
  for (genvar i = 0; i < ORDER; i++) begin : g_hp
    hp_neuron #(.N_IN(2)) u_hp (.clk, .rst_n, .in({in2, in1}), .beta(beta[1+i]), .out(h[i]));
  end
  lp_neuron #(.N_IN(ORDER+2)) u_out (.clk, .rst_n, .in({l2, h, l1}), .beta(beta[0]), .out(out));

endmodule
