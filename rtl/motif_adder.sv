// motif_adder: spike-train adder protected by a shared motif.
//
// Same function as snp_adder (SUM carries in1 + in2 spikes, a carry fed back),
// but its two input neurons, which both see in1, in2 and the carry, share one
// motif level: in1, in2 and the carry each pass a one-input LP neuron, and
// ORDER HP neurons detect two or more of them. The sum-bit LP neuron and the
// carry HP neuron read all of these, so a single threshold error in the HP
// neuron, or in the sum/carry neuron, no longer changes the result. Then, as
// in the plain adder, an LP neuron merges both into SUM and a delay LP neuron
// forms the carry. Network from the document; for ORDER > 1 the extra HP
// neurons are plain copies of the first.
//
// beta: [0] LP(in1), [1] LP(in2), [2] LP(carry), [3] sum-bit LP,
// [4] carry HP, [5] SUM LP, [6] carry delay LP, [7+i] motif HP i (i = 0 .. ORDER-1).
// Timing: SUM follows the inputs by 3 cycles; the carry loop is 3 cycles, so
// spikes of an input train are applied every third cycle.
module motif_adder #(
  parameter int unsigned ORDER = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in1,
  input  logic in2,
  input  logic [ORDER+6:0] beta,
  output logic sum,
  output logic cout
);
  logic             l1, l2, lc, s_bit, c_bit;
  logic [ORDER-1:0] h;

  lp_neuron #(.N_IN(1)) u_l1 (.clk, .rst_n, .in(in1),  .beta(beta[0]), .out(l1));
  lp_neuron #(.N_IN(1)) u_l2 (.clk, .rst_n, .in(in2),  .beta(beta[1]), .out(l2));
  lp_neuron #(.N_IN(1)) u_lc (.clk, .rst_n, .in(cout), .beta(beta[2]), .out(lc));
  for (genvar i = 0; i < ORDER; i++) begin : g_hp
    hp_neuron #(.N_IN(3)) u_hp (.clk, .rst_n, .in({in2, cout, in1}), .beta(beta[7+i]), .out(h[i]));
  end

  lp_neuron #(.N_IN(ORDER+3)) u_s (.clk, .rst_n, .in({lc, l2, h, l1}), .beta(beta[3]), .out(s_bit));
  hp_neuron #(.N_IN(ORDER+3)) u_c (.clk, .rst_n, .in({lc, l2, h, l1}), .beta(beta[4]), .out(c_bit));

  lp_neuron #(.N_IN(2)) u_sum  (.clk, .rst_n, .in({c_bit, s_bit}), .beta(beta[5]), .out(sum));
  lp_neuron #(.N_IN(1)) u_cout (.clk, .rst_n, .in(c_bit),          .beta(beta[6]), .out(cout));

endmodule
