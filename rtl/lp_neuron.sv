// lp_neuron: Low Pass spiking neuron.
//
// The LP neuron counts the spikes arriving on its N_IN inputs in one time step.
// It fires one spike when it received at least one and fewer than THRESHOLD
// spikes (alpha version, threshold 2: rules a -> a, a^{>=2} -> lambda) and
// otherwise forgets them. With no spike it stays silent. A one-input LP neuron
// is the delay unit used to align branches of a network.
//
// beta models the threshold-shift error studied for these neurons: while it is
// high the threshold is THRESHOLD+1, so an LP neuron also fires on two spikes.
// That port is a modelling choice of this design; the neuron's rules follow
// the document.
//
// Timing: registered output, out in cycle t+1 reflects in in cycle t. rst_n is
// asynchronous and active low.
module lp_neuron #(
  parameter int unsigned N_IN      = 2,
  parameter int unsigned THRESHOLD = snp_pkg::ALPHA_THRESHOLD
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_IN-1:0] in,
  input  logic            beta,
  output logic            out
);
  localparam int unsigned CW = $clog2(N_IN + 1);

  logic [CW-1:0] count;
  logic [CW:0]   thr;
  logic          fire;

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < N_IN; i++) count += CW'(in[i]);
    thr  = (CW+1)'(THRESHOLD) + (CW+1)'(beta);
    fire = (count != '0) && ({1'b0, count} < thr);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out <= 1'b0;
    else        out <= fire;

endmodule
