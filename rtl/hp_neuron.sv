// hp_neuron: High Pass spiking neuron.
//
// The HP neuron counts the spikes arriving on its N_IN inputs in one time step
// and fires one spike when it received THRESHOLD or more (alpha version,
// threshold 2: rules a -> lambda, a^{>=2} -> a); fewer spikes are forgotten.
// With three inputs it is the even-type neuron and acts as a majority vote.
//
// beta models the threshold-shift error: while it is high the threshold is
// THRESHOLD+1, so two spikes are forgotten. The port is this design's way to
// inject that error; the rules follow the document.
//
// Timing: registered output, out in cycle t+1 reflects in in cycle t. rst_n is
// asynchronous and active low.
module hp_neuron #(
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
    fire = ({1'b0, count} >= thr);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out <= 1'b0;
    else        out <= fire;

endmodule
