// snp_pkg: constants shared by the spiking-neuron (SNP) circuits.
//
// Every circuit in this library is a network of two basic neuron types, the
// Low Pass (LP) and the High Pass (HP) neuron, both with threshold 2. A neuron
// is a one-cycle register: the spikes present on its inputs in cycle t decide
// its output spike in cycle t+1. The latencies below count those cycles from a
// primary input spike to the first output spike. The loop periods are the
// spacing that spikes of one input train must keep so that a fed-back spike
// meets the next input spike (adders, complex neuron).
package snp_pkg;

  // Threshold of the alpha (error-free) basic neurons.
  localparam int unsigned ALPHA_THRESHOLD = 2;

  // Neuron counts, i.e. widths of the beta (error-injection) vectors.
  localparam int unsigned ODD_NEURONS        = 3;
  localparam int unsigned EVEN_NEURONS       = 2;
  localparam int unsigned ADDER1B_NEURONS    = ODD_NEURONS + EVEN_NEURONS;
  localparam int unsigned CONVERTER_NEURONS  = 4 * ADDER1B_NEURONS + 6;
  localparam int unsigned CONVERTER12_NEURONS = 11 * ADDER1B_NEURONS + 18;
  localparam int unsigned RULER_NEURONS      = 14;
  localparam int unsigned COMPLEX_NEURONS    = CONVERTER_NEURONS + RULER_NEURONS;
  localparam int unsigned ADDER_NEURONS      = 4;

  // Latencies in cycles (levels of the network).
  localparam int unsigned ODD_EVEN_LATENCY    = 2;
  localparam int unsigned CONVERTER_LATENCY   = 3 * ODD_EVEN_LATENCY;
  localparam int unsigned CONVERTER12_LATENCY = 5 * ODD_EVEN_LATENCY + 1;
  localparam int unsigned RULER_LATENCY       = 3;
  localparam int unsigned COMPLEX_LATENCY     = CONVERTER_LATENCY + RULER_LATENCY;
  localparam int unsigned ADDER_LATENCY       = 2;
  localparam int unsigned MOTIF_ADDER_LATENCY = 3;
  localparam int unsigned SUBTRACTOR_LATENCY  = 1;
  localparam int unsigned LP_MOTIF_LATENCY    = 2;

endpackage
