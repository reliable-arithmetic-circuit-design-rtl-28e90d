// snp_top: the spiking-neuron (SNP) arithmetic circuits side by side.
//
// Every circuit below is a network of LP and HP neurons (one-cycle registers
// that fire on fewer than / at least two input spikes), computing on numbers
// encoded as trains of spikes. The circuits are independent; each has its own
// ports, prefixed by its name:
//   cn_   complex neuron with rules a->a, a^3->lambda, a^4->a, a^5->lambda,
//         a^6->a and do-nothing a^2 (converter + ruler + feedback)
//   cv_   twelve-input converter: spike count as a 4-bit number
//         cv_count = {a0, a1, a2, a3}, a0 the most significant bit
//   add_  adder with carry feedback (inputs every 2nd cycle)
//   sub_  subtractor |in1 - in2| (one LP neuron)
//   cmp_  comparator, one spike when |in1 - in2| >= CMP_THRESHOLD
//   mlp_  motif-improved LP neuron of order MLP_ORDER
//   madd_ motif-improved adder (inputs every 3rd cycle)
//   mcmp_ motif-improved comparator
//   dn_   behavioural models of the DRAM-type CMOS neuron circuit, one HP
//         and one LP, sharing the four clock phases dn_c1..dn_c4 (not
//         synthesizable: they model capacitor voltages)
// Each *_beta input raises the threshold of individual neurons by one, the
// error model the reliability of these circuits is judged by; tie them to
// zero for error-free operation. The bit order of each vector is given in the
// circuit's own file. Timing: a common clock, one SNP time step per cycle,
// asynchronous active-low reset.
module snp_top #(
  parameter int unsigned CMP_THRESHOLD = 3,
  parameter int unsigned MLP_ORDER     = 1,
  parameter int unsigned MADD_ORDER    = 1
) (
  input  logic clk,
  input  logic rst_n,

  input  logic [3:0] cn_in,
  input  logic [snp_pkg::COMPLEX_NEURONS-1:0] cn_beta,
  output logic cn_out,

  input  logic [11:0] cv_in,
  input  logic [snp_pkg::CONVERTER12_NEURONS-1:0] cv_beta,
  output logic [3:0] cv_count,

  input  logic add_in1,
  input  logic add_in2,
  input  logic [snp_pkg::ADDER_NEURONS-1:0] add_beta,
  output logic add_sum,
  output logic add_cout,

  input  logic sub_in1,
  input  logic sub_in2,
  input  logic sub_beta,
  output logic sub_out,

  input  logic cmp_in1,
  input  logic cmp_in2,
  input  logic [CMP_THRESHOLD+3:0] cmp_beta,
  output logic cmp_out,

  input  logic mlp_in1,
  input  logic mlp_in2,
  input  logic [MLP_ORDER+2:0] mlp_beta,
  output logic mlp_out,

  input  logic madd_in1,
  input  logic madd_in2,
  input  logic [MADD_ORDER+6:0] madd_beta,
  output logic madd_sum,
  output logic madd_cout,

  input  logic mcmp_in1,
  input  logic mcmp_in2,
  input  logic [CMP_THRESHOLD+11:0] mcmp_beta,
  output logic mcmp_out,

  input  logic [1:0] dn_hp_in,
  input  logic [1:0] dn_lp_in,
  input  logic dn_c1,
  input  logic dn_c2,
  input  logic dn_c3,
  input  logic dn_c4,
  output logic dn_hp_out,
  output logic dn_lp_out
);

  complex_neuron u_cn (.clk, .rst_n, .in(cn_in), .beta(cn_beta), .out(cn_out));

  spike_converter12 u_cv (
    .clk, .rst_n, .in(cv_in), .beta(cv_beta),
    .a0(cv_count[3]), .a1(cv_count[2]), .a2(cv_count[1]), .a3(cv_count[0])
  );

  snp_adder u_add (
    .clk, .rst_n, .in1(add_in1), .in2(add_in2), .beta(add_beta),
    .sum(add_sum), .cout(add_cout)
  );

  snp_subtractor u_sub (
    .clk, .rst_n, .in1(sub_in1), .in2(sub_in2), .beta(sub_beta), .out(sub_out)
  );

  snp_comparator #(.THRESHOLD(CMP_THRESHOLD)) u_cmp (
    .clk, .rst_n, .in1(cmp_in1), .in2(cmp_in2), .beta(cmp_beta), .out(cmp_out)
  );

  lp_motif #(.ORDER(MLP_ORDER)) u_mlp (
    .clk, .rst_n, .in1(mlp_in1), .in2(mlp_in2), .beta(mlp_beta), .out(mlp_out)
  );

  motif_adder #(.ORDER(MADD_ORDER)) u_madd (
    .clk, .rst_n, .in1(madd_in1), .in2(madd_in2), .beta(madd_beta),
    .sum(madd_sum), .cout(madd_cout)
  );

  motif_comparator #(.THRESHOLD(CMP_THRESHOLD)) u_mcmp (
    .clk, .rst_n, .in1(mcmp_in1), .in2(mcmp_in2), .beta(mcmp_beta), .out(mcmp_out)
  );

  dram_neuron u_dn_hp (
    .in(dn_hp_in), .c1(dn_c1), .c2(dn_c2), .c3(dn_c3), .c4(dn_c4), .out(dn_hp_out)
  );

  dram_neuron #(.HIGH_PASS(1'b0)) u_dn_lp (
    .in(dn_lp_in), .c1(dn_c1), .c2(dn_c2), .c3(dn_c3), .c4(dn_c4), .out(dn_lp_out)
  );

endmodule
