// tb_lp_motif: self-checking test of the motif-improved LP neuron.
//
// For the first-order motif (the default) and a second-order one, every
// combination of threshold errors (beta) is applied together with every
// input pair, and the output is checked two cycles later. The expected value
// is the LP function of two inputs (a spike for exactly one input spike),
// except that two input spikes must produce a wrong spike when the output
// neuron and all HP neurons are in error: the only failure of the motif. For
// order 1 this reproduces the four signal-analysis cases of the motif (no
// error, output LP in error, HP in error, both).
module tb_lp_motif;
  import snp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in1, in2, out_o1, out_o2;
  logic [3:0] beta_o1;
  logic [4:0] beta_o2;
  int checks = 0, failures = 0, masked = 0;

  lp_motif                dut_o1 (.clk, .rst_n, .in1, .in2, .beta(beta_o1), .out(out_o1));
  lp_motif #(.ORDER(2))   dut_o2 (.clk, .rst_n, .in1, .in2, .beta(beta_o2), .out(out_o2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic expected(input logic i1, input logic i2, input logic out_err, input logic all_hp_err);
    if (i1 && i2) return out_err && all_hp_err;
    return i1 ^ i2;
  endfunction

  initial begin
    logic e1, e2;
    in1 = 1'b0; in2 = 1'b0; beta_o1 = '0; beta_o2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 32; b++) begin
      for (int v = 0; v < 4; v++) begin
        @(negedge clk);
        beta_o1 = 4'(b);
        beta_o2 = 5'(b);
        {in1, in2} = 2'(v);
        e1 = expected(in1, in2, beta_o1[0], beta_o1[1]);
        e2 = expected(in1, in2, beta_o2[0], &beta_o2[2:1]);
        repeat (LP_MOTIF_LATENCY) @(negedge clk);
        checks += 2;
        if (out_o1 !== e1) begin failures++; $display("FAIL order1 beta=%b in=%b%b out=%b", beta_o1, in1, in2, out_o1); end
        if (out_o2 !== e2) begin failures++; $display("FAIL order2 beta=%b in=%b%b out=%b", beta_o2, in1, in2, out_o2); end
        if (in1 && in2 && (beta_o1 != 0) && !e1) masked++;
        {in1, in2} = 2'b00;
      end
    end
    checks++;
    if (masked == 0) begin failures++; $display("FAIL: no error was ever masked"); end
    $display("errors masked %0d", masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
