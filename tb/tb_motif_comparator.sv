// tb_motif_comparator: self-checking test of the motif-improved comparator.
//
// Comparators with thresholds 3 (the default), 2 and 5 receive the same pairs
// of aligned spike trains (a and b spikes from cycle 1, then idle cycles).
// Each must fire exactly one spike when |a - b| >= its threshold and none
// otherwise, in cycle min(a,b) + T + 7 (counted from cycle 1; for 7 against 2
// with T = 3, cycle 12). The default comparator is then run with a threshold
// error injected into each single neuron in turn, which it must tolerate, and
// with errors in both the HP neuron and the output neuron of its subtraction
// motif, which must make 5 against 4 fire wrongly.
module tb_motif_comparator;
  import snp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in1, in2;
  logic out3, out1, out5;  // out1: threshold 2
  logic [14:0] beta3;
  logic [13:0] beta1;
  logic [16:0] beta5;
  int checks = 0, failures = 0, fired = 0, silent = 0;

  motif_comparator                 dut3 (.clk, .rst_n, .in1, .in2, .beta(beta3), .out(out3));
  motif_comparator #(.THRESHOLD(2)) dut1 (.clk, .rst_n, .in1, .in2, .beta(beta1), .out(out1));
  motif_comparator #(.THRESHOLD(5)) dut5 (.clk, .rst_n, .in1, .in2, .beta(beta5), .out(out5));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int when(input int a, input int b, input int thr);
    int lo, d;
    lo = (a < b) ? a : b;
    d  = (a > b) ? a - b : b - a;
    if (d < thr) return -1;
    return lo + thr + 7;
  endfunction

  task automatic run(input int a, input int b, input logic err);
    int hi, w3, w1, w5, c3;
    hi = (a > b) ? a : b;
    w3 = when(a, b, 3);
    w1 = when(a, b, 2);
    w5 = when(a, b, 5);
    c3 = 0;
    // Iteration t observes outputs at the start of cycle t, then drives cycle t.
    for (int t = 1; t <= hi + 18; t++) begin
      @(negedge clk);
      if (!err) begin
        checks += 3;
        if (out3 !== (t == w3)) begin failures++; $display("FAIL T=3 %0d vs %0d cycle %0d", a, b, t); end
        if (out1 !== (t == w1)) begin failures++; $display("FAIL T=2 %0d vs %0d cycle %0d", a, b, t); end
        if (out5 !== (t == w5)) begin failures++; $display("FAIL T=5 %0d vs %0d cycle %0d", a, b, t); end
      end
      c3 += int'(out3);
      in1 = (t <= a);
      in2 = (t <= b);
    end
    if (!err) begin
      if (w3 > 0) fired++; else silent++;
    end else begin
      checks++;
      if (c3 != 1) begin failures++; $display("FAIL: erroneous comparator did not misfire"); end
    end
  endtask

  initial begin
    in1 = 1'b0; in2 = 1'b0; beta3 = '0; beta1 = '0; beta5 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(7, 2, 1'b0);
    for (int i = 0; i < 300; i++) run($urandom % 14, $urandom % 14, 1'b0);
    // Any single threshold error is tolerated.
    for (int e = 0; e < 15; e++) begin
      beta3 = 15'(1) << e;
      for (int i = 0; i < 15; i++) run($urandom % 10, $urandom % 10, 1'b0);
    end
    // Errors in HP(in1,in2) and in the subtraction output LP together.
    beta3 = '0;
    beta3[1] = 1'b1;
    beta3[3] = 1'b1;
    run(5, 4, 1'b1);
    beta3 = '0;
    checks++;
    if (fired == 0 || silent == 0) begin failures++; $display("FAIL: a decision never occurred"); end
    $display("fired %0d silent %0d", fired, silent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
