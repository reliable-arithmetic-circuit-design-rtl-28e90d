// tb_snp_comparator: self-checking test of the spike-train comparator.
//
// Three comparators with thresholds 3 (the default), 1 and 5 receive the same
// pairs of aligned spike trains (a and b spikes from cycle 1, then idle
// cycles). Each must fire exactly one spike when |a - b| >= its threshold and
// none otherwise. The spike is expected in cycle min(a,b) + T + 4 for T >= 2
// and min(a,b) + 4 for T = 1 (counted from cycle 1): for the document's
// example 7 against 2 with T = 3 that is cycle 9. In that example the
// internal trains of the T = 3 comparator are also checked against the
// published timing diagram: d1 (subtraction) in cycles 4-8, d2 (end of the
// delay chain) 6-10, d3 (comparison) 7-9, d4 8-10, d5 9-10. Finally a threshold error in
// the subtraction neuron must make 5 against 4 fire wrongly, the
// single-neuron failure that the motif version removes.
module tb_snp_comparator;
  import snp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in1, in2;
  logic out3, out1, out5;
  logic [6:0]  beta3;
  logic [4:0]  beta1;
  logic [8:0]  beta5;
  int checks = 0, failures = 0, fired = 0, silent = 0;

  snp_comparator                 dut3 (.clk, .rst_n, .in1, .in2, .beta(beta3), .out(out3));
  snp_comparator #(.THRESHOLD(1)) dut1 (.clk, .rst_n, .in1, .in2, .beta(beta1), .out(out1));
  snp_comparator #(.THRESHOLD(5)) dut5 (.clk, .rst_n, .in1, .in2, .beta(beta5), .out(out5));

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
    return (thr == 1) ? lo + 4 : lo + thr + 4;
  endfunction

  function automatic bit in_span(input int t, input int first, input int last);
    return (t >= first) && (t <= last);
  endfunction

  task automatic run(input int a, input int b, input logic err, input bit diagram = 1'b0);
    int hi, w3, w1, w5, c3;
    hi = (a > b) ? a : b;
    w3 = when(a, b, 3);
    w1 = when(a, b, 1);
    w5 = when(a, b, 5);
    c3 = 0;
    // Iteration t observes outputs at the start of cycle t, then drives cycle t.
    for (int t = 1; t <= hi + 14; t++) begin
      @(negedge clk);
      if (!err) begin
        checks += 3;
        if (out3 !== (t == w3)) begin failures++; $display("FAIL T=3 %0d vs %0d cycle %0d", a, b, t); end
        if (out1 !== (t == w1)) begin failures++; $display("FAIL T=1 %0d vs %0d cycle %0d", a, b, t); end
        if (out5 !== (t == w5)) begin failures++; $display("FAIL T=5 %0d vs %0d cycle %0d", a, b, t); end
      end
      if (diagram) begin
        checks += 5;
        if (dut3.d1 !== in_span(t, 4, 8) || dut3.g_cmp.chain[2] !== in_span(t, 6, 10) ||
            dut3.d3 !== in_span(t, 7, 9) || dut3.d4 !== in_span(t, 8, 10) || dut3.d5 !== in_span(t, 9, 10)) begin
          failures++;
          $display("FAIL timing diagram cycle %0d: d1..d5 = %b%b%b%b%b", t,
                   dut3.d1, dut3.g_cmp.chain[2], dut3.d3, dut3.d4, dut3.d5);
        end
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
    run(7, 2, 1'b0, 1'b1);
    for (int i = 0; i < 300; i++) run($urandom % 14, $urandom % 14, 1'b0);
    beta3[0] = 1'b1;
    run(5, 4, 1'b1);
    beta3 = '0;
    checks++;
    if (fired == 0 || silent == 0) begin failures++; $display("FAIL: a decision never occurred"); end
    $display("fired %0d silent %0d", fired, silent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
