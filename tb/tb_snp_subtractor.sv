// tb_snp_subtractor: self-checking test of the one-neuron subtractor.
//
// Applies pairs of spike trains of a and b spikes that start in the same
// cycle, separated by idle cycles. The difference train must hold |a - b|
// spikes, exactly in the cycles start+min(a,b)+1 .. start+max(a,b) (one cycle
// of latency). The first pair is the document's example |3 - 6| = 3 starting
// in cycle 1, whose result spikes fall in cycles 5, 6 and 7. A last pair with
// the threshold error injected must let the overlap through (max(a,b) spikes).
module tb_snp_subtractor;
  import snp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in1, in2, beta, out;
  int checks = 0, failures = 0;

  snp_subtractor dut (.clk, .rst_n, .in1, .in2, .beta, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one pair; cycle numbers are relative to the cycle before the trains.
  task automatic run(input int a, input int b, input logic err);
    int lo, hi, cnt;
    logic exp;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    beta = err;
    cnt = 0;
    for (int t = 1; t <= hi + 4; t++) begin
      @(negedge clk);
      // out now shows the decision on the inputs of cycle t-1.
      exp = err ? (t - 1 >= 1 && t - 1 <= hi) : (t - 1 > lo && t - 1 <= hi);
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL |%0d-%0d| cycle %0d: out=%b expected %b", a, b, t, out, exp);
      end
      cnt += int'(out);
      in1 = (t <= a);
      in2 = (t <= b);
    end
    checks++;
    if (cnt != (err ? hi : hi - lo)) begin
      failures++;
      $display("FAIL |%0d-%0d| gave %0d spikes", a, b, cnt);
    end
  endtask

  initial begin
    in1 = 1'b0; in2 = 1'b0; beta = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(3, 6, 1'b0);
    for (int i = 0; i < 200; i++) run($urandom % 10, $urandom % 10, 1'b0);
    run(4, 2, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
