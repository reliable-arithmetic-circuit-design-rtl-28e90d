// tb_snp_ruler: self-checking test of the ruler network.
//
// Drives a random spike count n = 0..6 as the binary number {a0, a1, a2}
// every cycle. Three cycles later out must fire for the firing rules (n = 1,
// 4, 6), feedback must fire for the do-nothing rule (n = 2), and neither for
// the forgetting rules (n = 3, 5) or no spike. Counts how often each rule was
// exercised and fails if one never was.
module tb_snp_ruler;
  import snp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a0, a1, a2, out, feedback;
  logic [RULER_NEURONS-1:0] beta;
  int unsigned hist [0:4095];
  int unsigned seen [0:6];
  int checks = 0, failures = 0;

  snp_ruler dut (.clk, .rst_n, .a0, .a1, .a2, .beta, .out, .feedback);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n;
    logic exp_out, exp_fb;
    {a0, a1, a2} = '0; beta = '0;
    foreach (seen[i]) seen[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      n       = (c >= RULER_LATENCY) ? hist[c-RULER_LATENCY] : 0;
      exp_out = (n == 1) || (n == 4) || (n == 6);
      exp_fb  = (n == 2);
      checks += 2;
      if (out !== exp_out || feedback !== exp_fb) begin
        failures++;
        $display("FAIL cycle %0d: n=%0d out=%b fb=%b expected %b %b", c, n, out, feedback, exp_out, exp_fb);
      end
      if (c >= RULER_LATENCY) seen[n]++;
      n = $urandom % 7;
      {a0, a1, a2} = 3'(n);
      hist[c] = n;
    end
    for (int i = 0; i <= 6; i++) begin
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL: count %0d never exercised", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
