// tb_motif_adder: self-checking test of the motif-improved spike-train adder.
//
// Numbers are trains of spikes applied one step every PERIOD cycles. The
// reference works step by step: n = in1 + in2 + carry; a SUM spike when
// n >= 1, a carry into the next step when n >= 2. Its SUM and carry spikes are
// expected exactly LATENCY cycles after their step. The run replays the
// document's example (1 + 2: inputs in steps 0 and 1, SUM in steps 0, 1, 2,
// three cycles apart),
// then random additions a + b where at most one operand exceeds one spike,
// checking every cycle and the total SUM count a + b. It then repeats random
// additions with a threshold error injected into each single neuron in turn,
// which the motif must tolerate, and finally injects errors into both the
// motif HP neuron and the sum-bit LP neuron, which must corrupt 1 + 1 (one
// SUM spike instead of two). Counts how often the carry feedback was used.
module tb_motif_adder;
  import snp_pkg::*;
  localparam int PERIOD  = 3;
  localparam int LATENCY = MOTIF_ADDER_LATENCY;
  localparam int NB      = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in1, in2, sum, cout;
  logic [NB-1:0] beta;
  int checks = 0, failures = 0, carries = 0;
  int cyc = 0;
  logic exp_sum [0:65535];
  logic exp_cout [0:65535];
  int sum_count = 0;

  motif_adder dut (.clk, .rst_n, .in1, .in2, .beta, .sum, .cout);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One cycle: check outputs (when check_on), then drive inputs.
  task automatic tick(input logic i1, input logic i2, input logic check_on);
    @(negedge clk);
    if (check_on) begin
      checks++;
      if (sum !== exp_sum[cyc] || cout !== exp_cout[cyc]) begin
        failures++;
        $display("FAIL cycle %0d: sum=%b cout=%b expected %b %b", cyc, sum, cout, exp_sum[cyc], exp_cout[cyc]);
      end
    end
    sum_count += int'(sum);
    in1 = i1; in2 = i2;
    cyc++;
  endtask

  // Apply one addition of a-spike and b-spike trains, then let it drain.
  task automatic add(input int a, input int b, input logic check_on);
    int steps, carry, n;
    steps = ((a > b) ? a : b) + 2;
    carry = 0;
    for (int k = 0; k < steps; k++) begin
      n = int'(k < a) + int'(k < b) + carry;
      exp_sum[cyc + LATENCY]  = (n >= 1);
      exp_cout[cyc + LATENCY] = (n >= 2);
      if (n >= 2) carries++;
      carry = int'(n >= 2);
      tick(k < a, k < b, check_on);
      for (int j = 1; j < PERIOD; j++) tick(1'b0, 1'b0, check_on);
    end
  endtask

  initial begin
    int a, b;
    foreach (exp_sum[i]) begin exp_sum[i] = 1'b0; exp_cout[i] = 1'b0; end
    in1 = 1'b0; in2 = 1'b0; beta = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // The document's example 1 + 2.
    sum_count = 0;
    add(1, 2, 1'b1);
    checks++;
    if (sum_count != 3) begin failures++; $display("FAIL 1+2 gave %0d", sum_count); end

    for (int t = 0; t < 300; t++) begin
      a = $urandom % 2;
      b = $urandom % 12;
      if (t % 2 == 1) begin automatic int x = a; a = b; b = x; end
      sum_count = 0;
      add(a, b, 1'b1);
      checks++;
      if (sum_count != a + b) begin
        failures++;
        $display("FAIL %0d + %0d gave %0d", a, b, sum_count);
      end
    end

    // Any single threshold error is tolerated.
    for (int e = 0; e < NB; e++) begin
      beta = NB'(1) << e;
      for (int t = 0; t < 20; t++) begin
        a = $urandom % 2;
        b = $urandom % 8;
        if (t % 2 == 1) begin automatic int x = a; a = b; b = x; end
        sum_count = 0;
        add(a, b, 1'b1);
        checks++;
        if (sum_count != a + b) begin
          failures++;
          $display("FAIL error in neuron %0d: %0d + %0d gave %0d", e, a, b, sum_count);
        end
      end
    end

    // Errors in the motif HP (beta[7]) and the sum-bit LP (beta[3]) together.
    beta = '0;
    beta[7] = 1'b1;
    beta[3] = 1'b1;
    sum_count = 0;
    add(1, 1, 1'b0);
    checks++;
    if (sum_count != 1) begin failures++; $display("FAIL double-error 1+1 gave %0d", sum_count); end
    beta = '0;
    add(0, 0, 1'b0);

    checks++;
    if (carries == 0) begin failures++; $display("FAIL: carry never used"); end
    $display("carry feedbacks %0d", carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
