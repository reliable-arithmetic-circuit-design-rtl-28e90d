// tb_spike_adder_1bit: self-checking test of spike_adder_1bit.
//
// Random 3-bit spike sets every cycle; {e, o} must be the binary count of spikes.
// A reference computed from the input history in the testbench (not from the
// neuron network) gives the expected output; the check also confirms the
// latency of 2 cycles. A watchdog ends the run if it hangs.
module tb_spike_adder_1bit;
  import snp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3-1:0] in;
  logic [3-1:0] hist [0:4095];
  logic [ADDER1B_NEURONS-1:0] beta;
  logic o, e; function automatic logic [1:0] got(); return {e, o}; endfunction
  int checks = 0, failures = 0;

  spike_adder_1bit dut (.clk, .rst_n, .in, .beta, .o(o), .e(e));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] expected(input logic [2:0] v); return 2'($countones(v));
  endfunction

  initial begin
    int unsigned n;
    in = '0; beta = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (c >= 2) begin
        checks++;
        if (got() !== expected(hist[c-2])) begin
          failures++;
          $display("FAIL cycle %0d: input %b got %b expected %b", c, hist[c-2], got(), expected(hist[c-2]));
        end
      end else begin
        checks++;
        if (got() !== '0) begin
          failures++;
          $display("FAIL cycle %0d: output before the first result", c);
        end
      end
      in = 3'($urandom);
      hist[c] = in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
