// tb_spike_converter12: self-checking test of spike_converter12.
//
// Random 12-bit spike sets every cycle, plus the all-ones set of twelve
// spikes now and then; {a0, a1, a2, a3} (a0 the MSB) must be the binary count of spikes.
// A reference computed from the input history in the testbench (not from the
// neuron network) gives the expected output; the check also confirms the
// latency of 11 cycles. A watchdog ends the run if it hangs.
module tb_spike_converter12;
  import snp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] in;
  logic [11:0] hist [0:4095];
  logic [CONVERTER12_NEURONS-1:0] beta;
  logic a0, a1, a2, a3;
  function automatic logic [3:0] got(); return {a0, a1, a2, a3}; endfunction
  int checks = 0, failures = 0;

  spike_converter12 dut (.clk, .rst_n, .in, .beta, .a0, .a1, .a2, .a3);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] expected(input logic [11:0] v); return 4'($countones(v));
  endfunction

  initial begin
    int unsigned n;
    in = '0; beta = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (c >= 11) begin
        checks++;
        if (got() !== expected(hist[c-11])) begin
          failures++;
          $display("FAIL cycle %0d: input %b got %b expected %b", c, hist[c-11], got(), expected(hist[c-11]));
        end
      end else begin
        checks++;
        if (got() !== '0) begin
          failures++;
          $display("FAIL cycle %0d: output before the first result", c);
        end
      end
      in = (c % 7 == 3) ? 12'hfff : 12'($urandom);
      hist[c] = in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
