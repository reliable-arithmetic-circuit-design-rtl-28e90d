// tb_spike_converter: self-checking test of spike_converter.
//
// Random 6-bit spike sets every cycle; {a0, a1, a2} (a0 the MSB) must be the binary count of spikes.
// A reference computed from the input history in the testbench (not from the
// neuron network) gives the expected output; the check also confirms the
// latency of 6 cycles. A watchdog ends the run if it hangs.
module tb_spike_converter;
  import snp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [6-1:0] in;
  logic [6-1:0] hist [0:4095];
  logic [CONVERTER_NEURONS-1:0] beta;
  logic a0, a1, a2; function automatic logic [2:0] got(); return {a0, a1, a2}; endfunction
  int checks = 0, failures = 0;

  spike_converter dut (.clk, .rst_n, .in, .beta, .a0, .a1, .a2);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] expected(input logic [5:0] v); return 3'($countones(v));
  endfunction

  initial begin
    int unsigned n;
    in = '0; beta = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (c >= 6) begin
        checks++;
        if (got() !== expected(hist[c-6])) begin
          failures++;
          $display("FAIL cycle %0d: input %b got %b expected %b", c, hist[c-6], got(), expected(hist[c-6]));
        end
      end else begin
        checks++;
        if (got() !== '0) begin
          failures++;
          $display("FAIL cycle %0d: output before the first result", c);
        end
      end
      in = 6'($urandom);
      hist[c] = in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
