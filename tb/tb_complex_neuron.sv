// tb_complex_neuron: self-checking test of the representative complex neuron.
//
// The reference is a plain SNP neuron with rules a -> a, a^3 -> lambda,
// a^4 -> a, a^5 -> lambda, a^6 -> a and do-nothing a^2: each step it adds the
// new spikes to those it kept, fires and empties for 1, 4 or 6, empties for 3
// or 5, keeps 2 spikes for 2. Because the circuit's feedback loop is 9 cycles
// long, inputs applied in cycle c and c+9 are consecutive steps of the same
// neuron; the testbench feeds random spike sets (0..4 spikes) every cycle,
// i.e. 9 interleaved neurons, and checks the output 9 cycles later. It first
// replays one directed sequence (2 spikes, then 1: kept then forgotten; 2,
// then 2: kept then 4 -> fire). Counts fire, forget and do-nothing steps and
// fails if one of them never occurred.
module tb_complex_neuron;
  import snp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] in;
  logic       out;
  logic [COMPLEX_NEURONS-1:0] beta;
  logic       exp_hist [0:8191];
  int unsigned kept [0:8];
  int checks = 0, failures = 0;
  int n_fire = 0, n_forget = 0, n_keep = 0;

  complex_neuron dut (.clk, .rst_n, .in, .beta, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference SNP neuron step for stream s.
  function automatic logic step(input int unsigned s, input logic [3:0] spikes);
    int unsigned total;
    total = kept[s] + $countones(spikes);
    kept[s] = 0;
    case (total)
      1, 4, 6: begin n_fire++;   return 1'b1; end
      3, 5:    begin n_forget++; return 1'b0; end
      2:       begin n_keep++;   kept[s] = 2; return 1'b0; end
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    logic [3:0] directed [0:35];
    foreach (kept[i]) kept[i] = 0;
    foreach (directed[i]) directed[i] = '0;
    directed[0]  = 4'b0011;  // stream 0: keep 2
    directed[9]  = 4'b0100;  // stream 0: 2 + 1 = 3, forget
    directed[18] = 4'b1001;  // stream 0: keep 2
    directed[27] = 4'b0110;  // stream 0: 2 + 2 = 4, fire
    in = '0; beta = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      checks++;
      if (out !== ((c >= COMPLEX_LATENCY) ? exp_hist[c-COMPLEX_LATENCY] : 1'b0)) begin
        failures++;
        $display("FAIL cycle %0d: out=%b", c, out);
      end
      in = (c < 36) ? directed[c] : 4'($urandom);
      exp_hist[c] = step(c % COMPLEX_LATENCY, in);
    end
    checks += 3;
    if (n_fire == 0 || n_forget == 0 || n_keep == 0) begin
      failures++;
      $display("FAIL: a rule was never applied (fire %0d forget %0d keep %0d)", n_fire, n_forget, n_keep);
    end
    $display("fire %0d forget %0d do-nothing %0d", n_fire, n_forget, n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
