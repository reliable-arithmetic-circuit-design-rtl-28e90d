// tb_hp_neuron: self-checking test of the High Pass neuron.
//
// Drives random spikes and random beta (threshold-shift error) into a 3-input
// and a 2-input HP neuron every cycle and checks, one cycle later, that the
// neuron fired exactly when it saw 2 (3 under beta) or more spikes, and that
// reset clears the output.
module tb_hp_neuron;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] in3;
  logic [1:0] in1;
  logic       beta3, beta1;
  logic       out3, out1;
  int checks = 0, failures = 0;

  hp_neuron #(.N_IN(3)) dut3 (.clk, .rst_n, .in(in3), .beta(beta3), .out(out3));
  hp_neuron #(.N_IN(2)) dut1 (.clk, .rst_n, .in(in1), .beta(beta1), .out(out1));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    int unsigned n, thr;
    logic exp3, exp1;
    in3 = '0; in1 = 2'b0; beta3 = 1'b0; beta1 = 1'b0;
    repeat (2) @(negedge clk);
    check(out3, 1'b0, "reset");
    rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      if (c > 0) begin
        check(out3, exp3, "hp 3-input");
        check(out1, exp1, "hp 2-input");
      end
      in3   = 3'($urandom);
      in1   = 2'($urandom);
      beta3 = ($urandom % 4) == 0;
      beta1 = 1'($urandom);
      n   = $countones(in3);
      thr = beta3 ? 3 : 2;
      exp3 = (n >= thr);
      exp1 = beta1 ? 1'b0 : (in1 == 2'b11);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
