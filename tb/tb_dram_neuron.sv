// tb_dram_neuron: self-checking test of the behavioural DRAM-type neuron.
//
// Generates the four clock phases of the circuit with a period of 500 ps in
// the order C3, inputs, C2 together with C4, C1, and drives a random number of
// input pulses (0, 1 or 2) into a 2-input HP and a 2-input LP model in each
// period. During C3 of the next period the HP neuron must pulse exactly when
// two pulses arrived and the LP neuron exactly when one did; outside C3 both
// outputs must stay low. The first periods replay the document's SPICE
// stimulus (two pulses, then one), which must give one HP output pulse.
module tb_dram_neuron;
  timeunit 1ps;
  timeprecision 1ps;

  logic [1:0] in_hp, in_lp;
  logic c1 = 1'b0, c2 = 1'b0, c3 = 1'b0, c4 = 1'b0;
  logic out_hp, out_lp;
  int checks = 0, failures = 0, hp_pulses = 0, lp_pulses = 0;

  dram_neuron                     dut_hp (.in(in_hp), .c1, .c2, .c3, .c4, .out(out_hp));
  dram_neuron #(.HIGH_PASS(1'b0)) dut_lp (.in(in_lp), .c1, .c2, .c3, .c4, .out(out_lp));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int n_hp, n_lp, prev_hp, prev_lp;
    in_hp = '0; in_lp = '0;
    prev_hp = 0; prev_lp = 0;
    // Start with n1 discharged.
    c1 = 1'b1; #50; c1 = 1'b0; #50;
    for (int p = 0; p < 400; p++) begin
      if (p == 0)      n_hp = 2;
      else if (p == 1) n_hp = 1;
      else             n_hp = $urandom % 3;
      n_lp = $urandom % 3;
      // C3: fire stage evaluates the previous period.
      c3 = 1'b1;
      #30;
      check(out_hp == (prev_hp == 2), "HP output during C3");
      check(out_lp == (prev_lp == 1), "LP output during C3");
      hp_pulses += int'(out_hp);
      lp_pulses += int'(out_lp);
      #10;
      // Input pulses overlap the end of C3.
      in_hp = (n_hp == 2) ? 2'b11 : (n_hp == 1) ? 2'(1 << ($urandom % 2)) : 2'b00;
      in_lp = (n_lp == 2) ? 2'b11 : (n_lp == 1) ? 2'(1 << ($urandom % 2)) : 2'b00;
      #20; c3 = 1'b0;
      #100; in_hp = '0; in_lp = '0;
      // C2 copies n1 to n2, C4 discharges n3.
      #20; c2 = 1'b1; c4 = 1'b1;
      #60; c2 = 1'b0;
      #60;
      check(out_hp == 1'b0 && out_lp == 1'b0, "outputs low outside C3");
      // C1 resets n1, then C4 falls before the next C3.
      #60; c1 = 1'b1;
      #70; c1 = 1'b0;
      #30; c4 = 1'b0;
      #70;
      prev_hp = n_hp;
      prev_lp = n_lp;
    end
    check(hp_pulses > 0 && lp_pulses > 0, "both neurons fired");
    $display("HP pulses %0d LP pulses %0d", hp_pulses, lp_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
