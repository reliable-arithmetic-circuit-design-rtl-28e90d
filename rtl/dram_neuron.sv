// dram_neuron: behavioural model of the DRAM-type CMOS spiking neuron.
//
// This is a behavioural model of an analog circuit, not synthesizable logic.
// The circuit has three stages, each driven by its own clock phase:
//  - integration: every input pulse opens a pass gate and adds a fixed charge
//    step to the capacitor at node n1, so the voltage of n1 represents the
//    number of input spikes of the period; C1 discharges n1 (reset);
//  - evaluation: C2 connects n1 (large capacitor) to n2 (small capacitor), and
//    charge sharing copies the voltage of n1 to n2, where it is held; the LP
//    variant adds a pull-down transistor on n2 whose gate is n1, so a large
//    count (n1 above that transistor's threshold V_TN) empties n2 instead;
//  - fire: C3 passes n2 to n3, an inverter compares n3 with its switching
//    threshold and a second inverter buffers and shapes the output pulse; C4
//    discharges n3 until the next C3.
// One period runs C3 (fire on the previous period's count, inputs arrive),
// C2, C4 and C1, so a spike appears during C3 of the period after its inputs.
// The stages, clocks, the n1-gated pull-down of the LP variant and the single
// inverter threshold are the document's. The voltages and capacitances are
// not given: V_STEP, the capacitor ratio and the thresholds are this model's
// own values. For the HP neuron the inverter threshold lies between one and
// two charge steps; for the LP neuron it lies below one step, and the
// pull-down threshold between one and two steps, so one pulse fires and two
// are forgotten. The model works on voltages only: the pass gates are ideal
// switches and n1 is assumed large enough that charge sharing with n2 leaves
// it unchanged. Nodes n2 and n3 keep their voltage while no clock phase
// drives them, as the capacitors do; n3 is therefore written as a latch.
module dram_neuron #(
  parameter bit          HIGH_PASS = 1'b1,  // 1: HP neuron, 0: LP neuron
  parameter int unsigned N_IN      = 2,     // number of pass gates (inputs)
  parameter real         V_STEP    = 0.3,   // n1 rise per input pulse (V)
  parameter real         C_RATIO   = 10.0,  // C(n1) / C(n2)
  parameter real         V_INV     = HIGH_PASS ? 0.45 : 0.15,  // inverter threshold (V)
  parameter real         V_TN      = 0.45   // LP only: pull-down threshold on n1 (V)
) (
  input  logic [N_IN-1:0] in,
  input  logic            c1,
  input  logic            c2,
  input  logic            c3,
  input  logic            c4,
  output logic            out
);
  real n1 = 0.0, n2 = 0.0, n3;
  logic [N_IN-1:0] in_q = '0;
  logic shared = 1'b0;

  // Integration: one charge step per rising input pulse; C1 resets n1.
  always @(in or c1) begin
    if (c1) n1 = 0.0;
    else    n1 = n1 + V_STEP * real'($countones(in & ~in_q));
    in_q = in;
  end

  // Evaluation: charge sharing from n1 to n2 once per C2 pulse; in the LP
  // variant a high n1 holds n2 at ground whenever it is above V_TN.
  always @(c2 or n1) begin
    if (!HIGH_PASS && n1 > V_TN) begin
      n2 = 0.0;
    end else if (c2 && !shared) begin
      n2 = (C_RATIO * n1 + n2) / (C_RATIO + 1.0);
    end
    shared = c2;
  end

  // Fire stage: C3 passes n2 to n3, C4 discharges n3; n3 holds otherwise.
  always_latch begin
    if (c4)      n3 = 0.0;
    else if (c3) n3 = n2;
  end

  // Two inverters: threshold comparison and output buffer.
  always_comb out = (n3 > V_INV);

endmodule
