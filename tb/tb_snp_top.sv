// tb_snp_top: end-to-end test of all SNP circuits in the top level.
//
// The top runs with its default parameters. Parallel processes drive the
// circuits at the same time, each against its own reference:
//  - complex neuron: random spike sets every cycle (nine interleaved step
//    sequences), checked against a plain SNP neuron with the same rules;
//  - twelve-input converter: random spike sets every cycle (some with all
//    twelve spikes), the 4-bit count checked 11 cycles later;
//  - adder and motif adder: random additions a + b (total SUM spikes), the
//    motif adder also with one random neuron in error per addition;
//  - subtractor: |a - b| spike count of aligned trains;
//  - comparator and motif comparator: one spike exactly when |a - b| >= 3,
//    the motif comparator with one random neuron in error per comparison;
//  - LP motif: random inputs and random single errors, checked against the LP
//    function;
//  - DRAM-type neuron models: four clock phases (C3, inputs, C2 with C4, C1)
//    and 0-2 input pulses per period; HP/LP output pulses in the next C3.
// It counts how often each mechanism happened (fire, forget and do-nothing
// rules with feedback, carry feedback, comparator firing and staying silent,
// an injected error masked) and fails for one that never did.
module tb_snp_top;
  import snp_pkg::*;
  localparam int T = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] cn_in;
  logic [COMPLEX_NEURONS-1:0] cn_beta;
  logic cn_out;
  logic [11:0] cv_in;
  logic [CONVERTER12_NEURONS-1:0] cv_beta;
  logic [3:0] cv_count;
  logic add_in1, add_in2, add_sum, add_cout;
  logic [ADDER_NEURONS-1:0] add_beta;
  logic sub_in1, sub_in2, sub_beta, sub_out;
  logic cmp_in1, cmp_in2, cmp_out;
  logic [T+3:0] cmp_beta;
  logic mlp_in1, mlp_in2, mlp_out;
  logic [3:0] mlp_beta;
  logic madd_in1, madd_in2, madd_sum, madd_cout;
  logic [7:0] madd_beta;
  logic mcmp_in1, mcmp_in2, mcmp_out;
  logic [T+11:0] mcmp_beta;
  logic [1:0] dn_hp_in, dn_lp_in;
  logic dn_c1, dn_c2, dn_c3, dn_c4, dn_hp_out, dn_lp_out;

  int checks = 0, failures = 0;
  int n_fire = 0, n_forget = 0, n_keep = 0, n_carry = 0, n_mcarry = 0;
  int n_cmp_fire = 0, n_cmp_silent = 0, n_masked = 0, n_overlap = 0;
  int n_dn_hp = 0, n_dn_lp = 0, n_cv_w8 = 0;

  snp_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- complex neuron ----------------
  task automatic run_cn(input int cycles);
    int unsigned kept [0:8];
    logic exp_q [$];
    int unsigned total;
    logic e;
    foreach (kept[i]) kept[i] = 0;
    for (int c = 0; c < cycles + COMPLEX_LATENCY; c++) begin
      @(negedge clk);
      if (c >= COMPLEX_LATENCY) begin
        e = exp_q.pop_front();
        check(cn_out === e, "complex neuron");
      end
      cn_in = (c < cycles) ? 4'($urandom) : 4'b0;
      total = kept[c % 9] + $countones(cn_in);
      kept[c % 9] = 0;
      case (total)
        1, 4, 6: begin n_fire++; e = 1'b1; end
        3, 5:    begin n_forget++; e = 1'b0; end
        2:       begin n_keep++; kept[c % 9] = 2; e = 1'b0; end
        default: e = 1'b0;
      endcase
      exp_q.push_back(e);
    end
  endtask

  // ---------------- twelve-input converter ----------------
  task automatic run_cv(input int cycles);
    logic [3:0] exp_q [$];
    for (int c = 0; c < cycles + CONVERTER12_LATENCY; c++) begin
      @(negedge clk);
      if (c >= CONVERTER12_LATENCY) check(cv_count === exp_q.pop_front(), "converter count");
      cv_in = (c >= cycles) ? 12'b0 : (c % 5 == 0) ? 12'hfff : 12'($urandom);
      if ($countones(cv_in) >= 8) n_cv_w8++;
      exp_q.push_back(4'($countones(cv_in)));
    end
  endtask

  // ---------------- adders ----------------
  task automatic run_add(input int ops);
    int a, b, cnt, steps;
    for (int i = 0; i < ops; i++) begin
      a = $urandom % 2; b = $urandom % 10;
      if (i % 2 != 0) begin int x = a; a = b; b = x; end
      if (a > 0 && b > 0) n_carry++;
      steps = ((a > b) ? a : b) + 3;
      cnt = 0;
      for (int k = 0; k < 2 * steps; k++) begin
        @(negedge clk);
        cnt += int'(add_sum);
        add_in1 = (k % 2 == 0) && (k / 2 < a);
        add_in2 = (k % 2 == 0) && (k / 2 < b);
      end
      check(cnt == a + b, "adder sum count");
    end
  endtask

  task automatic run_madd(input int ops);
    int a, b, cnt, steps;
    for (int i = 0; i < ops; i++) begin
      a = $urandom % 2; b = $urandom % 10;
      if (i % 2 != 0) begin int x = a; a = b; b = x; end
      madd_beta = (i % 3 == 0) ? '0 : 8'(1) << ($urandom % 8);
      if (a > 0 && b > 0) begin
        n_mcarry++;
        if (madd_beta[7] || madd_beta[3] || madd_beta[4]) n_masked++;
      end
      steps = ((a > b) ? a : b) + 3;
      cnt = 0;
      for (int k = 0; k < 3 * steps; k++) begin
        @(negedge clk);
        cnt += int'(madd_sum);
        madd_in1 = (k % 3 == 0) && (k / 3 < a);
        madd_in2 = (k % 3 == 0) && (k / 3 < b);
      end
      check(cnt == a + b, "motif adder sum count");
    end
    madd_beta = '0;
  endtask

  // ---------------- subtractor ----------------
  task automatic run_sub(input int ops);
    int a, b, cnt, hi;
    for (int i = 0; i < ops; i++) begin
      a = $urandom % 10; b = $urandom % 10;
      hi = (a > b) ? a : b;
      if (a > 0 && b > 0) n_overlap++;
      cnt = 0;
      for (int t = 1; t <= hi + 3; t++) begin
        @(negedge clk);
        cnt += int'(sub_out);
        sub_in1 = (t <= a);
        sub_in2 = (t <= b);
      end
      check(cnt == ((a > b) ? a - b : b - a), "subtractor count");
    end
  endtask

  // ---------------- comparators ----------------
  task automatic run_cmp(input int ops, input bit motif);
    int a, b, cnt, hi, d;
    for (int i = 0; i < ops; i++) begin
      a = $urandom % 12; b = $urandom % 12;
      hi = (a > b) ? a : b;
      d  = (a > b) ? a - b : b - a;
      if (motif) begin
        mcmp_beta = (i % 3 == 0) ? '0 : (T+12)'(1) << ($urandom % (T + 12));
        if (mcmp_beta != 0) n_masked++;
      end
      cnt = 0;
      for (int t = 1; t <= hi + 18; t++) begin
        @(negedge clk);
        cnt += motif ? int'(mcmp_out) : int'(cmp_out);
        if (motif) begin mcmp_in1 = (t <= a); mcmp_in2 = (t <= b); end
        else       begin cmp_in1  = (t <= a); cmp_in2  = (t <= b); end
      end
      check(cnt == int'(d >= T), motif ? "motif comparator" : "comparator");
      if (d >= T) n_cmp_fire++; else n_cmp_silent++;
    end
    mcmp_beta = '0;
  endtask

  // ---------------- LP motif ----------------
  task automatic run_mlp(input int cycles);
    logic exp_q [$];
    logic e;
    for (int c = 0; c < cycles + LP_MOTIF_LATENCY; c++) begin
      @(negedge clk);
      if (c >= LP_MOTIF_LATENCY) begin
        e = exp_q.pop_front();
        check(mlp_out === e, "LP motif");
      end
      // A new single error every 20 cycles, changed while the motif is idle.
      if (c % 20 == 0) mlp_beta = 4'(1) << ($urandom % 4);
      mlp_in1 = (c < cycles && c % 20 < 18) ? 1'($urandom) : 1'b0;
      mlp_in2 = (c < cycles && c % 20 < 18) ? 1'($urandom) : 1'b0;
      if (mlp_in1 && mlp_in2 && (mlp_beta[0] || mlp_beta[1])) n_masked++;
      exp_q.push_back(mlp_in1 ^ mlp_in2);
    end
    mlp_beta = '0;
  endtask

  // ---------------- DRAM-type neuron models ----------------
  task automatic run_dn(input int periods);
    int n_hp, n_lp, prev_hp, prev_lp;
    prev_hp = 0; prev_lp = 0;
    dn_c1 = 1'b1; #5; dn_c1 = 1'b0; #5;
    for (int p = 0; p < periods; p++) begin
      n_hp = $urandom % 3;
      n_lp = $urandom % 3;
      dn_c3 = 1'b1;
      #3;
      check(dn_hp_out == (prev_hp == 2), "DRAM HP neuron");
      check(dn_lp_out == (prev_lp == 1), "DRAM LP neuron");
      n_dn_hp += int'(dn_hp_out);
      n_dn_lp += int'(dn_lp_out);
      #1;
      dn_hp_in = (n_hp == 2) ? 2'b11 : (n_hp == 1) ? 2'b01 : 2'b00;
      dn_lp_in = (n_lp == 2) ? 2'b11 : (n_lp == 1) ? 2'b10 : 2'b00;
      #2; dn_c3 = 1'b0;
      #10; dn_hp_in = '0; dn_lp_in = '0;
      #2; dn_c2 = 1'b1; dn_c4 = 1'b1;
      #6; dn_c2 = 1'b0;
      #12; dn_c1 = 1'b1;
      #7; dn_c1 = 1'b0;
      #3; dn_c4 = 1'b0;
      #7;
      prev_hp = n_hp;
      prev_lp = n_lp;
    end
  endtask

  initial begin
    dn_hp_in = '0; dn_lp_in = '0;
    {dn_c1, dn_c2, dn_c3, dn_c4} = '0;
    cn_in = '0; cn_beta = '0;
    cv_in = '0; cv_beta = '0;
    {add_in1, add_in2} = '0; add_beta = '0;
    {sub_in1, sub_in2} = '0; sub_beta = 1'b0;
    {cmp_in1, cmp_in2} = '0; cmp_beta = '0;
    {mlp_in1, mlp_in2} = '0; mlp_beta = '0;
    {madd_in1, madd_in2} = '0; madd_beta = '0;
    {mcmp_in1, mcmp_in2} = '0; mcmp_beta = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fork
      run_cn(2000);
      run_cv(1000);
      run_add(150);
      run_madd(150);
      run_sub(200);
      run_cmp(120, 1'b0);
      run_cmp(120, 1'b1);
      run_mlp(1000);
      run_dn(300);
    join
    check(n_fire > 0,       "complex neuron fired");
    check(n_forget > 0,     "complex neuron forgot");
    check(n_keep > 0,       "complex neuron do-nothing feedback");
    check(n_cv_w8 > 0,      "converter count of eight or more");
    check(n_carry > 0,      "adder carry feedback");
    check(n_mcarry > 0,     "motif adder carry feedback");
    check(n_overlap > 0,    "subtractor overlap");
    check(n_cmp_fire > 0,   "comparator fired");
    check(n_cmp_silent > 0, "comparator silent");
    check(n_masked > 0,     "error masked by a motif");
    check(n_dn_hp > 0,      "DRAM HP neuron fired");
    check(n_dn_lp > 0,      "DRAM LP neuron fired");
    $display("fire %0d forget %0d do-nothing %0d carry %0d/%0d overlap %0d cmp fire %0d silent %0d masked %0d dram %0d/%0d count>=8 %0d",
             n_fire, n_forget, n_keep, n_carry, n_mcarry, n_overlap, n_cmp_fire, n_cmp_silent, n_masked, n_dn_hp, n_dn_lp, n_cv_w8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
