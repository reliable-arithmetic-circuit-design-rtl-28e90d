// tb_reliability: exact success rate of each circuit under threshold errors.
//
// Error model: every neuron is either correct or in error (threshold raised
// by one, the beta input), independently with the same probability e. For
// each circuit the testbench applies every one of the 2^n combinations of
// neurons in error, runs a fixed set of operations that exercises all cases
// of the circuit's function, and records whether the result was still right.
// From the number of failing combinations with k errors it builds the exact
// success probability S(e) = 1 - sum_k fail[k] e^k (1-e)^(n-k) and compares it
// with a closed form at several e:
//   LP motif, order 1        1 - e^2
//   LP motif, order 2        1 - e^3
//   comparator               (1-e)^4
//   motif comparator         (1-e^2)(1-e^2)(1-e^4-3e^3(1-e))
//   adder                    1 - e - e(1-e)^2
//   motif adder              1 - e^2 - e^2(1-e)^2
// All of these except the second-order motif are the published formulas; the
// second-order motif only appears as a curve there, and 1 - e^3 is this
// design's own reading of it (the output fails only if the output neuron and
// both high-pass neurons are in error). The error rate each circuit tolerates
// at a 95 % success rate is printed too; the published values are 22.4 % for
// the first-order motif, 2.6 % for the adder and 17.2 % for the motif adder.
// Two orderings the document reports are checked as well, at every e: the
// comparator is less reliable than the adder, and a second-order motif adder
// (one more shared HP neuron, no closed form given) is more reliable than the
// first-order one.
// Timing: 10-unit clock; every combination starts from a reset; about 7
// seconds of simulation in total.
module tb_reliability;
  import snp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic m1_in1, m1_in2, m1_out;  logic [3:0]  m1_beta;
  logic m2_in1, m2_in2, m2_out;  logic [4:0]  m2_beta;
  logic a_in1, a_in2, a_sum, a_cout;     logic [3:0] a_beta;
  logic ma_in1, ma_in2, ma_sum, ma_cout; logic [7:0] ma_beta;
  logic mb_sum, mb_cout;                 logic [8:0] mb_beta;
  logic c_in1, c_in2, c_out;     logic [6:0]  c_beta;
  logic mc_in1, mc_in2, mc_out;  logic [14:0] mc_beta;

  lp_motif              u_m1 (.clk, .rst_n, .in1(m1_in1), .in2(m1_in2), .beta(m1_beta), .out(m1_out));
  lp_motif #(.ORDER(2)) u_m2 (.clk, .rst_n, .in1(m2_in1), .in2(m2_in2), .beta(m2_beta), .out(m2_out));
  snp_adder             u_a  (.clk, .rst_n, .in1(a_in1), .in2(a_in2), .beta(a_beta), .sum(a_sum), .cout(a_cout));
  motif_adder           u_ma (.clk, .rst_n, .in1(ma_in1), .in2(ma_in2), .beta(ma_beta), .sum(ma_sum), .cout(ma_cout));
  motif_adder #(.ORDER(2)) u_mb (.clk, .rst_n, .in1(ma_in1), .in2(ma_in2), .beta(mb_beta), .sum(mb_sum), .cout(mb_cout));
  snp_comparator        u_c  (.clk, .rst_n, .in1(c_in1), .in2(c_in2), .beta(c_beta), .out(c_out));
  motif_comparator      u_mc (.clk, .rst_n, .in1(mc_in1), .in2(mc_in2), .beta(mc_beta), .out(mc_out));

  always #5 clk = ~clk;

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operations used for every combination.
  int add_a [9] = '{0, 1, 0, 1, 1, 3, 1, 0, 4};
  int add_b [9] = '{0, 0, 1, 1, 3, 1, 5, 4, 0};
  int cmp_a [13] = '{0, 1, 2, 3, 5, 0, 2, 5, 6, 7, 4, 8, 3};
  int cmp_b [13] = '{0, 0, 0, 0, 0, 4, 2, 4, 4, 2, 4, 5, 1};

  task automatic pulse_reset();
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
  endtask

  // One LP motif under a given error combination; 1 if the function held.
  task automatic try_motif(input int order, input int combo, output bit ok);
    logic o;
    ok = 1'b1;
    if (order == 1) m1_beta = 4'(combo); else m2_beta = 5'(combo);
    pulse_reset();
    for (int v = 0; v < 4; v++) begin
      @(negedge clk);
      if (order == 1) {m1_in1, m1_in2} = 2'(v); else {m2_in1, m2_in2} = 2'(v);
      @(negedge clk);
      {m1_in1, m1_in2, m2_in1, m2_in2} = '0;
      @(negedge clk);
      o = (order == 1) ? m1_out : m2_out;
      if (o !== ((v == 1) || (v == 2))) ok = 1'b0;
    end
  endtask

  // motif: 0 plain adder, 1 first-order motif adder, 2 second-order.
  task automatic try_adder(input int motif, input int combo, output bit ok);
    int period, steps, cnt;
    ok = 1'b1;
    period = (motif != 0) ? 3 : 2;
    if (motif == 2) mb_beta = 9'(combo); else if (motif == 1) ma_beta = 8'(combo); else a_beta = 4'(combo);
    pulse_reset();
    for (int i = 0; i < 9; i++) begin
      steps = ((add_a[i] > add_b[i]) ? add_a[i] : add_b[i]) + 3;
      cnt = 0;
      for (int k = 0; k < period * steps; k++) begin
        @(negedge clk);
        cnt += (motif == 2) ? int'(mb_sum) : (motif == 1) ? int'(ma_sum) : int'(a_sum);
        if (motif != 0) begin
          ma_in1 = (k % 3 == 0) && (k / 3 < add_a[i]);
          ma_in2 = (k % 3 == 0) && (k / 3 < add_b[i]);
        end else begin
          a_in1 = (k % 2 == 0) && (k / 2 < add_a[i]);
          a_in2 = (k % 2 == 0) && (k / 2 < add_b[i]);
        end
      end
      if (cnt != add_a[i] + add_b[i]) ok = 1'b0;
      if (!ok) break;
    end
  endtask

  task automatic try_cmp(input bit motif, input int combo, output bit ok);
    int hi, d, cnt;
    ok = 1'b1;
    if (motif) mc_beta = 15'(combo); else c_beta = 7'(combo);
    pulse_reset();
    for (int i = 0; i < 13; i++) begin
      hi = (cmp_a[i] > cmp_b[i]) ? cmp_a[i] : cmp_b[i];
      d  = (cmp_a[i] > cmp_b[i]) ? cmp_a[i] - cmp_b[i] : cmp_b[i] - cmp_a[i];
      cnt = 0;
      for (int t = 1; t <= hi + 16; t++) begin
        @(negedge clk);
        cnt += motif ? int'(mc_out) : int'(c_out);
        if (motif) begin mc_in1 = (t <= cmp_a[i]); mc_in2 = (t <= cmp_b[i]); end
        else       begin c_in1  = (t <= cmp_a[i]); c_in2  = (t <= cmp_b[i]); end
      end
      if (cnt != int'(d >= 3)) ok = 1'b0;
      if (!ok) break;
    end
  endtask

  function automatic real success(input int n, input int fail [16], input real e);
    real s;
    s = 1.0;
    for (int k = 0; k <= n; k++) s -= real'(fail[k]) * (e ** k) * ((1.0 - e) ** (n - k));
    return s;
  endfunction

  function automatic real closed(input int which, input real e);
    case (which)
      0: return 1.0 - e ** 2;
      1: return 1.0 - e ** 3;
      2: return (1.0 - e) ** 4;
      3: return (1.0 - e ** 2) * (1.0 - e ** 2) * (1.0 - e ** 4 - 3.0 * e ** 3 * (1.0 - e));
      4: return 1.0 - e - e * (1.0 - e) ** 2;
      default: return 1.0 - e ** 2 - e ** 2 * (1.0 - e) ** 2;
    endcase
  endfunction

  // Error rate at which the success rate falls to 95 % (bisection).
  function automatic real tolerance(input int n, input int fail [16]);
    real lo, hi, mid;
    lo = 0.0; hi = 0.5;
    for (int i = 0; i < 40; i++) begin
      mid = (lo + hi) / 2.0;
      if (success(n, fail, mid) >= 0.95) lo = mid; else hi = mid;
    end
    return lo;
  endfunction

  real s_at [7][5];  // success of each circuit at each e below

  task automatic evaluate(input int which, input string name, input int n);
    int fail [16];
    bit ok;
    real es [5] = '{0.01, 0.05, 0.1, 0.2, 0.3};
    foreach (fail[k]) fail[k] = 0;
    for (int combo = 0; combo < (1 << n); combo++) begin
      case (which)
        0: try_motif(1, combo, ok);
        1: try_motif(2, combo, ok);
        2: try_cmp(1'b0, combo, ok);
        3: try_cmp(1'b1, combo, ok);
        4: try_adder(0, combo, ok);
        5: try_adder(1, combo, ok);
        default: try_adder(2, combo, ok);
      endcase
      if (!ok) fail[$countones(combo)]++;
    end
    m1_beta = '0; m2_beta = '0; a_beta = '0; ma_beta = '0; mb_beta = '0; c_beta = '0; mc_beta = '0;
    foreach (es[i]) begin
      real s, c;
      s = success(n, fail, es[i]);
      s_at[which][i] = s;
      if (which == 6) continue;
      c = closed(which, es[i]);
      checks++;
      if (s - c > 1e-9 || c - s > 1e-9) begin
        failures++;
        $display("FAIL %s: e=%0.2f success %0.6f expected %0.6f", name, es[i], s, c);
      end
    end
    $display("%-18s neurons %2d  failing combos by errors: %0d %0d %0d %0d %0d  S(0.1)=%0.4f  95%% tolerance %0.1f%%",
             name, n, fail[0], fail[1], fail[2], fail[3], fail[4], success(n, fail, 0.1),
             100.0 * tolerance(n, fail));
  endtask

  initial begin
    {m1_in1, m1_in2, m2_in1, m2_in2, a_in1, a_in2, ma_in1, ma_in2} = '0;
    {c_in1, c_in2, mc_in1, mc_in2} = '0;
    m1_beta = '0; m2_beta = '0; a_beta = '0; ma_beta = '0; mb_beta = '0; c_beta = '0; mc_beta = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    evaluate(0, "LP motif order 1", 4);
    evaluate(1, "LP motif order 2", 5);
    evaluate(2, "comparator", 7);
    evaluate(4, "adder", 4);
    evaluate(5, "motif adder", 8);
    evaluate(6, "motif adder ord 2", 9);
    evaluate(3, "motif comparator", 15);
    for (int i = 0; i < 5; i++) begin
      checks += 2;
      if (!(s_at[2][i] < s_at[4][i])) begin
        failures++;
        $display("FAIL comparator not below adder at point %0d", i);
      end
      if (!(s_at[6][i] > s_at[5][i])) begin
        failures++;
        $display("FAIL second-order motif adder not above first order at point %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
