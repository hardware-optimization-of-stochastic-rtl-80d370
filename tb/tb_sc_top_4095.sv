// tb_sc_top_4095: the stochastic function evaluator with 4,095-bit SNs, the
// longer of the two SN lengths the circuits were evaluated at: 12-bit LFSRs and
// counters (LFSR_W = 12) and 2^2 RRR duplicators (DUP_LOG = 2, reported as the
// most accurate choice at this length); the step windows stay at 15 flip-flops.
// The test is the same as the default-size end-to-end test, with input values
// spread over the 12-bit range and references:
//   x^2, sin', cos', tanh', exp'(-x^2): the polynomials, within 0.04;
//   x^8 with FSR, RRR and 2^2 RRR: no farther from x^8 than the analysis for
//        independent input bits (Eq. 2.13 for FSR, Eq. 2.18 otherwise), plus 0.03.
//        The input SN comes from an LFSR and a comparator, whose consecutive
//        bits are correlated, so at this length the units land between x^8 and
//        the analysis (at x = 0.78: FSR 0.20, RRR 0.14, 4RRR 0.12; x^8 = 0.14,
//        Eq. 2.13 0.29, Eq. 2.18 0.24);
//   step, band: the binomial laws of a 15-bit window, within 0.1;
//   |2x-1|: within 0.05 away from x = 1/2; discontinuous: the blend, within 0.06.
// Also checked: exactly x_val ones in the input SN, done L+1 edges after the
// start edge, results held, a restart reproducing an undisturbed run, and each
// mechanism (restart, both step levels, band in/out, both abs signs, both
// discontinuous branches) occurring at least once.
module tb_sc_top_4095;
  import sc_pkg::*;
  localparam int W = 12;
  localparam int L = (1 << W) - 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] x_val = '0;
  logic busy, done, x_sn;
  logic [NUM_FN-1:0][W-1:0] res;
  logic [NUM_FN-1:0] fn_sn;
  int checks = 0, failures = 0;
  int n_restart = 0, n_step_hi = 0, n_step_lo = 0, n_band_in = 0, n_band_out = 0;
  int n_abs_neg = 0, n_abs_pos = 0, n_disc_cos = 0, n_disc_sin = 0;

  sc_top #(.LFSR_W(W), .DUP_LOG(2)) dut (.clk, .rst_n, .start, .x_val, .busy, .done, .res, .x_sn, .fn_sn);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic real binom(input real p, input int lo, input int hi);  // P(lo <= B < hi)
    real s = 0.0, c = 1.0;
    for (int i = 0; i <= 15; i++) begin
      if (i > 0) c = c * (15 - i + 1) / i;
      if (i >= lo && i < hi) s += c * p**i * (1.0 - p)**(15 - i);
    end
    return s;
  endfunction

  initial begin
    #200000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one evaluation; returns cycles from start to done and ones of x_sn
  task automatic run(input logic [W-1:0] v, output int cycles, output int xones);
    @(negedge clk);
    x_val = v; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1; xones = 0;
    while (!done && cycles < 20000) begin
      xones += (busy && x_sn) ? 1 : 0;
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    automatic int vals [7] = '{205, 610, 1024, 2048, 2660, 3200, 3880};
    int cyc, xo, c2, x2;
    logic [NUM_FN-1:0][W-1:0] first;
    real x, r [NUM_FN], got, alpha, cosv, sinv;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (vals[k]) begin
      run(W'(vals[k]), cyc, xo);
      check(cyc == L + 2, $sformatf("x_val=%0d: done after %0d cycles", vals[k], cyc));
      check(xo == vals[k], $sformatf("x_val=%0d: input SN has %0d ones", vals[k], xo));
      x = real'(vals[k]) / L;
      cosv = 1.0 - x**2/2.0 + x**4/24.0 - x**6/720.0 + x**8/40320.0;
      sinv = x - x**3/6.0 + x**5/120.0 - x**7/5040.0;
      alpha = binom(x, 4, 12);
      r[FN_SQ]       = x * x;
      r[FN_POW8_FSR] = 0.375 * x**6 + 0.375 * x**5 + 0.25 * x**4;
      r[FN_POW8_RRR] = 16.0/105.0 * x**8 + 2.0/15.0 * x**7 + 13.0/35.0 * x**6 + 0.2 * x**5 + x**4 / 7.0;
      r[FN_POW8]     = r[FN_POW8_RRR];
      r[FN_SIN]      = sinv;
      r[FN_COS]      = cosv;
      r[FN_TANH]     = x * (1.0 - x*x/3.0 * (1.0 - 2.0*x*x/5.0 * (1.0 - 17.0*x*x/42.0 * (1.0 - 62.0*x*x/153.0))));
      r[FN_EXP]      = 1.0 - x**2 + x**4/2.0 - x**6/6.0 + x**8/24.0 - x**10/120.0;
      r[FN_STEP]     = binom(x, 8, 16);
      r[FN_BAND]     = alpha;
      r[FN_ABS]      = 0.5 * (absr(2.0 * x - 1.0) + 1.0);   // as a fraction of ones
      r[FN_DISC]     = alpha * cosv + (1.0 - alpha) * sinv;
      for (int f = 0; f < NUM_FN; f++) begin
        real tol;
        got = real'(res[f]) / L;
        tol = (f == FN_STEP || f == FN_BAND) ? 0.1 :
              (f == FN_POW8_FSR || f == FN_POW8_RRR) ? 0.05 :
              (f == FN_ABS) ? 0.05 : (f == FN_DISC) ? 0.06 : 0.04;
        if (f == FN_POW8 || f == FN_POW8_FSR || f == FN_POW8_RRR) begin
          automatic real ana = (f == FN_POW8_FSR) ? r[FN_POW8_FSR] : r[FN_POW8_RRR];
          check(absr(got - x**8) < absr(ana - x**8) + 0.03,
                $sformatf("x=%0.3f x^8 unit %0d: got %0.4f, x^8 %0.4f, analysis %0.4f",
                          x, f, got, x**8, ana));
          continue;
        end
        if (f == FN_ABS && vals[k] == 2048) continue;
        check(absr(got - r[f]) < tol,
              $sformatf("x=%0.3f fn %0d: got %0.4f ref %0.4f", x, f, got, r[f]));
      end
      $display("x=%0.3f sq %0.3f p8 %0.3f/%0.3f/%0.3f sin %0.3f cos %0.3f tanh %0.3f exp %0.3f step %0.3f band %0.3f abs %0.3f disc %0.3f",
               x, real'(res[0])/L, real'(res[1])/L, real'(res[2])/L, real'(res[3])/L, real'(res[4])/L,
               real'(res[5])/L, real'(res[6])/L, real'(res[7])/L, real'(res[8])/L, real'(res[9])/L,
               real'(res[10])/L, real'(res[11])/L);
      if (int'(res[FN_STEP]) > L / 2) n_step_hi++; else n_step_lo++;
      if (int'(res[FN_BAND]) > L / 2) n_band_in++; else n_band_out++;
      if (x < 0.4) n_abs_neg++;
      if (x > 0.6) n_abs_pos++;
      if (x > 0.3 && x < 0.7) n_disc_cos++;
      if (x < 0.2 || x > 0.8) n_disc_sin++;
      // results hold after done
      first = res;
      repeat (5) @(negedge clk);
      check(!busy && res == first, "results held after done");
    end

    // restart in the middle of a run: same results as an undisturbed run
    run(W'(1600), cyc, xo);
    first = res;
    @(negedge clk);
    x_val = W'(7); start = 1;
    @(negedge clk);
    start = 0;
    repeat (1000) @(negedge clk);
    check(busy, "running before restart");
    run(W'(1600), c2, x2);
    n_restart++;
    check(c2 == L + 2 && x2 == 1600, "restarted run length and input");
    check(res == first, "restarted run reproduces the undisturbed results");
    repeat (10) @(negedge clk);
    check(res == first && !busy, "results held while idle");

    check(n_restart > 0, "restart exercised");
    check(n_step_hi > 0 && n_step_lo > 0, "step function both levels");
    check(n_band_in > 0 && n_band_out > 0, "band step inside and outside");
    check(n_abs_neg > 0 && n_abs_pos > 0, "abs on negative and positive bi-polar inputs");
    check(n_disc_cos > 0 && n_disc_sin > 0, "discontinuous function on both branches");
    $display("mechanisms: restart %0d step hi/lo %0d/%0d band in/out %0d/%0d abs -/+ %0d/%0d disc cos/sin %0d/%0d",
             n_restart, n_step_hi, n_step_lo, n_band_in, n_band_out, n_abs_neg, n_abs_pos, n_disc_cos, n_disc_sin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
