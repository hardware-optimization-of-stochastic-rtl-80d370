// tb_step_family_eval: accuracy sweep of the flip-flop window circuits, run the
// way the step, absolute-value and discontinuous functions are evaluated in the
// source: for window sizes N = 2^n - 1 (n = 1..10, N = 1..1023), 101 input values
// P_x = 0, 0.01, .., 1, each as a 10,000-bit input SN, and the initial window bits
// 1010..01. The mean square error over the 101 points is
//     MSE = 1/101 * sum_i (f_ideal(i/100) - f_measured(i/100))^2
// with the ideal functions
//     step:   1 for x > 1/2, 0 for x < 1/2, and 1/2 at x = 1/2;
//     abs:    |2x - 1| (input and output read as bi-polar SNs);
//     discon: cos'(x) for 1/4 < x < 3/4, sin'(x) outside, and the mean of the
//             two at x = 1/4 and 3/4, built with 2^d RRR duplicators, d = 0..3.
// Taking the midpoint at the thresholds reproduces the published step values to
// within a few percent for every N (with the ideal value 1 at x = 1/2 each MSE
// would be 0.25/101 higher). The abs values agree to within about 1.6x. For the
// discontinuous function the measured MSE stops falling at about 1.7e-3 for
// N >= 511, where the published values keep falling: with the window preloaded
// with 1010..01 (about half ones, inside the band), the band step needs about
// N/2 cycles to leave the band for x near 0 or 1, so the cos' branch is chosen
// for the first ~5% of a 10,000-bit stream. This is how the circuit behaves with
// that initial pattern; the published value at N = 1023 is 0.99e-3.
// The input streams hold exactly round(P_x * 10,000) ones in random order
// (sequential sampling without replacement with $urandom), so the counts of the
// input carry no sampling noise. Every measured MSE must lie within a factor
// TOL_F of the published value for the same N; each printed line shows both.
// All window sizes run in parallel on the same input stream; the circuits are
// reset before each input value.
// A second phase checks the band step (BAND = 1) at its thresholds, where its
// output is neither 0 nor 1: for x = 1/4 and 3/4 the expected output is
// P(N/4 <= Bin(N, x) < 3N/4), printed in the source for N = 3..1023 (0.563 down
// to 0.505). Each value is measured on a LEN2-bit stream of independent bits
// with P(1) = x exactly representable ($urandom % 4), counting only after the
// first N cycles so the preloaded window has left. The output stays correlated
// over about N cycles, so the tolerance is 1.5 sqrt(N / (2 LEN2)) + 0.005: tight
// for small N, loose for the largest windows. About 1.2 M clock cycles in all.
module tb_step_family_eval;
  localparam int LEN = 10000;
  localparam int NPTS = 101;
  localparam int NMAX = 10;          // n = 1..10
  localparam real TOL_F = 2.0;       // measured/published within [1/TOL_F, TOL_F]
  localparam int LEN2 = 100000;      // bits per threshold value in phase 2

  // published MSE values, index n-1 (N = 2^n - 1)
  localparam real MSE_STEP [NMAX] = '{8.00e-2, 5.59e-2, 3.87e-2, 2.66e-2, 1.81e-2,
                                      1.21e-2, 7.90e-3, 4.97e-3, 2.93e-3, 1.56e-3};
  localparam real MSE_ABS [NMAX]  = '{3.30e-2, 1.34e-2, 5.05e-3, 1.85e-3, 6.64e-4,
                                      2.37e-4, 8.41e-5, 2.98e-5, 1.05e-5, 3.66e-6};
  // discontinuous function with 2^d RRR duplicators, index [d][n-1]; no value
  // for N = 1
  localparam int ND = 4;
  localparam real MSE_DISC [ND][NMAX] = '{
    '{0.0, 4.75e-2, 2.85e-2, 1.77e-2, 1.20e-2, 7.96e-3, 5.15e-3, 3.26e-3, 1.99e-3, 1.09e-3},
    '{0.0, 4.32e-2, 2.68e-2, 1.70e-2, 1.12e-2, 7.33e-3, 4.77e-3, 2.96e-3, 1.77e-3, 9.90e-4},
    '{0.0, 4.11e-2, 2.58e-2, 1.65e-2, 1.10e-2, 7.26e-3, 4.73e-3, 2.99e-3, 1.81e-3, 1.02e-3},
    '{0.0, 4.44e-2, 2.71e-2, 1.71e-2, 1.18e-2, 7.83e-3, 5.19e-3, 3.19e-3, 1.95e-3, 1.11e-3}};
  // band step output at x = 1/4 and 3/4; no value for N = 1
  localparam real ALPHA [NMAX] = '{0.0, 0.563, 0.554, 0.539, 0.527, 0.519,
                                   0.514, 0.510, 0.507, 0.505};

  logic clk = 0, rst_n = 0, en = 0, x = 0;
  logic [NMAX-1:0] ys, ya, yb;
  logic [NMAX-1:0] yd [ND];
  int checks = 0, failures = 0;
  int cnt_s [NMAX], cnt_a [NMAX], cnt_d [ND][NMAX], cnt_b [NMAX];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NMAX; g++) begin : g_n
    sc_step #(.N_LOG(g + 1)) u_step (.clk, .rst_n, .en, .x, .y(ys[g]));
    sc_abs  #(.N_LOG(g + 1)) u_abs  (.clk, .rst_n, .en, .a(x), .c(ya[g]));
    if (g >= 1) begin : g_disc
      for (genvar d = 0; d < ND; d++) begin : g_dup
        sc_discont #(.N_LOG(g + 1), .DUP_LOG(d), .SEED_BASE(30 + 10 * d + g))
          u_disc (.clk, .rst_n, .en, .x, .y(yd[d][g]));
      end
      sc_step #(.N_LOG(g + 1), .BAND(1'b1)) u_band (.clk, .rst_n, .en, .x, .y(yb[g]));
    end else begin : g_nodisc
      for (genvar d = 0; d < ND; d++) begin : g_dup
        assign yd[d][g] = 1'b0;
      end
      assign yb[g] = 1'b0;
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real sinp(input real v);
    return v * (1.0 - v**2/6.0 * (1.0 - v**2/20.0 * (1.0 - v**2/42.0)));
  endfunction
  function automatic real cosp(input real v);
    return 1.0 - v**2/2.0 * (1.0 - v**2/12.0 * (1.0 - v**2/30.0 * (1.0 - v**2/56.0)));
  endfunction
  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  function automatic bit in_band(input real got, input real ref_v);
    return got <= ref_v * TOL_F && got >= ref_v / TOL_F;
  endfunction

  initial begin
    #80000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real se_s [NMAX] = '{default: 0.0};
    automatic real se_a [NMAX] = '{default: 0.0};
    automatic real se_d [ND][NMAX] = '{default: 0.0};
    automatic int  n_upper = 0;
    for (int i = 0; i < NPTS; i++) begin
      automatic real px = i / 100.0;
      automatic int ones_left = int'(px * LEN);
      automatic real vs, va, vd, fs, fa, fd;
      rst_n = 0; en = 0;
      @(negedge clk); @(negedge clk);
      rst_n = 1; en = 1;
      for (int k = 0; k < NMAX; k++) begin cnt_s[k] = 0; cnt_a[k] = 0; end
      foreach (cnt_d[d, k]) cnt_d[d][k] = 0;
      for (int b = 0; b < LEN; b++) begin
        x = (int'($urandom_range(0, LEN - b - 1)) < ones_left);
        if (x) ones_left--;
        #1;
        for (int k = 0; k < NMAX; k++) begin
          cnt_s[k] += int'(ys[k]);
          cnt_a[k] += int'(ya[k]);
          for (int d = 0; d < ND; d++) cnt_d[d][k] += int'(yd[d][k]);
        end
        @(negedge clk);
      end
      en = 0;
      fs = (i == 50) ? 0.5 : (px > 0.5) ? 1.0 : 0.0;
      fa = absr(2.0 * px - 1.0);
      fd = (i == 25 || i == 75) ? 0.5 * (cosp(px) + sinp(px))
         : (px > 0.25 && px < 0.75) ? cosp(px) : sinp(px);
      if (i >= 50) n_upper++;
      for (int k = 0; k < NMAX; k++) begin
        vs = real'(cnt_s[k]) / LEN;
        va = 2.0 * real'(cnt_a[k]) / LEN - 1.0;
        se_s[k] += (vs - fs) ** 2;
        se_a[k] += (va - fa) ** 2;
        for (int d = 0; d < ND; d++) begin
          vd = real'(cnt_d[d][k]) / LEN;
          se_d[d][k] += (vd - fd) ** 2;
        end
      end
    end
    check(n_upper == 51, "all 101 input values were applied");
    for (int k = 0; k < NMAX; k++) begin
      automatic int nn = (1 << (k + 1)) - 1;
      automatic real ms = se_s[k] / NPTS;
      automatic real ma = se_a[k] / NPTS;
      $display("N=%4d  step MSE %0.3e (pub %0.3e)  abs MSE %0.3e (pub %0.3e)",
               nn, ms, MSE_STEP[k], ma, MSE_ABS[k]);
      check(in_band(ms, MSE_STEP[k]), $sformatf("step MSE N=%0d: %0.3e vs %0.3e", nn, ms, MSE_STEP[k]));
      check(in_band(ma, MSE_ABS[k]), $sformatf("abs MSE N=%0d: %0.3e vs %0.3e", nn, ma, MSE_ABS[k]));
      if (k >= 1) begin
        $display("        discont MSE 1RRR %0.3e (pub %0.3e)  2RRR %0.3e (pub %0.3e)  4RRR %0.3e (pub %0.3e)  8RRR %0.3e (pub %0.3e)",
                 se_d[0][k] / NPTS, MSE_DISC[0][k], se_d[1][k] / NPTS, MSE_DISC[1][k],
                 se_d[2][k] / NPTS, MSE_DISC[2][k], se_d[3][k] / NPTS, MSE_DISC[3][k]);
        for (int d = 0; d < ND; d++)
          check(in_band(se_d[d][k] / NPTS, MSE_DISC[d][k]),
                $sformatf("discont %0dRRR MSE N=%0d: %0.3e vs %0.3e", 1 << d, nn, se_d[d][k] / NPTS, MSE_DISC[d][k]));
      end
    end

    // phase 2: band step at the thresholds
    for (int h = 0; h < 2; h++) begin
      rst_n = 0; en = 0;
      @(negedge clk); @(negedge clk);
      rst_n = 1; en = 1;
      for (int k = 0; k < NMAX; k++) cnt_b[k] = 0;
      for (int b = 0; b < LEN2; b++) begin
        // x = 1/4 for h = 0, 3/4 for h = 1
        x = (h == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
        #1;
        for (int k = 1; k < NMAX; k++)
          if (b >= (1 << (k + 1))) cnt_b[k] += int'(yb[k]);
        @(negedge clk);
      end
      en = 0;
      for (int k = 1; k < NMAX; k++) begin
        automatic int nn = (1 << (k + 1)) - 1;
        automatic real vb = real'(cnt_b[k]) / (LEN2 - nn - 1);
        automatic real tol = 1.5 * $sqrt(real'(nn) / (2.0 * LEN2)) + 0.005;
        $display("band step N=%4d x=%s  output %0.4f (pub %0.3f, tolerance %0.3f)",
                 nn, (h == 0) ? "1/4" : "3/4", vb, ALPHA[k], tol);
        check(absr(vb - ALPHA[k]) < tol,
              $sformatf("band step N=%0d at x=%s: %0.4f vs %0.3f", nn, (h == 0) ? "1/4" : "3/4", vb, ALPHA[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
