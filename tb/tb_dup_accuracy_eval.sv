// tb_dup_accuracy_eval: accuracy of the duplicator-based function circuits, run
// the way they are evaluated in the source, at both SN lengths: 255 bits (8-bit
// LFSRs) and 4,095 bits (12-bit LFSRs). For x = 0.0, 0.1, .., 1.0 and T trials
// the mean square error
//     MSE(f) = 1/11 * sum_x 1/T * sum_trials (f(x) - measured)^2
// is measured for f = x^2, x^8, sin', cos', tanh' and exp'(-x^2), each built with
// six duplicator choices: 2^n RRR for n = 0..3 (1RRR is the one-flip-flop delay),
// FSR and RRR (dup_eval_bank, one bank per SN length). Each trial resets the
// circuits and feeds a fresh input SN holding exactly round(L x) ones in random
// order ($urandom, sampling without replacement), so trials differ in the input
// bit order; the duplicators' LFSRs restart from their seeds. T = 100 trials at
// 255 bits and 20 at 4,095 bits (the source uses 1,000).
// Checks, from the published comparisons:
//   255 bits:
//   * x^8: 2RRR and RRR at least 3x better than 1RRR, FSR better than 1RRR
//     (published 1.50e-2 / 2.66e-3, and 1.38e-2 / 6.73e-3 / 2.56e-3 for
//     1RRR / FSR / RRR);
//   * sin': 2RRR better than 1RRR; averaged over the functions, 2RRR better than
//     1RRR;
//   * 2RRR and RRR are the same circuit: same MSE within a factor 1.5;
//   * every 2RRR MSE within a factor 4 of the published value.
//   4,095 bits:
//   * x^8 and exp'(-x^2): 4RRR at least 3x better than 1RRR (published
//     1.38e-2 / 1.80e-3 for x^8);
//   * averaged over the functions, 4RRR better than 1RRR;
//   * every 4RRR MSE no more than 4x the published value. The measured values
//     are lower than published (x^8 about 1/4, sin' and tanh' about 1/6): the
//     input SNs here carry exactly round(L x) ones, so the error is that of the
//     duplication alone. For the same reason sin' already reaches its floor with
//     1RRR at this length (the x^3 and higher terms are small), where the source
//     reports 2.23e-4 for 1RRR.
// The printed tables give all 72 values next to the published ones.
module tb_dup_accuracy_eval;
  localparam int NF = 6;   // sq, pow8, sin, cos, tanh, exp
  localparam int NC = 6;   // 1RRR, 2RRR, 4RRR, 8RRR, FSR, RRR
  // published MSE, in function order: 2RRR at 255 bits, 4RRR at 4,095 bits
  localparam real PUB_255_2RRR [NF]  = '{1.22e-4, 2.66e-3, 9.01e-5, 1.67e-4, 1.41e-4, 2.29e-4};
  localparam real PUB_4095_4RRR [NF] = '{1.50e-5, 1.80e-3, 2.45e-5, 1.75e-5, 4.23e-5, 1.30e-5};

  logic clk = 0, rst_n = 0, en = 0, x = 0;
  logic [NC*NF-1:0] y8, y12;
  int checks = 0, failures = 0;
  int runs = 0;
  int cnt [NC][NF];
  real se [NC][NF];
  real mse8 [NC][NF], mse12 [NC][NF];
  real avg [NC];

  always #5 clk = ~clk;

  dup_eval_bank #(.W(8),  .SEED0(40)) u_b8  (.clk, .rst_n, .en, .x, .y(y8));
  dup_eval_bank #(.W(12), .SEED0(80)) u_b12 (.clk, .rst_n, .en, .x, .y(y12));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real f_ref(input int f, input real v);
    case (f)
      0: return v ** 2;
      1: return v ** 8;
      2: return v * (1.0 - v**2/6.0 * (1.0 - v**2/20.0 * (1.0 - v**2/42.0)));
      3: return 1.0 - v**2/2.0 * (1.0 - v**2/12.0 * (1.0 - v**2/30.0 * (1.0 - v**2/56.0)));
      4: return v * (1.0 - v**2/3.0 * (1.0 - 2.0*v**2/5.0 * (1.0 - 17.0*v**2/42.0
                    * (1.0 - 62.0*v**2/153.0))));
      default: return 1.0 - v**2 * (1.0 - v**2/2.0 * (1.0 - v**2/3.0 * (1.0 - v**2/4.0
                    * (1.0 - v**2/5.0))));
    endcase
  endfunction

  function automatic bit in_band(input real got, input real ref_v, input real fac);
    return got < ref_v * fac && got > ref_v / fac;
  endfunction

  // one sweep over 11 input values and `trials` trials; wide selects the bank
  // and the SN length (0: 255 bits, 1: 4,095 bits); the result is left in se
  task automatic sweep(input bit wide, input int trials);
    automatic int L = wide ? 4095 : 255;
    foreach (se[c, f]) se[c][f] = 0.0;
    for (int xi = 0; xi <= 10; xi++) begin
      automatic int ones = int'(xi / 10.0 * L);
      for (int t = 0; t < trials; t++) begin
        automatic int ones_left = ones;
        rst_n = 0; en = 0;
        @(negedge clk); @(negedge clk);
        rst_n = 1; en = 1;
        foreach (cnt[c, f]) cnt[c][f] = 0;
        for (int b = 0; b < L; b++) begin
          x = (int'($urandom_range(0, L - b - 1)) < ones_left);
          if (x) ones_left--;
          #1;
          foreach (cnt[c, f]) cnt[c][f] += int'(wide ? y12[c*NF + f] : y8[c*NF + f]);
          @(negedge clk);
        end
        en = 0;
        // the value carried by the input SN is ones/L
        foreach (se[c, f])
          se[c][f] += (f_ref(f, real'(ones) / L) - real'(cnt[c][f]) / L) ** 2;
        runs++;
      end
    end
    foreach (se[c, f]) se[c][f] = se[c][f] / (11.0 * trials);
  endtask

  // prints one table of se next to the published column and fills avg
  task automatic report(input string title, input real pub [NF], input string pub_name);
    automatic string nm_f [NF] = '{"x^2", "x^8", "sin'", "cos'", "tanh'", "exp'(-x^2)"};
    foreach (avg[c]) begin
      avg[c] = 0.0;
      for (int f = 0; f < NF; f++) avg[c] += se[c][f] / NF;
    end
    $display("%s", title);
    for (int f = 0; f < NF; f++)
      $display("  %-11s 1RRR %0.2e  2RRR %0.2e  4RRR %0.2e  8RRR %0.2e  FSR %0.2e  RRR %0.2e  (published %s %0.2e)",
               nm_f[f], se[0][f], se[1][f], se[2][f], se[3][f], se[4][f], se[5][f], pub_name, pub[f]);
    $display("  average     1RRR %0.2e  2RRR %0.2e  4RRR %0.2e  8RRR %0.2e  FSR %0.2e  RRR %0.2e",
             avg[0], avg[1], avg[2], avg[3], avg[4], avg[5]);
  endtask

  initial begin
    #400000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sweep(1'b0, 100);
    mse8 = se;
    report("255-bit SNs, 100 trials:", PUB_255_2RRR, "2RRR");
    check(mse8[1][1] * 3.0 < mse8[0][1], "255: x^8 2RRR at least 3x better than 1RRR");
    check(mse8[5][1] * 3.0 < mse8[0][1], "255: x^8 RRR at least 3x better than 1RRR");
    check(mse8[4][1] < mse8[0][1], "255: x^8 FSR better than 1RRR");
    check(mse8[1][2] < mse8[0][2], "255: sin' 2RRR better than 1RRR");
    check(avg[1] < avg[0], "255: average 2RRR better than 1RRR");
    for (int f = 0; f < NF; f++) begin
      check(in_band(mse8[1][f], mse8[5][f], 1.5),
            $sformatf("255: fn %0d 2RRR and RRR agree (%0.2e / %0.2e)", f, mse8[1][f], mse8[5][f]));
      check(in_band(mse8[1][f], PUB_255_2RRR[f], 4.0),
            $sformatf("255: fn %0d 2RRR MSE %0.2e vs published %0.2e", f, mse8[1][f], PUB_255_2RRR[f]));
    end

    sweep(1'b1, 20);
    mse12 = se;
    report("4,095-bit SNs, 20 trials:", PUB_4095_4RRR, "4RRR");
    check(mse12[2][1] * 3.0 < mse12[0][1], "4095: x^8 4RRR at least 3x better than 1RRR");
    check(mse12[2][5] * 3.0 < mse12[0][5], "4095: exp'(-x^2) 4RRR at least 3x better than 1RRR");
    check(avg[2] < avg[0], "4095: average 4RRR better than 1RRR");
    for (int f = 0; f < NF; f++)
      check(mse12[2][f] < PUB_4095_4RRR[f] * 4.0,
            $sformatf("4095: fn %0d 4RRR MSE %0.2e vs published %0.2e", f, mse12[2][f], PUB_4095_4RRR[f]));

    check(runs == 11 * 120, $sformatf("all trials were run (%0d)", runs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
