// tb_sc_step: step function circuits against a bit-exact reference and against
// the document's expected-value formula.
//   Reference: the testbench keeps its own history of input bits, starting from
//   the initial pattern 1,0,1,... (newest first), counts the ones of the last N
//   bits and takes the majority (BAND=0) or whether the count lies in
//   [2^(n-2), 3*2^(n-2)) (BAND=1); every output bit of five instances
//   (n = 1, 2, 4 with BAND=0, n = 2, 4 with BAND=1) is compared each cycle.
//   Statistics (n = 4, N = 15): for p = 0.3, 0.5, 0.7 the fraction of ones must
//   match E = sum_{i>=8} C(15,i) p^i (1-p)^(15-i) (Eq. 4.4) within 0.03; the band
//   version must be high for p = 0.5 and low for p = 0.05 and 0.95.
module tb_sc_step;
  localparam int LEN = 8000;
  logic clk = 0, rst_n = 0, en = 0, x = 0;
  logic [4:0] y;
  int checks = 0, failures = 0;
  localparam int NL [5] = '{1, 2, 4, 2, 4};
  localparam bit BD [5] = '{0, 0, 0, 1, 1};

  sc_step #(.N_LOG(1), .BAND(0)) s0 (.clk, .rst_n, .en, .x, .y(y[0]));
  sc_step #(.N_LOG(2), .BAND(0)) s1 (.clk, .rst_n, .en, .x, .y(y[1]));
  sc_step #(.N_LOG(4), .BAND(0)) s2 (.clk, .rst_n, .en, .x, .y(y[2]));
  sc_step #(.N_LOG(2), .BAND(1)) s3 (.clk, .rst_n, .en, .x, .y(y[3]));
  sc_step #(.N_LOG(4), .BAND(1)) s4 (.clk, .rst_n, .en, .x, .y(y[4]));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real binom_tail(input int n, input real p);
    real s = 0.0, c = 1.0;
    for (int i = 0; i <= n; i++) begin
      if (i > 0) c = c * (n - i + 1) / i;
      if (2 * i > n) s += c * p**i * (1.0 - p)**(n - i);
    end
    return s;
  endfunction

  initial begin
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real ps [5] = '{0.05, 0.3, 0.5, 0.7, 0.95};
    bit hist [$];
    int bad [5], ny [5], thr, cnt, n, lo, hi;
    logic expv;
    real v, e;
    bad = '{default: 0};
    foreach (ps[k]) begin
      rst_n = 0; en = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      hist.delete();
      for (int j = 0; j < 15; j++) hist.push_back(j % 2 == 0);  // hist[0] newest
      ny = '{default: 0};
      thr = int'(ps[k] * 65536.0);
      for (int i = 0; i < LEN; i++) begin
        x = ($urandom_range(0, 65535) < thr);
        en = ($urandom_range(0, 15) != 0);
        #1;
        for (int d = 0; d < 5; d++) begin
          n = (1 << NL[d]) - 1;
          cnt = 0;
          for (int j = 0; j < n; j++) cnt += int'(hist[j]);
          if (BD[d]) begin
            lo = 1 << (NL[d] - 2); hi = 3 << (NL[d] - 2);
            expv = (cnt >= lo && cnt < hi);
          end else expv = (2 * cnt > n);
          if (y[d] !== expv) bad[d]++;
          if (en) ny[d] += int'(y[d]);
        end
        if (en) begin hist.push_front(x); void'(hist.pop_back()); end
        @(negedge clk);
      end
      v = ps[k];
      e = binom_tail(15, v);
      $display("p=%0.2f  N=15 step %0.4f (Eq 4.4 %0.4f)  N=15 band %0.4f", v,
               real'(ny[2]) / (LEN * 15 / 16), e, real'(ny[4]) / (LEN * 15 / 16));
      if (v > 0.2 && v < 0.8) begin
        e = real'(ny[2]) / (LEN * 15 / 16) - e;
        check(e < 0.03 && e > -0.03, $sformatf("step N=15 at p=%0.2f off Eq 4.4 by %0.4f", v, e));
      end
      if (v == 0.5) check(ny[4] > LEN * 15 / 16 * 9 / 10, "band high at p=0.5");
      if (v < 0.1 || v > 0.9) check(ny[4] < LEN * 15 / 16 / 20, "band low outside (1/4,3/4)");
    end
    for (int d = 0; d < 5; d++)
      check(bad[d] == 0, $sformatf("instance %0d bit mismatches: %0d", d, bad[d]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
