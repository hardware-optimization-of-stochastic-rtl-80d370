// tb_sc_pow8: eighth power unit x^8 = ((x^2)^2)^2 with five duplicator choices,
// all fed the same Bernoulli input stream (drawn with $urandom) for LEN bits:
//   1RRR (one-bit delay): the re-convergent paths collapse and the unit computes
//        x^4 exactly in expectation (document Eq. 2.9) - checked to within 0.02;
//   FSR, RRR, 2^1 RRR, 8RRR: the randomized duplicators must move the result from
//        x^4 towards x^8 (closer to x^8 than x^4 is), for x = 0.5, 0.7, 0.9;
//   FSR must match the document's analysis 3/8x^6 + 3/8x^5 + 1/4x^4 (Eq. 2.13)
//        within 0.025, RRR and 2^1 RRR the analysis 16/105x^8 + 2/15x^7 +
//        13/35x^6 + 1/5x^5 + 1/7x^4 (Eq. 2.18) within 0.02;
//   8RRR must be closer to x^8 than 2^1 RRR (more register units, fewer equal
//        path delays).
// The 12-bit LFSRs used here make the random streams longer than the test.
module tb_sc_pow8;
  localparam int LEN = 16000;
  logic clk = 0, rst_n = 0, en = 0, x = 0;
  logic [4:0] y;
  int checks = 0, failures = 0;

  sc_pow8 #(.LFSR_W(12), .DUP_KIND(sc_pkg::DUP_NRRR), .DUP_LOG(0), .SEED_BASE(1))
    d1  (.clk, .rst_n, .en, .x, .y(y[0]));
  sc_pow8 #(.LFSR_W(12), .DUP_KIND(sc_pkg::DUP_FSR), .SEED_BASE(2))
    dfs (.clk, .rst_n, .en, .x, .y(y[1]));
  sc_pow8 #(.LFSR_W(12), .DUP_KIND(sc_pkg::DUP_RRR), .SEED_BASE(3))
    drr (.clk, .rst_n, .en, .x, .y(y[2]));
  sc_pow8 #(.LFSR_W(12), .DUP_KIND(sc_pkg::DUP_NRRR), .DUP_LOG(1), .SEED_BASE(4))
    d2  (.clk, .rst_n, .en, .x, .y(y[3]));
  sc_pow8 #(.LFSR_W(12), .DUP_KIND(sc_pkg::DUP_NRRR), .DUP_LOG(3), .SEED_BASE(5))
    d8  (.clk, .rst_n, .en, .x, .y(y[4]));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real ps [3] = '{0.5, 0.7, 0.9};
    automatic string nm [5] = '{"1RRR", "FSR", "RRR", "2RRR", "8RRR"};
    int nx, ny [5], thr;
    real v, vy [5], p4, p8, e213, e218;
    foreach (ps[k]) begin
      rst_n = 0; en = 0;
      repeat (2) @(negedge clk);
      rst_n = 1; en = 1;
      nx = 0; ny = '{default: 0};
      thr = int'(ps[k] * 65536.0);
      for (int i = 0; i < LEN; i++) begin
        x = ($urandom_range(0, 65535) < thr);
        #1;
        nx += int'(x);
        for (int d = 0; d < 5; d++) ny[d] += int'(y[d]);
        @(negedge clk);
      end
      v = real'(nx) / LEN;
      p4 = v**4; p8 = v**8;
      e213 = 0.375 * v**6 + 0.375 * v**5 + 0.25 * v**4;
      e218 = 16.0/105.0 * v**8 + 2.0/15.0 * v**7 + 13.0/35.0 * v**6 + 0.2 * v**5 + v**4 / 7.0;
      for (int d = 0; d < 5; d++) vy[d] = real'(ny[d]) / LEN;
      $display("x=%0.3f x^4=%0.4f x^8=%0.4f | 1RRR %0.4f FSR %0.4f (Eq2.13 %0.4f) RRR %0.4f 2RRR %0.4f (Eq2.18 %0.4f) 8RRR %0.4f",
               v, p4, p8, vy[0], vy[1], e213, vy[2], vy[3], e218, vy[4]);
      check(absr(vy[0] - p4) < 0.02, $sformatf("1RRR gives x^4: %0.4f vs %0.4f", vy[0], p4));
      for (int d = 1; d < 5; d++)
        check(absr(vy[d] - p8) < (p4 - p8) * 0.9,
              $sformatf("%s at x=%0.3f: %0.4f not closer to x^8=%0.4f", nm[d], v, vy[d], p8));
      check(absr(vy[1] - e213) < 0.025, $sformatf("FSR vs Eq. 2.13: %0.4f vs %0.4f", vy[1], e213));
      check(absr(vy[2] - e218) < 0.02, $sformatf("RRR vs Eq. 2.18: %0.4f vs %0.4f", vy[2], e218));
      check(absr(vy[3] - e218) < 0.02, $sformatf("2RRR vs Eq. 2.18: %0.4f vs %0.4f", vy[3], e218));
      check(absr(vy[4] - p8) < absr(vy[3] - p8), "8RRR closer to x^8 than 2RRR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
