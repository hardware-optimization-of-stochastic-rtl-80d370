// tb_sc_discont: discontinuous function, cos'(x) on (1/4,3/4) and sin'(x) outside.
//   Selection: every cycle the output must equal c ? a : b, where a, b, c are the
//   cos', sin' and band-step outputs inside the circuit (d OR f acts as a MUX).
//   Value: for x = 0.05, 0.15, 0.5, 0.6, 0.85, 0.95 the fraction of ones must be
//   within 0.04 of alpha*cos'(x) + (1-alpha)*sin'(x), alpha being the probability
//   that the 15-flip-flop band step outputs 1 (binomial); far from 1/4 and 3/4
//   this is the branch of Eq. 4.22, near them the blend the document describes.
module tb_sc_discont;
  localparam int LEN = 6000;
  logic clk = 0, rst_n = 0, en = 0, x = 0, y;
  int checks = 0, failures = 0;

  sc_discont dut (.clk, .rst_n, .en, .x, .y);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // alpha: probability that the 15-bit band step outputs 1, P(4 <= Bin(15,v) < 12)
  function automatic real ref_f(input real v);
    real cosv, sinv, alpha, cb;
    cosv = 1.0 - v**2/2.0 + v**4/24.0 - v**6/720.0 + v**8/40320.0;
    sinv = v - v**3/6.0 + v**5/120.0 - v**7/5040.0;
    alpha = 0.0; cb = 1.0;
    for (int i = 0; i <= 15; i++) begin
      if (i > 0) cb = cb * (15 - i + 1) / i;
      if (i >= 4 && i < 12) alpha += cb * v**i * (1.0 - v)**(15 - i);
    end
    return alpha * cosv + (1.0 - alpha) * sinv;
  endfunction

  initial begin
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real ps [6] = '{0.05, 0.15, 0.5, 0.6, 0.85, 0.95};
    int bad, nx, ny, thr;
    real vx, vy, e;
    bad = 0;
    foreach (ps[k]) begin
      rst_n = 0; en = 0;
      repeat (2) @(negedge clk);
      rst_n = 1; en = 1;
      nx = 0; ny = 0;
      thr = int'(ps[k] * 65536.0);
      for (int i = 0; i < LEN; i++) begin
        x = ($urandom_range(0, 65535) < thr);
        #1;
        if (y !== (dut.c ? dut.a : dut.b)) bad++;
        nx += int'(x); ny += int'(y);
        @(negedge clk);
      end
      vx = real'(nx) / LEN; vy = real'(ny) / LEN;
      e = vy - ref_f(vx);
      $display("x=%0.4f y=%0.4f ref=%0.4f", vx, vy, ref_f(vx));
      check(e < 0.04 && e > -0.04, $sformatf("x=%0.3f y=%0.4f ref=%0.4f", vx, vy, ref_f(vx)));
    end
    check(bad == 0, $sformatf("selection mismatches: %0d", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
