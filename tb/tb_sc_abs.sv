// tb_sc_abs: absolute value of a bi-polar SN (V = 2p - 1).
//   Bit-exact: every output bit must equal XNOR(a, majority of the previous 15
//   input bits), the history starting from the initial pattern 1,0,1,...
//   Value: for p = 0.1, 0.25, 0.75, 0.9 the output's bi-polar value must be
//   within 0.06 of |2p - 1| (Eq. 4.13); at p = 0.5 within 0.2 of 0, the step
//   function being undecided there.
module tb_sc_abs;
  localparam int LEN = 8000;
  logic clk = 0, rst_n = 0, en = 0, a = 0, c;
  int checks = 0, failures = 0;

  sc_abs dut (.clk, .rst_n, .en, .a, .c);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real ps [5] = '{0.1, 0.25, 0.5, 0.75, 0.9};
    bit hist [$];
    int bad, na, nc, thr, cnt;
    real va, vc, e;
    bad = 0;
    foreach (ps[k]) begin
      rst_n = 0; en = 0;
      repeat (2) @(negedge clk);
      rst_n = 1; en = 1;
      hist.delete();
      for (int j = 0; j < 15; j++) hist.push_back(j % 2 == 0);
      na = 0; nc = 0;
      thr = int'(ps[k] * 65536.0);
      for (int i = 0; i < LEN; i++) begin
        a = ($urandom_range(0, 65535) < thr);
        #1;
        cnt = 0;
        for (int j = 0; j < 15; j++) cnt += int'(hist[j]);
        if (c !== ~(a ^ (cnt >= 8))) bad++;
        na += int'(a); nc += int'(c);
        hist.push_front(a); void'(hist.pop_back());
        @(negedge clk);
      end
      va = 2.0 * na / LEN - 1.0;
      vc = 2.0 * nc / LEN - 1.0;
      e = vc - (va < 0 ? -va : va);
      $display("V_a=%0.4f V_c=%0.4f", va, vc);
      if (ps[k] == 0.5) check(vc < 0.2 && vc > -0.2, $sformatf("|V| near 0: %0.4f", vc));
      else check(e < 0.06 && e > -0.06, $sformatf("V_a=%0.4f V_c=%0.4f", va, vc));
    end
    check(bad == 0, $sformatf("bit mismatches: %0d", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
