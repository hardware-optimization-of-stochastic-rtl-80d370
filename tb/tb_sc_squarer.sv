// tb_sc_squarer: squarer y = x^2 built from an AND gate and a 2^1 RRR duplicator.
// The input SN x is a Bernoulli stream of probability p drawn with $urandom, so it
// is independent of every LFSR inside the circuit. For each p the circuit is reset
// and run for LEN bits; the fraction of ones in y must match the reference
//     y = x^2
// evaluated at the measured fraction of ones in x, within TOL.
// The output is also checked to respond to the current input bit in the same
// cycle (zero cycles of latency).
module tb_sc_squarer;
  localparam int LEN = 4080;
  localparam real TOL = 0.03;
  logic clk = 0, rst_n = 0, en = 0, x = 0, y;
  int checks = 0, failures = 0;

  sc_squarer dut (.clk, .rst_n, .en, .x, .y);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real ref_f(input real v);
    return v*v;
  endfunction

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real ps [7] = '{0.0, 0.1, 0.3, 0.5, 0.7, 0.9, 1.0};
    int nx, ny, thr;
    real vx, vy, err;
    logic y0, y1;
    foreach (ps[k]) begin
      rst_n = 0; en = 0;
      repeat (2) @(negedge clk);
      rst_n = 1; en = 1;
      nx = 0; ny = 0;
      thr = int'(ps[k] * 65536.0);
      for (int i = 0; i < LEN; i++) begin
        x = ($urandom_range(0, 65535) < thr);
        #1;
        nx += int'(x); ny += int'(y);
        @(negedge clk);
      end
      vx = real'(nx) / LEN; vy = real'(ny) / LEN;
      err = vy - ref_f(vx);
      if (err < 0) err = -err;
      $display("p=%0.2f x=%0.4f y=%0.4f ref=%0.4f", ps[k], vx, vy, ref_f(vx));
      check(err < TOL, $sformatf("x=%0.3f y=%0.4f ref=%0.4f", vx, vy, ref_f(vx)));
    end
    // zero latency: flipping the current input bit must be able to change y
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    if (1) begin
      automatic int seen = 0;
      for (int i = 0; i < 2000; i++) begin
        x = 0; #1 y0 = y; x = 1; #1 y1 = y;
        if (y0 != y1) seen++;
        x = ($urandom_range(0, 1) == 1);
        @(negedge clk);
      end
      check(seen > 0, "output responds to the current input bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
