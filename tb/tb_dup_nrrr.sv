// tb_dup_nrrr: 2^n RRR duplicators with n = 0, 1, 2, 3 (1RRR..8RRR) driven by one
// random input stream and independent random numbers r. For each:
//   * closed form: Out[i] is the most recent earlier input bit In[j] with
//     r[j] = r[i], or the initial bit of FF_r[i] (bit r[i][0]) when none exists;
//     n = 0 means Out[i] = In[i-1]; checked every cycle (zero latency);
//   * value: ones of Out and In differ by at most 2^n;
//   * delay: the mean wait of an input bit is 2^n cycles (geometric with
//     p = 2^-n), checked to within 15 %.
module tb_dup_nrrr;
  localparam int LEN = 6000;
  logic clk = 0, rst_n = 0, en = 0, in_sn = 0;
  logic [2:0] r0, r1, r2, r3;
  logic [3:0] out_sn;
  int checks = 0, failures = 0;

  dup_nrrr #(.N_LOG(0)) d0 (.clk, .rst_n, .en, .in_sn, .r(r0[0]),   .out_sn(out_sn[0]));
  dup_nrrr #(.N_LOG(1)) d1 (.clk, .rst_n, .en, .in_sn, .r(r1[0]),   .out_sn(out_sn[1]));
  dup_nrrr #(.N_LOG(2)) d2 (.clk, .rst_n, .en, .in_sn, .r(r2[1:0]), .out_sn(out_sn[2]));
  dup_nrrr #(.N_LOG(3)) d3 (.clk, .rst_n, .en, .in_sn, .r(r3),      .out_sn(out_sn[3]));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hin [LEN];
    int hr [4][LEN];
    int rv [4];
    int bad [4], ones_out [4], dsum [4], dcnt [4];
    int ones_in, n, lim;
    logic expv;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    ones_in = 0; n = 0;
    for (int k = 0; k < 4; k++) begin bad[k] = 0; ones_out[k] = 0; dsum[k] = 0; dcnt[k] = 0; end
    for (int i = 0; i < LEN; i++) begin
      in_sn = ($urandom_range(0, 9) < 7);
      en    = ($urandom_range(0, 9) != 0);
      rv[0] = 0;
      rv[1] = $urandom_range(0, 1);
      rv[2] = $urandom_range(0, 3);
      rv[3] = $urandom_range(0, 7);
      r0 = 3'(rv[0]); r1 = 3'(rv[1]); r2 = 3'(rv[2]); r3 = 3'(rv[3]);
      #1;
      for (int k = 0; k < 4; k++) begin
        expv = rv[k][0];
        for (int j = n - 1; j >= 0; j--) if (hr[k][j] == rv[k]) begin
          expv = hin[j];
          if (en && i > 200) begin dsum[k] += n - j; dcnt[k]++; end
          break;
        end
        if (out_sn[k] !== expv) bad[k]++;
      end
      if (en) begin
        ones_in += int'(in_sn);
        for (int k = 0; k < 4; k++) begin ones_out[k] += int'(out_sn[k]); hr[k][n] = rv[k]; end
        hin[n] = in_sn; n++;
      end
      @(negedge clk);
    end
    for (int k = 0; k < 4; k++) begin
      lim = 1 << k;
      check(bad[k] == 0, $sformatf("%0dRRR closed-form mismatches: %0d", lim, bad[k]));
      check(ones_out[k] - ones_in <= lim && ones_in - ones_out[k] <= lim,
            $sformatf("%0dRRR ones in %0d out %0d", lim, ones_in, ones_out[k]));
      check(dsum[k] * 100 >= dcnt[k] * lim * 85 && dsum[k] * 100 <= dcnt[k] * lim * 115,
            $sformatf("%0dRRR mean delay %0d/%0d", lim, dsum[k], dcnt[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
