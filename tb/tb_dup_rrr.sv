// tb_dup_rrr: RRR duplicator against (1) the document's worked example
// In=10101110, r=11100100 (first bit rightmost) giving Out=01111X10X0 with the
// initial bits X0=0, X1=1, (2) the closed form of the output: Out[i] is the most
// recent earlier input bit In[j] with r[j] = r[i], or the initial bit of FF_r[i]
// when there is none, checked every cycle on a long random stream (this also
// shows zero cycles of latency), and (3) value preservation: the ones of In and
// Out differ by at most two.
module tb_dup_rrr;
  localparam int LEN = 3000;
  logic clk = 0, rst_n = 0, en = 0, in_sn = 0, r = 0, out_sn;
  int checks = 0, failures = 0;

  dup_rrr dut (.clk, .rst_n, .en, .in_sn, .r, .out_sn);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [7:0] ex_in = 8'b10101110, ex_r = 8'b11100100, ex_out = 8'b01111100, got;
    bit hin [LEN];
    bit hr  [LEN];
    int ones_in, ones_out, bad, n;
    logic expv;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    en = 1;
    for (int i = 0; i < 8; i++) begin
      in_sn = ex_in[i]; r = ex_r[i];
      #1 got[i] = out_sn;
      @(negedge clk);
    end
    check(got == ex_out, $sformatf("worked example: got %b expected %b", got, ex_out));

    rst_n = 0; @(negedge clk); rst_n = 1;
    ones_in = 0; ones_out = 0; bad = 0; n = 0;
    for (int i = 0; i < LEN; i++) begin
      in_sn = ($urandom_range(0, 9) < 3);
      r     = 1'($urandom_range(0, 1));
      en    = ($urandom_range(0, 7) != 0);
      #1;
      expv = r;               // initial bit of FF_r is r (FF0=0, FF1=1)
      for (int j = n - 1; j >= 0; j--) if (hr[j] == r) begin expv = hin[j]; break; end
      if (out_sn !== expv) bad++;
      if (en) begin
        ones_in += int'(in_sn); ones_out += int'(out_sn);
        hin[n] = in_sn; hr[n] = r; n++;
      end
      @(negedge clk);
    end
    check(bad == 0, $sformatf("closed-form mismatches: %0d", bad));
    check(ones_out - ones_in <= 2 && ones_in - ones_out <= 2,
          $sformatf("ones in %0d out %0d", ones_in, ones_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
