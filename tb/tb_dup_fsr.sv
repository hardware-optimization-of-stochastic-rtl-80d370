// tb_dup_fsr: FSR duplicator against (1) the document's worked example
// In=10101110, r=11100100 (first bit rightmost) giving Out=010111X1X0 with the
// initial bits X0=0, X1=1, (2) the reference equation Out[i] = r[i] ? In[i-1] :
// In[i-2] on a long random stream, checked every cycle, which also shows the zero
// cycles of latency, and (3) value preservation: the ones of In and Out over the
// stream agree to within 100 of ~3500 bits (FSR keeps the value on average).
module tb_dup_fsr;
  logic clk = 0, rst_n = 0, en = 0, in_sn = 0, r = 0, out_sn;
  int checks = 0, failures = 0;

  dup_fsr dut (.clk, .rst_n, .en, .in_sn, .r, .out_sn);

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
    automatic logic [7:0] ex_in = 8'b10101110, ex_r = 8'b11100100, ex_out = 8'b01011110, got;
    logic h1, h2;   // In[i-1], In[i-2]
    int ones_in, ones_out, bad;
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

    // random stream against the reference equation
    rst_n = 0; @(negedge clk); rst_n = 1;
    h1 = 1'b1; h2 = 1'b0;  // initial bits FF1=1, FF0=0
    ones_in = 0; ones_out = 0; bad = 0;
    for (int i = 0; i < 4000; i++) begin
      in_sn = ($urandom_range(0, 9) < 6);
      r     = 1'($urandom_range(0, 1));
      en    = ($urandom_range(0, 7) != 0);
      #1;
      if (out_sn !== (r ? h1 : h2)) bad++;
      if (en) begin
        ones_in += int'(in_sn); ones_out += int'(out_sn);
        h2 = h1; h1 = in_sn;
      end
      @(negedge clk);
    end
    check(bad == 0, $sformatf("reference equation mismatches: %0d", bad));
    // FSR may skip or repeat bits: the value is kept on average, not exactly
    check((ones_out - ones_in) * (ones_out - ones_in) < 100 * 100,
          $sformatf("ones in %0d out %0d", ones_in, ones_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
