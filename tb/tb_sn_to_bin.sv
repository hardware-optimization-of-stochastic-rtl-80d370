// tb_sn_to_bin: feeds random bit streams to the SN-to-binary converter and
// compares the count of ones with a count kept by the testbench; checks that the
// converter stops after 2^M-1 bits, ignores bits while en=0 and clears on clear.
module tb_sn_to_bin;
  localparam int M = 6;
  logic clk = 0, rst_n = 0, en = 0, clear = 0, sn = 0;
  logic [M-1:0] count, nbits;
  logic full;
  int checks = 0, failures = 0;

  sn_to_bin #(.M(M)) dut (.clk, .rst_n, .en, .clear, .sn, .count, .nbits, .full);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_cnt, ref_n;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 4; run++) begin
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      check(count == 0 && nbits == 0 && !full, "cleared");
      ref_cnt = 0; ref_n = 0;
      for (int i = 0; i < 80; i++) begin
        en = ($urandom_range(0, 3) != 0);
        sn = ($urandom_range(0, 99) < 20 * run + 10);
        if (en && ref_n < 63) begin ref_cnt += int'(sn); ref_n++; end
        @(negedge clk);
        if (count != M'(ref_cnt) || nbits != M'(ref_n)) check(0, $sformatf("run %0d step %0d", run, i));
      end
      check(count == M'(ref_cnt), $sformatf("run %0d count %0d ref %0d", run, count, ref_cnt));
      check(full == (ref_n == 63), "full flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
