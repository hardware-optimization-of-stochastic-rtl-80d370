// tb_sn_gen: an SN generator with threshold v must emit exactly v ones in every
// window of 2^W-1 consecutive bits (one LFSR period). Checked for 8-bit and
// 12-bit generators over several thresholds, including 0 and all-ones.
module tb_sn_gen;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0]  v8;
  logic [11:0] v12;
  logic sn8, sn12;
  int checks = 0, failures = 0;

  sn_gen #(.WIDTH(8),  .SEED(8'h33))   dut8  (.clk, .rst_n, .en, .value(v8),  .sn(sn8));
  sn_gen #(.WIDTH(12), .SEED(12'h7A1)) dut12 (.clk, .rst_n, .en, .value(v12), .sn(sn12));

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
    int c8, c12;
    automatic int vals8 [6] = '{0, 1, 64, 128, 200, 255};
    automatic int vals12 [4] = '{0, 1000, 2048, 4095};
    repeat (2) @(posedge clk);
    rst_n <= 1; en <= 1;
    foreach (vals8[k]) begin
      v8 = 8'(vals8[k]); c8 = 0;
      @(negedge clk);
      for (int i = 0; i < 255; i++) begin
        c8 += int'(sn8);
        @(negedge clk);
      end
      check(c8 == vals8[k], $sformatf("8-bit v=%0d ones=%0d", vals8[k], c8));
    end
    foreach (vals12[k]) begin
      v12 = 12'(vals12[k]); c12 = 0;
      @(negedge clk);
      for (int i = 0; i < 4095; i++) begin
        c12 += int'(sn12);
        @(negedge clk);
      end
      check(c12 == vals12[k], $sformatf("12-bit v=%0d ones=%0d", vals12[k], c12));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
