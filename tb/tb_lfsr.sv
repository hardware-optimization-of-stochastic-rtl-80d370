// tb_lfsr: checks that the LFSR walks through all 2^W-1 non-zero states once per
// period (8-bit and 12-bit instances), never reaches zero, starts at its seed and
// follows an independently written Galois recurrence, and holds when en=0.
module tb_lfsr;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0]  s8;
  logic [11:0] s12;
  int checks = 0, failures = 0;

  lfsr #(.WIDTH(8),  .SEED(8'h5A))    dut8  (.clk, .rst_n, .en, .state(s8));
  lfsr #(.WIDTH(12), .SEED(12'h123))  dut12 (.clk, .rst_n, .en, .state(s12));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference: x^8+x^6+x^5+x^4+1 and x^12+x^11+x^10+x^4+1 in Galois form
  function automatic logic [7:0] ref8(input logic [7:0] s);
    return s[0] ? ((s >> 1) ^ 8'b1011_1000) : (s >> 1);
  endfunction
  function automatic logic [11:0] ref12(input logic [11:0] s);
    return s[0] ? ((s >> 1) ^ 12'b1110_0000_1000) : (s >> 1);
  endfunction

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen8 [256];
    bit seen12 [4096];
    automatic int dup8 = 0, dup12 = 0;
    logic [7:0] p8; logic [11:0] p12;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(s8 == 8'h5A && s12 == 12'h123, "seed loaded");
    // hold with en = 0
    @(negedge clk);
    check(s8 == 8'h5A, "holds while en=0");
    en <= 1;
    for (int i = 0; i < 4095; i++) begin
      p8 = s8; p12 = s12;
      if (i < 255) begin
        if (seen8[s8]) dup8++;
        seen8[s8] = 1;
      end
      if (seen12[s12]) dup12++;
      seen12[s12] = 1;
      @(negedge clk);
      if (s8 != ref8(p8)) begin check(0, $sformatf("8-bit step %0d", i)); end
      if (s12 != ref12(p12)) begin check(0, $sformatf("12-bit step %0d", i)); end
      if (s8 == 0 || s12 == 0) check(0, "zero state");
    end
    check(dup8 == 0 && !seen8[0], "8-bit: 255 distinct non-zero states");
    check(dup12 == 0 && !seen12[0], "12-bit: 4095 distinct non-zero states");
    check(s12 == 12'h123, "12-bit period 4095");
    // 4095 = 16*255 + 15, so the 8-bit LFSR is 15 steps past its seed
    for (int i = 0; i < 240; i++) @(negedge clk);
    check(s8 == 8'h5A, "8-bit period 255");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
