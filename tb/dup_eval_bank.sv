// dup_eval_bank: test fixture for the duplicator accuracy sweep. It holds the six
// duplicator-based function circuits (x^2, x^8, sin', cos', tanh', exp'(-x^2))
// in six duplicator variants each: 2^n RRR for n = 0..3, FSR and RRR, all fed by
// the same input SN x. Output y[c*NF + f] is function f built with variant c
// (c: 0..3 = 1RRR, 2RRR, 4RRR, 8RRR, 4 = FSR, 5 = RRR). W is the LFSR width of
// all random sources inside, so the circuits are built as for (2^W-1)-bit SNs.
// Zero latency, one bit per cycle with en = 1, synchronous active-low reset.
module dup_eval_bank
  import sc_pkg::*;
#(
  parameter int unsigned W = 8,
  parameter int unsigned SEED0 = 40
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic x,
  output logic [35:0] y
);
  localparam int NF = 6;
  for (genvar c = 0; c < 6; c++) begin : g_c
    localparam dup_kind_e K = (c == 4) ? DUP_FSR : (c == 5) ? DUP_RRR : DUP_NRRR;
    localparam int unsigned NL = (c < 4) ? c : 1;
    localparam int unsigned SB = SEED0 + 6 * c;
    sc_squarer    #(.LFSR_W(W), .DUP_KIND(K), .DUP_LOG(NL), .SEED_BASE(SB))
      u_sq   (.clk, .rst_n, .en, .x, .y(y[c * NF + 0]));
    sc_pow8       #(.LFSR_W(W), .DUP_KIND(K), .DUP_LOG(NL), .SEED_BASE(SB + 1))
      u_pow8 (.clk, .rst_n, .en, .x, .y(y[c * NF + 1]));
    sc_sin        #(.LFSR_W(W), .DUP_KIND(K), .DUP_LOG(NL), .SEED_BASE(SB + 2))
      u_sin  (.clk, .rst_n, .en, .x, .y(y[c * NF + 2]));
    sc_cos        #(.LFSR_W(W), .DUP_KIND(K), .DUP_LOG(NL), .SEED_BASE(SB + 3))
      u_cos  (.clk, .rst_n, .en, .x, .y(y[c * NF + 3]));
    sc_tanh       #(.LFSR_W(W), .DUP_KIND(K), .DUP_LOG(NL), .SEED_BASE(SB + 4))
      u_tanh (.clk, .rst_n, .en, .x, .y(y[c * NF + 4]));
    sc_exp_neg_sq #(.LFSR_W(W), .DUP_KIND(K), .DUP_LOG(NL), .SEED_BASE(SB + 5))
      u_exp  (.clk, .rst_n, .en, .x, .y(y[c * NF + 5]));
  end
endmodule
