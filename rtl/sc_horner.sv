// sc_horner: stochastic Horner evaluator of
//     h = 1 - c0*u*(1 - c1*u*(1 - ... (1 - c_{K-1}*u)))
// for a uni-polar SN u and constant coefficients c_k = NUM[k]/DEN[k] in [0,1].
//
// Each stage is a NAND gate: h_k = NOT(c_k AND u_k AND h_{k+1}), the innermost one
// NOT(c_{K-1} AND u_0). The K copies of u must be mutually independent, so u_0 = u
// feeds the innermost stage and each further stage gets u passed through one more
// SN duplicator (K-1 duplicators in a chain), the outermost stage the most delayed
// copy. The coefficients are SNs from K SN generators with separate LFSRs. This
// is the alternating-sign Horner form the document uses for sin', cos', tanh' and
// exp'; the order in which the delayed copies are assigned to the stages and the
// generators of the coefficient SNs are this design's choices.
//
// Interface: u in, h out, zero cycles of latency; state advances with en=1.
module sc_horner #(
  parameter int unsigned K = 3,
  parameter int unsigned NUM [K] = '{default: 1},
  parameter int unsigned DEN [K] = '{default: 2},
  parameter int unsigned LFSR_W = 8,
  parameter sc_pkg::dup_kind_e DUP_KIND = sc_pkg::DUP_NRRR,
  parameter int unsigned DUP_LOG = 1,
  parameter int unsigned SEED_BASE = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic u,
  output logic h
);
  logic [K-1:0] uc;     // uc[j]: u after j duplicators
  logic [K-1:0] c;      // coefficient SNs
  logic [K:0]   stage;  // stage[k]: h_k; stage[K] = 1

  assign uc[0] = u;
  for (genvar j = 1; j < K; j++) begin : g_dup
    sc_dup #(.DUP_KIND(DUP_KIND), .DUP_LOG(DUP_LOG), .LFSR_W(LFSR_W),
             .SEED(LFSR_W'(sc_pkg::seed_of(LFSR_W, SEED_BASE, 200 + j))))
      u_dup (.clk, .rst_n, .en, .in_sn(uc[j-1]), .out_sn(uc[j]));
  end

  for (genvar k = 0; k < K; k++) begin : g_coef
    sn_gen #(.WIDTH(LFSR_W), .SEED(LFSR_W'(sc_pkg::seed_of(LFSR_W, SEED_BASE, 100 + k))))
      u_gen (.clk, .rst_n, .en,
             .value(LFSR_W'(sc_pkg::coef_value(LFSR_W, NUM[k], DEN[k]))), .sn(c[k]));
  end

  assign stage[K] = 1'b1;
  for (genvar k = 0; k < K; k++) begin : g_stage
    // stage k uses the copy of u that went through K-1-k duplicators
    assign stage[k] = ~(c[k] & uc[K-1-k] & stage[k+1]);
  end

  assign h = stage[0];
endmodule
