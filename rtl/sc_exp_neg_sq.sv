// sc_exp_neg_sq: stochastic exp'(-x^2), a squarer followed by exp'(-u), where
//     exp'(-u) = 1 - u + u^2/2! - u^3/3! + u^4/4! - u^5/5!
//              = 1 - u*(1 - u/2*(1 - u/3*(1 - u/4*(1 - u/5)))).
//
// The squarer (AND gate plus SN duplicator) forms u = x^2 and a five-stage NAND
// Horner chain (sc_horner, four more duplicators on u) forms exp'(-u). The first
// coefficient is 1 (an all-ones SN); the others, 1/2..1/5, come from SN generators
// rounded to LFSR_W-bit thresholds. Structure after the document's description.
//
// Interface: x in, y out, uni-polar SNs, zero cycles of latency; state advances
// with en=1; synchronous reset loads all seeds and initial bits.
module sc_exp_neg_sq #(
  parameter int unsigned LFSR_W = 8,
  parameter sc_pkg::dup_kind_e DUP_KIND = sc_pkg::DUP_NRRR,
  parameter int unsigned DUP_LOG = 1,
  parameter int unsigned SEED_BASE = 7
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic x,
  output logic y
);
  localparam int unsigned K = 5;
  localparam int unsigned NUM [K] = '{1, 1, 1, 1, 1};
  localparam int unsigned DEN [K] = '{1, 2, 3, 4, 5};

  logic u;   // x^2
  logic h;   // Horner polynomial in x^2

  sc_squarer #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_KIND), .DUP_LOG(DUP_LOG),
               .SEED_BASE(SEED_BASE * 7 + 1)) u_sq (.clk, .rst_n, .en, .x(x), .y(u));

  sc_horner #(.K(K), .NUM(NUM), .DEN(DEN), .LFSR_W(LFSR_W), .DUP_KIND(DUP_KIND),
              .DUP_LOG(DUP_LOG), .SEED_BASE(SEED_BASE * 7 + 2))
    u_horner (.clk, .rst_n, .en, .u(u), .h(h));

  assign y = h;
endmodule
