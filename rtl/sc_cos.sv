// sc_cos: stochastic cos'(x), the 8th-order Taylor approximation of cos x on [0,1]:
//     cos'(x) = 1 - x^2/2! + x^4/4! - x^6/6! + x^8/8!
//             = 1 - x^2/2*(1 - x^2/12*(1 - x^2/30*(1 - x^2/56))).
//
// A squarer (AND gate plus SN duplicator) forms u = x^2 and a four-stage NAND
// Horner chain (sc_horner, three more duplicators on u) forms the result, so four
// duplicators lie in series, as in the document's circuit. The coefficient SNs
// 1/2, 1/12, 1/30, 1/56 come from SN generators, rounded to LFSR_W-bit thresholds.
//
// Interface: x in, y out, uni-polar SNs, zero cycles of latency; state advances
// with en=1; synchronous reset loads all seeds and initial bits.
module sc_cos #(
  parameter int unsigned LFSR_W = 8,
  parameter sc_pkg::dup_kind_e DUP_KIND = sc_pkg::DUP_NRRR,
  parameter int unsigned DUP_LOG = 1,
  parameter int unsigned SEED_BASE = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic x,
  output logic y
);
  localparam int unsigned K = 4;
  localparam int unsigned NUM [K] = '{1, 1, 1, 1};
  localparam int unsigned DEN [K] = '{2, 12, 30, 56};

  logic u;   // x^2
  logic h;   // Horner polynomial in x^2

  sc_squarer #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_KIND), .DUP_LOG(DUP_LOG),
               .SEED_BASE(SEED_BASE * 7 + 1)) u_sq (.clk, .rst_n, .en, .x(x), .y(u));

  sc_horner #(.K(K), .NUM(NUM), .DEN(DEN), .LFSR_W(LFSR_W), .DUP_KIND(DUP_KIND),
              .DUP_LOG(DUP_LOG), .SEED_BASE(SEED_BASE * 7 + 2))
    u_horner (.clk, .rst_n, .en, .u(u), .h(h));

  assign y = h;
endmodule
