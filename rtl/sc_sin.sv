// sc_sin: stochastic sin'(x), the 7th-order Taylor approximation of sin x on [0,1]:
//     sin'(x) = x - x^3/3! + x^5/5! - x^7/7! = x*(1 - x^2/6*(1 - x^2/20*(1 - x^2/42))).
//
// A squarer (AND gate plus SN duplicator) forms u = x^2, a three-stage NAND
// Horner chain (sc_horner, two more duplicators on u) forms the bracket, and a
// final AND gate multiplies by x. Three duplicators lie in series, as in the
// document's circuit. The coefficient SNs 1/6, 1/20, 1/42 come from SN generators;
// the final AND uses x itself, not a duplicate (this design's reading of the
// circuit). Coefficients are rounded to LFSR_W-bit thresholds.
// That x shares its current bit only with the undelayed x^2 in the innermost
// NAND stage, which biases the result by at most 1.2e-5 over [0,1].
//
// Interface: x in, y out, uni-polar SNs, zero cycles of latency; state advances
// with en=1; synchronous reset loads all seeds and initial bits.
module sc_sin #(
  parameter int unsigned LFSR_W = 8,
  parameter sc_pkg::dup_kind_e DUP_KIND = sc_pkg::DUP_NRRR,
  parameter int unsigned DUP_LOG = 1,
  parameter int unsigned SEED_BASE = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic x,
  output logic y
);
  localparam int unsigned K = 3;
  localparam int unsigned NUM [K] = '{1, 1, 1};
  localparam int unsigned DEN [K] = '{6, 20, 42};

  logic u;   // x^2
  logic h;   // Horner polynomial in x^2

  sc_squarer #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_KIND), .DUP_LOG(DUP_LOG),
               .SEED_BASE(SEED_BASE * 7 + 1)) u_sq (.clk, .rst_n, .en, .x(x), .y(u));

  sc_horner #(.K(K), .NUM(NUM), .DEN(DEN), .LFSR_W(LFSR_W), .DUP_KIND(DUP_KIND),
              .DUP_LOG(DUP_LOG), .SEED_BASE(SEED_BASE * 7 + 2))
    u_horner (.clk, .rst_n, .en, .u(u), .h(h));

  assign y = x & h;
endmodule
