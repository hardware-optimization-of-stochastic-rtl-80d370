// sc_tanh: stochastic tanh'(x), the 9th-order Taylor approximation of tanh x:
//     tanh'(x) = x*(1 - x^2/3*(1 - 2x^2/5*(1 - 17x^2/42*(1 - 62x^2/153)))).
//
// A squarer forms u = x^2, a four-stage NAND Horner chain (sc_horner, three more
// duplicators on u) forms the bracket, and a final AND gate multiplies by x, as in
// the document's Horner construction. Coefficient SNs 1/3, 2/5, 17/42, 62/153 come
// from SN generators, rounded to LFSR_W-bit thresholds; the final AND uses x itself
// (this design's reading of the circuit).
// That x shares its current bit only with the undelayed x^2 in the innermost
// NAND stage, which biases the result by at most 1e-3 over [0,1].
//
// Interface: x in, y out, uni-polar SNs, zero cycles of latency; state advances
// with en=1; synchronous reset loads all seeds and initial bits.
module sc_tanh #(
  parameter int unsigned LFSR_W = 8,
  parameter sc_pkg::dup_kind_e DUP_KIND = sc_pkg::DUP_NRRR,
  parameter int unsigned DUP_LOG = 1,
  parameter int unsigned SEED_BASE = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic x,
  output logic y
);
  localparam int unsigned K = 4;
  localparam int unsigned NUM [K] = '{1, 2, 17, 62};
  localparam int unsigned DEN [K] = '{3, 5, 42, 153};

  logic u;   // x^2
  logic h;   // Horner polynomial in x^2

  sc_squarer #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_KIND), .DUP_LOG(DUP_LOG),
               .SEED_BASE(SEED_BASE * 7 + 1)) u_sq (.clk, .rst_n, .en, .x(x), .y(u));

  sc_horner #(.K(K), .NUM(NUM), .DEN(DEN), .LFSR_W(LFSR_W), .DUP_KIND(DUP_KIND),
              .DUP_LOG(DUP_LOG), .SEED_BASE(SEED_BASE * 7 + 2))
    u_horner (.clk, .rst_n, .en, .u(u), .h(h));

  assign y = x & h;
endmodule
