// sc_discont: discontinuous function built around a step function,
//     y = cos'(x)  for 1/4 < x < 3/4,
//     y = sin'(x)  for x < 1/4 or x > 3/4.
//
// Circuit A (sc_cos) gives a = cos'(x), circuit B (sc_sin) gives b = sin'(x), and
// circuit C, a step function with thresholds 1/4 and 3/4 (sc_step, BAND=1), gives
// c ~ 1 inside the band. Then d = a AND c, e = NOT c, f = b AND e and y = d OR f;
// because d and f are never 1 together this OR is a multiplexer selected by c.
// Structure from the document's example; all three circuits see the same input
// SN, as in the document. Near x = 1/4 and 3/4 the step output is between 0 and 1
// and y mixes the two branches.
//
// Interface: x in, y out, uni-polar SNs, zero cycles of latency; state advances
// with en=1; synchronous reset loads all seeds and initial bits.
module sc_discont #(
  parameter int unsigned LFSR_W = 8,
  parameter int unsigned N_LOG = 4,
  parameter sc_pkg::dup_kind_e DUP_KIND = sc_pkg::DUP_NRRR,
  parameter int unsigned DUP_LOG = 1,
  parameter int unsigned SEED_BASE = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic x,
  output logic y
);
  logic a, b, c, d, e, f;

  sc_cos #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_KIND), .DUP_LOG(DUP_LOG),
           .SEED_BASE(SEED_BASE * 5 + 1)) u_a (.clk, .rst_n, .en, .x(x), .y(a));
  sc_sin #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_KIND), .DUP_LOG(DUP_LOG),
           .SEED_BASE(SEED_BASE * 5 + 2)) u_b (.clk, .rst_n, .en, .x(x), .y(b));
  sc_step #(.N_LOG(N_LOG), .BAND(1'b1)) u_c (.clk, .rst_n, .en, .x(x), .y(c));

  assign d = a & c;
  assign e = ~c;
  assign f = b & e;
  assign y = d | f;
endmodule
