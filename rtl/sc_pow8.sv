// sc_pow8: eighth power unit, y = x^8 = ((x^2)^2)^2.
//
// Three squarers in series, each with its own SN duplicator (DUP1 on x, DUP2 on
// z = x^2, DUP3 on w = x^4). With a plain one-bit delay as duplicator this circuit
// would compute x^4 only, because the re-convergent paths reuse the same bits; the
// randomized duplicators (FSR, RRR, 2^n RRR) move it towards x^8. Structure from
// the document; duplicator kind and size are parameters.
//
// Interface: x in, y out, zero cycles of latency; state advances with en=1.
module sc_pow8 #(
  parameter int unsigned LFSR_W = 8,
  parameter sc_pkg::dup_kind_e DUP_KIND = sc_pkg::DUP_NRRR,
  parameter int unsigned DUP_LOG = 1,
  parameter int unsigned SEED_BASE = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic x,
  output logic y
);
  logic z, w;

  sc_squarer #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_KIND), .DUP_LOG(DUP_LOG),
               .SEED_BASE(SEED_BASE * 3 + 0)) u_sq1 (.clk, .rst_n, .en, .x(x), .y(z));
  sc_squarer #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_KIND), .DUP_LOG(DUP_LOG),
               .SEED_BASE(SEED_BASE * 3 + 1)) u_sq2 (.clk, .rst_n, .en, .x(z), .y(w));
  sc_squarer #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_KIND), .DUP_LOG(DUP_LOG),
               .SEED_BASE(SEED_BASE * 3 + 2)) u_sq3 (.clk, .rst_n, .en, .x(w), .y(y));
endmodule
