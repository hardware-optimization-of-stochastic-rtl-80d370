// sc_squarer: stochastic squarer, y = x^2.
//
// An AND gate multiplies two independent SNs. Feeding x to both inputs would give
// x back, so one input is a duplicate x' of x made by an SN duplicator: the same
// value with a different bit stream. y[i] = x[i] & x'[i]. This is the document's
// squarer; the duplicator kind and size are parameters (default 2^1 RRR, the best
// choice the document reports for 255-bit SNs).
//
// Interface: x in, y out, both one SN bit per cycle, zero cycles of latency;
// duplicator state advances on a clock edge with en=1.
module sc_squarer #(
  parameter int unsigned LFSR_W = 8,
  parameter sc_pkg::dup_kind_e DUP_KIND = sc_pkg::DUP_NRRR,
  parameter int unsigned DUP_LOG = 1,
  parameter int unsigned SEED_BASE = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic x,
  output logic y
);
  logic xd;

  sc_dup #(.DUP_KIND(DUP_KIND), .DUP_LOG(DUP_LOG), .LFSR_W(LFSR_W),
           .SEED(LFSR_W'(sc_pkg::seed_of(LFSR_W, SEED_BASE, 0))))
    u_dup (.clk, .rst_n, .en, .in_sn(x), .out_sn(xd));

  assign y = x & xd;
endmodule
