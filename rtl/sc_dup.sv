// sc_dup: an SN duplicator together with the LFSR that drives its random bits.
//
// DUP_KIND selects the FSR, RRR or 2^n RRR duplicator (sc_pkg::dup_kind_e). The
// random bit stream r is taken from the low bits of a private LFSR of LFSR_W bits
// seeded with SEED: bit 0 for FSR and RRR, bits DUP_LOG-1..0 for 2^n RRR. Each
// LFSR bit carries a random stream of value ~1/2, as the document assumes. Giving
// every duplicator its own LFSR (rather than sharing bits of one LFSR between
// duplicators, which the document also allows) is this design's choice; it keeps
// the streams of different duplicators at unrelated phases.
//
// Interface and timing are those of the selected duplicator: out_sn follows in_sn
// with zero cycles of latency; state advances on a clock edge with en=1.
// Only the low LFSR bits are read; lint reports the upper bits as unused, which
// is expected: they are the LFSR's internal state.
module sc_dup #(
  parameter sc_pkg::dup_kind_e DUP_KIND = sc_pkg::DUP_NRRR,
  parameter int unsigned DUP_LOG = 1,
  parameter int unsigned LFSR_W = 8,
  parameter logic [LFSR_W-1:0] SEED = LFSR_W'(1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic in_sn,
  output logic out_sn
);
  localparam int unsigned RW = (DUP_LOG == 0) ? 1 : DUP_LOG;
  logic [LFSR_W-1:0] rnd;

  lfsr #(.WIDTH(LFSR_W), .SEED(SEED)) u_rnd (.clk, .rst_n, .en, .state(rnd));

  if (DUP_KIND == sc_pkg::DUP_FSR) begin : g_fsr
    dup_fsr u_dup (.clk, .rst_n, .en, .in_sn, .r(rnd[0]), .out_sn);
  end else if (DUP_KIND == sc_pkg::DUP_RRR) begin : g_rrr
    dup_rrr u_dup (.clk, .rst_n, .en, .in_sn, .r(rnd[0]), .out_sn);
  end else begin : g_nrrr
    dup_nrrr #(.N_LOG(DUP_LOG)) u_dup (.clk, .rst_n, .en, .in_sn, .r(rnd[RW-1:0]), .out_sn);
  end

  initial assert (DUP_LOG <= LFSR_W) else $error("sc_dup: DUP_LOG exceeds LFSR_W");
endmodule
