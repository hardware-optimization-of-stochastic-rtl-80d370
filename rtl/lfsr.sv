// lfsr: maximal-length linear feedback shift register, the pseudo-random source of
// every SN generator and every randomized SN duplicator.
//
// Galois form, shifting right: when the bit leaving at position 0 is 1 the state
// is XORed with the toggle mask of sc_pkg::lfsr_mask. The state runs through all
// 2^WIDTH-1 non-zero values, so a comparator against it produces an SN of exactly
// 2^WIDTH-1 bits, and each state bit is a random bit stream of value ~1/2.
// The document uses 8-bit LFSRs for 255-bit SNs and 12-bit LFSRs for 4,095-bit
// SNs; the Galois structure, the masks and the seed are this design's choice.
//
// Interface: state is valid in the same cycle; it advances on a clock edge with
// en=1 and is loaded with SEED on a clock edge with rst_n=0 (synchronous reset).
module lfsr #(
  parameter int unsigned WIDTH = 8,
  parameter logic [WIDTH-1:0] SEED = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] state
);
  localparam logic [WIDTH-1:0] MASK = WIDTH'(sc_pkg::lfsr_mask(WIDTH));
  localparam logic [WIDTH-1:0] SEED_NZ = (SEED == '0) ? WIDTH'(1) : SEED;

  logic [WIDTH-1:0] next;

  always_comb begin
    next = state >> 1;
    if (state[0]) next = next ^ MASK;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED_NZ;
    else if (en) state <= next;
  end

  initial assert (WIDTH >= 2 && WIDTH <= 16) else $error("lfsr: WIDTH must be 2..16");
endmodule
