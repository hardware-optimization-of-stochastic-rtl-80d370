// sn_gen: SN generator, an LFSR and a comparator.
//
// The LFSR produces a pseudo-random number rnd in 1..2^WIDTH-1 each cycle; the
// output bit is 1 when rnd <= value. Over one LFSR period of 2^WIDTH-1 cycles
// every number appears once, so the SN carries exactly `value` ones and its
// uni-polar value is value/(2^WIDTH-1). The document describes the generator as
// an LFSR plus a comparator; the "<=" convention is this design's choice, made so
// that value 0 gives all zeros and value 2^WIDTH-1 gives all ones.
//
// Interface: sn is combinational from the LFSR state and value (zero latency);
// the LFSR advances on each clock edge with en=1 and reloads SEED on reset.
module sn_gen #(
  parameter int unsigned WIDTH = 8,
  parameter logic [WIDTH-1:0] SEED = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] value,
  output logic             sn
);
  logic [WIDTH-1:0] rnd;

  lfsr #(.WIDTH(WIDTH), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .en, .state(rnd)
  );

  assign sn = (rnd <= value);
endmodule
