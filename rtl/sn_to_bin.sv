// sn_to_bin: SN to binary converter, an M-bit counter of the ones of an SN.
//
// For an SN of 2^M-1 bits (the length an M-bit LFSR produces) the counter counts
// the ones S_x while a second counter counts the bits seen; after 2^M-1 bits `full`
// is raised, counting stops, and count/(2^M-1) is the SN's value. The counter of
// ones follows the document; the bit counter and the stop at 2^M-1 bits are this
// design's additions so that the result is held for the reader.
//
// Interface: clear (synchronous, also by rst_n=0) zeroes both counters. A bit is
// counted on a clock edge with en=1 and full=0. count and nbits are registered.
module sn_to_bin #(
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clear,
  input  logic         sn,
  output logic [M-1:0] count,
  output logic [M-1:0] nbits,
  output logic         full
);
  assign full = (nbits == {M{1'b1}});

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      count <= '0;
      nbits <= '0;
    end else if (en && !full) begin
      nbits <= nbits + M'(1);
      count <= count + M'(sn);
    end
  end
endmodule
