// dup_rrr: RRR SN duplicator (register based re-arrangement circuit using a random
// bit stream).
//
// Two flip-flops FF0 and FF1 buffer input bits. In each cycle the random bit r
// picks one of them: its stored bit is output and it is refilled with the current
// input bit, while the other keeps its bit. An input bit therefore waits a random,
// geometrically distributed number of cycles (P(delay=d) = 2^-d) before it is
// output, and all input bits except the last two are output exactly once, so the
// value of the SN is kept to within 2 bits. The structure follows the document;
// the initial bits INIT[0] (FF0) and INIT[1] (FF1) are this design's choice.
//
// Interface: out_sn is combinational from the flip-flops and r (zero latency); the
// selected flip-flop loads in_sn on a clock edge with en=1 (synchronous reset).
module dup_rrr #(
  parameter logic [1:0] INIT = 2'b10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic in_sn,
  input  logic r,
  output logic out_sn
);
  logic [1:0] ff;

  always_ff @(posedge clk) begin
    if (!rst_n)  ff <= INIT;
    else if (en) ff[r] <= in_sn;
  end

  assign out_sn = ff[r];
endmodule
