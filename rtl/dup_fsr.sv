// dup_fsr: FSR SN duplicator (flip-flop selecting circuit using a random bit stream).
//
// Two flip-flops in series hold the previous two input bits: FF1 holds In[i-1]
// and FF0 holds In[i-2]. A random bit r selects which is output:
//     Out[i] = r[i] ? In[i-1] : In[i-2]
// With P(r=1)=1/2 the output has the value of the input but a bit stream that
// differs from call to call, which breaks the correlation a plain one-bit delay
// leaves in circuits with re-convergent paths. This structure and equation follow
// the document. The initial bits (INIT[0] into FF0, INIT[1] into FF1, loaded on
// reset) are output during the first two cycles; the default FF0=0, FF1=1 matches
// the worked examples of the document.
//
// Interface: out_sn is combinational from the flip-flops and r (zero cycles of
// latency); the flip-flops shift on a clock edge with en=1 (synchronous reset).
module dup_fsr #(
  parameter logic [1:0] INIT = 2'b10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic in_sn,
  input  logic r,
  output logic out_sn
);
  logic ff0, ff1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ff0 <= INIT[0];
      ff1 <= INIT[1];
    end else if (en) begin
      ff1 <= in_sn;
      ff0 <= ff1;
    end
  end

  assign out_sn = r ? ff1 : ff0;
endmodule
