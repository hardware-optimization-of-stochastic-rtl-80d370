// sc_abs: absolute value of a bi-polar SN, |V_a| with V = 2*P(1) - 1.
//
// A step function (sc_step, threshold 1/2) turns a into b, a bi-polar SN of value
// ~sign(V_a) (+1 when V_a > 0, -1 when V_a < 0). An XNOR gate, the bi-polar
// multiplier, then forms c = a * b = |V_a|. Structure from the document; N_LOG
// sets the step function's window of 2^N_LOG - 1 bits (default 15 flip-flops).
//
// Interface: a in, c out, one bi-polar SN bit per cycle, zero cycles of latency
// from a to c; the step function's window advances with en=1.
module sc_abs #(
  parameter int unsigned N_LOG = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic a,
  output logic c
);
  logic b;

  sc_step #(.N_LOG(N_LOG), .BAND(1'b0)) u_step (.clk, .rst_n, .en, .x(a), .y(b));

  assign c = ~(a ^ b);
endmodule
