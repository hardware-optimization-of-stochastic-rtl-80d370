// sc_step: step function on stochastic numbers, computed bit by bit.
//
// A shift register of N = 2^N_LOG - 1 flip-flops keeps the last N bits of the
// input SN x, and an adder counts the ones among them into an N_LOG-bit sum.
//   BAND = 0: y is the sum's MSB, i.e. the majority of the window. For an input
//             of value p, E[y] = sum_{i>(N-1)/2} C(N,i) p^i (1-p)^(N-i), which
//             tends to the step function (0 below 1/2, 1 above) as N grows.
//   BAND = 1: y is the XOR of the two MSBs of the sum, 1 when the window holds
//             between N/4 and 3N/4 ones, tending to 1 on (1/4,3/4) and 0 outside.
// The output starts right away, the first N outputs using the initial bits of the
// register, which are loaded on reset as 1,0,1,...,0,1 (the pattern the document
// uses in its experiments). Window, adder and output bits follow the document;
// the output is taken from the flip-flops, so y[i] depends on x[i-N]..x[i-1],
// and N_LOG=1 degenerates to a one-bit delay.
//
// Interface: x in, y out; y is combinational from the register (the window
// advances on a clock edge with en=1; synchronous reset loads the initial bits).
module sc_step #(
  parameter int unsigned N_LOG = 4,
  parameter bit BAND = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic x,
  output logic y
);
  localparam int unsigned N = (1 << N_LOG) - 1;

  logic [N-1:0]     win;   // win[0] newest bit
  logic [N_LOG-1:0] ones;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) win[k] <= ~k[0];
    end else if (en) begin
      win <= (win << 1) | N'(x);
    end
  end

  always_comb begin
    ones = '0;
    for (int k = 0; k < N; k++) ones = ones + N_LOG'(win[k]);
  end

  if (BAND) begin : g_band
    assign y = ones[N_LOG-1] ^ ones[N_LOG-2];
  end else begin : g_half
    assign y = ones[N_LOG-1];
  end

  initial assert (N_LOG >= 1 && (!BAND || N_LOG >= 2))
    else $error("sc_step: N_LOG must be >= 1 (>= 2 with BAND)");
endmodule
