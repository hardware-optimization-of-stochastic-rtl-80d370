// dup_nrrr: scalable 2^n RRR SN duplicator.
//
// 2^N_LOG register units RU_0..RU_{2^n-1}, each a flip-flop FF_m with a comparator
// CMP_m that fires when the n-bit random number r equals m. The selected unit
// outputs its stored bit and stores the current input bit; all other units hold.
// Each input bit thus waits a random delay with P(delay=e) = (1/N)(1-1/N)^(e-1),
// N = 2^n, and more register units make the delays of different duplicators less
// likely to coincide, at the cost of up to 2^n erroneous (initial or left-over)
// bits. N_LOG=0 is the one-flip-flop delay duplicator and N_LOG=1 is the RRR
// duplicator. The structure follows the document; the initial bits (alternating
// 0,1,0,1,... from FF_0, as in the RRR duplicator) are this design's choice.
//
// Interface: r is N_LOG bits wide (one unused bit when N_LOG=0). out_sn is
// combinational (zero latency); the selected FF loads in_sn on a clock edge with
// en=1; synchronous reset loads the initial bits.
module dup_nrrr #(
  parameter int unsigned N_LOG = 1,
  localparam int unsigned RW = (N_LOG == 0) ? 1 : N_LOG,
  localparam int unsigned NFF = 1 << N_LOG
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          in_sn,
  input  logic [RW-1:0] r,
  output logic          out_sn
);
  logic [NFF-1:0] ff;
  logic [NFF-1:0] sel;   // comparator outputs CMP_m

  always_comb begin
    for (int m = 0; m < NFF; m++) begin
      sel[m] = (N_LOG == 0) ? 1'b1 : (r == RW'(m));
    end
  end

  always_ff @(posedge clk) begin
    for (int m = 0; m < NFF; m++) begin
      if (!rst_n)              ff[m] <= m[0];
      else if (en && sel[m])   ff[m] <= in_sn;
    end
  end

  assign out_sn = |(ff & sel);
endmodule
