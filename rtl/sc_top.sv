// sc_top: stochastic function evaluator. One binary input value is turned into a
// stochastic number (SN), sent bit by bit through every circuit of the library in
// parallel, and each output SN is counted back into a binary result.
//
// Operation: a pulse on start latches x_val and resets all circuits to their
// seeds and initial bits. For the next L = 2^LFSR_W - 1 cycles (busy=1) the SN
// generator emits one bit of x = x_val/L per cycle, every circuit emits one output
// bit in the same cycle (the circuits have zero latency), and an SN-to-binary
// counter per output counts ones. After L bits, done pulses for one cycle (it is
// registered, so it rises L+1 clock edges after the edge that sampled start) and
// res[f] holds the count of ones of function f (sc_pkg::fn_e), its value being
// res[f]/L; the results stay until the next start. The circuits evaluated are:
//   x^2; x^8 with FSR, RRR and 2^n RRR duplicators; sin'(x); cos'(x); tanh'(x);
//   exp'(-x^2); the step function at 1/2 and the 1/4..3/4 band step; |2x-1|, the
//   absolute value of x read as a bi-polar SN; and the discontinuous function
//   (cos' inside the band, sin' outside).
// Which circuits exist and how they are built follows the document; gathering
// them behind one SN generator and one bank of counters, the start/done control
// and the seeds are this design's choices. Defaults: 255-bit SNs (8-bit LFSRs),
// 2^1 RRR duplicators, step functions over 15 flip-flops.
//
// Interface: start is sampled on a rising clock edge (also while busy, which
// restarts); x_sn and fn_sn show the current input and output bits while busy.
// The bit counters of the converters are read only through their full flags, so
// lint reports their nbits outputs as unused.
module sc_top
  import sc_pkg::*;
#(
  parameter int unsigned LFSR_W = 8,
  parameter int unsigned DUP_LOG = 1,
  parameter int unsigned STEP_LOG = 4
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic [LFSR_W-1:0]                 x_val,
  output logic                              busy,
  output logic                              done,
  output logic [NUM_FN-1:0][LFSR_W-1:0]     res,
  output logic                              x_sn,
  output logic [NUM_FN-1:0]                 fn_sn
);
  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e state;

  logic [LFSR_W-1:0] x_q;
  logic              sub_rst_n;   // reset of the datapath: power-on or start
  logic              en;
  logic [NUM_FN-1:0] full;

  assign sub_rst_n = rst_n & ~start;
  assign en        = (state == S_RUN) && !full[0];
  assign busy      = en;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      x_q   <= '0;
      done  <= 1'b0;
    end else if (start) begin
      state <= S_RUN;
      x_q   <= x_val;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state == S_RUN && full[0]) begin
        state <= S_IDLE;
        done  <= 1'b1;
      end
    end
  end

  // input SN
  sn_gen #(.WIDTH(LFSR_W), .SEED(LFSR_W'(seed_of(LFSR_W, 97, 0))))
    u_xgen (.clk, .rst_n(sub_rst_n), .en, .value(x_q), .sn(x_sn));

  // duplicator-based arithmetic circuits
  sc_squarer #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_NRRR), .DUP_LOG(DUP_LOG), .SEED_BASE(11))
    u_sq (.clk, .rst_n(sub_rst_n), .en, .x(x_sn), .y(fn_sn[FN_SQ]));
  sc_pow8 #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_FSR), .SEED_BASE(12))
    u_pow8_fsr (.clk, .rst_n(sub_rst_n), .en, .x(x_sn), .y(fn_sn[FN_POW8_FSR]));
  sc_pow8 #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_RRR), .SEED_BASE(13))
    u_pow8_rrr (.clk, .rst_n(sub_rst_n), .en, .x(x_sn), .y(fn_sn[FN_POW8_RRR]));
  sc_pow8 #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_NRRR), .DUP_LOG(DUP_LOG), .SEED_BASE(14))
    u_pow8 (.clk, .rst_n(sub_rst_n), .en, .x(x_sn), .y(fn_sn[FN_POW8]));
  sc_sin #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_NRRR), .DUP_LOG(DUP_LOG), .SEED_BASE(15))
    u_sin (.clk, .rst_n(sub_rst_n), .en, .x(x_sn), .y(fn_sn[FN_SIN]));
  sc_cos #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_NRRR), .DUP_LOG(DUP_LOG), .SEED_BASE(16))
    u_cos (.clk, .rst_n(sub_rst_n), .en, .x(x_sn), .y(fn_sn[FN_COS]));
  sc_tanh #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_NRRR), .DUP_LOG(DUP_LOG), .SEED_BASE(17))
    u_tanh (.clk, .rst_n(sub_rst_n), .en, .x(x_sn), .y(fn_sn[FN_TANH]));
  sc_exp_neg_sq #(.LFSR_W(LFSR_W), .DUP_KIND(DUP_NRRR), .DUP_LOG(DUP_LOG), .SEED_BASE(18))
    u_exp (.clk, .rst_n(sub_rst_n), .en, .x(x_sn), .y(fn_sn[FN_EXP]));

  // step-function-based circuits
  sc_step #(.N_LOG(STEP_LOG), .BAND(1'b0))
    u_step (.clk, .rst_n(sub_rst_n), .en, .x(x_sn), .y(fn_sn[FN_STEP]));
  sc_step #(.N_LOG(STEP_LOG), .BAND(1'b1))
    u_band (.clk, .rst_n(sub_rst_n), .en, .x(x_sn), .y(fn_sn[FN_BAND]));
  sc_abs #(.N_LOG(STEP_LOG))
    u_abs (.clk, .rst_n(sub_rst_n), .en, .a(x_sn), .c(fn_sn[FN_ABS]));
  sc_discont #(.LFSR_W(LFSR_W), .N_LOG(STEP_LOG), .DUP_KIND(DUP_NRRR), .DUP_LOG(DUP_LOG),
               .SEED_BASE(19))
    u_disc (.clk, .rst_n(sub_rst_n), .en, .x(x_sn), .y(fn_sn[FN_DISC]));

  // SN to binary converters
  for (genvar f = 0; f < NUM_FN; f++) begin : g_cnt
    logic [LFSR_W-1:0] nbits;
    sn_to_bin #(.M(LFSR_W)) u_cnt (
      .clk, .rst_n, .en, .clear(start), .sn(fn_sn[f]),
      .count(res[f]), .nbits(nbits), .full(full[f])
    );
  end

  // all counters advance together
  assert property (@(posedge clk) disable iff (!rst_n) full == '0 || full == '1);
endmodule
