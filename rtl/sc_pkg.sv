// sc_pkg: shared types and constants of the stochastic-computing (SC) library.
//
// Stochastic numbers (SNs) are bit streams whose value is the fraction of 1s
// (uni-polar) or 2*P(1)-1 (bi-polar). Every block in this library processes one
// SN bit per clock cycle. This package holds:
//   * dup_kind_e  - which SN duplicator a function circuit uses (FSR, RRR or the
//                   scalable 2^n RRR duplicator),
//   * lfsr_mask   - Galois toggle masks of maximal-length LFSRs, 2..16 bits,
//   * seed_of     - a deterministic spread of non-zero LFSR seeds, so that the many
//                   random sources of one circuit start at different phases,
//   * coef_value  - rounding of a rational coefficient num/den to an SN-generator
//                   threshold for (2^W-1)-bit long SNs,
//   * fn_e        - index of each function output of the top-level evaluator,
//   * NUM_FN      - the number of those outputs (used by the top level only, so
//                   lint of this package alone reports it as unused).
// The LFSR masks and seed spreading are this design's choices; the document only
// asks for 8-bit (255-bit SNs) and 12-bit (4,095-bit SNs) LFSRs.
package sc_pkg;

  typedef enum logic [1:0] {
    DUP_FSR  = 2'd0,  // flip-flop selecting circuit using a random bit stream
    DUP_RRR  = 2'd1,  // register based re-arrangement circuit, two FFs
    DUP_NRRR = 2'd2   // scalable 2^n RRR duplicator, 2^n FFs
  } dup_kind_e;

  // Galois (right-shift) toggle masks of maximal-length LFSRs.
  function automatic logic [15:0] lfsr_mask(input int unsigned w);
    case (w)
      2:       return 16'h0003;
      3:       return 16'h0006;
      4:       return 16'h000C;
      5:       return 16'h0014;
      6:       return 16'h0030;
      7:       return 16'h0060;
      8:       return 16'h00B8;
      9:       return 16'h0110;
      10:      return 16'h0240;
      11:      return 16'h0500;
      12:      return 16'h0E08;
      13:      return 16'h1C80;
      14:      return 16'h3802;
      15:      return 16'h6000;
      default: return 16'hD008;
    endcase
  endfunction

  // Non-zero W-bit seed number k of a family started from base.
  function automatic logic [15:0] seed_of(input int unsigned w, input int unsigned base,
                                          input int unsigned k);
    int unsigned s;
    s = (base * 32'd40503 + k * 32'd2654435 + 32'd12345) >> 3;
    s = s % ((32'd1 << w) - 32'd1);
    return 16'(s + 32'd1);
  endfunction

  // Threshold v of an SN generator so that an SN of 2^W-1 bits has v ones,
  // v = round(num/den * (2^W-1)).
  function automatic logic [15:0] coef_value(input int unsigned w, input int unsigned num,
                                             input int unsigned den);
    longint unsigned full;
    full = (64'd1 << w) - 64'd1;
    return 16'((64'(num) * full + 64'(den) / 2) / 64'(den));
  endfunction

  // Outputs of the top-level evaluator sc_top.
  typedef enum int unsigned {
    FN_SQ       = 0,   // x^2, squarer
    FN_POW8_FSR = 1,   // x^8 with FSR duplicators
    FN_POW8_RRR = 2,   // x^8 with RRR duplicators
    FN_POW8     = 3,   // x^8 with 2^n RRR duplicators
    FN_SIN      = 4,   // sin'(x)
    FN_COS      = 5,   // cos'(x)
    FN_TANH     = 6,   // tanh'(x)
    FN_EXP      = 7,   // exp'(-x^2)
    FN_STEP     = 8,   // step function, threshold 1/2
    FN_BAND     = 9,   // step function with thresholds 1/4 and 3/4
    FN_ABS      = 10,  // |x| of a bi-polar SN
    FN_DISC     = 11   // cos'(x) inside (1/4,3/4), sin'(x) outside
  } fn_e;

  localparam int unsigned NUM_FN = 12;

endpackage
