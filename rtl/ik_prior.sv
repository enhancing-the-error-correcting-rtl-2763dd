// ik_prior: a-priori probabilities of one code bit from its channel sample.
//
// The input is the scaled channel value lambda = 4*y/N0 of a BPSK sample y
// (+1 sent for bit 0), as a signed fixed-point number with LF fraction bits.
// The output pair is (p0, p1) with p1 = 1 / (1 + exp(lambda)) and
// p0 = 1 - p1, scaled by 2^(PW-1) - 1 and with p1 or p0 kept at least one
// LSB. Since max(p0, p1) >= 1/2, the pair is already in the normalised
// form of ik_pkg.
//
// The table of 1 / (1 + exp(|lambda|)) is computed at elaboration with an
// integer Taylor series of exp in Q16 (no real arithmetic), so nothing is
// read from a file. Purely combinational.
// The formula is the published initialisation; the input format (LW bits,
// LF fraction bits) is this design's own choice.
module ik_prior
  import ik_pkg::*;
#(
  parameter int LW = 8,   // width of lambda
  parameter int LF = 3    // fraction bits of lambda
) (
  input  logic signed [LW-1:0] llr,
  output pair_t                p
);

  localparam int TN = (1 << (LW - 1)) + 1;       // |lambda| = 0 .. 2^(LW-1)
  localparam longint SC = (64'sd1 << (PW - 1)) - 1;

  typedef logic [TN-1:0][PW-1:0] tab_t;

  // exp(v / 2^LF) in Q16
  function automatic longint exp_q16(int v);
    longint y, term, sum;
    y    = longint'(v) <<< (16 - LF);
    term = 64'sd1 <<< 16;
    sum  = term;
    for (int k = 1; k < 80; k++) begin
      term = (term * y) / (longint'(k) <<< 16);
      sum  = sum + term;
    end
    return sum;
  endfunction

  function automatic tab_t make_tab();
    tab_t   t;
    longint e, v;
    for (int i = 0; i < TN; i++) begin
      e = exp_q16(i);
      v = (SC * (64'sd1 <<< 16) + (((64'sd1 <<< 16) + e) >>> 1)) / ((64'sd1 <<< 16) + e);
      if (v < 1) v = 1;
      t[i] = PW'(v);
    end
    return t;
  endfunction

  localparam tab_t TAB = make_tab();

  logic [LW-1:0] mag;
  mant_t         p_lo, p_hi;

  always_comb begin
    mag   = (llr < 0) ? LW'(-llr) : LW'(llr);
    p_lo = mant_t'(TAB[mag]);
    p_hi   = mant_t'(SC) - p_lo;
    if (llr < 0) begin
      p.x0 = p_lo;
      p.x1 = p_hi;
    end else begin
      p.x0 = p_hi;
      p.x1 = p_lo;
    end
  end

endmodule
