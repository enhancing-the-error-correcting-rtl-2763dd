// ik_pkg: shared constants, types and elaboration-time functions for the
// Imai-Kamiyanagi ECC.
//
// Code construction. The parity check matrix of the double-error-correcting
// Imai-Kamiyanagi code is stacked from three parts,
//     H = [ A (x) H1   0  ]    (r0*m rows)
//         [ B (x) 1_n  I  ]    (r1 rows)
//         [ 1_n0 (x) H3 0 ]    (m rows)
// where (x) is the Kronecker product, n = 2^m - 1, H1 column i is alpha^i
// and H3 column i is alpha^(3i) in GF(2^m) (polynomial basis, bit b of the
// column is the coefficient of x^b). The code has n0*n + r1 columns; it is
// shortened by dropping the leftmost columns until N = K + R remains.
// This design uses n0 = 3, r0 = 2, r1 = 2 and m = 4, 5, 6 for K = 32, 64,
// 128, which gives the (46,32), (81,64) and (148,128) codes with 14, 17
// and 20 check bits. A = [01 10 11] (columns, bit 0 = first row) and
// B = [00 01 10]; with these the minimum distance of all three shortened
// codes is 5 (every sum of at most two columns is distinct and nonzero).
// The choice of n0, r0, r1, A and B is this design's own; the stacked form,
// the code sizes and d_min = 5 follow the published construction.
//
// Encoding is systematic: Gaussian elimination of H, scanning columns from
// the right, picks R pivot columns that carry the parity bits; the other
// K columns carry the data bits in ascending order.
//
// Probability arithmetic. The decoder never divides: every probability
// pair (x0, x1) is kept only up to a common positive factor, so a pair is
// stored as two signed PW-bit mantissas scaled by the same power of two
// until the larger magnitude lies in [2^(PW-2), 2^(PW-1)). Normalising by
// a power of two keeps the ratio x0/x1, which is all the decoder uses.
package ik_pkg;

  localparam int RMAX = 20;     // check bits of the largest code (148,128)
  localparam int NMAX = 148;    // length of the largest code
  localparam int KMAX = 128;
  localparam int PW   = 16;     // mantissa width of a probability pair

  typedef logic [RMAX-1:0][NMAX-1:0] hmat_t;
  typedef logic [KMAX-1:0][7:0]      dpos_t;

  typedef struct packed {
    hmat_t             h;    // H after elimination (pivot columns are unit)
    logic [NMAX-1:0]   piv;  // 1 marks a parity (pivot) column
  } sys_t;

  // Columns of A (r0 = 2 rows) and B (r1 = 2 rows), one per sub-block j.
  localparam logic [2:0][1:0] A_COL = {2'b11, 2'b10, 2'b01};
  localparam logic [2:0][1:0] B_COL = {2'b10, 2'b01, 2'b00};

  function automatic int ik_m(int k);
    return (k <= 32) ? 4 : (k <= 64) ? 5 : 6;
  endfunction

  function automatic int ik_r(int k);
    return 3 * ik_m(k) + 2;
  endfunction

  function automatic int ik_n(int k);
    return k + ik_r(k);
  endfunction

  // alpha^i in GF(2^m); primitive polynomials x^4+x+1, x^5+x^2+1, x^6+x+1
  function automatic int gf_pow(int m, int i);
    int x, poly, e;
    poly = (m == 4) ? 'h13 : (m == 5) ? 'h25 : 'h43;
    e    = i % ((1 << m) - 1);
    x    = 1;
    for (int s = 0; s < e; s++) begin
      x = x << 1;
      if (((x >> m) & 1) != 0) x = x ^ poly;
    end
    return x;
  endfunction

  // Parity check matrix of the shortened code; row r, column c.
  function automatic hmat_t ik_hmat(int k);
    hmat_t h;
    int m, n, nfull, nn, shift, fc, j, i, h1, h3;
    m     = ik_m(k);
    n     = (1 << m) - 1;
    nfull = 3 * n + 2;
    nn    = ik_n(k);
    shift = nfull - nn;
    h     = '0;
    for (int c = 0; c < nn; c++) begin
      fc = c + shift;
      if (fc < 3 * n) begin
        j  = fc / n;
        i  = fc % n;
        h1 = gf_pow(m, i);
        h3 = gf_pow(m, 3 * i);
        for (int a = 0; a < 2; a++)
          for (int b = 0; b < m; b++)
            h[a*m+b][c] = A_COL[j][a] & h1[b];
        for (int t = 0; t < 2; t++)
          h[2*m+t][c] = B_COL[j][t];
        for (int b = 0; b < m; b++)
          h[2*m+2+b][c] = h3[b];
      end else begin
        h[2*m + (fc - 3*n)][c] = 1'b1;
      end
    end
    return h;
  endfunction

  // Gaussian elimination over GF(2), pivots searched from the rightmost column.
  function automatic sys_t ik_systematic(int k);
    sys_t s;
    hmat_t h;
    logic [RMAX-1:0] used;
    logic [NMAX-1:0] tmp;
    int r, nn, p;
    r    = ik_r(k);
    nn   = ik_n(k);
    h    = ik_hmat(k);
    used = '0;
    s.piv = '0;
    for (int c = nn - 1; c >= 0; c--) begin
      p = -1;
      for (int row = 0; row < r; row++)
        if (p < 0 && !used[row] && h[row][c]) p = row;
      if (p >= 0) begin
        used[p]  = 1'b1;
        s.piv[c] = 1'b1;
        for (int row = 0; row < r; row++)
          if (row != p && h[row][c]) begin
            tmp    = h[row] ^ h[p];
            h[row] = tmp;
          end
      end
    end
    s.h = h;
    return s;
  endfunction

  // Column that carries data bit d (non-pivot columns, ascending).
  function automatic dpos_t ik_data_pos(int k);
    dpos_t d;
    sys_t  s;
    int    idx;
    s   = ik_systematic(k);
    d   = '0;
    idx = 0;
    for (int c = 0; c < ik_n(k); c++)
      if (!s.piv[c]) begin
        d[idx] = 8'(c);
        idx++;
      end
    return d;
  endfunction

  // ---------------------------------------------------------------- pairs
  typedef logic signed [PW-1:0] mant_t;

  typedef struct packed {
    mant_t x0;   // P(bit = 0), or the sum product S in the check step
    mant_t x1;   // P(bit = 1), or the difference product D in the check step
  } pair_t;

  localparam pair_t PAIR_ONE = '{x0: mant_t'(1 << (PW - 2)), x1: mant_t'(1 << (PW - 2))};

  localparam int XW = 2 * PW + 2;   // width of an intermediate value
  typedef logic signed [XW-1:0] wide_t;

  // Scale (a, b) by a common power of two so that the larger magnitude
  // lies in [2^(PW-2), 2^(PW-1)). Right shifts truncate.
  function automatic pair_t pair_norm(wide_t a, wide_t b);
    pair_t o;
    wide_t ma, mb, mx;
    int    lead, sh;
    ma   = (a < 0) ? -a : a;
    mb   = (b < 0) ? -b : b;
    mx   = ma | mb;
    lead = -1;
    for (int i = 0; i < XW - 1; i++)
      if (mx[i]) lead = i;
    if (lead < 0) begin
      o = '0;
    end else if (lead > PW - 2) begin
      sh   = lead - (PW - 2);
      o.x0 = mant_t'(a >>> sh);
      o.x1 = mant_t'(b >>> sh);
    end else begin
      sh   = (PW - 2) - lead;
      o.x0 = mant_t'(a <<< sh);
      o.x1 = mant_t'(b <<< sh);
    end
    return o;
  endfunction

  // Element-wise product of two pairs, renormalised.
  function automatic pair_t pair_mul(pair_t p, pair_t q);
    wide_t a, b;
    a = wide_t'(p.x0) * wide_t'(q.x0);
    b = wide_t'(p.x1) * wide_t'(q.x1);
    return pair_norm(a, b);
  endfunction

  // Keep both probabilities of a pair at least one LSB, so that a pair can
  // never collapse to (0, 0) in a later product.
  function automatic pair_t pair_floor(pair_t p);
    pair_t o;
    o.x0 = (p.x0 < 1) ? mant_t'(1) : p.x0;
    o.x1 = (p.x1 < 1) ? mant_t'(1) : p.x1;
    return o;
  endfunction

  // Bit-to-check message (q0, q1) -> factor (q0 + q1, q0 - q1) of Eq. (8).
  function automatic pair_t pair_to_sd(pair_t q);
    return pair_norm(wide_t'(q.x0) + wide_t'(q.x1), wide_t'(q.x0) - wide_t'(q.x1));
  endfunction

  // Products (S, D) -> check-to-bit message (r0, r1) = (S + D, S - D), Eq. (9).
  function automatic pair_t pair_from_sd(pair_t sd);
    return pair_floor(pair_norm(wide_t'(sd.x0) + wide_t'(sd.x1),
                                wide_t'(sd.x0) - wide_t'(sd.x1)));
  endfunction

endpackage
