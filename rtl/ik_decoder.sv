// ik_decoder: iterative soft decoder of the shortened Imai-Kamiyanagi code.
//
// The decoder passes probabilities along the edges of the Tanner graph of
// H: each check node tells each of its bits how likely the check is to be
// satisfied (horizontal step), each bit node combines its channel prior with
// what its other checks report (vertical step). Repeating the two steps
// spreads the evidence of checks further and further away from a bit, as in
// a parity check tree rooted at that bit. After every iteration the bits are
// decided and the decoder stops as soon as H * c = 0, or after MAX_ITER
// iterations with out_ok = 0 (a detected, uncorrected error).
//
// Equations (q = bit-to-check, r = check-to-bit, p = prior, all pairs):
//   init        q[m,l] = p[l] = (1 - p1, p1), p1 = 1 / (1 + exp(lambda_l))
//   horizontal  r[m,l] ~ (S + D, S - D) with S = prod (q0 + q1),
//               D = prod (q0 - q1) over the other bits l' of check m
//   vertical    q[m,l] ~ p[l] * prod r[m',l] over the other checks m' of l
//   posterior   Q[l]   ~ p[l] * prod r[m,l] over all checks of l
//   decision    c[l] = 1 when Q1 > Q0
// (S + D, S - D) is the pair ((1 + dr)/2, (1 - dr)/2) with dr = D/S, up to
// the factor S; normalisation by a power of two replaces the division by
// (q0 + q1), so the decoder contains multipliers but no divider.
//
// Schedule: one edge per clock. Each check node (row) and each bit node
// (column) is handled by a forward pass that stores prefix products in a
// scratch memory, then a backward pass that multiplies each prefix with
// the running suffix product, giving every "all but this edge" product.
// Edge memories q and r are indexed row-major; the column pass reaches them
// through a column-to-edge table. All tables come from H at elaboration.
//
// Timing: in_valid/in_ready accept a block of N samples in one cycle (only
// in S_IDLE). Loading the priors takes E cycles (E = number of ones in H);
// each iteration takes 4*E + 1 cycles. out_valid rises
// E + iters * (4*E + 1) cycles after the accepting edge and holds,
// with out_data, out_codeword, out_ok and out_iters stable, until out_ready.
//
// The update equations, the stop rule and the use of channel priors follow
// the published algorithm; the serial edge schedule, fixed-point pair
// format, MAX_ITER and handshake are this design's own.
module ik_decoder
  import ik_pkg::*;
#(
  parameter int K        = 32,
  parameter int MAX_ITER = 20,
  parameter int LW       = 8,
  parameter int LF       = 3,
  localparam int N = ik_n(K),
  localparam int R = ik_r(K)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [LW-1:0] in_llr [N],
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [K-1:0]         out_data,
  output logic [N-1:0]         out_codeword,
  output logic                 out_ok,
  output logic [7:0]           out_iters
);

  // ------------------------------------------------------------ tables
  localparam hmat_t H    = ik_hmat(K);
  localparam dpos_t DPOS = ik_data_pos(K);

  function automatic int count_edges();
    int e = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < N; c++)
        if (H[r][c]) e++;
    return e;
  endfunction

  function automatic int max_degree();
    int d = 0, w;
    for (int r = 0; r < R; r++) begin
      w = 0;
      for (int c = 0; c < N; c++) if (H[r][c]) w++;
      if (w > d) d = w;
    end
    for (int c = 0; c < N; c++) begin
      w = 0;
      for (int r = 0; r < R; r++) if (H[r][c]) w++;
      if (w > d) d = w;
    end
    return d;
  endfunction

  localparam int E  = count_edges();
  localparam int DG = max_degree();
  localparam int EW = $clog2(E + 1);
  localparam int NW = $clog2(N + 1);
  localparam int DW = $clog2(DG + 1);

  typedef logic [R:0][EW-1:0]   rptr_t;
  typedef logic [N:0][EW-1:0]   cptr_t;
  typedef logic [E-1:0][NW-1:0] ecol_t;
  typedef logic [E-1:0][EW-1:0] cedge_t;

  function automatic rptr_t f_row_start();
    rptr_t t;
    int e = 0;
    for (int r = 0; r < R; r++) begin
      t[r] = EW'(e);
      for (int c = 0; c < N; c++) if (H[r][c]) e++;
    end
    t[R] = EW'(e);
    return t;
  endfunction

  function automatic ecol_t f_edge_col();
    ecol_t t;
    int e = 0;
    t = '0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < N; c++)
        if (H[r][c]) begin
          t[e] = NW'(c);
          e++;
        end
    return t;
  endfunction

  function automatic cptr_t f_col_start();
    cptr_t t;
    int i = 0;
    for (int c = 0; c < N; c++) begin
      t[c] = EW'(i);
      for (int r = 0; r < R; r++) if (H[r][c]) i++;
    end
    t[N] = EW'(i);
    return t;
  endfunction

  // Edge index (row-major) of every edge, listed column by column.
  function automatic cedge_t f_col_edge();
    cedge_t t;
    int i = 0, e;
    t = '0;
    for (int c = 0; c < N; c++) begin
      e = 0;
      for (int r = 0; r < R; r++)
        for (int cc = 0; cc < N; cc++)
          if (H[r][cc]) begin
            if (cc == c) begin
              t[i] = EW'(e);
              i++;
            end
            e++;
          end
    end
    return t;
  endfunction

  localparam rptr_t  ROW_START = f_row_start();
  localparam ecol_t  EDGE_COL  = f_edge_col();
  localparam cptr_t  COL_START = f_col_start();
  localparam cedge_t COL_EDGE  = f_col_edge();

  // ------------------------------------------------------------- state
  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_HFWD, S_HBWD, S_VFWD, S_VBWD, S_CHECK, S_DONE
  } state_t;

  state_t state;

  logic signed [LW-1:0] llr_r [N];   // channel samples of the block
  pair_t   prior [N];                 // p[l]
  pair_t   qm    [E];                 // bit-to-check messages
  pair_t   rm    [E];                 // check-to-bit messages
  pair_t   scr   [DG];                // prefix products of one node
  pair_t   acc;                       // running product
  logic [N-1:0] chat;                 // tentative decision
  logic [EW-1:0] lidx;                // edge counter of S_LOAD
  logic [NW-1:0] node;                // current row or column
  logic [DW-1:0] k;                   // position within the node
  logic [7:0]    iter;
  logic          ok;

  // ------------------------------------------------------ datapath
  logic [EW-1:0] e_h, e_v, ci;
  logic [DW-1:0] len_h, len_v;
  pair_t         pr, t_h, prod_h, r_new, prod_v, q_new;
  logic [R-1:0]  syn;
  logic          syn_zero;

  ik_prior #(.LW(LW), .LF(LF)) u_prior (
    .llr (llr_r[EDGE_COL[lidx]]),
    .p   (pr)
  );

  ik_syndrome #(.K(K)) u_syn (
    .cw          (chat),
    .syndrome    (syn),
    .is_codeword (syn_zero)
  );

  always_comb begin
    e_h    = ROW_START[node[$clog2(R+1)-1:0]] + EW'(k);
    len_h  = DW'(ROW_START[node[$clog2(R+1)-1:0] + 1] - ROW_START[node[$clog2(R+1)-1:0]]);
    t_h    = pair_to_sd(qm[e_h]);
    prod_h = pair_mul(acc, t_h);
    r_new  = pair_from_sd(pair_mul(scr[k], acc));

    ci     = COL_START[node] + EW'(k);
    e_v    = COL_EDGE[ci];
    len_v  = DW'(COL_START[node + 1] - COL_START[node]);
    prod_v = pair_floor(pair_mul(acc, rm[e_v]));
    q_new  = pair_floor(pair_mul(scr[k], acc));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      lidx  <= '0;
      node  <= '0;
      k     <= '0;
      iter  <= '0;
      ok    <= 1'b0;
      acc   <= PAIR_ONE;
      chat  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          state <= S_LOAD;
          lidx  <= '0;
          iter  <= '0;
        end
        S_LOAD: begin
          if (lidx == EW'(E - 1)) begin
            state <= S_HFWD;
            node  <= '0;
            k     <= '0;
            acc   <= PAIR_ONE;
          end
          lidx <= lidx + 1'b1;
        end
        S_HFWD: begin
          if (k == len_h - 1'b1) begin
            state <= S_HBWD;
            acc   <= PAIR_ONE;
          end else begin
            k   <= k + 1'b1;
            acc <= prod_h;
          end
        end
        S_HBWD: begin
          if (k == '0) begin
            if (node == NW'(R - 1)) begin
              state <= S_VFWD;
              node  <= '0;
              acc   <= prior[0];
            end else begin
              state <= S_HFWD;
              node  <= node + 1'b1;
              acc   <= PAIR_ONE;
            end
          end else begin
            k   <= k - 1'b1;
            acc <= prod_h;
          end
        end
        S_VFWD: begin
          if (k == len_v - 1'b1) begin
            chat[node] <= (prod_v.x1 > prod_v.x0);
            state      <= S_VBWD;
            acc        <= PAIR_ONE;
          end else begin
            k   <= k + 1'b1;
            acc <= prod_v;
          end
        end
        S_VBWD: begin
          if (k == '0) begin
            if (node == NW'(N - 1)) begin
              state <= S_CHECK;
            end else begin
              state <= S_VFWD;
              node  <= node + 1'b1;
              acc   <= prior[node + 1'b1];
            end
          end else begin
            k   <= k - 1'b1;
            acc <= prod_v;
          end
        end
        S_CHECK: begin
          iter <= iter + 1'b1;
          ok   <= syn_zero;
          if (syn_zero || (iter == 8'(MAX_ITER - 1))) begin
            state <= S_DONE;
          end else begin
            state <= S_HFWD;
            node  <= '0;
            k     <= '0;
            acc   <= PAIR_ONE;
          end
        end
        S_DONE: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Memories: written one entry per cycle, no reset needed (every entry is
  // written in S_LOAD or a forward pass before it is read).
  always_ff @(posedge clk) begin
    if (state == S_IDLE && in_valid) llr_r <= in_llr;
    if (state == S_LOAD) begin
      qm[lidx]                   <= pr;
      prior[EDGE_COL[lidx]]      <= pr;
    end
    if (state == S_HFWD || state == S_VFWD) scr[k] <= acc;
    if (state == S_HBWD) rm[e_h] <= r_new;
    if (state == S_VBWD) qm[e_v] <= q_new;
  end

  assign in_ready     = (state == S_IDLE);
  assign out_valid    = (state == S_DONE);
  assign out_ok       = ok;
  assign out_iters    = iter;
  assign out_codeword = chat;

  always_comb begin
    for (int d = 0; d < K; d++) out_data[d] = chat[DPOS[d][NW-1:0]];
  end

endmodule
