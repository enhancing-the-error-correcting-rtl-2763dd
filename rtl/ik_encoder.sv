// ik_encoder: systematic encoder of the shortened Imai-Kamiyanagi code.
//
// The K data bits are placed on the K non-pivot columns of the code word
// (ascending column order) and each of the R parity bits, on its pivot
// column, is the XOR of the data bits that row of the eliminated parity
// check matrix touches (see ik_pkg). The result satisfies H * c = 0.
// In the memory, the data bits go to the data array and the parity bits
// to the parity array; the whole N-bit word is what the decoder later
// reads back.
//
// Interface: data (K bits) in, codeword (N bits) out, parity_mask marks the
// parity positions. Purely combinational, no clock.
// The code and the write-path position of the encoder follow the published
// design; systematic placement and pivot choice are this design's own.
module ik_encoder
  import ik_pkg::*;
#(
  parameter int K = 32,
  localparam int N = ik_n(K),
  localparam int R = ik_r(K)
) (
  input  logic [K-1:0] data,
  output logic [N-1:0] codeword,
  output logic [N-1:0] parity_mask
);

  localparam sys_t  SYS  = ik_systematic(K);
  localparam dpos_t DPOS = ik_data_pos(K);

  logic [N-1:0] placed;   // data bits on their columns, zeros elsewhere
  logic [R-1:0] parity;   // parity bit of each eliminated row

  always_comb begin
    placed = '0;
    for (int d = 0; d < K; d++) placed[DPOS[d][$clog2(N)-1:0]] = data[d];
  end

  always_comb begin
    for (int r = 0; r < R; r++) parity[r] = ^(SYS.h[r][N-1:0] & placed);
  end

  always_comb begin
    codeword = placed;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < N; c++)
        if (SYS.piv[c] && SYS.h[r][c]) codeword[c] = parity[r];
  end

  assign parity_mask = SYS.piv[N-1:0];

endmodule
