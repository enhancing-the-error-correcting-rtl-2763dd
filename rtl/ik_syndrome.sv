// ik_syndrome: syndrome s = H * c of an N-bit hard decision word.
//
// Each of the R syndrome bits is the XOR of the code bits that take part in
// that parity check (the set L(m) of the decoder). A zero syndrome means
// the word is a code word; the iterative decoder stops on it.
//
// Interface: cw (N bits) in, syndrome (R bits) and is_codeword out.
// Purely combinational. H is the matrix built in ik_pkg.
module ik_syndrome
  import ik_pkg::*;
#(
  parameter int K = 32,
  localparam int N = ik_n(K),
  localparam int R = ik_r(K)
) (
  input  logic [N-1:0] cw,
  output logic [R-1:0] syndrome,
  output logic         is_codeword
);

  localparam hmat_t H = ik_hmat(K);

  always_comb begin
    for (int r = 0; r < R; r++) syndrome[r] = ^(H[r][N-1:0] & cw);
  end

  assign is_codeword = (syndrome == '0);

endmodule
