// ik_ecc_top: ECC circuit of a memory protected by an Imai-Kamiyanagi code
// with iterative soft decoding.
//
// Write path: the K-bit block from the data input is encoded into an N-bit
// code word; the K data bits go to the data array and the N-K parity bits
// to the parity array (wr_codeword; which positions hold parity is fixed
// by the code, see ik_encoder). Read path: the N cells of a block are read back as soft
// values (rd_llr, the scaled channel value 4*y/N0 of each bit), decoded by
// the iterative decoder, and the K corrected data bits with their status
// pass through the output buffer to the output.
//
// The memory arrays, the row and column decoders and the sense amplifiers
// are outside this module: their signals are the wr_* and rd_* ports.
//
// Interface: the write path is combinational. The read path uses
// valid/ready on both ends; see ik_decoder for the decoding latency and
// ik_output_buffer for the one-cycle buffer delay. out_ok = 0 flags a block
// the decoder could not turn into a code word (detected error); out_iters
// is the number of iterations it used.
// The split into encoder, iterative decoder and output buffer follows the
// published block diagram; the port formats are this design's own.
module ik_ecc_top
  import ik_pkg::*;
#(
  parameter int K        = 32,
  parameter int MAX_ITER = 20,
  parameter int LW       = 8,
  parameter int LF       = 3,
  parameter int OB_DEPTH = 2,
  localparam int N = ik_n(K)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // write path
  input  logic [K-1:0]         wr_data,
  output logic [N-1:0]         wr_codeword,
  // read path, from the sense amplifiers
  input  logic                 rd_valid,
  output logic                 rd_ready,
  input  logic signed [LW-1:0] rd_llr [N],
  // decoded output
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [K-1:0]         out_data,
  output logic                 out_ok,
  output logic [7:0]           out_iters
);

  ik_encoder #(.K(K)) u_enc (
    .data        (wr_data),
    .codeword    (wr_codeword),
    .parity_mask ()
  );

  logic         dec_valid, dec_ready, dec_ok;
  logic [K-1:0] dec_data;
  logic [N-1:0] dec_cw;
  logic [7:0]   dec_iters;

  ik_decoder #(.K(K), .MAX_ITER(MAX_ITER), .LW(LW), .LF(LF)) u_dec (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (rd_valid),
    .in_ready     (rd_ready),
    .in_llr       (rd_llr),
    .out_valid    (dec_valid),
    .out_ready    (dec_ready),
    .out_data     (dec_data),
    .out_codeword (dec_cw),
    .out_ok       (dec_ok),
    .out_iters    (dec_iters)
  );

  ik_output_buffer #(.W(K + 9), .DEPTH(OB_DEPTH)) u_obuf (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (dec_valid),
    .in_ready  (dec_ready),
    .in_data   ({dec_ok, dec_iters, dec_data}),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_data  ({out_ok, out_iters, out_data})
  );

endmodule
