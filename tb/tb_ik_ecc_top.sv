// tb_ik_ecc_top: end-to-end test of the ECC circuit at its default size,
// the (46,32) code.
//
// A small array in the testbench stands in for the memory cells: blocks are
// written through the encoder, and on a read each stored bit comes back as
// the soft value 4*y/N0 of a noisy BPSK sample y. Reads are issued
// back to back, so the decoder's busy time stalls the read side; the output
// side takes words at random and pauses for long stretches, so the output
// buffer fills and stalls the decoder. Kinds of read:
//   clean    no noise: must return the data after one iteration
//   noisy    AWGN at Eb/N0 = 4 dB: most blocks corrected; an ok block with
//            more than one iteration counts as a correction
//   garbage  random signs at full confidence: the decoder gives up after
//            MAX_ITER iterations (out_ok = 0) or lands on some code word
// A detected failure (out_ok = 0, MAX_ITER iterations) may come from a
// noisy or a garbage read.
// Every mechanism (clean decode, correction, detected failure, read stall,
// output buffer full) must occur at least once.
module tb_ik_ecc_top;
  import ik_pkg::*;

  localparam int K = 32, N = 46, MAX_ITER = 20, NBLK = 16, NREAD = 60;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [K-1:0]      wr_data, out_data;
  logic [N-1:0]      wr_codeword;
  logic              rd_valid, rd_ready, out_valid, out_ready, out_ok;
  logic signed [7:0] rd_llr [N];
  logic [7:0]        out_iters;

  ik_ecc_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  function automatic logic signed [7:0] quant(real lam);
    real v = lam * 8.0;
    if (v > 127.0)  v = 127.0;
    if (v < -127.0) v = -127.0;
    return 8'($rtoi(v + ((v < 0) ? -0.5 : 0.5)));
  endfunction

  // memory cells and the reference copy of the data
  logic [N-1:0] cells [NBLK];
  logic [K-1:0] ref_data [NBLK];

  typedef struct { logic [K-1:0] data; int kind; } exp_t;
  exp_t expq [$];

  int n_clean = 0, n_corr = 0, n_fail = 0, n_rd_stall = 0, n_ob_full = 0, n_out = 0;
  int n_noisy_ok = 0, n_noisy = 0;

  always @(posedge clk) begin
    if (rst_n && rd_valid && !rd_ready) n_rd_stall++;
    if (rst_n && dut.dec_valid && !dut.dec_ready) n_ob_full++;
  end

  // read issue
  initial begin
    real esn0, n0, sig, y;
    int a, kind;
    rd_valid = 0; wr_data = '0;
    for (int i = 0; i < N; i++) rd_llr[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // write path
    for (int b = 0; b < NBLK; b++) begin
      wr_data = $urandom;
      #1;
      cells[b]    = wr_codeword;
      ref_data[b] = wr_data;
      @(posedge clk);
    end
    esn0 = (real'(K) / real'(N)) * (10.0 ** 0.4);
    n0   = 1.0 / esn0;
    sig  = $sqrt(n0 / 2.0);
    for (int t = 0; t < NREAD; t++) begin
      a    = $urandom % NBLK;
      kind = (t % 6 == 0) ? 0 : (t % 6 == 5) ? 2 : 1;
      for (int i = 0; i < N; i++) begin
        y = cells[a][i] ? -1.0 : 1.0;
        if (kind == 1) y = y + sig * gauss();
        rd_llr[i] = (kind == 1) ? quant(4.0 * y / n0) : (y > 0 ? 8'sd40 : -8'sd40);
      end
      if (kind == 2)
        for (int j = 0; j < N; j++) rd_llr[j] = ($urandom % 2 != 0) ? 8'sd40 : -8'sd40;
      expq.push_back('{data: ref_data[a], kind: kind});
      @(negedge clk);
      rd_valid = 1;
      while (!rd_ready) @(negedge clk);
      @(posedge clk);
      #1 rd_valid = 0;
    end
  end

  // output side
  initial begin
    exp_t e;
    out_ready = 0;
    wait (rst_n);
    while (n_out < NREAD) begin
      @(negedge clk);
      // long pauses now and then let the output buffer fill
      out_ready = ((n_out / 8) % 2 == 0) ? ($urandom % 2 == 0) : ($urandom % 4000 == 0);
      if (out_valid && out_ready) begin
        e = expq.pop_front();
        n_out++;
        case (e.kind)
          0: begin
            check(out_ok && out_data == e.data && out_iters == 1, $sformatf("clean read ok=%0d it=%0d d=%h exp=%h", out_ok, out_iters, out_data, e.data));
            if (out_ok && out_iters == 1) n_clean++;
          end
          1: begin
            n_noisy++;
            if (out_ok) begin
              n_noisy_ok++;
              if (out_iters > 1 && out_data == e.data) n_corr++;
            end else begin
              n_fail++;
              check(out_iters == MAX_ITER, "failure only after MAX_ITER");
            end
          end
          default: begin
            if (!out_ok) begin
              n_fail++;
              check(out_iters == MAX_ITER, "failure only after MAX_ITER");
            end
          end
        endcase
      end
    end
    $display("clean %0d, corrected %0d, noisy ok %0d/%0d, detected failures %0d, read stall cycles %0d, buffer-full cycles %0d",
             n_clean, n_corr, n_noisy_ok, n_noisy, n_fail, n_rd_stall, n_ob_full);
    check(n_clean > 0, "clean decode happened");
    check(n_corr > 0, "correction happened");
    check(n_fail > 0, "detected failure happened");
    check(n_rd_stall > 0, "read stall happened");
    check(n_ob_full > 0, "output buffer full happened");
    check(n_noisy_ok * 10 >= n_noisy * 7, "most noisy blocks decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
