// tb_ik_workloads: the three code sizes, (46,32), (81,64) and (148,128),
// decoded over an AWGN channel with BPSK at Eb/N0 = 3, 4 and 5 dB.
//
// For each code and noise level a number of random blocks is encoded,
// passed through the channel, quantised to 4*y/N0 with 3 fraction bits and
// decoded. Checked: a clean block decodes in one iteration with latency
// E + 4E + 1 cycles (E = 248, 562, 1227 edges, counted independently from
// the parity check matrices); at every noise level the decoded data hold
// fewer bit errors than the hard decisions of the channel values; an
// unsuccessful block always ran MAX_ITER iterations. The printed bit error
// counts compare the iterative decoder with plain hard decisions.
module tb_ik_workloads;
  import ik_pkg::*;

  localparam int MAX_ITER = 20, NB = 10;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
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

  // one decoder per code size, driven by the generate block below
  bit done [3];

  for (genvar g = 0; g < 3; g++) begin : g_code
    localparam int K  = (g == 0) ? 32 : (g == 1) ? 64 : 128;
    localparam int N  = (g == 0) ? 46 : (g == 1) ? 81 : 148;
    localparam int EE = (g == 0) ? 248 : (g == 1) ? 562 : 1227;

    logic              in_valid, in_ready, out_valid, out_ready, out_ok;
    logic signed [7:0] in_llr [N];
    logic [K-1:0]      out_data, enc_data;
    logic [N-1:0]      out_cw, enc_cw;
    logic [7:0]        out_iters;

    ik_encoder #(.K(K)) u_enc (.data(enc_data), .codeword(enc_cw), .parity_mask());
    ik_decoder #(.K(K), .MAX_ITER(MAX_ITER)) u_dec (
      .clk, .rst_n, .in_valid, .in_ready, .in_llr, .out_valid, .out_ready,
      .out_data, .out_codeword(out_cw), .out_ok, .out_iters);

    task automatic run(output int lat);
      int c = 0;
      in_valid = 1;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      #1 in_valid = 0;
      while (!out_valid) begin
        @(posedge clk); c++;
        #1;
      end
      lat = c;
      out_ready = 1;
      @(posedge clk);
      #1 out_ready = 0;
    endtask

    initial begin
      int lat, raw, dec, nok;
      real ebn0, esn0, n0, sig, y;
      in_valid = 0; out_ready = 0; enc_data = '0;
      for (int i = 0; i < N; i++) in_llr[i] = '0;
      wait (rst_n);
      @(posedge clk);
      // clean block
      for (int i = 0; i < K; i += 32) enc_data[i +: 32] = $urandom;
      #1;
      for (int i = 0; i < N; i++) in_llr[i] = enc_cw[i] ? -8'sd40 : 8'sd40;
      run(lat);
      check(out_ok && out_data == enc_data && out_iters == 1, $sformatf("K=%0d clean block", K));
      check(lat == EE + 4 * EE + 1, $sformatf("K=%0d clean latency %0d", K, lat));
      for (int s = 3; s <= 5; s++) begin
        ebn0 = 10.0 ** (real'(s) / 10.0);
        esn0 = ebn0 * real'(K) / real'(N);
        n0   = 1.0 / esn0;
        sig  = $sqrt(n0 / 2.0);
        raw = 0; dec = 0; nok = 0;
        for (int b = 0; b < NB; b++) begin
          for (int i = 0; i < K; i += 32) enc_data[i +: 32] = $urandom;
          #1;
          for (int i = 0; i < N; i++) begin
            y = (enc_cw[i] ? -1.0 : 1.0) + sig * gauss();
            in_llr[i] = quant(4.0 * y / n0);
            if (i < K && ((y < 0) != enc_cw[u_dec.DPOS[i]])) raw++;
          end
          run(lat);
          if (out_ok) nok++;
          else check(out_iters == MAX_ITER, "failure after MAX_ITER");
          check(lat == EE + int'(out_iters) * (4 * EE + 1), "latency formula");
          dec += $countones(out_data ^ enc_data);
        end
        $display("(%0d,%0d) Eb/N0=%0d dB: %0d/%0d blocks decoded, data bit errors: hard decision %0d, iterative %0d",
                 N, K, s, nok, NB, raw, dec);
        check(dec < raw || raw == 0, $sformatf("K=%0d %0d dB: iterative decoding removes errors", K, s));
      end
      done[g] = 1;
    end
  end

  initial begin
    done = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
