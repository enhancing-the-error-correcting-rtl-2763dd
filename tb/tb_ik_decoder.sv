// tb_ik_decoder: self-checking test of the iterative decoder, (46,32) code.
//
// Code words come from the encoder (checked on its own against reference
// vectors). Channel values are lambda = 4*y/N0 quantised with 3 fraction
// bits. Cases:
//   clean word          decoded in one iteration, exact latency
//   single errors      one bit sign flipped at full confidence, every
//                        position; and pairs of weak errors. The RTL must
//                        match a floating-point model of the algorithm
//                        (decision, success, iteration count).
//   3 weak errors        three wrong bits of low confidence: beyond what a
//                        hard-decision distance-5 decoder corrects
//   random noise         AWGN at Eb/N0 = 5 dB; the decoded data must hold
//                        fewer bit errors than the hard decisions of the
//                        channel values
//   no code word         random strong values: out_ok = 0 after MAX_ITER
//                        iterations, exact latency
// Latency: out_valid comes E + iters*(4E+1) cycles after the accepting
// edge, E = 248 edges in the (46,32) Tanner graph. out_ready is held low for
// a while on some blocks and the outputs must stay put.
module tb_ik_decoder;
  import ik_pkg::*;

  localparam int K = 32, N = 46, E = 248, MAX_ITER = 20;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              in_valid, in_ready, out_valid, out_ready, out_ok;
  logic signed [7:0] in_llr [N];
  logic [K-1:0]      out_data, enc_data;
  logic [N-1:0]      out_cw, enc_cw;
  logic [7:0]        out_iters;

  ik_encoder #(.K(K)) u_enc (.data(enc_data), .codeword(enc_cw), .parity_mask());

  ik_decoder #(.K(K), .MAX_ITER(MAX_ITER)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_llr, .out_valid, .out_ready,
    .out_data, .out_codeword(out_cw), .out_ok, .out_iters);

  localparam logic [13:0][45:0] H32 = {46'hf7bdef7bdef, 46'ha5294a5294a, 46'hc6318c6318c,
    46'h8c6318c6318, 46'h2fffe0000000, 46'h10001fffc000, 46'hf591eb20000, 46'h7ac8f590000,
    46'h3d647ac8000, 46'heb23d644000, 46'hf5900003d64, 46'h7ac80001eb2, 46'h3d640000f59,
    46'heb220003ac8};
  localparam int R = 14;
  logic [N-1:0] hv [R];   // run-time copy of H32 for the model
  initial for (int m = 0; m < R; m++) hv[m] = H32[m];

  // Floating-point model of the algorithm (probability domain, divisions
  // as written): returns the decision, the iteration count and success.
  real qr0 [R][N], qr1 [R][N], rr0 [R][N], rr1 [R][N];
  function automatic void ref_bp(input logic signed [7:0] llr [N], output logic [N-1:0] c,
                        output int iters, output bit ok);
    real p1 [N];
    real d, a, b;
    for (int l = 0; l < N; l++) begin
      p1[l] = 1.0 / (1.0 + $exp(real'(llr[l]) / 8.0));
      for (int m = 0; m < R; m++) begin
        qr0[m][l] = 1.0 - p1[l];
        qr1[m][l] = p1[l];
      end
    end
    ok = 0; iters = MAX_ITER; c = '0;
    for (int it = 1; it <= MAX_ITER && !ok; it++) begin
      for (int m = 0; m < R; m++)
        for (int l = 0; l < N; l++) if (hv[m][l]) begin
          d = 1.0;
          for (int l2 = 0; l2 < N; l2++)
            if (hv[m][l2] && l2 != l) d = d * (qr0[m][l2] - qr1[m][l2]);
          rr0[m][l] = (1.0 + d) / 2.0;
          rr1[m][l] = (1.0 - d) / 2.0;
        end
      for (int l = 0; l < N; l++) begin
        for (int m = 0; m < R; m++) if (hv[m][l]) begin
          a = 1.0 - p1[l]; b = p1[l];
          for (int m2 = 0; m2 < R; m2++)
            if (hv[m2][l] && m2 != m) begin
              a = a * rr0[m2][l];
              b = b * rr1[m2][l];
            end
          qr0[m][l] = a / (a + b);
          qr1[m][l] = b / (a + b);
        end
        a = 1.0 - p1[l]; b = p1[l];
        for (int m = 0; m < R; m++) if (hv[m][l]) begin
          a = a * rr0[m][l];
          b = b * rr1[m][l];
        end
        c[l] = (b > a);
      end
      begin
        bit z = 1;
        for (int m = 0; m < R; m++) if (^(hv[m] & c)) z = 0;
        if (z) begin
          ok = 1; iters = it;
        end
      end
    end
  endfunction

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

  // Decode one block; returns the cycle count from accept to out_valid.
  task automatic run(input logic signed [7:0] llr [N], input int hold, output int lat);
    int c = 0;
    in_llr   = llr;
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
    if (hold > 0) begin
      logic [K-1:0] d0 = out_data;
      logic         k0 = out_ok;
      repeat (hold) @(posedge clk);
      #1 check(out_valid && out_data == d0 && out_ok == k0, "output held while not ready");
    end
    out_ready = 1;
    @(posedge clk);
    #1 out_ready = 0;
  endtask

  logic signed [7:0] llr [N];
  int lat, nok, nbits_raw, nbits_dec, pos [3], ref_it, n_single_ok = 0, nmis = 0;
  logic [N-1:0] ref_c;
  bit ref_ok;

  initial begin
    in_valid = 0; out_ready = 0; enc_data = '0;
    for (int i = 0; i < N; i++) in_llr[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // clean word
    enc_data = 32'hdeadbeef; #1;
    for (int i = 0; i < N; i++) llr[i] = enc_cw[i] ? -8'sd40 : 8'sd40;
    run(llr, 5, lat);
    check(out_ok && out_data == enc_data && out_cw == enc_cw, "clean word decoded");
    check(out_iters == 1, "clean word: one iteration");
    check(lat == E + 1 * (4 * E + 1), $sformatf("clean latency %0d", lat));

    // single strong errors (all positions) and pairs of weak errors:
    // the RTL must make the same decision as the floating-point model
    for (int t = 0; t < 86; t++) begin
      enc_data = $urandom; #1;
      for (int i = 0; i < N; i++) llr[i] = enc_cw[i] ? -8'sd24 : 8'sd24;
      pos[0] = t % N; pos[1] = (t * 7 + 3) % N;
      if (t < N) llr[pos[0]] = -llr[pos[0]];
      else begin
        llr[pos[0]] = enc_cw[pos[0]] ? 8'sd8 : -8'sd8;
        if (pos[1] != pos[0]) llr[pos[1]] = enc_cw[pos[1]] ? 8'sd8 : -8'sd8;
      end
      run(llr, 0, lat);
      ref_bp(llr, ref_c, ref_it, ref_ok);
      check(out_ok == ref_ok && out_cw == ref_c && int'(out_iters) == ref_it,
            $sformatf("model match t=%0d ok=%0d/%0d it=%0d/%0d", t, out_ok, ref_ok, out_iters, ref_it));
      if (ref_ok) check(out_data == enc_data, $sformatf("corrected word carries sent data t=%0d", t));
      if (ref_ok) n_single_ok++;
      check(lat == E + int'(out_iters) * (4 * E + 1), "latency formula");
    end
    $display("single strong errors or weak pairs corrected by the model: %0d/86", n_single_ok);

    // three weak errors
    for (int t = 0; t < 30; t++) begin
      enc_data = $urandom; #1;
      for (int i = 0; i < N; i++) llr[i] = enc_cw[i] ? -8'sd32 : 8'sd32;
      pos[0] = $urandom % N;
      pos[1] = (pos[0] + 1 + $urandom % 20) % N;
      pos[2] = (pos[1] + 1 + $urandom % 20) % N;
      if (pos[2] == pos[0]) pos[2] = (pos[2] + 1) % N;
      for (int j = 0; j < 3; j++) llr[pos[j]] = enc_cw[pos[j]] ? 8'sd3 : -8'sd3;
      run(llr, 0, lat);
      check(out_ok && out_data == enc_data, $sformatf("three weak errors t=%0d", t));
    end

    // AWGN, Eb/N0 = 5 dB
    nok = 0; nbits_raw = 0; nbits_dec = 0;
    for (int t = 0; t < 60; t++) begin
      real esn0, n0, sig, y;
      esn0 = (real'(K) / real'(N)) * (10.0 ** 0.5);
      n0   = 1.0 / esn0;
      sig  = $sqrt(n0 / 2.0);
      enc_data = $urandom; #1;
      for (int i = 0; i < N; i++) begin
        y = (enc_cw[i] ? -1.0 : 1.0) + sig * gauss();
        llr[i] = quant(4.0 * y / n0);
        if ((llr[i] < 0) != enc_cw[i]) nbits_raw++;
      end
      run(llr, (t % 10 == 0) ? 3 : 0, lat);
      if (out_ok) begin
        nok++;
        if (out_data != enc_data) nmis++;
      end
      nbits_dec += $countones(out_data ^ enc_data);
    end
    $display("AWGN 5 dB: %0d/60 blocks ok (%0d of them wrong code words), raw bit errors %0d, decoded data bit errors %0d",
             nok, nmis, nbits_raw, nbits_dec);
    check(nbits_dec < nbits_raw, "decoder reduces bit errors");

    // not a code word
    for (int i = 0; i < N; i++) llr[i] = ($urandom % 2) ? -8'sd20 : 8'sd20;
    llr[0] = 8'sd20; llr[1] = -8'sd20; llr[2] = 8'sd20;
    run(llr, 0, lat);
    if (!out_ok) begin
      check(out_iters == MAX_ITER, "failure after MAX_ITER iterations");
      check(lat == E + MAX_ITER * (4 * E + 1), "failure latency");
    end else begin
      check(out_iters < MAX_ITER, "early stop on code word");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
