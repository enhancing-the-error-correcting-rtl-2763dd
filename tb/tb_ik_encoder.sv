// tb_ik_encoder: checks the systematic encoder for all three code sizes.
// Reference code words and parity check matrices were computed with an
// independent model of the construction (see the package header for the
// formula). Checks: the reference code words, H * c = 0 for random data,
// and linearity enc(a ^ b) = enc(a) ^ enc(b).
module tb_ik_encoder;
  import ik_pkg::*;

  int checks = 0, failures = 0;

  logic [31:0]  d32a, d32b;  logic [45:0]  c32a, c32b, m32;
  logic [63:0]  d64;         logic [80:0]  c64, m64;
  logic [127:0] d128;        logic [147:0] c128, m128;
  logic [31:0]  d32x;        logic [45:0]  c32x, m32x;

  ik_encoder #(.K(32))  u32a (.data(d32a), .codeword(c32a), .parity_mask(m32));
  ik_encoder #(.K(32))  u32b (.data(d32b), .codeword(c32b), .parity_mask(m32x));
  ik_encoder #(.K(32))  u32x (.data(d32x), .codeword(c32x), .parity_mask());
  ik_encoder #(.K(64))  u64  (.data(d64),  .codeword(c64),  .parity_mask(m64));
  ik_encoder #(.K(128)) u128 (.data(d128), .codeword(c128), .parity_mask(m128));

  localparam logic [13:0][45:0] H32 = {46'hf7bdef7bdef, 46'ha5294a5294a, 46'hc6318c6318c,
    46'h8c6318c6318, 46'h2fffe0000000, 46'h10001fffc000, 46'hf591eb20000, 46'h7ac8f590000,
    46'h3d647ac8000, 46'heb23d644000, 46'hf5900003d64, 46'h7ac80001eb2, 46'h3d640000f59,
    46'heb220003ac8};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d32b = '0; d32x = '0;
    d32a = 32'h0;               d64 = 64'h0;  d128 = 128'h0;  #1;
    check(c32a == 46'h0 && c64 == 81'h0 && c128 == 148'h0, "zero word");
    d32a = 32'hffffffff; d64 = 64'hffffffffffffffff; d128 = 128'hffffffffffffffffffffffffffffffff; #1;
    check(c32a == 46'h162ff9ffffff, "K32 ones");
    check(c64 == 81'h11dbffffff7ffffffffff, "K64 ones");
    check(c128 == 148'h6207ffffffffffff93fffffffffffffffffff, "K128 ones");
    d32a = 32'h9f767c45; d64 = 64'h5bc8fbbcbde5c099; d128 = 128'ha6eb8c9ebd69fe29d76d4330f1446bea; #1;
    check(c32a == 46'h2fa9fd767c45, "K32 vec1");
    check(c64 == 81'h45ab791fd3bcbde5c099, "K64 vec1");
    check(c128 == 148'hce829bae327af5a781e29d76d4330f1446bea, "K128 vec1");
    d32a = 32'h4164d839; d64 = 64'hb0c11fdecb91ce37; d128 = 128'hd7210dff076ce2ef87b0b125ec1d7da0; #1;
    check(c32a == 46'h26c40164d839, "K32 vec2");
    check(c64 == 81'h18b61823efdecb91ce37, "K64 vec2");
    check(c128 == 148'hd83f5c8437fc1db38e2ef87b0b125ec1d7da0, "K128 vec2");
    check($countones(m32) == 14 && $countones(m64) == 17 && $countones(m128) == 20, "parity counts");
    for (int t = 0; t < 300; t++) begin
      d32a = $urandom; d32b = $urandom; d32x = d32a ^ d32b; #1;
      begin
        bit zero = 1;
        for (int r = 0; r < 14; r++) if (^(H32[r] & c32a)) zero = 0;
        check(zero, "H*c = 0");
      end
      check(c32x == (c32a ^ c32b), "linearity");
      check((c32a & ~m32) != 46'h0 || d32a == 0, "data present");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
