// tb_ik_syndrome: checks the syndrome H * c against a reference parity
// check matrix of the (46,32) code and against reference code words of all
// three sizes (computed with an independent model of the construction).
module tb_ik_syndrome;
  int checks = 0, failures = 0;

  localparam logic [13:0][45:0] H32 = {46'hf7bdef7bdef, 46'ha5294a5294a, 46'hc6318c6318c,
    46'h8c6318c6318, 46'h2fffe0000000, 46'h10001fffc000, 46'hf591eb20000, 46'h7ac8f590000,
    46'h3d647ac8000, 46'heb23d644000, 46'hf5900003d64, 46'h7ac80001eb2, 46'h3d640000f59,
    46'heb220003ac8};

  logic [45:0]  cw32;  logic [13:0] s32;  logic z32;
  logic [80:0]  cw64;  logic [16:0] s64;  logic z64;
  logic [147:0] cw128; logic [19:0] s128; logic z128;

  ik_syndrome #(.K(32))  u32  (.cw(cw32),  .syndrome(s32),  .is_codeword(z32));
  ik_syndrome #(.K(64))  u64  (.cw(cw64),  .syndrome(s64),  .is_codeword(z64));
  ik_syndrome #(.K(128)) u128 (.cw(cw128), .syndrome(s128), .is_codeword(z128));

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
    logic [13:0] exp_s;
    cw32 = 46'h2fa9fd767c45; cw64 = 81'h45ab791fd3bcbde5c099;
    cw128 = 148'hce829bae327af5a781e29d76d4330f1446bea; #1;
    check(z32 && z64 && z128, "code words give zero syndrome");
    cw64 = cw64 ^ 81'h1; cw128 = cw128 ^ (148'h1 << 147); #1;
    check(!z64 && !z128, "single error detected");
    for (int t = 0; t < 500; t++) begin
      cw32 = {$urandom, $urandom} ;
      if (t < 46) cw32 = 46'h1 << t;        // every single column
      #1;
      for (int r = 0; r < 14; r++) exp_s[r] = ^(H32[r] & cw32);
      check(s32 == exp_s, "syndrome bits");
      check(z32 == (exp_s == 0), "zero flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
