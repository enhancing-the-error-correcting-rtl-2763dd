// tb_ik_prior: compares the prior table with p1 = 1 / (1 + exp(lambda))
// computed in floating point, for every input value.
module tb_ik_prior;
  import ik_pkg::*;
  int checks = 0, failures = 0;

  logic signed [7:0] llr;
  pair_t p;

  ik_prior #(.LW(8), .LF(3)) dut (.llr(llr), .p(p));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s llr=%0d p0=%0d p1=%0d", what, llr, p.x0, p.x1);
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
    real lam, p1, e1;
    for (int v = -127; v <= 127; v++) begin
      llr = 8'(v); #1;
      lam = real'(v) / 8.0;
      p1  = 32767.0 / (1.0 + $exp(lam));
      e1  = (v < 0) ? 32767.0 - p1 : p1;     // the smaller of the two
      e1  = (e1 < 1.0) ? 1.0 : e1;
      if (v >= 0) check(p.x1 >= $rtoi(e1) - 1 && p.x1 <= $rtoi(e1) + 1, "p1 value");
      else        check(p.x0 >= $rtoi(e1) - 1 && p.x0 <= $rtoi(e1) + 1, "p0 value");
      check(int'(p.x0) + int'(p.x1) == 32767, "p0 + p1");
      check((v > 0) ? p.x0 > p.x1 : (v < 0) ? p.x1 > p.x0 : (p.x0 - p.x1 <= 1 && p.x1 - p.x0 <= 1), "ordering");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
