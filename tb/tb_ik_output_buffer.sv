// tb_ik_output_buffer: random valid/ready traffic on both sides of the
// output FIFO; the words must come out in order, none lost or doubled, and
// in_ready must drop exactly when DEPTH words are held.
module tb_ik_output_buffer;
  localparam int W = 41, DEPTH = 2;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;

  ik_output_buffer #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model [$];
  int sent = 0, got = 0, full_seen = 0;
  bit do_pop, do_push;

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (got < 500) begin
      @(negedge clk);
      check(in_ready == (model.size() < DEPTH), "in_ready vs fill level");
      check(out_valid == (model.size() > 0), "out_valid vs fill level");
      if (model.size() == DEPTH) full_seen++;
      if (out_valid) check(out_data == model[0], "order");
      in_valid  = ($urandom % 3) != 0;
      out_ready = ($urandom % 3) == 0;
      in_data   = {$urandom, $urandom};
      #1;
      do_pop  = out_valid && out_ready;
      do_push = in_valid && in_ready;
      @(posedge clk);
      if (do_pop) begin
        void'(model.pop_front());
        got++;
      end
      if (do_push) begin
        model.push_back(in_data);
        sent++;
      end
    end
    check(full_seen > 0, "buffer became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
