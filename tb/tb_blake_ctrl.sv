// tb_blake_ctrl - follows the controller through several compressions with
// random gaps in msg_valid and checks every phase: pairs 0..7 written in
// order, one precharge cycle, ceil(NR/UNROLL) compute cycles with the address
// counter one round step ahead of the constant counter, `last` on the final
// compute cycle, and the cycle count 8 + gaps + 1 + ceil(NR/UNROLL).
module tb_blake_ctrl;
  localparam int NR = 14, K = 4, NCYC = (NR + K - 1) / K;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       start = 0, msg_valid = 0;
  logic       msg_ready, wr_en, ld_state, run, last, busy;
  logic [2:0] wr_pair;
  logic [3:0] msg_rnd, cst_rnd;
  int checks = 0, failures = 0, stalls = 0;

  blake_ctrl #(.NR(NR), .UNROLL(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int beat, cyc, rc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      check(!busy && !msg_ready, "idle");
      start = 1;
      @(negedge clk);
      start = 0;
      beat = 0; cyc = 0; rc = 0;
      while (1) begin
        if (msg_ready) begin
          check(wr_pair == 3'(beat), "pair order");
          msg_valid = (n == 0) ? 1'b1 : ($urandom % 3 != 0);
          #1;
          check(wr_en == msg_valid, "wr_en");
          if (msg_valid) beat++; else stalls++;
        end else begin
          msg_valid = 0;
          if (ld_state) begin
            check(beat == 8 && rc == 0 && !run, "precharge after 8 beats");
            check(msg_rnd == 0, "precharge address round");
          end else if (run) begin
            check(msg_rnd == 4'(((rc + 1) * K) % 10), "msg counter ahead");
            check(cst_rnd == 4'((rc * K) % 10), "const counter");
            check(last == (rc == NCYC - 1), "last flag");
            if (last) begin
              check(cyc == 8 + stalls + 1 + NCYC - 1, "cycle count");
              rc++;
              break;
            end
            rc++;
          end else check(0, "unexpected idle");
        end
        cyc++;
        @(negedge clk);
      end
      stalls = 0;
      @(negedge clk);
      check(!busy, "back to idle");
      check(rc == NCYC, "compute cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
