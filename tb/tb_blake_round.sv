// tb_blake_round - loads random messages into three round instances through
// their write ports (8 pair writes), then for every round number the instance
// computes presents the RAM address round one cycle ahead (the precharge
// step) and the constant round in the computing cycle, and compares v_out
// with one reference round on a random state. Covers BLAKE with full-size
// RAMs (R0 of x1, all 14 rounds), BLAKE with compact RAMs (R2 of x5) and
// BLAKE2 with compact RAMs (R1 of x4).
module tb_blake_round;
  import blake_pkg::*;
  import blake_ref_pkg::*;

  localparam int ND = 3;
  localparam bit B2 [ND] = '{1'b0, 1'b0, 1'b1};
  localparam int JJ [ND] = '{0, 2, 1};
  localparam int KK [ND] = '{1, 5, 4};
  localparam bit CM [ND] = '{1'b0, 1'b1, 1'b1};

  logic       clk = 1'b0;
  state_t     v_in;
  state_t     v_out [ND];
  logic       wr_en;
  logic [2:0] wr_pair;
  pair_t      wr_words;
  logic [3:0] msg_rnd [ND], cst_rnd [ND];
  int checks = 0, failures = 0;

  for (genvar d = 0; d < ND; d++) begin : g_dut
    blake_round #(.BLAKE2(B2[d]), .J(JJ[d]), .UNROLL(KK[d]), .MEM_COMPACT(CM[d])) dut (
      .clk, .v_in, .v_out(v_out[d]), .wr_en, .wr_pair, .wr_words,
      .msg_rnd(msg_rnd[d]), .cst_rnd(cst_rnd[d]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_t m [16], v [16];
    wr_en = 0; wr_pair = '0; wr_words = '0; v_in = '0;
    for (int d = 0; d < ND; d++) begin msg_rnd[d] = '0; cst_rnd[d] = '0; end
    for (int trial = 0; trial < 6; trial++) begin
      for (int i = 0; i < 16; i++) m[i] = $urandom;
      for (int p = 0; p < 8; p++) begin
        @(negedge clk);
        wr_en = 1; wr_pair = 3'(p); wr_words[0] = m[2*p]; wr_words[1] = m[2*p+1];
      end
      @(negedge clk);
      wr_en = 0;
      for (int d = 0; d < ND; d++) begin
        int nr;
        nr = B2[d] ? 10 : 14;
        for (int r = JJ[d]; r < nr; r += KK[d]) begin
          // precharge: address round presented one cycle ahead
          msg_rnd[d] = 4'((r - JJ[d]) % 10);
          @(negedge clk);
          cst_rnd[d] = 4'((r - JJ[d]) % 10);
          msg_rnd[d] = 4'($urandom % 10);   // next address must not matter now
          for (int i = 0; i < 16; i++) begin v[i] = $urandom; v_in[i] = v[i]; end
          #1;
          ref_round(v, m, r, B2[d]);
          checks++;
          for (int i = 0; i < 16; i++)
            if (v_out[d][i] !== v[i]) begin
              failures++;
              if (failures < 5) $display("dut %0d round %0d word %0d", d, r, i);
              break;
            end
          @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
