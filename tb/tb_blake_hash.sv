// tb_blake_hash - end-to-end hashing of whole messages through the top level
// in eight organisations (BLAKE / BLAKE2, 1, 2, 4 and 5 rounds in hardware),
// one of them with compact message RAMs. The testbench pads each message,
// feeds it block by block (init, start, 8 beats with random gaps) and checks
// the digest against published test values (BLAKE-256 of the empty message
// and of one zero byte, BLAKE2s of "abc") and against the reference model for
// longer messages, salted BLAKE and BLAKE2 messages of several blocks.
// It also counts how often each mechanism occurred: gaps while loading,
// chained multi-block messages, results taken from a round before the last
// in the cascade, final-block flags, salted runs and compact memories.
module tb_blake_hash;
  import blake_pkg::*;
  import blake_ref_pkg::*;

  localparam int NC = 8;
  localparam bit B2 [NC] = '{0, 0, 0, 0, 1, 1, 1, 1};
  localparam int KK [NC] = '{1, 2, 4, 5, 1, 2, 4, 5};
  localparam bit CM [NC] = '{0, 0, 1, 0, 0, 0, 0, 1};

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, finished = 0;
  int n_stall = 0, n_chain = 0, n_tap = 0, n_final = 0, n_salt = 0, n_compact = 0;
  int n_b1 = 0, n_b2 = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  end

  function automatic void msg_of(int len, int seed, output byte unsigned q [$]);
    q = {};
    for (int i = 0; i < len; i++) q.push_back(8'((i * 7 + 3 + seed) & 255));
  endfunction

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    localparam int NR = B2[c] ? 10 : 14;
    localparam int NCYC = (NR + KK[c] - 1) / KK[c];

    logic        init = 1'b0, start = 1'b0, msg_valid = 1'b0;
    logic        msg_ready, busy, done;
    salt_t       salt;
    chain_t      param, h_out;
    logic [63:0] t;
    logic [1:0]  f;
    pair_t       msg_words;

    blake_hash #(.BLAKE2(B2[c]), .UNROLL(KK[c]), .MEM_COMPACT(CM[c])) dut (.*);

    // Hash one message through the DUT; returns the digest.
    task automatic run_hash(input byte unsigned msg [$], input w_t s [4],
                            output logic [255:0] d);
      blk_t blks [$];
      logic [63:0] ts [$];
      int beat, cyc, stalls;
      make_blocks(msg, B2[c], blks, ts);
      param = '0;
      param[0] = 32'h01010020;
      for (int i = 0; i < 4; i++) salt[i] = s[i];
      @(negedge clk);
      init = 1'b1;
      @(negedge clk);
      init = 1'b0;
      for (int k = 0; k < blks.size(); k++) begin
        t = ts[k];
        f = {1'b0, (k == blks.size() - 1)};
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        beat = 0; cyc = 0; stalls = 0;
        while (!done && cyc < 100) begin
          if (msg_ready) begin
            msg_valid = ($urandom % 4 != 0);
            msg_words[0] = blks[k][64*beat +: 32];
            msg_words[1] = blks[k][64*beat + 32 +: 32];
            if (msg_valid) beat++; else stalls++;
          end else msg_valid = 1'b0;
          cyc++;
          @(negedge clk);
        end
        msg_valid = 1'b0;
        checks++;
        // done follows the last compute cycle by one clock
        if (cyc != 8 + stalls + 1 + NCYC) begin
          failures++;
          $display("cfg %0d: block latency %0d, expected %0d", c, cyc, 8 + stalls + 1 + NCYC);
        end
        if (stalls > 0) n_stall++;
        if (k > 0) n_chain++;
        if (NR % KK[c] != 0) n_tap++;
        if (B2[c] && k == blks.size() - 1) n_final++;
        if (CM[c]) n_compact++;
        if (B2[c]) n_b2++; else n_b1++;
      end
      d = digest(h_out, B2[c]);
    endtask

    initial begin
      byte unsigned q [$];
      w_t s [4];
      logic [255:0] d, e;
      msg_words = '0; t = '0; f = '0; salt = '0; param = '0;
      @(posedge rst_n);
      for (int i = 0; i < 4; i++) s[i] = '0;
      if (!B2[c]) begin
        q = {};
        run_hash(q, s, d);
        checks++;
        if (d !== 256'h716f6e863f744b9ac22c97ec7b76ea5f5908bc5b2f67c61510bfc4751384ea7a) begin
          failures++; $display("cfg %0d BLAKE-256(\"\") = %h", c, d);
        end
        q = {8'h00};
        run_hash(q, s, d);
        checks++;
        if (d !== 256'h0ce8d4ef4dd7cd8d62dfded9d4edb0a774ae6a41929a74da23109e8f11139c87) begin
          failures++; $display("cfg %0d BLAKE-256(00) = %h", c, d);
        end
        msg_of(150, 0, q);
        run_hash(q, s, d);
        checks++;
        if (d !== 256'h157122be2e973dcfc9d1a78608c1b7aa4ff8afee58bcb0ce60e329a7bcedacbf) begin
          failures++; $display("cfg %0d BLAKE-256(150 bytes) = %h", c, d);
        end
        // a message whose padding needs a block of its own, and a salted one
        msg_of(56, 1, q);
        run_hash(q, s, d);
        ref_hash(q, 1'b0, s, e);
        checks++;
        if (d !== e) begin failures++; $display("cfg %0d 56-byte message", c); end
        for (int i = 0; i < 4; i++) s[i] = $urandom;
        msg_of(100, 5, q);
        run_hash(q, s, d);
        ref_hash(q, 1'b0, s, e);
        checks++;
        n_salt++;
        if (d !== e) begin failures++; $display("cfg %0d salted message", c); end
      end else begin
        q = {8'h61, 8'h62, 8'h63};
        run_hash(q, s, d);
        checks++;
        if (d !== 256'h508c5e8c327c14e2e1a72ba34eeb452f37458b209ed63a294d999b4c86675982) begin
          failures++; $display("cfg %0d BLAKE2s(abc) = %h", c, d);
        end
        q = {};
        run_hash(q, s, d);
        checks++;
        if (d !== 256'h69217a3079908094e11121d042354a7c1f55b6482ca1a51e1b250dfd1ed0eef9) begin
          failures++; $display("cfg %0d BLAKE2s(\"\") = %h", c, d);
        end
        msg_of(150, 0, q);
        run_hash(q, s, d);
        checks++;
        if (d !== 256'h2e0cd3c1cf2f5893dd4b97ccfa040b83c8918c61e543cf63f2853b3d3cf5d98c) begin
          failures++; $display("cfg %0d BLAKE2s(150 bytes) = %h", c, d);
        end
        msg_of(64, 9, q);
        run_hash(q, s, d);
        ref_hash(q, 1'b1, s, e);
        checks++;
        if (d !== e) begin failures++; $display("cfg %0d 64-byte message", c); end
      end
      finished++;
    end
  end

  initial begin
    wait (finished == NC);
    checks += 8;
    if (n_stall == 0)   begin failures++; $display("no loading stall"); end
    if (n_chain == 0)   begin failures++; $display("no chained block"); end
    if (n_tap == 0)     begin failures++; $display("no early tap"); end
    if (n_final == 0)   begin failures++; $display("no final-block flag"); end
    if (n_salt == 0)    begin failures++; $display("no salted hash"); end
    if (n_compact == 0) begin failures++; $display("no compact memory run"); end
    if (n_b1 == 0)      begin failures++; $display("no BLAKE block"); end
    if (n_b2 == 0)      begin failures++; $display("no BLAKE2 block"); end
    $display("mechanisms: stalls=%0d chained=%0d early_tap=%0d final_flag=%0d salted=%0d compact=%0d blake=%0d blake2=%0d",
             n_stall, n_chain, n_tap, n_final, n_salt, n_compact, n_b1, n_b2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
