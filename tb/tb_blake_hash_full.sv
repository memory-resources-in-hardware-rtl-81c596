// tb_blake_hash_full - the top level at its default parameters (BLAKE-256,
// four rounds in hardware, 512-word message RAMs) hashing the empty message,
// one zero byte and a 150-byte message (three chained blocks), checked
// against published / precomputed digests, with the per-block latency
// 8 beats + 1 precharge + 4 compute cycles, done in the cycle after.
module tb_blake_hash_full;
  import blake_pkg::*;
  import blake_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        init = 1'b0, start = 1'b0, msg_valid = 1'b0;
  logic        msg_ready, busy, done;
  salt_t       salt;
  chain_t      param, h_out;
  logic [63:0] t;
  logic [1:0]  f;
  pair_t       msg_words;
  int checks = 0, failures = 0;

  blake_hash dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_hash(input byte unsigned msg [$], output logic [255:0] d);
    blk_t blks [$];
    logic [63:0] ts [$];
    int cyc;
    make_blocks(msg, 1'b0, blks, ts);
    @(negedge clk);
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    for (int k = 0; k < blks.size(); k++) begin
      t = ts[k];
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 0;
      while (!done && cyc < 100) begin
        msg_valid = msg_ready;
        msg_words[0] = blks[k][64*(cyc % 8) +: 32];
        msg_words[1] = blks[k][64*(cyc % 8) + 32 +: 32];
        cyc++;
        @(negedge clk);
      end
      msg_valid = 1'b0;
      checks++;
      if (cyc != 8 + 1 + 4) begin
        failures++;
        $display("block latency %0d", cyc);
      end
    end
    d = digest(h_out, 1'b0);
  endtask

  initial begin
    byte unsigned q [$];
    logic [255:0] d;
    salt = '0; param = '0; t = '0; f = '0; msg_words = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    q = {};
    run_hash(q, d);
    checks++;
    if (d !== 256'h716f6e863f744b9ac22c97ec7b76ea5f5908bc5b2f67c61510bfc4751384ea7a) failures++;
    q = {8'h00};
    run_hash(q, d);
    checks++;
    if (d !== 256'h0ce8d4ef4dd7cd8d62dfded9d4edb0a774ae6a41929a74da23109e8f11139c87) failures++;
    q = {};
    for (int i = 0; i < 150; i++) q.push_back(8'((i * 7 + 3) & 255));
    run_hash(q, d);
    checks++;
    if (d !== 256'h157122be2e973dcfc9d1a78608c1b7aa4ff8afee58bcb0ce60e329a7bcedacbf) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
