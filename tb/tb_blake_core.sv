// tb_blake_core - random compressions (random h, salt, t, flags, message)
// on the compression core in ten organisations: BLAKE and BLAKE2 with 1, 2,
// 4 and 5 rounds in hardware and full-size RAMs, plus BLAKE x4 and x5 and
// BLAKE2 x4 with compact RAMs. Each result is compared with the reference
// compression, and the latency is checked: from the first loading cycle to
// fin_valid, 8 beats + gaps in msg_valid + 1 precharge + ceil(NR/k) - 1.
module tb_blake_core;
  import blake_pkg::*;
  import blake_ref_pkg::*;

  localparam int NC = 11;
  localparam bit B2 [NC] = '{0, 0, 0, 0, 1, 1, 1, 1, 0, 0, 1};
  localparam int KK [NC] = '{1, 2, 4, 5, 1, 2, 4, 5, 4, 5, 4};
  localparam bit CM [NC] = '{0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1};
  localparam int NTRIAL = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, finished = 0, stall_total = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  end

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    localparam int NR = B2[c] ? 10 : 14;
    localparam int NCYC = (NR + KK[c] - 1) / KK[c];

    logic        start = 1'b0, msg_valid = 1'b0, msg_ready, busy, fin_valid;
    logic [63:0] t;
    logic [1:0]  f;
    chain_t      h_in, h_next;
    salt_t       salt;
    pair_t       msg_words;

    blake_core #(.BLAKE2(B2[c]), .UNROLL(KK[c]), .MEM_COMPACT(CM[c])) dut (.*);

    initial begin
      w_t h [8], s [4], m [16], hn [8];
      int beat, cyc, stalls;
      msg_words = '0;
      @(posedge rst_n);
      for (int n = 0; n < NTRIAL; n++) begin
        for (int i = 0; i < 8; i++) begin h[i] = $urandom; h_in[i] = h[i]; end
        for (int i = 0; i < 4; i++) begin s[i] = $urandom; salt[i] = s[i]; end
        for (int i = 0; i < 16; i++) m[i] = $urandom;
        t = {$urandom, $urandom};
        f = 2'($urandom);
        @(negedge clk);
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        beat = 0; cyc = 0; stalls = 0;
        while (!fin_valid && cyc < 100) begin
          if (msg_ready) begin
            msg_valid = (n == 0) ? 1'b1 : ($urandom % 3 != 0);
            msg_words[0] = m[2*beat];
            msg_words[1] = m[2*beat+1];
            if (msg_valid) beat++; else stalls++;
          end else msg_valid = 1'b0;
          cyc++;
          @(negedge clk);
        end
        msg_valid = 1'b0;
        ref_compress(h, s, t, f, m, B2[c], hn);
        checks += 2;
        for (int i = 0; i < 8; i++)
          if (h_next[i] !== hn[i]) begin
            failures++;
            $display("cfg %0d trial %0d: h'%0d %h expected %h", c, n, i, h_next[i], hn[i]);
            break;
          end
        if (cyc != 8 + stalls + 1 + NCYC - 1) begin
          failures++;
          $display("cfg %0d: %0d cycles, expected %0d", c, cyc, 8 + stalls + NCYC);
        end
        stall_total += stalls;
        @(negedge clk);
      end
      finished++;
    end
  end

  initial begin
    wait (finished == NC);
    checks++;
    if (stall_total == 0) begin
      failures++;
      $display("loading stall never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
