// blake_hash - BLAKE-256 / BLAKE2s hashing unit built around the RAM-based
// compression core (the design's top level).
//
// The unit keeps the chain value h and the salt in registers and compresses
// a message one 512-bit block at a time:
//   init  (while idle): h := IV for BLAKE-256, h := IV ^ param for BLAKE2s
//         (param = the 8-word BLAKE2 parameter block, e.g. p0 = 0x01010020
//         for an unkeyed 32-byte digest); the salt is latched (BLAKE only).
//   start (while idle): begins one compression with counter t (message bits
//         hashed so far for BLAKE, bytes for BLAKE2) and, for BLAKE2, the
//         finalization flags f[0] (last block) and f[1] (last node).
//   then 8 beats of msg_words (m_2p in [0], m_2p+1 in [1], p = 0..7) while
//         msg_ready is high; a beat is taken when msg_valid is high.
// After the precharge and compute cycles h is updated and `done` pulses for
// one cycle; h_out then holds the new chain value, which after the last
// block is the hash (as words; BLAKE-256 uses big-endian, BLAKE2s
// little-endian byte order). Padding and the counter are the host's job.
// Latency per block: 8 beats + 1 + ceil(NR/UNROLL) cycles, then done.
// Parameters: BLAKE2 selects the variant, UNROLL the number of rounds in
// hardware (1, 2, 4 or 5 in the evaluated organisations; default 4),
// MEM_COMPACT the minimal-capacity message memories, RAM_AW the address
// width of the full-size (FPGA block RAM style) message memories.
// rst_n is also the disable condition of the protocol assertion below, which
// is why lint sees it used both as an asynchronous reset and as a sampled
// signal; the logic itself uses it only as an asynchronous reset.
module blake_hash
  import blake_pkg::*;
#(
  parameter bit          BLAKE2      = 1'b0,
  parameter int unsigned UNROLL      = 4,
  parameter bit          MEM_COMPACT = 1'b0,
  parameter int unsigned RAM_AW      = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  salt_t       salt,
  input  chain_t      param,
  input  logic        start,
  input  logic [63:0] t,
  input  logic [1:0]  f,
  input  logic        msg_valid,
  output logic        msg_ready,
  input  pair_t       msg_words,
  output logic        busy,
  output logic        done,
  output chain_t      h_out
);

  chain_t      h_q;
  salt_t       s_q;
  logic [63:0] t_q;
  logic [1:0]  f_q;
  logic        core_busy, fin_valid;
  chain_t      h_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_q  <= '0;
      s_q  <= '0;
      t_q  <= '0;
      f_q  <= '0;
      done <= 1'b0;
    end else begin
      done <= fin_valid;
      if (init && !core_busy) begin
        for (int i = 0; i < 8; i++) h_q[i] <= BLAKE2 ? (IV[i] ^ param[i]) : IV[i];
        s_q <= salt;
      end
      if (start && !core_busy) begin
        t_q <= t;
        f_q <= f;
      end
      if (fin_valid) h_q <= h_next;
    end
  end

  blake_core #(
    .BLAKE2(BLAKE2), .UNROLL(UNROLL), .MEM_COMPACT(MEM_COMPACT), .RAM_AW(RAM_AW)
  ) u_core (
    .clk, .rst_n, .start(start && !core_busy), .t(t_q), .f(f_q), .h_in(h_q),
    .salt(s_q), .msg_valid, .msg_ready, .msg_words, .busy(core_busy),
    .fin_valid, .h_next);

  assign busy  = core_busy;
  assign h_out = h_q;

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(start && core_busy));

endmodule
