// blake_ref_pkg - software-style reference model of BLAKE-256 and BLAKE2s used
// by the testbenches. Written as a plain loop over rounds with its own copy of
// the tables, independent of the RTL's structure (no RAMs, no unrolling).
package blake_ref_pkg;

  typedef logic [31:0] w_t;

  localparam w_t RIV [8] = '{
    32'h6A09E667, 32'hBB67AE85, 32'h3C6EF372, 32'hA54FF53A,
    32'h510E527F, 32'h9B05688C, 32'h1F83D9AB, 32'h5BE0CD19};

  localparam w_t RC [16] = '{
    32'h243F6A88, 32'h85A308D3, 32'h13198A2E, 32'h03707344,
    32'hA4093822, 32'h299F31D0, 32'h082EFA98, 32'hEC4E6C89,
    32'h452821E6, 32'h38D01377, 32'hBE5466CF, 32'h34E90C6C,
    32'hC0AC29B7, 32'hC97C50DD, 32'h3F84D5B5, 32'hB5470917};

  // sigma tables as hex strings, one digit per element
  localparam logic [63:0] RSIG [10] = '{
    64'h0123456789ABCDEF, 64'hEA489FD61C02B753, 64'hB8C0_52FD_AE36_7194,
    64'h7931_DCBE_265A_40F8, 64'h9057_24AF_E1BC_683D, 64'h2C6A_0B83_4D75_FE19,
    64'hC51F_ED4A_0763_928B, 64'hDB7E_C139_50F4_862A, 64'h6FE9_B308_C2D7_14A5,
    64'hA284_7615_FB9E_3CD0};

  function automatic int sig(int r, int k);
    return int'(RSIG[r % 10][63 - 4*k -: 4]);
  endfunction

  function automatic w_t ror(w_t x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  task automatic gfun(ref w_t v [16], input int a, b, c, d, input w_t x0, x1);
    v[a] = v[a] + v[b] + x0; v[d] = ror(v[d] ^ v[a], 16);
    v[c] = v[c] + v[d];      v[b] = ror(v[b] ^ v[c], 12);
    v[a] = v[a] + v[b] + x1; v[d] = ror(v[d] ^ v[a], 8);
    v[c] = v[c] + v[d];      v[b] = ror(v[b] ^ v[c], 7);
  endtask

  // One round r applied in place.
  task automatic ref_round(ref w_t v [16], input w_t m [16], input int r, input bit b2);
    int A [8] = '{0, 1, 2, 3, 0, 1, 2, 3};
    int B [8] = '{4, 5, 6, 7, 5, 6, 7, 4};
    int Cc[8] = '{8, 9, 10, 11, 10, 11, 8, 9};
    int D [8] = '{12, 13, 14, 15, 15, 12, 13, 14};
    for (int i = 0; i < 8; i++) begin
      int p, q;
      w_t x0, x1;
      p = sig(r, 2*i); q = sig(r, 2*i+1);
      x0 = b2 ? m[p] : (m[p] ^ RC[q]);
      x1 = b2 ? m[q] : (m[q] ^ RC[p]);
      gfun(v, A[i], B[i], Cc[i], D[i], x0, x1);
    end
  endtask

  // Full compression; h, s (4 words), t, f (BLAKE2 flags), m (16 words).
  task automatic ref_compress(input w_t h [8], input w_t s [4], input logic [63:0] t,
                              input logic [1:0] f, input w_t m [16], input bit b2,
                              output w_t hn [8]);
    w_t v [16];
    for (int i = 0; i < 8; i++) v[i] = h[i];
    if (b2) begin
      for (int i = 0; i < 4; i++) v[8+i] = RIV[i];
      v[12] = t[31:0] ^ RIV[4]; v[13] = t[63:32] ^ RIV[5];
      v[14] = (f[0] ? 32'hFFFFFFFF : 0) ^ RIV[6];
      v[15] = (f[1] ? 32'hFFFFFFFF : 0) ^ RIV[7];
    end else begin
      for (int i = 0; i < 4; i++) v[8+i] = s[i] ^ RC[i];
      v[12] = t[31:0] ^ RC[4]; v[13] = t[31:0] ^ RC[5];
      v[14] = t[63:32] ^ RC[6]; v[15] = t[63:32] ^ RC[7];
    end
    for (int r = 0; r < (b2 ? 10 : 14); r++) ref_round(v, m, r, b2);
    for (int i = 0; i < 8; i++)
      hn[i] = h[i] ^ v[i] ^ v[i+8] ^ (b2 ? 32'h0 : s[i%4]);
  endtask

  typedef logic [511:0] blk_t;   // word k of a block = bits [32k +: 32]

  // Pads a byte message and cuts it into 512-bit blocks with their counters.
  // BLAKE-256: append 0x80, zeros, set the last bit of byte 55 (mod 64), then
  // the 64-bit big-endian bit length; words are big-endian; t counts message
  // bits up to the end of the block (0 for a block holding only padding).
  // BLAKE2s: zero-pad to whole blocks (one block for an empty message);
  // words are little-endian; t counts message bytes; the last block is final.
  task automatic make_blocks(input byte unsigned msg [$], input bit b2,
                             output blk_t blks [$], output logic [63:0] ts [$]);
    int L;
    blk_t blk;
    L = msg.size();
    blks = {};
    ts = {};
    if (b2) begin
      int nb;
      nb = (L == 0) ? 1 : (L + 63) / 64;
      for (int k = 0; k < nb; k++) begin
        blk = '0;
        for (int j = 0; j < 64; j++)
          if (64*k + j < L) blk[32*(j/4) + 8*(j%4) +: 8] = msg[64*k + j];
        blks.push_back(blk);
        ts.push_back((L < 64*(k+1)) ? 64'(L) : 64'(64*(k+1)));
      end
    end else begin
      byte unsigned p [$];
      logic [63:0] lbits;
      p = msg;
      lbits = 64'(L) * 8;
      p.push_back(8'h80);
      while (p.size() % 64 != 56) p.push_back(8'h00);
      p[p.size()-1] = p[p.size()-1] | 8'h01;
      for (int i = 7; i >= 0; i--) p.push_back(lbits[8*i +: 8]);
      for (int k = 0; k < p.size() / 64; k++) begin
        blk = '0;
        for (int j = 0; j < 64; j++) blk[32*(j/4) + 8*(3 - j%4) +: 8] = p[64*k + j];
        blks.push_back(blk);
        if (64'(512*k) < lbits) ts.push_back((lbits < 64'(512*(k+1))) ? lbits : 64'(512*(k+1)));
        else ts.push_back(64'd0);
      end
    end
  endtask

  // Digest bytes of a chain value, first byte in the MSBs.
  function automatic logic [255:0] digest(input logic [7:0][31:0] h, input bit b2);
    logic [255:0] d;
    for (int i = 0; i < 8; i++)
      d[255 - 32*i -: 32] = b2 ? {h[i][7:0], h[i][15:8], h[i][23:16], h[i][31:24]} : h[i];
    return d;
  endfunction

  // Reference hash of a whole message (unkeyed 32-byte BLAKE2s parameters).
  task automatic ref_hash(input byte unsigned msg [$], input bit b2, input w_t s [4],
                          output logic [255:0] d);
    blk_t blks [$];
    logic [63:0] ts [$];
    w_t h [8], hn [8], m [16];
    logic [7:0][31:0] hp;
    make_blocks(msg, b2, blks, ts);
    for (int i = 0; i < 8; i++) h[i] = RIV[i];
    if (b2) h[0] = h[0] ^ 32'h01010020;
    for (int k = 0; k < blks.size(); k++) begin
      for (int i = 0; i < 16; i++) m[i] = blks[k][32*i +: 32];
      ref_compress(h, s, ts[k], {1'b0, b2 && (k == blks.size() - 1)}, m, b2, hn);
      h = hn;
    end
    for (int i = 0; i < 8; i++) hp[i] = h[i];
    d = digest(hp, b2);
  endtask

endpackage
