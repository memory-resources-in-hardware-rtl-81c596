// blake_pkg - types, constants and elaboration-time helpers shared by the
// BLAKE-256 / BLAKE2s compression datapath.
//
// The sigma permutation table is the one of the BLAKE specification (ten
// 16-element permutations). IV is the SHA-256 initial value, used by both
// BLAKE-256 and BLAKE2s; C holds the sixteen BLAKE-256 constants (the leading
// fraction digits of pi), which BLAKE2 no longer uses.
//
// msg_mask() works out, for round instance J of a cascade of UNROLL rounds,
// which message words G_i ever reads: instance J computes rounds J, J+UNROLL,
// J+2*UNROLL, ... below NR, each with sigma_(r mod 10), and G_i reads
// sigma(2i) and sigma(2i+1). The popcount of that mask is the capacity the
// message RAM of that G_i needs when it keeps only the words it uses.
package blake_pkg;

  typedef logic [31:0]       word_t;
  typedef logic [15:0][31:0] state_t;   // v0..v15 (index 0 = v0)
  typedef logic [7:0][31:0]  chain_t;   // h0..h7
  typedef logic [3:0][31:0]  salt_t;    // s0..s3
  typedef logic [1:0][31:0]  pair_t;    // [0] = m_2p, [1] = m_2p+1

  localparam int unsigned NR_BLAKE  = 14;
  localparam int unsigned NR_BLAKE2 = 10;

  localparam word_t IV [8] = '{
    32'h6A09E667, 32'hBB67AE85, 32'h3C6EF372, 32'hA54FF53A,
    32'h510E527F, 32'h9B05688C, 32'h1F83D9AB, 32'h5BE0CD19};

  localparam word_t C [16] = '{
    32'h243F6A88, 32'h85A308D3, 32'h13198A2E, 32'h03707344,
    32'hA4093822, 32'h299F31D0, 32'h082EFA98, 32'hEC4E6C89,
    32'h452821E6, 32'h38D01377, 32'hBE5466CF, 32'h34E90C6C,
    32'hC0AC29B7, 32'hC97C50DD, 32'h3F84D5B5, 32'hB5470917};

  localparam logic [3:0] SIGMA [10][16] = '{
    '{ 0,  1,  2,  3,  4,  5,  6,  7,  8,  9, 10, 11, 12, 13, 14, 15},
    '{14, 10,  4,  8,  9, 15, 13,  6,  1, 12,  0,  2, 11,  7,  5,  3},
    '{11,  8, 12,  0,  5,  2, 15, 13, 10, 14,  3,  6,  7,  1,  9,  4},
    '{ 7,  9,  3,  1, 13, 12, 11, 14,  2,  6,  5, 10,  4,  0, 15,  8},
    '{ 9,  0,  5,  7,  2,  4, 10, 15, 14,  1, 11, 12,  6,  8,  3, 13},
    '{ 2, 12,  6, 10,  0, 11,  8,  3,  4, 13,  7,  5, 15, 14,  1,  9},
    '{12,  5,  1, 15, 14, 13,  4, 10,  0,  7,  6,  3,  9,  2,  8, 11},
    '{13, 11,  7, 14, 12,  1,  3,  9,  5,  0, 15,  4,  8,  6,  2, 10},
    '{ 6, 15, 14,  9, 11,  3,  0,  8, 12,  2, 13,  7,  1,  4, 10,  5},
    '{10,  2,  8,  4,  7,  6,  1,  5, 15, 11,  9, 14,  3, 12, 13,  0}};

  // (a + b) mod 10 for a < 10, b < 10: one conditional subtraction.
  function automatic logic [3:0] add_mod10(logic [3:0] a, logic [3:0] b);
    logic [4:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s >= 5'd10) ? 4'(s - 5'd10) : s[3:0];
  endfunction

  // Set of message word indices read by G_gi of round instance j.
  function automatic logic [15:0] msg_mask(int unsigned unroll, int unsigned nr,
                                           int unsigned j, int unsigned gi);
    logic [15:0] m;
    m = '0;
    for (int unsigned r = j; r < nr; r += unroll) begin
      m[SIGMA[r % 10][2*gi]]   = 1'b1;
      m[SIGMA[r % 10][2*gi+1]] = 1'b1;
    end
    return m;
  endfunction

  function automatic int unsigned popcount16(logic [15:0] m);
    int unsigned n;
    n = 0;
    for (int k = 0; k < 16; k++) n += int'(m[k]);
    return n;
  endfunction

  // Address of word idx inside a compact RAM holding the words of mask m:
  // the number of held words with a lower index.
  function automatic logic [3:0] local_addr(logic [15:0] m, logic [3:0] idx);
    logic [3:0] a;
    a = '0;
    for (int k = 0; k < 16; k++)
      if (k < int'(idx) && m[k]) a = a + 4'd1;
    return a;
  endfunction

  function automatic int unsigned clog2_min1(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
