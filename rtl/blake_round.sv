// blake_round - one round instance R_J of the compression cascade, with the
// message kept in RAM inside the round.
//
// A round applies G_0..G_3 to the columns of the 4x4 state (v0,v4,v8,v12 ...)
// and then G_4..G_7 to the diagonals (v0,v5,v10,v15 ...); the eight G units
// are chained combinationally, so v_out = round(v_in) in the same cycle.
// Every G_i owns a dual-port message RAM M_i instead of taking its words from
// a shared 512-bit message bus through permutation multiplexers:
//   * loading: wr_en with pair index p writes m_2p (port A) and m_2p+1
//     (port B) into all eight RAMs at once, so the message enters in 8 cycles;
//   * computing: the RAM read addresses are sigma_r(2i) and sigma_r(2i+1) of
//     the round r this instance computes in the NEXT cycle (msg_rnd + J, mod
//     10), because the RAM read data are registered. The constants (BLAKE
//     only) are looked up for the round computed in THIS cycle (cst_rnd + J).
// With MEM_COMPACT = 0 each M_i is a 512 x 32b RAM holding the whole message
// at addresses 0..15, as in the FPGA implementation. With MEM_COMPACT = 1 each
// M_i holds only the words its G_i ever reads in this cascade position, at a
// local address equal to the number of held words with a smaller index; its
// depth is then the capacity figure mu_i of the memory-size analysis.
// The permutation table, the G function and the two address sets follow the
// published scheme; the compact address map is this design's choice.
module blake_round
  import blake_pkg::*;
#(
  parameter bit          BLAKE2      = 1'b0,
  parameter int unsigned J           = 0,
  parameter int unsigned UNROLL      = 1,
  parameter int unsigned NR          = BLAKE2 ? NR_BLAKE2 : NR_BLAKE,
  parameter bit          MEM_COMPACT = 1'b0,
  parameter int unsigned RAM_AW      = 9
) (
  input  logic       clk,
  input  state_t     v_in,
  output state_t     v_out,
  input  logic       wr_en,
  input  logic [2:0] wr_pair,
  input  pair_t      wr_words,
  input  logic [3:0] msg_rnd,
  input  logic [3:0] cst_rnd
);

  // Round numbers (mod 10) of this instance for addressing and for constants.
  logic [3:0] rnd_m, rnd_c;
  assign rnd_m = add_mod10(msg_rnd, 4'(J % 10));
  assign rnd_c = add_mod10(cst_rnd, 4'(J % 10));

  word_t m0 [8], m1 [8];   // message words read by G_i
  word_t x0 [8], x1 [8];   // G inputs after the constant XOR

  for (genvar gi = 0; gi < 8; gi++) begin : g_mem
    localparam logic [15:0]  MASK  = msg_mask(UNROLL, NR, J, gi);
    localparam int unsigned  DEPTH = MEM_COMPACT ? popcount16(MASK) : (1 << RAM_AW);
    localparam int unsigned  AW    = MEM_COMPACT ? clog2_min1(DEPTH) : RAM_AW;

    logic          a_we, b_we;
    logic [AW-1:0] a_addr, b_addr;
    logic [3:0]    s0, s1;

    always_comb begin
      s0 = SIGMA[rnd_m][2*gi];
      s1 = SIGMA[rnd_m][2*gi+1];
      if (MEM_COMPACT) begin
        a_we = wr_en && MASK[{wr_pair, 1'b0}];
        b_we = wr_en && MASK[{wr_pair, 1'b1}];
        if (wr_en) begin
          a_addr = AW'(local_addr(MASK, {wr_pair, 1'b0}));
          b_addr = AW'(local_addr(MASK, {wr_pair, 1'b1}));
        end else begin
          a_addr = AW'(local_addr(MASK, s0));
          b_addr = AW'(local_addr(MASK, s1));
        end
      end else begin
        a_we = wr_en;
        b_we = wr_en;
        a_addr = wr_en ? AW'({wr_pair, 1'b0}) : AW'(s0);
        b_addr = wr_en ? AW'({wr_pair, 1'b1}) : AW'(s1);
      end
    end

    msg_ram #(.AW(AW), .DEPTH(DEPTH)) u_ram (
      .clk,
      .a_we, .a_addr, .a_wdata(wr_words[0]), .a_rdata(m0[gi]),
      .b_we, .b_addr, .b_wdata(wr_words[1]), .b_rdata(m1[gi]));

    if (BLAKE2) begin : g_b2
      assign x0[gi] = m0[gi];
      assign x1[gi] = m1[gi];
    end else begin : g_b1
      word_t c0, c1;
      cst_rom #(.GI(gi)) u_rom (.rnd(rnd_c), .c0, .c1);
      assign x0[gi] = m0[gi] ^ c0;
      assign x1[gi] = m1[gi] ^ c1;
    end
  end

  // Column step G0..G3, then diagonal step G4..G7.
  state_t vc;   // state after the column step

  for (genvar k = 0; k < 4; k++) begin : g_col
    blake_g u_g (
      .a_i(v_in[k]), .b_i(v_in[4+k]), .c_i(v_in[8+k]), .d_i(v_in[12+k]),
      .x0(x0[k]), .x1(x1[k]),
      .a_o(vc[k]), .b_o(vc[4+k]), .c_o(vc[8+k]), .d_o(vc[12+k]));
  end

  for (genvar k = 0; k < 4; k++) begin : g_diag
    blake_g u_g (
      .a_i(vc[k]), .b_i(vc[4+(k+1)%4]), .c_i(vc[8+(k+2)%4]), .d_i(vc[12+(k+3)%4]),
      .x0(x0[4+k]), .x1(x1[4+k]),
      .a_o(v_out[k]), .b_o(v_out[4+(k+1)%4]), .c_o(v_out[8+(k+2)%4]), .d_o(v_out[12+(k+3)%4]));
  end

endmodule
