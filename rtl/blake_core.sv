// blake_core - BLAKE-256 / BLAKE2s compression function, loop unrolled by
// UNROLL, with the message stored in RAM inside every round instance.
//
// Datapath: a 512-bit state register feeds a combinational cascade of UNROLL
// round units R0..R(UNROLL-1); the output of the last unit returns to the
// register through the input multiplexer, whose other input is the initial
// state built from h, salt/flags and counter t:
//   BLAKE   : v = h0..h7, s0^c0..s3^c3, t0^c4, t0^c5, t1^c6, t1^c7
//   BLAKE2s : v = h0..h7, IV0..IV3, t0^IV4, t1^IV5, f0^IV6, f1^IV7
// (t0 = low word of t; f0/f1 are all-ones when the flag bit is set).
// NR = 14 (BLAKE) or 10 (BLAKE2) rounds take ceil(NR/UNROLL) cycles; when
// UNROLL does not divide NR the result is taken from instance
// (NR-1) mod UNROLL in the last cycle (for UNROLL = 4: the second round), and
// the instances behind it compute unused rounds. The new chain value is
//   BLAKE   : h'_i = h_i ^ s_(i mod 4) ^ v_i ^ v_(i+8)
//   BLAKE2s : h'_i = h_i ^ v_i ^ v_(i+8)
// and is valid (combinationally, on h_next) while fin_valid is high, in the
// last compute cycle. h_in, salt, t and f must stay stable from start until
// fin_valid.
// Timing: start (1 cycle) -> 8 message beats -> 1 precharge cycle ->
// ceil(NR/UNROLL) compute cycles, the last with fin_valid. The organisation,
// the tap position and the cycle counts follow the published architecture;
// the handshake and the combinational result port are this design's choice.
module blake_core
  import blake_pkg::*;
#(
  parameter bit          BLAKE2      = 1'b0,
  parameter int unsigned UNROLL      = 4,
  parameter bit          MEM_COMPACT = 1'b0,
  parameter int unsigned RAM_AW      = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [63:0] t,
  input  logic [1:0]  f,
  input  chain_t      h_in,
  input  salt_t       salt,
  input  logic        msg_valid,
  output logic        msg_ready,
  input  pair_t       msg_words,
  output logic        busy,
  output logic        fin_valid,
  output chain_t      h_next
);

  localparam int unsigned NR  = BLAKE2 ? NR_BLAKE2 : NR_BLAKE;
  localparam int unsigned TAP = (NR - 1) % UNROLL;

  logic       wr_en, ld_state, run, last;
  logic [2:0] wr_pair;
  logic [3:0] msg_rnd, cst_rnd;

  blake_ctrl #(.NR(NR), .UNROLL(UNROLL)) u_ctrl (
    .clk, .rst_n, .start, .msg_valid, .msg_ready, .wr_en, .wr_pair,
    .ld_state, .run, .last, .msg_rnd, .cst_rnd, .busy);

  // Initial state (eq. of the state initialisation of either variant).
  state_t v_init;
  always_comb begin
    for (int i = 0; i < 8; i++) v_init[i] = h_in[i];
    if (BLAKE2) begin
      for (int i = 0; i < 4; i++) v_init[8+i] = IV[i];
      v_init[12] = t[31:0]  ^ IV[4];
      v_init[13] = t[63:32] ^ IV[5];
      v_init[14] = {32{f[0]}} ^ IV[6];
      v_init[15] = {32{f[1]}} ^ IV[7];
    end else begin
      for (int i = 0; i < 4; i++) v_init[8+i] = salt[i] ^ C[i];
      v_init[12] = t[31:0]  ^ C[4];
      v_init[13] = t[31:0]  ^ C[5];
      v_init[14] = t[63:32] ^ C[6];
      v_init[15] = t[63:32] ^ C[7];
    end
  end

  // State register with the input multiplexer.
  state_t v_q;
  state_t chain [UNROLL+1];
  assign chain[0] = v_q;

  always_ff @(posedge clk) begin
    if (ld_state)  v_q <= v_init;
    else if (run)  v_q <= chain[UNROLL];
  end

  for (genvar j = 0; j < UNROLL; j++) begin : g_rnd
    blake_round #(
      .BLAKE2(BLAKE2), .J(j), .UNROLL(UNROLL), .NR(NR),
      .MEM_COMPACT(MEM_COMPACT), .RAM_AW(RAM_AW)
    ) u_round (
      .clk, .v_in(chain[j]), .v_out(chain[j+1]),
      .wr_en, .wr_pair, .wr_words(msg_words), .msg_rnd, .cst_rnd);
  end

  // Finalisation from the tapped round.
  state_t v_fin;
  assign v_fin = chain[TAP+1];

  always_comb begin
    for (int i = 0; i < 8; i++)
      h_next[i] = h_in[i] ^ v_fin[i] ^ v_fin[i+8] ^ (BLAKE2 ? 32'h0 : salt[i%4]);
  end

  assign fin_valid = last;

endmodule
