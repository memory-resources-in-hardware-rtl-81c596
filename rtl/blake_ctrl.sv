// blake_ctrl - control unit of the RAM-based compression core.
//
// One compression runs through three phases:
//   LOAD  8 cycles (more if msg_valid drops): msg_ready is high and every
//         accepted word pair p = 0..7 is written into all message RAMs
//         (wr_en, wr_pair);
//   PRE   1 void cycle that "precharges" the registered RAM outputs with the
//         words of the first computed rounds; the state register takes the
//         initial state (ld_state);
//   RUN   ceil(NR/UNROLL) cycles (run); each pushes the state through the
//         UNROLL-round cascade; `last` marks the final one.
// Two round counters, both kept modulo 10 since a round number only selects
// sigma_(r mod 10): msg_rnd is the round number of the cascade's first
// instance in the NEXT cycle and drives the RAM read addresses; cst_rnd is
// the same number delayed by one cycle (the round being computed now) and
// drives the constant ROMs. BLAKE2 has no constants and leaves cst_rnd
// unconnected. The phase lengths and the one-cycle lead of the address
// counter follow the published scheme; the valid/ready loading handshake is
// this design's choice. Reset is asynchronous, active low.
module blake_ctrl
  import blake_pkg::*;
#(
  parameter int unsigned NR     = NR_BLAKE,
  parameter int unsigned UNROLL = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       msg_valid,
  output logic       msg_ready,
  output logic       wr_en,
  output logic [2:0] wr_pair,
  output logic       ld_state,
  output logic       run,
  output logic       last,
  output logic [3:0] msg_rnd,
  output logic [3:0] cst_rnd,
  output logic       busy
);

  localparam int unsigned NCYC   = (NR + UNROLL - 1) / UNROLL;
  localparam int unsigned CW     = (NCYC > 1) ? $clog2(NCYC) : 1;
  localparam logic [3:0]  STEP   = 4'(UNROLL % 10);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_PRE, S_RUN} state_e;

  state_e        st;
  logic [2:0]    pair;
  logic [CW-1:0] cyc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      pair    <= '0;
      cyc     <= '0;
      msg_rnd <= '0;
      cst_rnd <= '0;
    end else begin
      cst_rnd <= msg_rnd;
      unique case (st)
        S_IDLE: if (start) begin
          st      <= S_LOAD;
          pair    <= '0;
          msg_rnd <= '0;
        end
        S_LOAD: if (msg_valid) begin
          pair <= pair + 3'd1;
          if (pair == 3'd7) st <= S_PRE;
        end
        S_PRE: begin
          st      <= S_RUN;
          cyc     <= '0;
          msg_rnd <= add_mod10(msg_rnd, STEP);
        end
        S_RUN: begin
          msg_rnd <= add_mod10(msg_rnd, STEP);
          cyc     <= cyc + CW'(1);
          if (cyc == CW'(NCYC - 1)) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign msg_ready = (st == S_LOAD);
  assign wr_en     = msg_ready && msg_valid;
  assign wr_pair   = pair;
  assign ld_state  = (st == S_PRE);
  assign run       = (st == S_RUN);
  assign last      = run && (cyc == CW'(NCYC - 1));
  assign busy      = (st != S_IDLE);

  initial begin
    assert (UNROLL >= 1 && UNROLL <= 10) else $error("UNROLL must be 1..10");
  end

endmodule
