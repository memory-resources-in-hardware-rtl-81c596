// msg_ram - message memory M_i attached to one G unit: a true dual-port RAM of
// 32-bit words with synchronous (registered) read on both ports.
//
// Modelled on an FPGA block RAM in its 512 x 32b configuration. Both ports can
// write, so a message word pair is stored in one cycle while the message is
// loaded; during computation both ports read, giving the two message words a
// G unit needs in one cycle. Read data appears after the clock edge that
// samples the address (one cycle latency); a port reading the address it is
// writing returns the old contents. Writing the same address from both ports
// in one cycle is not allowed (checked by an assertion).
// The memory contents are not reset: every word read is written first.
module msg_ram #(
  parameter int unsigned AW    = 9,
  parameter int unsigned DEPTH = 512
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
  end

  a_no_collision: assert property (@(posedge clk) !(a_we && b_we && a_addr == b_addr));

endmodule
