// tb_msg_ram - random dual-port traffic against an array model: writes on
// both ports (distinct addresses), reads on both ports with one cycle of
// latency, and read-during-write returning the old word.
module tb_msg_ram;
  localparam int AW = 9;

  logic          clk = 1'b0;
  logic          a_we, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0]   a_wdata, b_wdata, a_rdata, b_rdata;
  logic [31:0]   model [1 << AW];
  logic [31:0]   exp_a, exp_b;
  int checks = 0, failures = 0;

  msg_ram #(.AW(AW), .DEPTH(1 << AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; b_we = 0; a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    // fill a window of 32 words through both ports
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      a_we = 1; b_we = 1;
      a_addr = AW'(2*k); b_addr = AW'(2*k + 1);
      a_wdata = $urandom; b_wdata = $urandom;
      model[2*k] = a_wdata; model[2*k+1] = b_wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      a_addr = AW'($urandom % 32);
      b_addr = AW'($urandom % 32);
      a_we = ($urandom % 3 == 0);
      b_we = ($urandom % 3 == 0) && (b_addr != a_addr);
      a_wdata = $urandom; b_wdata = $urandom;
      exp_a = model[a_addr];
      exp_b = model[b_addr];
      @(posedge clk);
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
      #1;
      checks += 2;
      if (a_rdata !== exp_a) failures++;
      if (b_rdata !== exp_b) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
