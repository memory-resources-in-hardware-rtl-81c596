// tb_cst_rom - checks the eight constant ROMs (one per G index) for every
// round number 0..9 against c_sigma(2i+1) / c_sigma(2i) of the reference.
module tb_cst_rom;
  import blake_pkg::*;
  import blake_ref_pkg::*;

  logic [3:0] rnd;
  word_t c0 [8], c1 [8];
  int checks = 0, failures = 0;

  for (genvar gi = 0; gi < 8; gi++) begin : g_dut
    cst_rom #(.GI(gi)) dut (.rnd, .c0(c0[gi]), .c1(c1[gi]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 10; r++) begin
      rnd = 4'(r);
      #1;
      for (int gi = 0; gi < 8; gi++) begin
        checks += 2;
        if (c0[gi] !== RC[sig(r, 2*gi+1)]) failures++;
        if (c1[gi] !== RC[sig(r, 2*gi)]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
