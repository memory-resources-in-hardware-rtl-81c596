// cst_rom - constant ROM of one G_i unit in BLAKE-256.
//
// For round number r (given mod 10) G_i XORs message word sigma_r(2i) with
// constant c_sigma_r(2i+1) and word sigma_r(2i+1) with c_sigma_r(2i). This ROM
// returns those two constants for its G index GI: c0 for the first half step,
// c1 for the second. Combinational (a small distributed ROM); BLAKE2 does not
// use it.
module cst_rom
  import blake_pkg::*;
#(
  parameter int unsigned GI = 0
) (
  input  logic [3:0] rnd,
  output word_t      c0,
  output word_t      c1
);

  always_comb begin
    c0 = '0;
    c1 = '0;
    for (int r = 0; r < 10; r++) begin
      if (rnd == 4'(r)) begin
        c0 = C[SIGMA[r][2*GI+1]];
        c1 = C[SIGMA[r][2*GI]];
      end
    end
  end

endmodule
