// blake_g - the G function of BLAKE-256 and BLAKE2s (one "quarter-round").
//
// Purely combinational. Two half steps, each: a += b + x; d = (d ^ a) >>> R1;
// c += d; b = (b ^ c) >>> R2, with rotations 16/12 in the first half and 8/7
// in the second. x0/x1 are the two message inputs of the half steps. For
// BLAKE-256 the caller supplies m_sigma(2i) ^ c_sigma(2i+1) and
// m_sigma(2i+1) ^ c_sigma(2i); for BLAKE2s it supplies the bare message words.
// Keeping the constant XOR outside lets one G serve both variants, which
// otherwise share this function exactly.
module blake_g
  import blake_pkg::*;
(
  input  word_t a_i, b_i, c_i, d_i,
  input  word_t x0, x1,
  output word_t a_o, b_o, c_o, d_o
);

  function automatic word_t rotr(word_t w, int unsigned n);
    return (w >> n) | (w << (32 - n));
  endfunction

  word_t a1, b1, c1, d1;

  always_comb begin
    a1  = a_i + b_i + x0;
    d1  = rotr(d_i ^ a1, 16);
    c1  = c_i + d1;
    b1  = rotr(b_i ^ c1, 12);
    a_o = a1 + b1 + x1;
    d_o = rotr(d1 ^ a_o, 8);
    c_o = c1 + d_o;
    b_o = rotr(b1 ^ c_o, 7);
  end

endmodule
