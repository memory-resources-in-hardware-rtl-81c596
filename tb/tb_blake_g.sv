// tb_blake_g - checks the G function against the reference model on random
// inputs and on a few corner values (all zeros, all ones).
module tb_blake_g;
  import blake_pkg::*;
  import blake_ref_pkg::*;

  word_t a_i, b_i, c_i, d_i, x0, x1, a_o, b_o, c_o, d_o;
  int checks = 0, failures = 0;

  blake_g dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_t v [16];
    for (int n = 0; n < 500; n++) begin
      if (n == 0) {a_i, b_i, c_i, d_i, x0, x1} = '0;
      else if (n == 1) {a_i, b_i, c_i, d_i, x0, x1} = '1;
      else begin
        a_i = $urandom; b_i = $urandom; c_i = $urandom; d_i = $urandom;
        x0 = $urandom; x1 = $urandom;
      end
      #1;
      for (int k = 0; k < 16; k++) v[k] = '0;
      v[0] = a_i; v[1] = b_i; v[2] = c_i; v[3] = d_i;
      gfun(v, 0, 1, 2, 3, x0, x1);
      checks++;
      if ({a_o, b_o, c_o, d_o} !== {v[0], v[1], v[2], v[3]}) begin
        failures++;
        if (failures < 5) $display("mismatch n=%0d got %h %h %h %h exp %h %h %h %h",
                                   n, a_o, b_o, c_o, d_o, v[0], v[1], v[2], v[3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
