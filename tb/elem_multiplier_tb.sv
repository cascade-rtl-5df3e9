// elem_multiplier_tb: all 21 x 21 digit pairs (random encodings, several
// rounds): 16*t + 4*u + s must equal the product, with t in -6..6,
// u in -1..1 and s in -4..4.
module elem_multiplier_tb;
  import tb_util_pkg::*;
  logic [5:0] a, b;
  logic signed [3:0] t;
  logic signed [2:0] s;
  logic signed [1:0] u;
  int checks = 0, failures = 0;
  elem_multiplier dut (.mcand_i(a), .mplier_i(b), .t_o(t), .s_o(s), .u_o(u));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int r = 0; r < 3; r++)
      for (int x = -10; x <= 10; x++)
        for (int y = -10; y <= 10; y++) begin
          a = enc_rand(x); b = enc_rand(y); #1;
          checks++;
          if (16 * int'(t) + 4 * int'(u) + int'(s) != x * y || t > 6 || t < -6 || s > 4 || s < -4
              || u > 1 || u < -1) begin
            failures++;
            if (failures < 5) $display("%0d*%0d -> t=%0d u=%0d s=%0d", x, y, t, u, s);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
