// norm_sensor_tb: random words (top digits often small so both outcomes
// occur) at each radix; need_shift must be set exactly when
// radix*|256*d15 + 16*d14 + d13| < 4096.
module norm_sensor_tb;
  import tb_util_pkg::*;
  logic [95:0] w;
  logic [1:0] radix;
  logic need;
  int checks = 0, failures = 0, v [16], top, r, seen [2];
  norm_sensor #(.DIGITS(16)) dut (.digits_i(w), .radix_i(radix), .need_shift_o(need));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    seen[0] = 0; seen[1] = 0;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 16; i++) begin
        v[i] = (i == 15 && t % 2 == 0) ? int'($urandom_range(2)) - 1 : rand_digit();
        w[i*6 +: 6] = enc_rand(v[i]);
      end
      radix = 2'($urandom_range(2));
      r = (radix == 0) ? 16 : (radix == 1) ? 4 : 2;
      top = 256 * v[15] + 16 * v[14] + v[13];
      if (top < 0) top = -top;
      #1; checks++;
      if (need != (r * top < 4096)) failures++;
      seen[need]++;
    end
    if (seen[0] == 0 || seen[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
