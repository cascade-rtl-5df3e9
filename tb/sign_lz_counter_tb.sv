// sign_lz_counter_tb: random 16-digit words with a random number of leading
// zero digits (including all zero); checks the count and the sign of the
// most significant nonzero digit against a direct scan.
module sign_lz_counter_tb;
  import tb_util_pkg::*;
  logic [95:0] w;
  logic neg;
  logic [4:0] lz;
  int checks = 0, failures = 0, v [16], nz, elz, eneg;
  sign_lz_counter #(.DIGITS(16)) dut (.digits_i(w), .neg_o(neg), .lz_o(lz));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 2000; t++) begin
      nz = $urandom_range(16);
      for (int i = 0; i < 16; i++) begin
        v[i] = (i >= 16 - nz) ? 0 : rand_digit();
        w[i*6 +: 6] = enc_rand(v[i]);
      end
      elz = 16; eneg = 0;
      for (int i = 15; i >= 0; i--) if (v[i] != 0) begin elz = 15 - i; eneg = v[i] < 0; break; end
      #1; checks++;
      if (int'(lz) != elz || int'(neg) != eneg) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
