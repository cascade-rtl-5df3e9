// arith_unit_tb: random 16-digit words in random redundant encodings, random
// q and end transfers, in every mode. The word-level identity must hold:
//   sum + 16^16*a_out - a_in = X +/- B
// where B is Y (add/sub), or q*M + m_in - 16^16*m_out (multiply modes) with
// M = Y, or for square root (root position outside the word)
// M = 2*Y + dbl_in - 16^16*dbl_out. The zero detectors are checked against
// the result digits.
module arith_unit_tb;
  import tb_util_pkg::*;
  localparam int D = 16;
  logic [D*6-1:0] x, y, sum;
  logic [5:0] q;
  logic [D-1:0] zero;
  logic upper_zero, mul_en, neg_en, sqrt_en;
  logic signed [1:0] dti, dto, ati, ato;
  logic signed [3:0] mti, mto;
  logic signed [127:0] xv, yv, sv, mc, rhs, lhs, p16;
  int checks = 0, failures = 0, qv, dv;
  arith_unit #(.DIGITS(D)) dut (
    .x_i(x), .y_i(y), .q_i(q), .root_pos_i('0), .mul_en_i(mul_en), .neg_en_i(neg_en),
    .sqrt_en_i(sqrt_en), .dbl_t_i(dti), .dbl_t_o(dto), .m_t_i(mti), .m_t_o(mto),
    .a_t_i(ati), .a_t_o(ato), .sum_o(sum), .zero_o(zero), .upper_zero_o(upper_zero));
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    p16 = 128'sd1 <<< (4 * D);
    for (int t = 0; t < 5000; t++) begin
      xv = 0; yv = 0;
      for (int i = D - 1; i >= 0; i--) begin
        dv = (t % 4 == 0 && i > 0) ? 0 : rand_digit();
        x[i*6 +: 6] = enc_rand(dv); xv = xv * 16 + dv;
        dv = (t % 4 == 0 && i > 0) ? 0 : rand_digit();
        y[i*6 +: 6] = enc_rand(dv); yv = yv * 16 + dv;
      end
      qv = rand_digit(); q = enc_rand(qv);
      mul_en = 1'($urandom); neg_en = 1'($urandom); sqrt_en = mul_en & 1'($urandom);
      dti = 2'(int'($urandom_range(2)) - 1); ati = 2'(int'($urandom_range(2)) - 1);
      mti = mul_en ? 4'(int'($urandom_range(12)) - 6) : 4'sd0;
      #1;
      sv = 0;
      for (int i = D - 1; i >= 0; i--) sv = sv * 16 + 128'(dval(sum[i*6 +: 6]));
      mc = sqrt_en ? 2 * yv + 128'(dti) - p16 * 128'(dto) : yv;
      rhs = mul_en ? mc * 128'(qv) + 128'(mti) - p16 * 128'(mto) : yv;
      rhs = neg_en ? xv - rhs : xv + rhs;
      lhs = sv + p16 * 128'(ato) - 128'(ati);
      checks++;
      if (lhs != rhs) begin
        failures++;
        if (failures < 5) $display("mode mul=%0d neg=%0d sqrt=%0d: %0d != %0d", mul_en, neg_en, sqrt_en, lhs, rhs);
      end
      for (int i = 0; i < D; i++) begin
        checks++;
        if (zero[i] != (dval(sum[i*6 +: 6]) == 0)) failures++;
      end
      checks++;
      if (upper_zero != (&zero[D-1:1])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
