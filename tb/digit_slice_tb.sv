// digit_slice_tb: random operands, transfers and modes. The slice must keep
// the positional identity of its mode,
//   add/sub:  16*ta_out + sum - ta_in = x +/- y
//   mul(+/-): 16*ta_out + sum - ta_in = x +/- (mcand*q + tm_in - 16*tm_out)
// where mcand is y, or during square root the doubled digit
// 2*y - 16*td_out + td_in (q itself at the root position); and every output
// digit must lie in its digit set.
module digit_slice_tb;
  import tb_util_pkg::*;
  logic [5:0] x, y, q, sum;
  logic mul_en, neg_en, sqrt_en, root_here;
  logic signed [1:0] dti, dto, ati, ato;
  logic signed [3:0] mti, mto;
  int checks = 0, failures = 0;
  int xv, yv, qv, mc, rhs, lhs;
  digit_slice dut (.x_i(x), .y_i(y), .q_i(q), .mul_en_i(mul_en), .neg_en_i(neg_en),
                   .sqrt_en_i(sqrt_en), .root_here_i(root_here), .dbl_t_i(dti), .dbl_t_o(dto),
                   .m_t_i(mti), .m_t_o(mto), .a_t_i(ati), .a_t_o(ato), .sum_o(sum));
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 20000; t++) begin
      xv = rand_digit(); yv = rand_digit(); qv = rand_digit();
      x = enc_rand(xv); y = enc_rand(yv); q = enc_rand(qv);
      mul_en = 1'($urandom); neg_en = 1'($urandom); sqrt_en = mul_en & 1'($urandom);
      root_here = 1'($urandom);
      dti = 2'(int'($urandom_range(2)) - 1); ati = 2'(int'($urandom_range(2)) - 1);
      mti = mul_en ? 4'(int'($urandom_range(12)) - 6) : 4'sd0;
      #1;
      if (sqrt_en) mc = root_here ? qv : 2 * yv - 16 * int'(dto) + int'(dti);
      else mc = yv;
      rhs = mul_en ? mc * qv + int'(mti) - 16 * int'(mto) : yv;
      if (neg_en) rhs = -rhs;
      rhs = xv + rhs;
      lhs = 16 * int'(ato) + dval(sum) - int'(ati);
      checks++;
      if (lhs != rhs || mto > 6 || mto < -6 || (sqrt_en && !root_here && (mc > 10 || mc < -10))) begin
        failures++;
        if (failures < 5) $display("x=%0d y=%0d q=%0d mul=%0d neg=%0d sqrt=%0d: %0d != %0d",
                                   xv, yv, qv, mul_en, neg_en, sqrt_en, lhs, rhs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
