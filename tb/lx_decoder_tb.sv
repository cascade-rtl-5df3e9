// lx_decoder_tb: every stored code 0..20 in every position must decode to a
// six-signal digit of value code-10.
module lx_decoder_tb;
  import tb_util_pkg::*;
  logic [79:0] din;
  logic [95:0] dout;
  int checks = 0, failures = 0, c [16];
  lx_decoder #(.DIGITS(16)) dut (.stored_i(din), .digits_o(dout));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 16; i++) begin
        c[i] = (t < 21) ? t : int'($urandom_range(20));
        din[i*5 +: 5] = 5'(c[i]);
      end
      #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (dval(dout[i*6 +: 6]) != c[i] - 10) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
