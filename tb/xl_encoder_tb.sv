// xl_encoder_tb: random words of randomly encoded digits; every stored
// five-bit field must equal the digit value plus 10.
module xl_encoder_tb;
  import tb_util_pkg::*;
  logic [95:0] din;
  logic [79:0] dout;
  int checks = 0, failures = 0, v [16];
  xl_encoder #(.DIGITS(16)) dut (.digits_i(din), .stored_o(dout));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 16; i++) begin v[i] = rand_digit(); din[i*6 +: 6] = enc_rand(v[i]); end
      #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(dout[i*5 +: 5]) != v[i] + 10) begin
          failures++;
          if (failures < 5) $display("digit %0d value %0d stored %0d", i, v[i], dout[i*5 +: 5]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
