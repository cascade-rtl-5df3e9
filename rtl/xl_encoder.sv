// xl_encoder: the XL box of the arithmetic chip. It converts a word of
// six-signal <20.10> digits into five-bit <31.10> digits for digit memory,
// so that a 16-digit word takes 80 memory bits instead of 96.
// Each stored digit is the unsigned number value+10; the offset code is this
// design's choice of a five-bit <31.10> encoding. Purely combinational.
module xl_encoder
  import cascade_pkg::*;
#(
  parameter int unsigned DIGITS = 16
) (
  input  sd_digit_t [DIGITS-1:0]   digits_i,
  output logic [DIGITS*5-1:0]      stored_o
);
  always_comb begin
    for (int i = 0; i < DIGITS; i++) stored_o[i*5 +: 5] = sd_store(digits_i[i]);
  end
endmodule
