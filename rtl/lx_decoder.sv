// lx_decoder: the LX box of the arithmetic chip, the inverse of the XL box.
// It expands five-bit stored digits (value+10) read from digit memory into
// six-signal <20.10> digits in the canonical encoding of cascade_pkg.
// Codes above 20 are never written; they decode as 10. Combinational.
module lx_decoder
  import cascade_pkg::*;
#(
  parameter int unsigned DIGITS = 16
) (
  input  logic [DIGITS*5-1:0]      stored_i,
  output sd_digit_t [DIGITS-1:0]   digits_o
);
  always_comb begin
    for (int i = 0; i < DIGITS; i++) digits_o[i] = sd_load(stored_i[i*5 +: 5]);
  end
endmodule
