// sign_lz_counter: sign computer and leading-zeros counter of one
// arithmetic chip. A priority encoder finds the most significant nonzero
// digit of the DIGITS-digit segment; its sign is the sign of the segment
// and the number of zero digits above it is the leading-zero count
// (DIGITS when the whole segment is zero, sign then reported as +).
// The control chip combines the counts of the chips, from the most
// significant down, until one below DIGITS is found. Combinational.
module sign_lz_counter
  import cascade_pkg::*;
#(
  parameter int unsigned DIGITS = 16
) (
  input  sd_digit_t [DIGITS-1:0]        digits_i,
  output logic                          neg_o,
  output logic [$clog2(DIGITS+1)-1:0]   lz_o
);
  always_comb begin
    neg_o = 1'b0;
    lz_o  = ($clog2(DIGITS+1))'(DIGITS);
    for (int i = 0; i < DIGITS; i++) begin   // the highest nonzero digit wins
      if (sd_value(digits_i[i]) != 7'sd0) begin
        neg_o = sd_value(digits_i[i]) < 7'sd0;
        lz_o  = ($clog2(DIGITS+1))'(DIGITS - 1 - i);
      end
    end
  end
endmodule
