// norm_sensor: normalization sensor. It evaluates the three most
// significant digits of a segment, V = 256*d[n-1] + 16*d[n-2] + d[n-3]
// (|V| <= 2730), and reports whether the number needs another
// normalization shift at the selected radix. The rule, this design's own,
// is: the number is normalized at radix R when R*|V| >= 4096, i.e. one more
// left shift by a radix-R position would carry the leading value out of the
// three-digit window. need_shift_o is the negation. Combinational.
module norm_sensor
  import cascade_pkg::*;
#(
  parameter int unsigned DIGITS = 16
) (
  input  sd_digit_t [DIGITS-1:0] digits_i,
  input  norm_radix_e            radix_i,
  output logic                   need_shift_o
);
  logic signed [12:0] v;
  logic [12:0] mag;
  always_comb begin
    v = 13'(sd_value(digits_i[DIGITS-1])) * 13'sd256
      + 13'(sd_value(digits_i[DIGITS-2])) * 13'sd16
      + 13'(sd_value(digits_i[DIGITS-3]));
    mag = v[12] ? 13'(-v) : 13'(v);
    case (radix_i)
      NORM_R16: need_shift_o = mag < 13'd256;
      NORM_R4:  need_shift_o = mag < 13'd1024;
      default:  need_shift_o = mag < 13'd2048;
    endcase
  end
endmodule
