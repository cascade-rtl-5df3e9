// elem_multiplier: the elementary multiplier and m0 adder of one radix-16
// digit slice. It multiplies a multiplicand digit by the broadcast multiplier
// digit (both in -10..10, product in -100..100) and splits the product as
//   product = 16*t + 4*u + s
// with the transfer digit t in <12.6> = -6..6 (sent to the next more
// significant slice), the sum digit s in <8.4> = -4..4 (kept for the m1 adder)
// and u in 4<2.1> = -1..1 (passed to the normal addition circuitry).
// The digit sets follow the architecture; the selection rule
// (t = round(p/16), then u from the remainder) is this design's own.
// Combinational.
module elem_multiplier
  import cascade_pkg::*;
(
  input  sd_digit_t           mcand_i,
  input  sd_digit_t           mplier_i,
  output logic signed [3:0]   t_o,     // -6..6, weight 16
  output logic signed [2:0]   s_o,     // -4..4, weight 1
  output logic signed [1:0]   u_o      // -1..1, weight 4
);
  logic signed [7:0] p, r, t, u;
  always_comb begin
    p = 8'(sd_value(mcand_i)) * 8'(sd_value(mplier_i));
    t = (p + 8'sd8) >>> 4;            // remainder r = p - 16t in -8..7
    r = p - t * 8'sd16;
    u = (r >= 8'sd4) ? 8'sd1 : ((r <= -8'sd5) ? -8'sd1 : 8'sd0);
    t_o = t[3:0];
    u_o = u[1:0];
    s_o = 3'(r - u * 8'sd4);
  end
endmodule
