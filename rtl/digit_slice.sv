// digit_slice: one radix-16 position of the arithmetic unit.
//
// Datapath, top to bottom, as in the architecture's digit slice:
//   * doubling circuit: 2*y is recoded as 16*td + wd (td in -1..1 sent up on
//     the dbl loop) and wd plus the transfer from below forms a valid digit.
//     During square root the multiplexor then selects, as multiplicand, the
//     doubled root digit, or the new root digit q at the root position;
//   * elementary multiplier and m0 adder: mcand*q = 16*tm + 4*u + s;
//   * m1 adder: s plus the incoming <12.6> transfer tm from below gives a
//     <20.10> digit;
//   * multiplexors: product path (multiply, divide, root) or plain operand y;
//   * conditional complementers: negate the selected path for subtraction;
//   * a0 adder: x + path + 4*u (-24..24) = 16*ta + w, w in -9..9;
//     a1 adder: w + incoming ta gives the <20.10> result digit.
// No carry ripples: every transfer crosses exactly one position.
// The transfer selection thresholds and value-level formulation are this
// design's own. Combinational.
module digit_slice
  import cascade_pkg::*;
(
  input  sd_digit_t          x_i,        // port A digit
  input  sd_digit_t          y_i,        // port B digit
  input  sd_digit_t          q_i,        // broadcast multiplier / quotient / root digit
  input  logic               mul_en_i,   // use product path
  input  logic               neg_en_i,   // complement the B path
  input  logic               sqrt_en_i,  // multiplicand from doubling circuit
  input  logic               root_here_i,// this is the root digit position
  input  logic signed [1:0]  dbl_t_i,    // doubling transfer from lower slice
  output logic signed [1:0]  dbl_t_o,
  input  logic signed [3:0]  m_t_i,      // <12.6> product transfer from lower slice
  output logic signed [3:0]  m_t_o,
  input  logic signed [1:0]  a_t_i,      // addition transfer from lower slice
  output logic signed [1:0]  a_t_o,
  output sd_digit_t          sum_o
);
  dval_t y2, td, wd, dbl, path, x, sum, ta, w, mdv, uu;
  sd_digit_t mcand;
  logic signed [3:0] tm;
  logic signed [2:0] s;
  logic signed [1:0] u;

  elem_multiplier u_mul (.mcand_i(mcand), .mplier_i(q_i), .t_o(tm), .s_o(s), .u_o(u));

  always_comb begin
    // doubling circuit
    y2  = sd_value(y_i) * 7'sd2;
    td  = (y2 >= 7'sd7) ? 7'sd1 : ((y2 <= -7'sd7) ? -7'sd1 : 7'sd0);
    wd  = y2 - td * 7'sd16;
    dbl = wd + 7'(dbl_t_i);
    dbl_t_o = td[1:0];
    mcand = sqrt_en_i ? (root_here_i ? q_i : sd_encode(dbl)) : y_i;
    // m1 adder
    mdv = 7'(s) + 7'(m_t_i);
    m_t_o = tm;
    // multiplexors and complementers
    path = mul_en_i ? mdv : sd_value(y_i);
    uu   = mul_en_i ? 7'(u) : 7'sd0;
    if (neg_en_i) begin
      path = -path;
      uu   = -uu;
    end
    // a0 / a1 adders
    x   = sd_value(x_i);
    sum = x + path + uu * 7'sd4;
    ta  = (sum >= 7'sd7) ? 7'sd1 : ((sum <= -7'sd7) ? -7'sd1 : 7'sd0);
    w   = sum - ta * 7'sd16;
    a_t_o = ta[1:0];
    sum_o = sd_encode(w + 7'(a_t_i));
  end
endmodule
