// arith_unit: the arithmetic unit of one arithmetic chip, a row of DIGITS
// identical radix-16 digit slices. Transfer digits of the addition (ol),
// multiplication (ml) and doubling (dbl) loops pass from each slice to the
// next more significant one; the chip's end transfers are ports so that
// chips can be cascaded and the control chip can close the loops across
// the words of a multiple-precision number.
// Every position has a zero detector; the single-digit-value detector
// reports that all positions above the least significant one are zero.
// Combinational.
module arith_unit
  import cascade_pkg::*;
#(
  parameter int unsigned DIGITS = 16
) (
  input  sd_digit_t [DIGITS-1:0] x_i,
  input  sd_digit_t [DIGITS-1:0] y_i,
  input  sd_digit_t              q_i,
  input  logic [DIGITS-1:0]      root_pos_i,
  input  logic                   mul_en_i,
  input  logic                   neg_en_i,
  input  logic                   sqrt_en_i,
  input  logic signed [1:0]      dbl_t_i,
  output logic signed [1:0]      dbl_t_o,
  input  logic signed [3:0]      m_t_i,
  output logic signed [3:0]      m_t_o,
  input  logic signed [1:0]      a_t_i,
  output logic signed [1:0]      a_t_o,
  output sd_digit_t [DIGITS-1:0] sum_o,
  output logic [DIGITS-1:0]      zero_o,     // per-position zero detectors
  output logic                   upper_zero_o // all positions above 0 are zero
);
  logic signed [1:0] dbl_t [DIGITS+1];
  logic signed [3:0] m_t   [DIGITS+1];
  logic signed [1:0] a_t   [DIGITS+1];

  assign dbl_t[0] = dbl_t_i;
  assign m_t[0]   = m_t_i;
  assign a_t[0]   = a_t_i;

  for (genvar i = 0; i < DIGITS; i++) begin : g_slice
    digit_slice u_slice (
      .x_i(x_i[i]), .y_i(y_i[i]), .q_i(q_i),
      .mul_en_i(mul_en_i), .neg_en_i(neg_en_i), .sqrt_en_i(sqrt_en_i),
      .root_here_i(root_pos_i[i]),
      .dbl_t_i(dbl_t[i]), .dbl_t_o(dbl_t[i+1]),
      .m_t_i(m_t[i]), .m_t_o(m_t[i+1]),
      .a_t_i(a_t[i]), .a_t_o(a_t[i+1]),
      .sum_o(sum_o[i]));
    assign zero_o[i] = (sd_value(sum_o[i]) == 7'sd0);
  end

  assign dbl_t_o = dbl_t[DIGITS];
  assign m_t_o   = m_t[DIGITS];
  assign a_t_o   = a_t[DIGITS];
  assign upper_zero_o = &zero_o[DIGITS-1:1];
endmodule
