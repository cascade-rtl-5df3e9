// model_division: quotient digit selection of the control chip.
//
// The divisor estimate (its three most significant digits, value
// D = 256*d2 + 16*d1 + d0) is held in a special register, loaded by
// load_d_i, together with its multiples; each recursion step selects the
// radix-16 quotient digit q in -10..10 from a two-digit estimate of the
// shifted partial remainder, P = 16*p1 + p0, aligned so that
// q ~ 16*P / D. The selection compares 32*|P| with the odd multiples
// (2k-1)*D, k = 1..10, i.e. q = round(16*P/D) limited to +-10, and is
// broadcast to the arithmetic chips for the full-precision
// p(j+1) = r*p(j) - q*d step. The registered output is valid the cycle after
// step_i. The comparator-bank selection is this design's own; the
// two-stage radix-4 selection of the original is not reproduced.
// Range: P spans at most +-170, so q reaches 10 only for |D| up to about
// 272; a divisor estimate normalized to a nonzero top digit can be as large
// as 2730, which limits the selectable digits. A complete divider therefore
// needs a wider remainder estimate or a scaled divisor; the control chip
// does not yet run the division recursion.
module model_division
  import cascade_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load_d_i,
  input  sd_digit_t [2:0] d_est_i,    // divisor digits, [2] most significant
  input  logic            step_i,
  input  sd_digit_t [1:0] p_est_i,    // partial remainder digits, [1] most significant
  output sd_digit_t       q_o
);
  logic signed [12:0] d_reg;
  logic [16:0] mult [11];             // (2k-1)*|D|, k = 1..10

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_reg <= 13'sd256;
    else if (load_d_i)
      d_reg <= 13'(sd_value(d_est_i[2])) * 13'sd256 + 13'(sd_value(d_est_i[1])) * 13'sd16
             + 13'(sd_value(d_est_i[0]));
  end

  logic [12:0] dmag;
  assign dmag = d_reg[12] ? 13'(-d_reg) : 13'(d_reg);
  always_comb begin
    mult[0] = '0;
    for (int k = 1; k <= 10; k++) mult[k] = 17'(2*k - 1) * 17'(dmag);
  end

  logic signed [12:0] p;
  logic [12:0] pmag;
  logic [4:0]  k;
  dval_t       q;
  always_comb begin
    p    = 13'(sd_value(p_est_i[1])) * 13'sd16 + 13'(sd_value(p_est_i[0]));
    pmag = p[12] ? 13'(-p) : 13'(p);
    k = '0;
    for (int i = 1; i <= 10; i++)
      if (17'(pmag) * 17'd32 >= mult[i]) k = 5'(i);
    q = 7'(k);
    if (p[12] != d_reg[12]) q = -q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_o <= SD_ZERO;
    else if (step_i) q_o <= sd_encode(q);
  end
endmodule
