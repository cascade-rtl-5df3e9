// digit_regfile: the four DIGITS-digit registers of an arithmetic chip with
// their shift paths and the root digit position register.
//
// * Two read ports (rx, ry) feed the arithmetic unit; one write port latches
//   the arithmetic unit output or the LX-decoded memory word into rz.
// * Shift path sp0 shifts rz toward the more significant end, sp1 toward the
//   less significant end, by a whole digit or by half a digit. A half-digit
//   shift works on the radix-4 components of every digit: moving up,
//   digit i becomes 4*lo(i) + hi(i-1); moving down, 4*lo(i+1) + hi(i).
//   The digit (or radix-4 component, value -2..2) leaving the segment is
//   output and the one entering comes from the neighbouring chip or, at the
//   ends of the chain, from the control chip.
// * The root digit position register is one-hot across the cascaded chips.
//   root_load copies rpos_in into the top position (and clears the rest);
//   root_step moves the position one digit down, through rpos_in/rpos_out.
//   root_we stores the root digit q into register ry at the root position,
//   so the root accumulates in place from the most significant end.
// All updates take effect at the rising clock edge; reset clears everything.
// The direction assigned to each shift path and the port-level protocol are
// this design's own.
module digit_regfile
  import cascade_pkg::*;
#(
  parameter int unsigned DIGITS = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [1:0]              rx_i,
  input  logic [1:0]              ry_i,
  output sd_digit_t [DIGITS-1:0]  x_o,
  output sd_digit_t [DIGITS-1:0]  y_o,
  input  logic                    we_i,
  input  logic [1:0]              rz_i,
  input  sd_digit_t [DIGITS-1:0]  wdata_i,
  input  logic                    shl_i,      // shift rz up (sp0)
  input  logic                    shr_i,      // shift rz down (sp1)
  input  logic                    half_i,     // half-digit shift
  input  sd_digit_t               sp0_i,      // from the less significant neighbour
  output sd_digit_t               sp0_o,      // to the more significant neighbour
  input  sd_digit_t               sp1_i,      // from the more significant neighbour
  output sd_digit_t               sp1_o,      // to the less significant neighbour
  input  logic                    root_load_i,
  input  logic                    root_step_i,
  input  logic                    root_we_i,
  input  sd_digit_t               q_i,
  input  logic                    rpos_i,
  output logic                    rpos_o,
  output logic [DIGITS-1:0]       root_pos_o
);
  sd_digit_t [DIGITS-1:0] regs [4];
  sd_digit_t [DIGITS-1:0] cur, shifted;
  logic [DIGITS-1:0] rpos;

  assign x_o = regs[rx_i];
  assign y_o = regs[ry_i];
  assign cur = regs[rz_i];
  assign root_pos_o = rpos;
  assign rpos_o = rpos[0];

  always_comb begin
    shifted = cur;
    sp0_o   = SD_ZERO;
    sp1_o   = SD_ZERO;
    if (shl_i && !half_i) begin
      shifted = {cur[DIGITS-2:0], sp0_i};
      sp0_o   = cur[DIGITS-1];
    end else if (shl_i) begin
      for (int i = 0; i < DIGITS; i++)
        shifted[i] = sd_encode(7'(sd_lo(cur[i])) * 7'sd4 +
                               ((i == 0) ? sd_value(sp0_i) : 7'(sd_hi(cur[(i+DIGITS-1)%DIGITS]))));
      sp0_o = sd_from_r4(3'sd0, sd_hi(cur[DIGITS-1]));
    end else if (shr_i && !half_i) begin
      shifted = {sp1_i, cur[DIGITS-1:1]};
      sp1_o   = cur[0];
    end else if (shr_i) begin
      for (int i = 0; i < DIGITS; i++)
        shifted[i] = sd_encode(7'(sd_hi(cur[i])) +
                               ((i == DIGITS-1) ? sd_value(sp1_i) * 7'sd4
                                                : 7'(sd_lo(cur[(i+1)%DIGITS])) * 7'sd4));
      sp1_o = sd_from_r4(3'sd0, sd_lo(cur[0]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++) regs[r] <= '0;
      rpos <= '0;
    end else begin
      if (we_i) regs[rz_i] <= wdata_i;
      else if (shl_i || shr_i) regs[rz_i] <= shifted;
      if (root_we_i)
        for (int i = 0; i < DIGITS; i++)
          if (rpos[i]) regs[ry_i][i] <= q_i;
      if (root_load_i)      rpos <= {rpos_i, {(DIGITS-1){1'b0}}};
      else if (root_step_i) rpos <= {rpos_i, rpos[DIGITS-1:1]};
    end
  end
endmodule
