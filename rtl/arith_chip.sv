// arith_chip: one Cascade arithmetic chip, a DIGITS-digit slice of the
// arithmetic datapath.
//
// It decodes the ten-bit instruction word broadcast by the control chip
// (cascade_pkg::instr_t) and executes it in one clock cycle:
//   register file (4 x DIGITS digits, shift paths, root digit position)
//   -> arithmetic unit (digit slices) -> register write-back or, through the
//   distribution box, straight onto the digit memory bus via the XL box.
// Words read from digit memory enter through the LX box (OP_LOAD; the
// memory read must have been issued the cycle before).
// Sensors look at the arithmetic unit output for arithmetic operations and at
// register rx otherwise: sign computer / leading-zero counter, normalization
// sensor (radix chosen by the ry field of an OP_NOP, radix 16 otherwise) and
// the single-digit-value detector (sdv_o: all digits above position 0 zero;
// the board wire-ANDs sdv_o of all chips, the upper chips reporting
// all-zero). lsd_o is the least significant result digit.
// Transfer digits (a/m/dbl), shift paths and the root position chain connect
// to neighbouring chips; the control chip closes them across words.
// The op encoding and this decode are this design's own. Only the lowest
// position's zero detector is used directly (the upper ones are combined in
// the arithmetic unit), so an unused-bits warning on `zero` stands.
module arith_chip
  import cascade_pkg::*;
#(
  parameter int unsigned DIGITS = 16,
  parameter bit          IS_LOW = 1'b1     // least significant chip of the cascade
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  instr_t                     instr_i,
  input  sd_digit_t                  q_i,
  input  logic [DIGITS*5-1:0]        mem_rdata_i,
  output logic [DIGITS*5-1:0]        mem_wdata_o,
  output logic                       mem_drive_o,
  input  logic signed [1:0]          a_t_i,
  output logic signed [1:0]          a_t_o,
  input  logic signed [3:0]          m_t_i,
  output logic signed [3:0]          m_t_o,
  input  logic signed [1:0]          dbl_t_i,
  output logic signed [1:0]          dbl_t_o,
  input  sd_digit_t                  sp0_i,
  output sd_digit_t                  sp0_o,
  input  sd_digit_t                  sp1_i,
  output sd_digit_t                  sp1_o,
  input  logic                       rpos_i,
  output logic                       rpos_o,
  output logic                       neg_o,
  output logic [$clog2(DIGITS+1)-1:0] lz_o,
  output logic                       need_norm_o,
  output logic                       sdv_o,
  output sd_digit_t                  lsd_o
);
  sd_digit_t [DIGITS-1:0] x, y, sum, ld, wdata, sense;
  logic [DIGITS-1:0] root_pos, zero;
  logic mul_en, neg_en, sqrt_en, we, shl, shr, half, root_load, root_step, root_we;
  logic arith_op, upper_zero;
  norm_radix_e radix;

  always_comb begin
    mul_en = 1'b0; neg_en = 1'b0; sqrt_en = 1'b0; we = 1'b0; wdata = sum;
    shl = 1'b0; shr = 1'b0; half = 1'b0; root_load = 1'b0; root_step = 1'b0;
    root_we = 1'b0; mem_drive_o = 1'b0; arith_op = 1'b0;
    radix = NORM_R16;
    unique case (instr_i.op)
      OP_NOP:   radix = norm_radix_e'(instr_i.ry);
      OP_LOAD:  begin we = 1'b1; wdata = ld; end
      OP_STORE: mem_drive_o = 1'b1;
      OP_ADD:   begin we = 1'b1; arith_op = 1'b1; end
      OP_SUB:   begin we = 1'b1; neg_en = 1'b1; arith_op = 1'b1; end
      OP_MAC:   begin we = 1'b1; mul_en = 1'b1; arith_op = 1'b1; end
      OP_MSUB:  begin we = 1'b1; mul_en = 1'b1; neg_en = 1'b1; arith_op = 1'b1; end
      OP_SQRT:  begin we = 1'b1; mul_en = 1'b1; neg_en = 1'b1; sqrt_en = 1'b1;
                      root_we = 1'b1; arith_op = 1'b1; end
      OP_SHL:   shl = 1'b1;
      OP_SHR:   shr = 1'b1;
      OP_SHLH:  begin shl = 1'b1; half = 1'b1; end
      OP_SHRH:  begin shr = 1'b1; half = 1'b1; end
      OP_CLR:   begin we = 1'b1; wdata = '0; end
      OP_ROOT:  begin root_load = ~instr_i.rz[0]; root_step = instr_i.rz[0]; end
      OP_ADDST: begin mem_drive_o = 1'b1; arith_op = 1'b1; end
      OP_SUBST: begin mem_drive_o = 1'b1; neg_en = 1'b1; arith_op = 1'b1; end
      default: ;
    endcase
    sense = arith_op ? sum : x;
  end

  // distribution box: register rx or the arithmetic unit output to memory
  xl_encoder #(.DIGITS(DIGITS)) u_xl (
    .digits_i((instr_i.op == OP_STORE) ? x : sum), .stored_o(mem_wdata_o));
  lx_decoder #(.DIGITS(DIGITS)) u_lx (.stored_i(mem_rdata_i), .digits_o(ld));

  digit_regfile #(.DIGITS(DIGITS)) u_regs (
    .clk, .rst_n, .rx_i(instr_i.rx), .ry_i(instr_i.ry), .x_o(x), .y_o(y),
    .we_i(we), .rz_i(instr_i.rz), .wdata_i(wdata),
    .shl_i(shl), .shr_i(shr), .half_i(half),
    .sp0_i, .sp0_o, .sp1_i, .sp1_o,
    .root_load_i(root_load), .root_step_i(root_step), .root_we_i(root_we),
    .q_i, .rpos_i, .rpos_o, .root_pos_o(root_pos));

  arith_unit #(.DIGITS(DIGITS)) u_au (
    .x_i(x), .y_i(y), .q_i, .root_pos_i(root_pos),
    .mul_en_i(mul_en), .neg_en_i(neg_en), .sqrt_en_i(sqrt_en),
    .dbl_t_i, .dbl_t_o, .m_t_i, .m_t_o, .a_t_i, .a_t_o,
    .sum_o(sum), .zero_o(zero), .upper_zero_o(upper_zero));

  sign_lz_counter #(.DIGITS(DIGITS)) u_sign (.digits_i(sense), .neg_o, .lz_o);
  norm_sensor #(.DIGITS(DIGITS)) u_norm (.digits_i(sense), .radix_i(radix), .need_shift_o(need_norm_o));

  // single-digit-value detector on the sensed word
  // (the arithmetic unit's own zero detectors for arithmetic operations)
  logic sense_upper_zero, sense_lsd_zero;
  always_comb begin
    sense_upper_zero = 1'b1;
    for (int i = 1; i < DIGITS; i++)
      if (sd_value(sense[i]) != 7'sd0) sense_upper_zero = 1'b0;
    sense_lsd_zero = sd_value(sense[0]) == 7'sd0;
    if (arith_op) begin
      sense_upper_zero = upper_zero;
      sense_lsd_zero   = zero[0];
    end
  end
  assign sdv_o = IS_LOW ? sense_upper_zero : (sense_upper_zero && sense_lsd_zero);
  assign lsd_o = sense[0];
endmodule
