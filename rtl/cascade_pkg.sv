// cascade_pkg: types, constants and helper functions shared by the Cascade
// variable-precision integer processor.
//
// Number representation. Every arithmetic digit is a radix-16 signed digit
// in the symmetric set <20.10> = {-10..10}. It is carried on six signals,
// following the decomposition 8<1.1> + 4<2.0> + 2<1.1> + <2.0>:
//   n_hi : one signal of weight -8
//   p_hi : two signals of weight +4 each (their count is 0..2)
//   n_lo : one signal of weight -2
//   p_lo : two signals of weight +1 each
// so the upper pair (n_hi,p_hi) is a radix-4 digit in {-2..2} of weight 4 and
// the lower pair is a radix-4 digit in {-2..2} of weight 1. The decomposition
// is the one the architecture uses; the assignment of signals to bit positions
// and the canonical encoding chosen by sd_encode are this design's own.
//
// In digit memory a digit takes five bits: the <31.10> set {-10..21}, stored
// as the unsigned number value+10 (only -10..10 ever occurs).
//
// The ten-bit instruction word broadcast from the control chip to the
// arithmetic chips is {op[3:0], rx[1:0], ry[1:0], rz[1:0]}; its op encoding
// is this design's own.
// Lint notes: the helper functions take whole digits and use only the
// signals they need, and sd_encode keeps its radix-4 parts in seven-bit
// temporaries of which three bits are used; these unused-bit warnings stand.
package cascade_pkg;

  typedef struct packed {
    logic       n_hi;   // weight -8
    logic [1:0] p_hi;   // two signals of weight +4
    logic       n_lo;   // weight -2
    logic [1:0] p_lo;   // two signals of weight +1
  } sd_digit_t;

  typedef logic signed [6:0] dval_t;   // integer value of a digit or digit sum

  localparam sd_digit_t SD_ZERO = '0;

  // value of a radix-4 component (-2..2) from its negative and positive signals
  function automatic logic signed [2:0] r4_value(input logic n, input logic [1:0] p);
    return $signed({2'b00, p[1]}) + $signed({2'b00, p[0]}) - (n ? 3'sd2 : 3'sd0);
  endfunction

  function automatic logic signed [2:0] sd_hi(input sd_digit_t d);
    return r4_value(d.n_hi, d.p_hi);
  endfunction

  function automatic logic signed [2:0] sd_lo(input sd_digit_t d);
    return r4_value(d.n_lo, d.p_lo);
  endfunction

  function automatic dval_t sd_value(input sd_digit_t d);
    return 7'(sd_hi(d)) * 7'sd4 + 7'(sd_lo(d));
  endfunction

  // encode a radix-4 component -2..2 as (n, p)
  function automatic logic [2:0] r4_encode(input logic signed [2:0] v);
    case (v)
      -3'sd2:  return 3'b1_00;
      -3'sd1:  return 3'b1_01;
      3'sd1:   return 3'b0_01;
      3'sd2:   return 3'b0_11;
      default: return 3'b0_00;
    endcase
  endfunction

  // build a digit from a radix-4 pair: value = 4*hi + lo, both in -2..2
  function automatic sd_digit_t sd_from_r4(input logic signed [2:0] hi, input logic signed [2:0] lo);
    logic [2:0] eh, el;
    eh = r4_encode(hi);
    el = r4_encode(lo);
    return sd_digit_t'({eh, el});
  endfunction

  // canonical encoding of a value -10..10
  function automatic sd_digit_t sd_encode(input dval_t v);
    dval_t hi, lo;
    hi = (v + 7'sd2) >>> 2;             // floor((v+2)/4), lo = v-4hi in -2..1
    if (hi > 7'sd2)  hi = 7'sd2;
    if (hi < -7'sd2) hi = -7'sd2;
    lo = v - hi * 7'sd4;
    return sd_from_r4(hi[2:0], lo[2:0]);
  endfunction

  function automatic sd_digit_t sd_negate(input sd_digit_t d);
    return sd_encode(-sd_value(d));
  endfunction

  // five-bit stored form
  function automatic logic [4:0] sd_store(input sd_digit_t d);
    return 5'(sd_value(d) + 7'sd10);
  endfunction

  function automatic sd_digit_t sd_load(input logic [4:0] s);
    dval_t v;
    v = $signed({2'b00, s}) - 7'sd10;
    if (v > 7'sd10) v = 7'sd10;          // codes 21..31 never written
    return sd_encode(v);
  endfunction

  // ---------------------------------------------------------------------
  // instruction word
  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,   // sense rx; ry selects the normalization radix
    OP_LOAD  = 4'd1,   // rz <- LX(digit memory bus)
    OP_STORE = 4'd2,   // digit memory bus <- XL(rx)
    OP_ADD   = 4'd3,   // rz <- rx + ry + transfer in
    OP_SUB   = 4'd4,   // rz <- rx - ry
    OP_MAC   = 4'd5,   // rz <- rx + q*ry
    OP_MSUB  = 4'd6,   // rz <- rx - q*ry   (division recursion)
    OP_SQRT  = 4'd7,   // rz <- rx - q*(2*ry + q at root position); ry[root] <- q
    OP_SHL   = 4'd8,   // rz <- rz * 16 (shift path sp0)
    OP_SHR   = 4'd9,   // rz <- rz / 16 (shift path sp1)
    OP_SHLH  = 4'd10,  // rz <- rz * 4
    OP_SHRH  = 4'd11,  // rz <- rz / 4
    OP_CLR   = 4'd12,  // rz <- 0
    OP_ROOT  = 4'd13,  // rz=0: load root position from rpos_in; rz=1: move it one digit right
    OP_ADDST = 4'd14,  // digit memory bus <- XL(rx + ry)  (distribution box)
    OP_SUBST = 4'd15   // digit memory bus <- XL(rx - ry)
  } au_op_e;

  typedef struct packed {
    au_op_e     op;
    logic [1:0] rx;
    logic [1:0] ry;
    logic [1:0] rz;
  } instr_t;

  typedef enum logic [1:0] {NORM_R16 = 2'd0, NORM_R4 = 2'd1, NORM_R2 = 2'd2} norm_radix_e;

  // ---------------------------------------------------------------------
  // message port opcodes (command word bits [4:0]); flags in bits [7:5]
  typedef enum logic [4:0] {
    MSG_CREATE  = 5'd0,  MSG_DESTROY = 5'd1,  MSG_ASSIM   = 5'd2,
    MSG_SAVE    = 5'd3,  MSG_RESTORE = 5'd4,  MSG_NEG     = 5'd5,
    MSG_ADD     = 5'd6,  MSG_SUB     = 5'd7,  MSG_MUL     = 5'd8,
    MSG_DIV     = 5'd9,  MSG_SQRT    = 5'd10, MSG_REM     = 5'd11,
    MSG_GCD     = 5'd12, MSG_CMP     = 5'd13, MSG_SIGN    = 5'd14,
    MSG_DIGITS  = 5'd15, MSG_SETREG  = 5'd16, MSG_GETREG  = 5'd17,
    MSG_GC      = 5'd18
  } msg_op_e;

  localparam int unsigned FLAG_F = 5;   // future
  localparam int unsigned FLAG_D = 6;   // destroy arguments
  localparam int unsigned FLAG_I = 7;   // in place

  // error replies (handle field all ones plus a code)
  localparam logic [19:0] REPLY_NO_HANDLE = 20'hFFFFF;
  localparam logic [19:0] REPLY_NO_MEMORY = 20'hFFFFE;
  localparam logic [19:0] REPLY_BAD_MSG   = 20'hFFFFD;

  // memory manager commands
  typedef enum logic [2:0] {
    MM_ALLOC = 3'd0, MM_DESTROY = 3'd1, MM_GC = 3'd2, MM_LOOKUP = 3'd3, MM_UPDATE = 3'd4
  } mm_cmd_e;

endpackage
