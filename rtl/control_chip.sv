// control_chip: the Cascade control chip. It receives messages on the
// external message port, keeps all variable-precision integers behind
// handles through the memory manager, and sequences the arithmetic chips by
// broadcasting one ten-bit instruction word (and one digit, q) per cycle.
//
// Message protocol (one port transfer carries a word each way):
//   cycle 1      command word: [4:0] message opcode, [5] f (future),
//                [6] d (destroy arguments), [7] i (in place); answered with 0
//   next cycles  the operands, each answered with 0
//   last cycles  one transfer per result word (the host's word is ignored)
// gc is a single cycle: it is answered at once and the port then accepts
// nothing until collection has finished. With f set, neg/add/sub/mul
// answer with the new handle as soon as storage is allocated and compute
// afterwards; the next message waits until the value exists.
//
// Implemented messages: create, destroy, assim, save, restore, neg (f d i),
// add, sub, mul (f d), cmp, sign, digits (d), setreg, getreg, gc. div, sqrt, rem
// and gcd are answered with REPLY_BAD_MSG after their operands.
//
// Arithmetic is word-serial over digit-memory words of WD = 16*2^N digits,
// least significant word first. The transfer digits leaving the top chip
// (addition, multiplication) and the digit shifted out by sp0 are held in
// loop registers and fed into the bottom chip for the next word, so a
// multiple-precision operation is exact. add/sub: 4 cycles per word.
// mul: for each multiplier digit, most significant first,
// acc = 16*acc + a_j*b over all result words (6 cycles per word).
// Result size is allocated from the operands' digit counts (max+1 for
// add/sub, na+nb+1 for mul). The sign computer / leading-zero counts of the
// result words give the result's sign and digit count, written to its
// descriptor. cmp decides from the cached signs and digit counts when the
// signs differ or the counts differ by two or more (a signed-digit number of
// n digits has a magnitude between 16^(n-1)/3 and 2*16^n/3); otherwise it
// runs a subtraction without storing it.
// create converts a 32-bit two's complement value into digits; assim
// converts back and returns 1 + floor(nd/4) 16-bit chunks, least
// significant first, after a word holding the chunk count.
// save answers with the 40-bit pseudo-descriptor the paper describes, as
// two words (desc0 = {sign, 18 zero bits, digit count bit 20}, desc1 =
// digit count bits 19..0), then the number of 4-digit chunks, ceil(nd/4),
// then the chunks: four digits each in their stored five-bit form, least
// significant first. restore takes desc0, desc1, the count and the chunks,
// allocates ceil(nd/WD) words, writes the chunks back unchanged and answers
// with the new handle; if allocation fails it still consumes the chunks and
// then answers with the error. The word layout of the pseudo-descriptor is
// this design's own.
// getreg registers: 0 installed top word/4 (settable with setreg 0),
// 1 free digit words/4, 2 live handles, 3 last handle, 4 garbage
// collections, 5 single-digit results seen on sdv, 6 comparisons decided
// without subtraction, 7 handles reused without collection.
// getreg returns 20 bits, so the upper bits of the memory manager's 32-bit
// collection and reuse counters are unused (lint warning stands).
// Message encodings, result formats and the sequencing are this design's
// own; the message set, flags and operation semantics follow the
// architecture.
module control_chip
  import cascade_pkg::*;
#(
  parameter int unsigned N           = 0,    // 2^N arithmetic modules
  parameter int unsigned HANDLE_BITS = 20,
  parameter int unsigned DADDR_BITS  = 22
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // external message port
  input  logic                      req_i,
  input  logic [19:0]               data_i,
  output logic                      ack_o,
  output logic [19:0]               data_o,
  // broadcast to the arithmetic chips
  output instr_t                    instr_o,
  output sd_digit_t                 q_o,
  // loops closed through the control chip
  output logic signed [1:0]         a_t_o,     // into the lowest chip
  input  logic signed [1:0]         a_t_i,     // from the highest chip
  output logic signed [3:0]         m_t_o,
  input  logic signed [3:0]         m_t_i,
  output logic signed [1:0]         dbl_t_o,
  input  logic signed [1:0]         dbl_t_i,
  output sd_digit_t                 sp0_o,     // into the lowest chip
  input  sd_digit_t                 sp0_i,     // from the highest chip
  output sd_digit_t                 sp1_o,     // into the highest chip
  input  sd_digit_t                 sp1_i,     // from the lowest chip
  output logic                      rpos_o,    // into the highest chip
  input  logic                      rpos_i,    // from the lowest chip
  // sensors
  input  logic [(2**N)-1:0]         neg_i,
  input  logic [(2**N)*5-1:0]       lz_i,
  input  logic                      need_norm_i,
  input  logic                      sdv_i,
  input  sd_digit_t                 lsd_i,
  // digit memory
  output logic [DADDR_BITS-1:0]     dmem_addr_o,
  output logic                      dmem_we_o,
  output logic                      dmem_ctl_drive_o,
  output logic [(2**N)*80-1:0]      dmem_wdata_o,
  input  logic [(2**N)*80-1:0]      dmem_rdata_i,
  // management memory
  output logic [HANDLE_BITS-1:0]    dptr_addr_o,
  output logic                      dptr_we_o,
  output logic [21:0]               dptr_wdata_o,
  input  logic [21:0]               dptr_rdata_i,
  output logic [HANDLE_BITS+1:0]    desc_addr_o,
  output logic                      desc_we_o,
  output logic [21:0]               desc_wdata_o,
  input  logic [21:0]               desc_rdata_i
);
  localparam int unsigned NC  = 2**N;
  localparam int unsigned WD  = 16 * NC;          // digits per word
  localparam int unsigned WB  = 5 * WD;
  localparam int unsigned WSH = $clog2(WD);
  localparam int unsigned AW  = DADDR_BITS + 1;   // word counts

  // ------------------------------------------------------------------
  // message port
  logic        port_ready, rx_valid, tx_valid;
  logic [19:0] rx_data, tx_data;
  message_port #(.DATA_BITS(20)) u_port (
    .clk, .rst_n, .req_i, .data_i, .ack_o, .data_o,
    .ready_i(port_ready), .rx_valid_o(rx_valid), .rx_data_o(rx_data),
    .tx_valid_i(tx_valid), .tx_data_i(tx_data));

  // ------------------------------------------------------------------
  // memory manager
  logic                   mm_valid, mm_busy, mm_done, mm_sign, mm_set_top;
  mm_cmd_e                mm_cmd;
  logic [HANDLE_BITS-1:0] mm_handle, mm_handle_o, mm_last;
  logic [AW-1:0]          mm_words, mm_free_words;
  logic [20:0]            mm_nd, mm_nd_o;
  logic                   mm_sign_o;
  logic [1:0]             mm_err;
  logic [DADDR_BITS-1:0]  mm_msw, mm_lsw, mm_top_word, mm_installed;
  logic [HANDLE_BITS:0]   mm_free_desc, mm_live;
  logic [31:0]            mm_gc_runs, mm_reuse;
  logic [DADDR_BITS-1:0]  mm_dmem_addr;
  logic                   mm_dmem_we;
  logic [WB-1:0]          mm_dmem_wdata;

  memory_manager #(.HANDLE_BITS(HANDLE_BITS), .DADDR_BITS(DADDR_BITS),
                   .WORD_DIGITS(WD), .WORD_BITS(WB)) u_mm (
    .clk, .rst_n, .cmd_valid_i(mm_valid), .cmd_i(mm_cmd), .handle_i(mm_handle),
    .words_i(mm_words), .sign_i(mm_sign), .nd_i(mm_nd),
    .busy_o(mm_busy), .done_o(mm_done), .err_o(mm_err), .handle_o(mm_handle_o),
    .sign_o(mm_sign_o), .nd_o(mm_nd_o), .msw_o(mm_msw), .lsw_o(mm_lsw),
    .set_top_i(mm_set_top), .top_word_i(mm_top_word), .installed_top_o(mm_installed),
    .free_words_o(mm_free_words), .free_desc_o(mm_free_desc), .live_o(mm_live),
    .last_handle_o(mm_last), .gc_runs_o(mm_gc_runs), .reuse_count_o(mm_reuse),
    .dptr_addr_o, .dptr_we_o, .dptr_wdata_o, .dptr_rdata_i,
    .desc_addr_o, .desc_we_o, .desc_wdata_o, .desc_rdata_i,
    .dmem_addr_o(mm_dmem_addr), .dmem_we_o(mm_dmem_we), .dmem_wdata_o(mm_dmem_wdata),
    .dmem_rdata_i(dmem_rdata_i));

  // ------------------------------------------------------------------
  // sequencer state
  typedef enum logic [5:0] {
    C_IDLE, C_OPND, C_EXEC, C_RES,
    C_LKA, C_LKA_W, C_LKB, C_LKB_W, C_DISPATCH,
    C_ALLOC, C_ALLOC_W, C_CREATE_WR, C_UPD, C_UPD_W, C_DSA, C_DSA_W, C_DSB, C_DSB_W, C_FINISH,
    C_SIMPLE_W,
    C_W0, C_W1, C_W2, C_W3,
    C_M0, C_M1, C_M2, C_M3, C_M4, C_M5, C_M6, C_M7,
    C_A0, C_A1, C_A2, C_A3, C_R0, C_R1, C_RDRAIN,
    C_GC_W
  } cstate_e;

  typedef struct packed {
    logic                  sign;
    logic [20:0]           nd;
    logic [DADDR_BITS-1:0] lsw;
  } desc_t;

  cstate_e               state, ret_state;
  msg_op_e               op;
  logic                  fl_f, fl_d, fl_i, future_sent;
  logic [1:0]            nops, opnd_idx;
  logic [19:0]           opnd [3];
  logic [19:0]           res [2];
  logic [1:0]            nres, res_idx;
  desc_t                 da, db;
  logic [HANDLE_BITS-1:0] hr;
  logic [DADDR_BITS-1:0] r_lsw;
  logic [AW-1:0]         wr, k;
  logic [20:0]           j;
  logic                  first;
  logic signed [1:0]     a_carry;
  logic signed [3:0]     m_carry;
  sd_digit_t             sp_carry;
  logic [WB-1:0]         abuf;
  logic                  r_sign;
  logic [20:0]           r_nd;
  logic [19:0]           nchunks, chunk;
  logic signed [1:0]     cv_carry;
  logic [31:0]           sdv_count, fastcmp_count;

  // words actually holding digits of a number (0 for zero)
  function automatic logic [AW-1:0] words_of(input logic [20:0] nd);
    return (AW'(nd) + AW'(WD - 1)) >> WSH;
  endfunction

  function automatic logic [AW-1:0] max_w(input logic [AW-1:0] x, input logic [AW-1:0] y);
    return (x > y) ? x : y;
  endfunction

  // leading zeros of the whole word from the per-chip counts, and the sign
  logic [AW-1:0] lz_total;
  logic          word_neg;
  always_comb begin
    logic stop;
    lz_total = '0; word_neg = 1'b0; stop = 1'b0;
    for (int c = NC - 1; c >= 0; c--) begin
      if (!stop) begin
        lz_total = lz_total + AW'(lz_i[c*5 +: 5]);
        if (lz_i[c*5 +: 5] < 5'd16) begin stop = 1'b1; word_neg = neg_i[c]; end
      end
    end
  end

  // 32-bit two's complement to signed digits (8 digits, all in -8..8)
  sd_digit_t [WD-1:0] create_digits;
  logic [20:0]        create_nd;
  logic               create_neg;
  always_comb begin
    logic [31:0] v;
    dval_t       n, c;
    v = {opnd[0][15:0], opnd[1][15:0]};
    create_digits = '0; create_nd = '0; create_neg = 1'b0; c = '0;
    for (int i = 0; i < 8; i++) begin
      n = 7'(v[i*4 +: 4]) + c;
      if (i == 7) n = $signed({{3{v[31]}}, v[31:28]}) + c;
      else if (n >= 7'sd8) begin n = n - 7'sd16; c = 7'sd1; end
      else c = 7'sd0;
      create_digits[i] = sd_encode(n);
      if (n != 7'sd0) begin create_nd = 21'(i + 1); create_neg = (n < 7'sd0); end
    end
  end

  // one 16-bit chunk of the two's complement value of the digits in abuf
  logic [15:0]       chunk_bits;
  logic signed [1:0] chunk_carry;
  always_comb begin
    logic signed [19:0] acc;
    logic [AW-1:0]      g;
    logic [WSH-1:0]     off;
    acc = 20'(cv_carry);
    for (int i = 0; i < 4; i++) begin
      g   = AW'({chunk, 2'b00}) + AW'(i);
      off = WSH'(g);
      if (g < AW'(da.nd))
        acc = acc + (20'(sd_value(sd_load(abuf[off*5 +: 5]))) <<< (4 * i));
    end
    chunk_bits  = acc[15:0];
    chunk_carry = 2'(acc >>> 16);
  end

  // current multiplier digit a_j
  sd_digit_t a_digit;
  assign a_digit = sd_load(abuf[5*WSH'(j) +: 5]);

  // cmp, sign and digits with d destroy their operands before answering
  cstate_e after_query;
  assign after_query = fl_d ? C_DSA : C_RES;

  // a word of stored zero digits (code 10), the fill of a partly restored word
  localparam logic [WB-1:0] STORED_ZEROS = {WD{5'd10}};

  // save: four stored digits of abuf, unconverted
  logic [19:0] save_bits;
  assign save_bits = abuf[5 * WSH'({chunk, 2'b00}) +: 20];

  // result sensing of the word being produced
  logic [20:0] sensed_nd;
  assign sensed_nd = 21'((k << WSH) + AW'(WD) - lz_total);

  // ------------------------------------------------------------------
  // outputs driven per state
  always_comb begin
    port_ready = 1'b0; tx_valid = 1'b0; tx_data = '0;
    instr_o = '{op: OP_NOP, rx: 2'd0, ry: 2'd0, rz: 2'd0};
    q_o = SD_ZERO; a_t_o = 2'sd0; m_t_o = 4'sd0; dbl_t_o = 2'sd0;
    sp0_o = SD_ZERO; sp1_o = SD_ZERO; rpos_o = 1'b0;
    dmem_addr_o = '0; dmem_we_o = 1'b0; dmem_ctl_drive_o = 1'b0; dmem_wdata_o = '0;
    mm_valid = 1'b0; mm_cmd = MM_LOOKUP; mm_handle = '0; mm_words = '0; mm_sign = 1'b0;
    mm_nd = '0; mm_set_top = 1'b0; mm_top_word = {opnd[1][DADDR_BITS-3:0], 2'b11};
    unique case (state)
      C_IDLE:  begin port_ready = !mm_busy; tx_valid = rx_valid; end
      C_OPND:  begin port_ready = 1'b1; tx_valid = rx_valid; end
      C_RES:   begin port_ready = 1'b1; tx_valid = rx_valid; tx_data = res[res_idx[0]]; end
      C_A0:    begin port_ready = 1'b1; tx_valid = rx_valid; tx_data = nchunks; end
      C_A3:    begin port_ready = 1'b1; tx_valid = rx_valid;
                     tx_data = (op == MSG_SAVE) ? save_bits : {4'd0, chunk_bits}; end
      C_R0, C_RDRAIN: begin port_ready = 1'b1; tx_valid = rx_valid; end
      C_R1: begin
        dmem_addr_o = DADDR_BITS'(r_lsw + k); dmem_we_o = (k < wr); dmem_ctl_drive_o = 1'b1;
        dmem_wdata_o = abuf;
      end
      C_LKA:   begin mm_valid = 1'b1; mm_cmd = MM_LOOKUP; mm_handle = HANDLE_BITS'(opnd[0]); end
      C_LKB:   begin mm_valid = 1'b1; mm_cmd = MM_LOOKUP; mm_handle = HANDLE_BITS'(opnd[1]); end
      C_ALLOC: begin mm_valid = 1'b1; mm_cmd = MM_ALLOC; mm_words = wr; end
      C_UPD:   begin mm_valid = 1'b1; mm_cmd = MM_UPDATE; mm_handle = hr;
                     mm_sign = r_sign; mm_nd = r_nd; end
      C_DSA:   begin mm_valid = 1'b1; mm_cmd = MM_DESTROY; mm_handle = HANDLE_BITS'(opnd[0]); end
      C_DSB:   begin mm_valid = 1'b1; mm_cmd = MM_DESTROY; mm_handle = HANDLE_BITS'(opnd[1]); end
      C_EXEC: begin
        if (op == MSG_DESTROY) begin mm_valid = 1'b1; mm_cmd = MM_DESTROY; mm_handle = HANDLE_BITS'(opnd[0]); end
        if (op == MSG_GC)      begin mm_valid = 1'b1; mm_cmd = MM_GC; end
        if (op == MSG_SETREG && opnd[0] == 20'd0) mm_set_top = 1'b1;
      end
      C_CREATE_WR: begin
        dmem_addr_o = r_lsw; dmem_we_o = 1'b1; dmem_ctl_drive_o = 1'b1;
        for (int i = 0; i < WD; i++) dmem_wdata_o[i*5 +: 5] = sd_store(create_digits[i]);
      end
      // add / sub / neg / cmp, one word
      C_W0: begin
        dmem_addr_o = DADDR_BITS'(da.lsw + k);
        instr_o = '{op: OP_CLR, rx: 2'd0, ry: 2'd0, rz: 2'd3};
      end
      C_W1: begin
        dmem_addr_o = DADDR_BITS'(db.lsw + k);
        instr_o = '{op: (k < words_of(da.nd)) ? OP_LOAD : OP_CLR, rx: 2'd0, ry: 2'd0, rz: 2'd0};
      end
      C_W2: instr_o = '{op: (k < words_of(db.nd) && op != MSG_NEG) ? OP_LOAD : OP_CLR,
                        rx: 2'd0, ry: 2'd0, rz: 2'd1};
      C_W3: begin
        if (op == MSG_ADD) instr_o = '{op: OP_ADDST, rx: 2'd0, ry: 2'd1, rz: 2'd0};
        else if (op == MSG_NEG) instr_o = '{op: OP_SUBST, rx: 2'd3, ry: 2'd0, rz: 2'd0};
        else instr_o = '{op: OP_SUBST, rx: 2'd0, ry: 2'd1, rz: 2'd0};
        a_t_o = a_carry;
        dmem_addr_o = DADDR_BITS'(r_lsw + k);
        dmem_we_o = (op != MSG_CMP);
      end
      // multiplication
      C_M0: dmem_addr_o = DADDR_BITS'(da.lsw + (AW'(j) >> WSH));
      C_M2: dmem_addr_o = DADDR_BITS'(r_lsw + k);
      C_M3: begin
        instr_o = '{op: first ? OP_CLR : OP_LOAD, rx: 2'd0, ry: 2'd0, rz: 2'd0};
        dmem_addr_o = DADDR_BITS'(db.lsw + k);
      end
      C_M4: instr_o = '{op: (k < words_of(db.nd)) ? OP_LOAD : OP_CLR, rx: 2'd0, ry: 2'd0, rz: 2'd1};
      C_M5: begin instr_o = '{op: OP_SHL, rx: 2'd0, ry: 2'd0, rz: 2'd0}; sp0_o = sp_carry; end
      C_M6: begin
        instr_o = '{op: OP_MAC, rx: 2'd0, ry: 2'd1, rz: 2'd2};
        q_o = a_digit; a_t_o = a_carry; m_t_o = m_carry;
      end
      C_M7: begin
        instr_o = '{op: OP_STORE, rx: 2'd2, ry: 2'd0, rz: 2'd0};
        dmem_addr_o = DADDR_BITS'(r_lsw + k); dmem_we_o = 1'b1;
      end
      C_A1: dmem_addr_o = DADDR_BITS'(da.lsw + (AW'({chunk, 2'b00}) >> WSH));
      default: ;
    endcase
    // the memory manager owns digit memory while it is busy (collection)
    if (mm_busy) begin
      dmem_addr_o = mm_dmem_addr; dmem_we_o = mm_dmem_we; dmem_ctl_drive_o = 1'b1;
      dmem_wdata_o = mm_dmem_wdata;
    end
  end

  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE; ret_state <= C_IDLE; op <= MSG_GC;
      fl_f <= 1'b0; fl_d <= 1'b0; fl_i <= 1'b0; future_sent <= 1'b0;
      nops <= '0; opnd_idx <= '0; opnd[0] <= '0; opnd[1] <= '0; opnd[2] <= '0;
      res[0] <= '0; res[1] <= '0; nres <= '0; res_idx <= '0;
      da <= '0; db <= '0; hr <= '0; r_lsw <= '0; wr <= '0; k <= '0; j <= '0; first <= 1'b0;
      a_carry <= '0; m_carry <= '0; sp_carry <= SD_ZERO; abuf <= '0;
      r_sign <= 1'b0; r_nd <= '0; nchunks <= '0; chunk <= '0; cv_carry <= '0;
      sdv_count <= '0; fastcmp_count <= '0;
    end else begin
      unique case (state)
        C_IDLE: if (rx_valid) begin
          op <= msg_op_e'(rx_data[4:0]);
          fl_f <= rx_data[FLAG_F]; fl_d <= rx_data[FLAG_D]; fl_i <= rx_data[FLAG_I];
          future_sent <= 1'b0; opnd_idx <= '0; res_idx <= '0;
          unique case (msg_op_e'(rx_data[4:0]))
            MSG_GC: begin nops <= 2'd0; state <= C_EXEC; end
            MSG_RESTORE: begin nops <= 2'd3; state <= C_OPND; end
            MSG_DESTROY, MSG_ASSIM, MSG_SAVE, MSG_NEG, MSG_SQRT, MSG_SIGN, MSG_DIGITS, MSG_GETREG:
              begin nops <= 2'd1; state <= C_OPND; end
            default: begin nops <= 2'd2; state <= C_OPND; end
          endcase
        end
        C_OPND: if (rx_valid) begin
          opnd[opnd_idx] <= rx_data;
          opnd_idx <= opnd_idx + 1'b1;
          if (opnd_idx + 1'b1 == nops) state <= C_EXEC;
        end
        C_EXEC: begin
          nres <= 2'd1; res[0] <= '0;
          unique case (op)
            MSG_CREATE: begin wr <= AW'(1); state <= C_ALLOC; end
            MSG_DESTROY: state <= C_SIMPLE_W;
            MSG_GC: state <= C_GC_W;
            MSG_SETREG: state <= C_RES;
            MSG_GETREG: begin
              unique case (opnd[0][2:0])
                3'd0: res[0] <= 20'(mm_installed >> 2);
                3'd1: res[0] <= 20'(mm_free_words >> 2);
                3'd2: res[0] <= (mm_live > (HANDLE_BITS+1)'(20'hFFFFF)) ? 20'hFFFFF : 20'(mm_live);
                3'd3: res[0] <= 20'(mm_last);
                3'd4: res[0] <= 20'(mm_gc_runs);
                3'd5: res[0] <= 20'(sdv_count);
                3'd6: res[0] <= 20'(fastcmp_count);
                default: res[0] <= 20'(mm_reuse);
              endcase
              state <= C_RES;
            end
            MSG_RESTORE: begin
              // pseudo-descriptor: sign in bit 19 of desc0, digit count in
              // desc0[0] and desc1; then the number of 4-digit chunks
              r_sign <= opnd[0][19]; r_nd <= {opnd[0][0], opnd[1]};
              wr <= (words_of({opnd[0][0], opnd[1]}) == '0) ? AW'(1)
                                                          : words_of({opnd[0][0], opnd[1]});
              nchunks <= opnd[2]; chunk <= '0; k <= '0; abuf <= STORED_ZEROS; state <= C_ALLOC;
            end
            MSG_NEG, MSG_ADD, MSG_SUB, MSG_MUL, MSG_CMP, MSG_SIGN, MSG_DIGITS, MSG_ASSIM, MSG_SAVE:
              state <= C_LKA;
            default: begin res[0] <= REPLY_BAD_MSG; state <= C_RES; end
          endcase
        end
        C_SIMPLE_W: if (mm_done) state <= C_RES;      // destroy answers nil
        C_GC_W: if (mm_done) state <= C_IDLE;
        // -------------------------------------------------- operand lookup
        C_LKA: state <= C_LKA_W;
        C_LKA_W: if (mm_done) begin
          da <= '{sign: mm_sign_o, nd: mm_nd_o, lsw: mm_lsw};
          if (mm_err != 2'd0) begin res[0] <= REPLY_BAD_MSG; state <= C_RES; end
          else if (op == MSG_ADD || op == MSG_SUB || op == MSG_MUL || op == MSG_CMP) state <= C_LKB;
          else state <= C_DISPATCH;
        end
        C_LKB: state <= C_LKB_W;
        C_LKB_W: if (mm_done) begin
          db <= '{sign: mm_sign_o, nd: mm_nd_o, lsw: mm_lsw};
          if (mm_err != 2'd0) begin res[0] <= REPLY_BAD_MSG; state <= C_RES; end
          else state <= C_DISPATCH;
        end
        C_DISPATCH: begin
          k <= '0; a_carry <= '0; m_carry <= '0; sp_carry <= SD_ZERO;
          r_nd <= '0; r_sign <= 1'b0;
          unique case (op)
            MSG_SIGN: begin res[0] <= {19'd0, da.sign}; state <= after_query; end
            MSG_DIGITS: begin
              res[0] <= 20'(da.nd >> 16); res[1] <= {4'd0, da.nd[15:0]}; nres <= 2'd2;
              state <= after_query;
            end
            MSG_SAVE: begin
              res[0] <= {da.sign, 19'(da.nd >> 20)}; res[1] <= 20'(da.nd); nres <= 2'd2;
              nchunks <= 20'((da.nd + 21'd3) >> 2); chunk <= '0; state <= C_RES;
            end
            MSG_ASSIM: begin
              nchunks <= 20'(da.nd >> 2) + 1'b1; chunk <= '0; cv_carry <= '0; state <= C_A0;
            end
            MSG_NEG: begin
              wr <= (words_of(da.nd) == '0) ? AW'(1) : words_of(da.nd);
              if (fl_i) begin
                hr <= HANDLE_BITS'(opnd[0]); r_lsw <= da.lsw; state <= C_W0;
              end else state <= C_ALLOC;
            end
            MSG_ADD, MSG_SUB: begin
              wr <= words_of(21'(max_w(AW'(da.nd), AW'(db.nd))) + 1'b1);
              state <= C_ALLOC;
            end
            MSG_CMP: begin
              // fast decisions from the cached signs and digit counts
              if (da.nd == '0 && db.nd == '0) begin
                res[0] <= 20'd0; fastcmp_count <= fastcmp_count + 1'b1; state <= after_query;
              end else if (da.nd != '0 && db.nd != '0 && da.sign != db.sign) begin
                res[0] <= da.sign ? 20'hFFFFF : 20'd1; fastcmp_count <= fastcmp_count + 1'b1;
                state <= after_query;
              end else if ((da.nd == '0) != (db.nd == '0)) begin
                res[0] <= ((da.nd != '0) ? ~da.sign : db.sign) ? 20'd1 : 20'hFFFFF;
                fastcmp_count <= fastcmp_count + 1'b1; state <= after_query;
              end else if (da.nd >= db.nd + 21'd2 || db.nd >= da.nd + 21'd2) begin
                res[0] <= ((da.nd > db.nd) ^ da.sign) ? 20'd1 : 20'hFFFFF;
                fastcmp_count <= fastcmp_count + 1'b1; state <= after_query;
              end else begin
                wr <= words_of(21'(max_w(AW'(da.nd), AW'(db.nd))) + 1'b1);
                state <= C_W0;
              end
            end
            MSG_MUL: begin
              wr <= words_of(da.nd + db.nd + 1'b1);
              state <= C_ALLOC;
            end
            default: begin res[0] <= REPLY_BAD_MSG; state <= C_RES; end
          endcase
        end
        // -------------------------------------------------- allocation
        C_ALLOC: state <= C_ALLOC_W;
        C_ALLOC_W: if (mm_done) begin
          hr <= mm_handle_o; r_lsw <= mm_lsw; res[0] <= 20'(mm_handle_o);
          if (mm_err == 2'd1) begin
            res[0] <= REPLY_NO_HANDLE; state <= (op == MSG_RESTORE && nchunks != '0) ? C_RDRAIN : C_RES;
          end else if (mm_err != 2'd0) begin
            res[0] <= REPLY_NO_MEMORY; state <= (op == MSG_RESTORE && nchunks != '0) ? C_RDRAIN : C_RES;
          end else if (op == MSG_RESTORE) state <= (nchunks == '0) ? C_UPD : C_R0;
          else if (op == MSG_CREATE) state <= C_CREATE_WR;
          else begin
            ret_state <= (op == MSG_MUL) ? C_M0 : C_W0;
            j <= da.nd - 1'b1; first <= 1'b1;
            if (op == MSG_MUL && (da.nd == '0 || db.nd == '0)) begin
              ret_state <= C_UPD;                         // product is zero
            end
            if (fl_f) begin future_sent <= 1'b1; state <= C_RES; end
            else if (op == MSG_MUL && (da.nd == '0 || db.nd == '0)) state <= C_UPD;
            else state <= (op == MSG_MUL) ? C_M0 : C_W0;
          end
        end
        C_CREATE_WR: begin r_nd <= create_nd; r_sign <= create_neg; state <= C_UPD; end
        // -------------------------------------------------- add / sub / neg / cmp
        C_W0: state <= C_W1;
        C_W1: state <= C_W2;
        C_W2: state <= C_W3;
        C_W3: begin
          a_carry <= a_t_i;
          if (lz_total < AW'(WD)) begin r_nd <= sensed_nd; r_sign <= word_neg; end
          if (k + 1'b1 == wr) begin
            if (sdv_i && k == '0) sdv_count <= sdv_count + 1'b1;
            if (op == MSG_CMP) begin
              // sign of a-b, zero if no digit was left
              if (lz_total < AW'(WD)) res[0] <= word_neg ? 20'hFFFFF : 20'd1;
              else if (r_nd == '0) res[0] <= 20'd0;
              else res[0] <= r_sign ? 20'hFFFFF : 20'd1;
              state <= after_query;
            end else state <= C_UPD;
          end else begin
            k <= k + 1'b1; state <= C_W0;
          end
        end
        // -------------------------------------------------- multiplication
        C_M0: state <= C_M1;
        C_M1: begin abuf <= dmem_rdata_i; k <= '0; a_carry <= '0; m_carry <= '0;
                    sp_carry <= SD_ZERO; state <= C_M2; end
        C_M2: state <= C_M3;
        C_M3: state <= C_M4;
        C_M4: state <= C_M5;
        C_M5: begin sp_carry <= sp0_i; state <= C_M6; end
        C_M6: begin
          a_carry <= a_t_i; m_carry <= m_t_i;
          if (j == '0 && lz_total < AW'(WD)) begin r_nd <= sensed_nd; r_sign <= word_neg; end
          state <= C_M7;
        end
        C_M7: begin
          if (k + 1'b1 != wr) begin k <= k + 1'b1; state <= C_M2; end
          else if (j == '0) state <= C_UPD;
          else begin j <= j - 1'b1; first <= 1'b0; state <= C_M0; end
        end
        // -------------------------------------------------- finish
        C_UPD: state <= C_UPD_W;
        C_UPD_W: if (mm_done)
          state <= (fl_d && op != MSG_CREATE && op != MSG_RESTORE && !(op == MSG_NEG && fl_i))
                   ? C_DSA : C_FINISH;
        C_DSA: state <= C_DSA_W;
        C_DSA_W: if (mm_done)
          state <= (op == MSG_ADD || op == MSG_SUB || op == MSG_MUL || op == MSG_CMP) ? C_DSB : C_FINISH;
        C_DSB: state <= C_DSB_W;
        C_DSB_W: if (mm_done) state <= C_FINISH;
        C_FINISH: begin
          if (op != MSG_CMP && op != MSG_SIGN && op != MSG_DIGITS) res[0] <= 20'(hr);
          state <= future_sent ? C_IDLE : C_RES;
        end
        // -------------------------------------------------- results
        C_RES: if (rx_valid) begin
          res_idx <= res_idx + 1'b1;
          if (res_idx + 1'b1 == nres)
            state <= future_sent ? ret_state : (op == MSG_SAVE) ? C_A0 : C_IDLE;
        end
        // -------------------------------------------------- assim
        C_A0: if (rx_valid) state <= (nchunks == '0) ? C_IDLE : C_A1;
        C_A1: state <= C_A2;
        C_A2: begin abuf <= dmem_rdata_i; state <= C_A3; end
        C_A3: if (rx_valid) begin
          cv_carry <= chunk_carry;
          chunk <= chunk + 1'b1;
          if (chunk + 1'b1 == nchunks) state <= C_IDLE;
          else if (WSH'({chunk + 1'b1, 2'b00}) == '0) state <= C_A1;
        end
        // -------------------------------------------------- restore
        C_R0: if (rx_valid) begin
          abuf[5 * WSH'({chunk, 2'b00}) +: 20] <= rx_data;
          chunk <= chunk + 1'b1;
          if (chunk + 1'b1 == nchunks || WSH'({chunk + 1'b1, 2'b00}) == '0) state <= C_R1;
        end
        C_R1: begin
          abuf <= STORED_ZEROS; k <= k + 1'b1;
          state <= (chunk == nchunks) ? C_UPD : C_R0;
        end
        C_RDRAIN: if (rx_valid) begin
          chunk <= chunk + 1'b1;
          if (chunk + 1'b1 == nchunks) state <= C_RES;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // loops and sensors this sequencer does not use
  logic unused;
  assign unused = ^{dbl_t_i, sp1_i, rpos_i, need_norm_i, lsd_i, mm_msw, mm_free_desc,
                    1'b0};
endmodule
