// memory_manager: the hardware memory management of the control chip.
//
// It owns the management memory and, during garbage collection, the digit
// memory, and serves one command at a time from the control sequencer:
//   MM_ALLOC   w words: circular handle search starting after the last
//              handle allocated. A free handle that refers to no garbage is
//              given a new descriptor and w words from the top of the free
//              digit memory. A free handle that still refers to a garbage
//              number whose block holds at least w words is reused in place,
//              without collecting garbage. Otherwise, if some free handle was
//              seen, the garbage collector runs and the allocation is retried
//              for that handle. Returns the handle and its msw/lsw words.
//   MM_DESTROY marks the handle free and garbage, and its descriptor garbage.
//   MM_GC      compacting collector: descriptors are visited from the top of
//              descriptor space down; garbage ones are dropped (their handles
//              become free and clean), live ones move up over the dropped
//              space, their used digit words move up over freed and unused
//              words, and their pointers are adjusted.
//   MM_LOOKUP  returns sign, digit count, msw and lsw of a handle.
//   MM_UPDATE  writes sign and digit count of a handle's descriptor.
// Memory formats are described in mgmt_memory. Descriptors and digit blocks
// are both allocated from the top down, so their orders agree and no
// pointers cross. After reset the descriptor-pointer memory is swept so that
// every handle is free (2^HANDLE_BITS cycles, busy_o high).
// The algorithms follow the architecture's allocation and collection
// procedures; the state sequence, one memory access per part per cycle, is
// this design's own. The three highest handle values are never allocated;
// they are the error replies of the message port.
module memory_manager
  import cascade_pkg::*;
#(
  parameter int unsigned HANDLE_BITS  = 20,
  parameter int unsigned DADDR_BITS   = 22,
  parameter int unsigned WORD_DIGITS  = 16,   // digits per digit-memory word (power of two)
  parameter int unsigned WORD_BITS    = 80
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // command interface
  input  logic                    cmd_valid_i,
  input  mm_cmd_e                 cmd_i,
  input  logic [HANDLE_BITS-1:0]  handle_i,
  input  logic [DADDR_BITS:0]     words_i,
  input  logic                    sign_i,
  input  logic [20:0]             nd_i,
  output logic                    busy_o,
  output logic                    done_o,
  output logic [1:0]              err_o,      // 0 ok, 1 no handle, 2 no memory, 3 bad handle
  output logic [HANDLE_BITS-1:0]  handle_o,
  output logic                    sign_o,
  output logic [20:0]             nd_o,
  output logic [DADDR_BITS-1:0]   msw_o,
  output logic [DADDR_BITS-1:0]   lsw_o,
  // setup and status registers
  input  logic                    set_top_i,
  input  logic [DADDR_BITS-1:0]   top_word_i,
  output logic [DADDR_BITS-1:0]   installed_top_o,
  output logic [DADDR_BITS:0]     free_words_o,
  output logic [HANDLE_BITS:0]    free_desc_o,
  output logic [HANDLE_BITS:0]    live_o,
  output logic [HANDLE_BITS-1:0]  last_handle_o,
  output logic [31:0]             gc_runs_o,
  output logic [31:0]             reuse_count_o,
  // management memory
  output logic [HANDLE_BITS-1:0]  dptr_addr_o,
  output logic                    dptr_we_o,
  output logic [21:0]             dptr_wdata_o,
  input  logic [21:0]             dptr_rdata_i,
  output logic [HANDLE_BITS+1:0]  desc_addr_o,
  output logic                    desc_we_o,
  output logic [21:0]             desc_wdata_o,
  input  logic [21:0]             desc_rdata_i,
  // digit memory (used only while collecting garbage)
  output logic [DADDR_BITS-1:0]   dmem_addr_o,
  output logic                    dmem_we_o,
  output logic [WORD_BITS-1:0]    dmem_wdata_o,
  input  logic [WORD_BITS-1:0]    dmem_rdata_i
);
  localparam int unsigned HB = HANDLE_BITS;
  localparam logic [HB-1:0] TOP_HANDLE = HB'((2**HB) - 4);
  localparam logic [HB-1:0] TOP_DESC   = HB'((2**HB) - 1);
  localparam int unsigned   WSH = $clog2(WORD_DIGITS);

  typedef enum logic [5:0] {
    S_INIT, S_IDLE, S_DONE,
    S_LK0, S_LK1, S_LK2, S_LK3, S_LK4,
    S_UP0, S_UP1,
    S_DS0, S_DS1,
    S_AL_RD, S_AL_CHK, S_AL_G1, S_AL_G2, S_AL_G3, S_AL_END, S_AL_NEW, S_AL_N1, S_AL_N2, S_AL_N3,
    S_GC_START, S_GC_R0, S_GC_R1, S_GC_R2, S_GC_R3, S_GC_R4, S_GC_MV_RD, S_GC_MV_WR,
    S_GC_WD0, S_GC_WD1, S_GC_WD2, S_GC_WD3, S_GC_NEXT, S_GC_END
  } mstate_e;

  mstate_e state;
  logic [HB-1:0]         h, hcur, free_handle, last_handle;
  logic                  found_free, gc_for_alloc;
  logic [DADDR_BITS:0]   want, free_words;
  logic [DADDR_BITS-1:0] installed_top;
  logic [HB:0]           top_desc, live;
  logic [HB-1:0]         ref_idx, d;
  logic [HB:0]           drise;
  logic [DADDR_BITS:0]   wrise;
  logic [21:0]           w0, w1;
  logic [DADDR_BITS-1:0] msw, lsw, new_lsw;
  logic [DADDR_BITS:0]   used, mv;
  logic [1:0]            err;
  logic                  nsign;
  logic [20:0]           nnd;

  assign installed_top_o = installed_top;
  assign free_words_o    = free_words;
  assign free_desc_o     = top_desc;
  assign live_o          = live;
  assign last_handle_o   = last_handle;
  assign busy_o          = (state != S_IDLE);

  function automatic logic [HB-1:0] next_handle(input logic [HB-1:0] x);
    return (x >= TOP_HANDLE) ? '0 : x + 1'b1;
  endfunction

  // words a number of nd digits actually occupies (at least one)
  function automatic logic [DADDR_BITS:0] used_words(input logic [20:0] nd);
    logic [DADDR_BITS:0] u;
    u = ((DADDR_BITS+1)'(nd) + (DADDR_BITS+1)'(WORD_DIGITS - 1)) >> WSH;
    return (u == 0) ? 1 : u;
  endfunction

  always_comb begin
    dptr_addr_o = h; dptr_we_o = 1'b0; dptr_wdata_o = '0;
    desc_addr_o = '0; desc_we_o = 1'b0; desc_wdata_o = '0;
    dmem_addr_o = '0; dmem_we_o = 1'b0; dmem_wdata_o = dmem_rdata_i;
    unique case (state)
      S_INIT:   begin dptr_addr_o = hcur; dptr_we_o = 1'b1; dptr_wdata_o = {2'b10, 20'd0}; end
      S_LK0, S_UP0, S_DS0, S_AL_RD: dptr_addr_o = h;
      S_LK1:    desc_addr_o = {dptr_rdata_i[HB-1:0], 2'd1};
      S_LK2:    desc_addr_o = {ref_idx, 2'd2};
      S_LK3:    desc_addr_o = {ref_idx, 2'd3};
      S_UP1:    begin desc_addr_o = {dptr_rdata_i[HB-1:0], 2'd1}; desc_we_o = 1'b1;
                      desc_wdata_o = {nsign, nnd}; end
      S_DS1:    begin
                  dptr_addr_o = h; dptr_we_o = ~dptr_rdata_i[21];
                  dptr_wdata_o = {2'b11, 20'(dptr_rdata_i[HB-1:0])};
                  desc_addr_o = {dptr_rdata_i[HB-1:0], 2'd0}; desc_we_o = ~dptr_rdata_i[21];
                  desc_wdata_o = {2'b10, 20'(h)};
                end
      S_AL_CHK: desc_addr_o = {dptr_rdata_i[HB-1:0], 2'd2};
      S_AL_G1:  desc_addr_o = {ref_idx, 2'd3};
      S_AL_G3:  begin
                  dptr_addr_o = h; dptr_we_o = 1'b1; dptr_wdata_o = {2'b00, 20'(ref_idx)};
                  desc_addr_o = {ref_idx, 2'd0}; desc_we_o = 1'b1; desc_wdata_o = {2'b00, 20'(h)};
                end
      S_AL_NEW: begin
                  dptr_addr_o = h; dptr_we_o = 1'b1; dptr_wdata_o = {2'b00, 20'(top_desc - 1'b1)};
                  desc_addr_o = {HB'(top_desc - 1'b1), 2'd0}; desc_we_o = 1'b1;
                  desc_wdata_o = {2'b00, 20'(h)};
                end
      S_AL_N1:  begin desc_addr_o = {HB'(top_desc - 1'b1), 2'd1}; desc_we_o = 1'b1; desc_wdata_o = '0; end
      S_AL_N2:  begin desc_addr_o = {HB'(top_desc - 1'b1), 2'd2}; desc_we_o = 1'b1;
                      desc_wdata_o = 22'(free_words - 1'b1); end
      S_AL_N3:  begin desc_addr_o = {HB'(top_desc - 1'b1), 2'd3}; desc_we_o = 1'b1;
                      desc_wdata_o = 22'(free_words - want); end
      S_GC_R0:  desc_addr_o = {d, 2'd0};
      S_GC_R1:  desc_addr_o = {d, 2'd1};
      S_GC_R2:  desc_addr_o = {d, 2'd2};
      S_GC_R3:  desc_addr_o = {d, 2'd3};
      S_GC_R4:  if (w0[21]) begin   // garbage: its handle becomes free and clean
                  dptr_addr_o = HB'(w0[19:0]); dptr_we_o = 1'b1; dptr_wdata_o = {2'b10, 20'd0};
                end
      S_GC_MV_RD: dmem_addr_o = DADDR_BITS'(lsw + mv);
      S_GC_MV_WR: begin dmem_addr_o = DADDR_BITS'(lsw + mv + wrise); dmem_we_o = 1'b1; end
      S_GC_WD0: begin
                  desc_addr_o = {HB'(d + drise), 2'd0}; desc_we_o = 1'b1; desc_wdata_o = w0;
                  dptr_addr_o = HB'(w0[19:0]); dptr_we_o = 1'b1;
                  dptr_wdata_o = {2'b00, 20'(HB'(d + drise))};
                end
      S_GC_WD1: begin desc_addr_o = {HB'(d + drise), 2'd1}; desc_we_o = 1'b1; desc_wdata_o = w1; end
      S_GC_WD2: begin desc_addr_o = {HB'(d + drise), 2'd2}; desc_we_o = 1'b1;
                      desc_wdata_o = 22'(new_lsw + used - 1'b1); end
      S_GC_WD3: begin desc_addr_o = {HB'(d + drise), 2'd3}; desc_we_o = 1'b1;
                      desc_wdata_o = 22'(new_lsw); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT; hcur <= '0; h <= '0; done_o <= 1'b0; err_o <= '0; err <= '0;
      handle_o <= '0; sign_o <= 1'b0; nd_o <= '0; msw_o <= '0; lsw_o <= '0;
      last_handle <= TOP_HANDLE; free_handle <= '0; found_free <= 1'b0; gc_for_alloc <= 1'b0;
      want <= '0; free_words <= (DADDR_BITS+1)'(2**DADDR_BITS);
      installed_top <= DADDR_BITS'((2**DADDR_BITS) - 1);
      top_desc <= (HB+1)'(2**HB); live <= '0; ref_idx <= '0; d <= '0; drise <= '0; wrise <= '0;
      w0 <= '0; w1 <= '0; msw <= '0; lsw <= '0; new_lsw <= '0; used <= '0; mv <= '0;
      nsign <= 1'b0; nnd <= '0; gc_runs_o <= '0; reuse_count_o <= '0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        S_INIT: begin
          hcur <= hcur + 1'b1;
          if (hcur == HB'((2**HB) - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          if (set_top_i) begin
            installed_top <= top_word_i;
            free_words    <= (DADDR_BITS+1)'(top_word_i) + 1'b1;
          end
          if (cmd_valid_i) begin
            h <= handle_i; want <= words_i; nsign <= sign_i; nnd <= nd_i;
            err <= '0;
            unique case (cmd_i)
              MM_LOOKUP:  state <= S_LK0;
              MM_UPDATE:  state <= S_UP0;
              MM_DESTROY: state <= S_DS0;
              MM_ALLOC:   begin h <= next_handle(last_handle); found_free <= 1'b0;
                                gc_for_alloc <= 1'b0; state <= S_AL_RD; end
              MM_GC:      begin gc_for_alloc <= 1'b0; state <= S_GC_START; end
              default:    state <= S_DONE;
            endcase
          end
        end
        // ---------------- lookup
        S_LK0: state <= S_LK1;
        S_LK1: begin
          ref_idx <= dptr_rdata_i[HB-1:0];
          if (dptr_rdata_i[21]) begin err <= 2'd3; state <= S_DONE; end
          else state <= S_LK2;
        end
        S_LK2: begin sign_o <= desc_rdata_i[21]; nd_o <= desc_rdata_i[20:0]; state <= S_LK3; end
        S_LK3: begin msw_o <= desc_rdata_i[DADDR_BITS-1:0]; state <= S_LK4; end
        S_LK4: begin lsw_o <= desc_rdata_i[DADDR_BITS-1:0]; handle_o <= h; state <= S_DONE; end
        // ---------------- update
        S_UP0: state <= S_UP1;
        S_UP1: begin
          if (dptr_rdata_i[21]) err <= 2'd3;
          state <= S_DONE;
        end
        // ---------------- destroy
        S_DS0: state <= S_DS1;
        S_DS1: begin
          if (dptr_rdata_i[21]) err <= 2'd3;
          else live <= live - 1'b1;
          state <= S_DONE;
        end
        // ---------------- allocate
        S_AL_RD: state <= S_AL_CHK;
        S_AL_CHK: begin
          ref_idx <= dptr_rdata_i[HB-1:0];
          if (dptr_rdata_i[21] && !dptr_rdata_i[20] && free_words >= want) begin
            state <= S_AL_NEW;
          end else if (dptr_rdata_i[21] && dptr_rdata_i[20]) begin
            state <= S_AL_G1;                  // garbage: is its block big enough?
          end else begin
            if (dptr_rdata_i[21]) begin free_handle <= h; found_free <= 1'b1; end
            if (h == last_handle) state <= S_AL_END;
            else begin h <= next_handle(h); state <= S_AL_RD; end
          end
        end
        S_AL_G1: begin msw <= desc_rdata_i[DADDR_BITS-1:0]; state <= S_AL_G2; end
        S_AL_G2: begin
          lsw <= desc_rdata_i[DADDR_BITS-1:0];
          if ((DADDR_BITS+1)'(msw) - (DADDR_BITS+1)'(desc_rdata_i[DADDR_BITS-1:0]) + 1'b1 >= want)
            state <= S_AL_G3;
          else begin
            free_handle <= h; found_free <= 1'b1;
            if (h == last_handle) state <= S_AL_END;
            else begin h <= next_handle(h); state <= S_AL_RD; end
          end
        end
        S_AL_G3: begin
          // reuse in place: the block keeps its bounds, the sequencer rewrites sign/digits
          msw_o <= msw; lsw_o <= lsw; handle_o <= h; last_handle <= h;
          live <= live + 1'b1; reuse_count_o <= reuse_count_o + 1'b1;
          state <= S_DONE;
        end
        S_AL_END: begin
          if (!found_free) begin err <= 2'd1; state <= S_DONE; end
          else if (!gc_for_alloc) begin gc_for_alloc <= 1'b1; state <= S_GC_START; end
          else if (free_words >= want) begin h <= free_handle; state <= S_AL_NEW; end
          else begin err <= 2'd2; state <= S_DONE; end
        end
        S_AL_NEW: state <= S_AL_N1;
        S_AL_N1:  state <= S_AL_N2;
        S_AL_N2:  state <= S_AL_N3;
        S_AL_N3: begin
          msw_o <= DADDR_BITS'(free_words - 1'b1);
          lsw_o <= DADDR_BITS'(free_words - want);
          free_words <= free_words - want;
          top_desc <= top_desc - 1'b1;
          handle_o <= h; last_handle <= h; live <= live + 1'b1;
          state <= S_DONE;
        end
        // ---------------- garbage collection
        S_GC_START: begin
          d <= TOP_DESC; drise <= '0; wrise <= '0;
          gc_runs_o <= gc_runs_o + 1'b1;
          state <= (top_desc > (HB+1)'(TOP_DESC)) ? S_GC_END : S_GC_R0;
        end
        S_GC_R0: state <= S_GC_R1;
        S_GC_R1: begin w0 <= desc_rdata_i; state <= S_GC_R2; end
        S_GC_R2: begin w1 <= desc_rdata_i; state <= S_GC_R3; end
        S_GC_R3: begin msw <= desc_rdata_i[DADDR_BITS-1:0]; state <= S_GC_R4; end
        S_GC_R4: begin
          lsw <= desc_rdata_i[DADDR_BITS-1:0];
          if (w0[21]) begin
            drise <= drise + 1'b1;
            wrise <= wrise + (DADDR_BITS+1)'(msw) - (DADDR_BITS+1)'(desc_rdata_i[DADDR_BITS-1:0]) + 1'b1;
            state <= S_GC_NEXT;
          end else begin
            // unused words at the top of the block join the rise
            used  <= used_words(w1[20:0]);
            wrise <= wrise + (DADDR_BITS+1)'(msw) - (DADDR_BITS+1)'(desc_rdata_i[DADDR_BITS-1:0])
                     + 1'b1 - used_words(w1[20:0]);
            new_lsw <= DADDR_BITS'(desc_rdata_i[DADDR_BITS-1:0] + wrise + (DADDR_BITS+1)'(msw)
                     - (DADDR_BITS+1)'(desc_rdata_i[DADDR_BITS-1:0]) + 1'b1 - used_words(w1[20:0]));
            mv    <= used_words(w1[20:0]) - 1'b1;
            state <= S_GC_MV_RD;
          end
        end
        S_GC_MV_RD: state <= (wrise == '0) ? S_GC_WD0 : S_GC_MV_WR;
        S_GC_MV_WR: begin
          if (mv == '0) state <= S_GC_WD0;
          else begin mv <= mv - 1'b1; state <= S_GC_MV_RD; end
        end
        S_GC_WD0: state <= S_GC_WD1;
        S_GC_WD1: state <= S_GC_WD2;
        S_GC_WD2: state <= S_GC_WD3;
        S_GC_WD3: state <= S_GC_NEXT;
        S_GC_NEXT: begin
          if ((HB+1)'(d) == top_desc) state <= S_GC_END;
          else begin d <= d - 1'b1; state <= S_GC_R0; end
        end
        S_GC_END: begin
          free_words <= free_words + wrise;
          top_desc   <= top_desc + drise;
          state      <= gc_for_alloc ? S_AL_END : S_DONE;
        end
        S_DONE: begin
          done_o <= 1'b1; err_o <= err; state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
