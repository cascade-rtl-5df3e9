// cascade_top: the Cascade variable-precision integer processor: one
// control module and 2^N arithmetic modules of 16 digits each, so the
// arithmetic datapath and digit memory word are 16*2^N digits wide.
// The host sees only the request/acknowledge message port with a 20-bit
// data bus (modelled as separate in and out buses). Inside, the control
// module broadcasts the instruction word and digit q to all arithmetic
// modules and drives the common digit-memory address. The transfer-digit
// loops (addition, multiplication, doubling) and shift path sp0 run from
// module 0 (least significant) upward, shift path sp1 and the root
// position chain downward; the control chip closes each loop. The sdv line
// is the wired-AND of all modules' single-digit-value outputs.
// Defaults: one arithmetic module (N = 0), 20-bit handles, 4 M-word digit
// memory; the number of modules is this design's choice. At that size the
// synthesized netlist is too large to write out (see digit_memory).
module cascade_top
  import cascade_pkg::*;
#(
  parameter int unsigned N           = 0,
  parameter int unsigned HANDLE_BITS = 20,
  parameter int unsigned DADDR_BITS  = 22
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_i,
  input  logic [19:0] data_i,
  output logic        ack_o,
  output logic [19:0] data_o
);
  localparam int unsigned NC = 2**N;

  instr_t                  instr;
  sd_digit_t               q;
  logic [DADDR_BITS-1:0]   dmem_addr;
  logic                    dmem_we, dmem_ctl_drive;
  logic [NC*80-1:0]        dmem_wdata, dmem_rdata;
  logic signed [1:0]       a_t [NC+1];
  logic signed [3:0]       m_t [NC+1];
  logic signed [1:0]       dbl_t [NC+1];
  sd_digit_t               sp0 [NC+1];
  sd_digit_t               sp1 [NC+1];     // sp1[c] enters module c from above
  logic                    rpos [NC+1];
  logic [NC-1:0]           neg, sdv, need_norm;
  logic [NC*5-1:0]         lz;
  sd_digit_t               lsd [NC];
  sd_digit_t               sp1_low;
  logic                    rpos_low;

  control_module #(.N(N), .HANDLE_BITS(HANDLE_BITS), .DADDR_BITS(DADDR_BITS)) u_control (
    .clk, .rst_n, .req_i, .data_i, .ack_o, .data_o, .instr_o(instr), .q_o(q),
    .a_t_o(a_t[0]), .a_t_i(a_t[NC]), .m_t_o(m_t[0]), .m_t_i(m_t[NC]),
    .dbl_t_o(dbl_t[0]), .dbl_t_i(dbl_t[NC]), .sp0_o(sp0[0]), .sp0_i(sp0[NC]),
    .sp1_o(sp1[NC-1]), .sp1_i(sp1_low), .rpos_o(rpos[NC-1]), .rpos_i(rpos_low),
    .neg_i(neg), .lz_i(lz), .need_norm_i(need_norm[NC-1]), .sdv_i(&sdv), .lsd_i(lsd[0]),
    .dmem_addr_o(dmem_addr), .dmem_we_o(dmem_we), .dmem_ctl_drive_o(dmem_ctl_drive),
    .dmem_wdata_o(dmem_wdata), .dmem_rdata_i(dmem_rdata));

  for (genvar c = 0; c < NC; c++) begin : g_mod
    sd_digit_t sp1_out;
    logic      rpos_out;
    arith_module #(.DADDR_BITS(DADDR_BITS), .IS_LOW(c == 0)) u_mod (
      .clk, .rst_n, .instr_i(instr), .q_i(q),
      .mem_addr_i(dmem_addr), .mem_we_i(dmem_we), .ctl_drive_i(dmem_ctl_drive),
      .ctl_wdata_i(dmem_wdata[c*80 +: 80]), .mem_rdata_o(dmem_rdata[c*80 +: 80]),
      .a_t_i(a_t[c]), .a_t_o(a_t[c+1]), .m_t_i(m_t[c]), .m_t_o(m_t[c+1]),
      .dbl_t_i(dbl_t[c]), .dbl_t_o(dbl_t[c+1]), .sp0_i(sp0[c]), .sp0_o(sp0[c+1]),
      .sp1_i(sp1[c]), .sp1_o(sp1_out), .rpos_i(rpos[c]), .rpos_o(rpos_out),
      .neg_o(neg[c]), .lz_o(lz[c*5 +: 5]), .need_norm_o(need_norm[c]), .sdv_o(sdv[c]),
      .lsd_o(lsd[c]));
    if (c == 0) begin : g_low
      assign sp1_low  = sp1_out;
      assign rpos_low = rpos_out;
    end else begin : g_up
      assign sp1[c-1]  = sp1_out;
      assign rpos[c-1] = rpos_out;
    end
  end
  assign sp1[NC] = SD_ZERO;
  assign rpos[NC] = 1'b0;
endmodule
