// control_module_tb: the control module (control chip and management
// memory) with one arithmetic module attached, reduced to 64 handles and
// 256 digit-memory words. Runs the shared message sequence: create, add,
// sub, multiply, negate, sign, compare, digits, destroy, gc, and checks
// every value read back with assim.
module control_module_tb;
  import cascade_pkg::*;
  localparam int unsigned HB = 6, DA = 8;
  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0, ack;
  logic [19:0] din = '0, dout;
  int checks = 0, failures = 0;
  `include "cascade_host_tasks.svh"

  instr_t instr;
  sd_digit_t q, sp0, sp1, lsd, sp0_top, sp1_low;
  logic [DA-1:0] addr;
  logic we, drive, neg, sdv, need, rpos, rpos_low, rpos_top;
  logic [79:0] wdata, rdata;
  logic signed [1:0] a_lo, a_hi, d_lo, d_hi;
  logic signed [3:0] m_lo, m_hi;
  logic [4:0] lz;

  control_module #(.N(0), .HANDLE_BITS(HB), .DADDR_BITS(DA)) dut (
    .clk, .rst_n, .req_i(req), .data_i(din), .ack_o(ack), .data_o(dout), .instr_o(instr), .q_o(q),
    .a_t_o(a_lo), .a_t_i(a_hi), .m_t_o(m_lo), .m_t_i(m_hi), .dbl_t_o(d_lo), .dbl_t_i(d_hi),
    .sp0_o(sp0), .sp0_i(sp0_top), .sp1_o(sp1), .sp1_i(sp1_low), .rpos_o(rpos), .rpos_i(rpos_low),
    .neg_i(neg), .lz_i(lz), .need_norm_i(need), .sdv_i(sdv), .lsd_i(lsd),
    .dmem_addr_o(addr), .dmem_we_o(we), .dmem_ctl_drive_o(drive), .dmem_wdata_o(wdata),
    .dmem_rdata_i(rdata));

  arith_module #(.DADDR_BITS(DA), .IS_LOW(1'b1)) u_am (
    .clk, .rst_n, .instr_i(instr), .q_i(q), .mem_addr_i(addr), .mem_we_i(we), .ctl_drive_i(drive),
    .ctl_wdata_i(wdata), .mem_rdata_o(rdata), .a_t_i(a_lo), .a_t_o(a_hi), .m_t_i(m_lo), .m_t_o(m_hi),
    .dbl_t_i(d_lo), .dbl_t_o(d_hi), .sp0_i(sp0), .sp0_o(sp0_top), .sp1_i(sp1), .sp1_o(sp1_low),
    .rpos_i(rpos), .rpos_o(rpos_low), .neg_o(neg), .lz_o(lz), .need_norm_o(need), .sdv_o(sdv),
    .lsd_o(lsd));

  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    `include "cascade_basic_seq.svh"
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
