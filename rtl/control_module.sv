// control_module: the Cascade control module, the control chip and its
// management memory (descriptor pointers and descriptors). It presents the
// external message port and the buses to the arithmetic modules: the
// instruction word and digit broadcast, digit memory address and control,
// the transfer/shift loops and the sensor lines.
module control_module
  import cascade_pkg::*;
#(
  parameter int unsigned N           = 0,
  parameter int unsigned HANDLE_BITS = 20,
  parameter int unsigned DADDR_BITS  = 22
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      req_i,
  input  logic [19:0]               data_i,
  output logic                      ack_o,
  output logic [19:0]               data_o,
  output instr_t                    instr_o,
  output sd_digit_t                 q_o,
  output logic signed [1:0]         a_t_o,
  input  logic signed [1:0]         a_t_i,
  output logic signed [3:0]         m_t_o,
  input  logic signed [3:0]         m_t_i,
  output logic signed [1:0]         dbl_t_o,
  input  logic signed [1:0]         dbl_t_i,
  output sd_digit_t                 sp0_o,
  input  sd_digit_t                 sp0_i,
  output sd_digit_t                 sp1_o,
  input  sd_digit_t                 sp1_i,
  output logic                      rpos_o,
  input  logic                      rpos_i,
  input  logic [(2**N)-1:0]         neg_i,
  input  logic [(2**N)*5-1:0]       lz_i,
  input  logic                      need_norm_i,
  input  logic                      sdv_i,
  input  sd_digit_t                 lsd_i,
  output logic [DADDR_BITS-1:0]     dmem_addr_o,
  output logic                      dmem_we_o,
  output logic                      dmem_ctl_drive_o,
  output logic [(2**N)*80-1:0]      dmem_wdata_o,
  input  logic [(2**N)*80-1:0]      dmem_rdata_i
);
  logic [HANDLE_BITS-1:0] dptr_addr;
  logic [HANDLE_BITS+1:0] desc_addr;
  logic                   dptr_we, desc_we;
  logic [21:0]            dptr_wdata, dptr_rdata, desc_wdata, desc_rdata;

  control_chip #(.N(N), .HANDLE_BITS(HANDLE_BITS), .DADDR_BITS(DADDR_BITS)) u_ctl (
    .clk, .rst_n, .req_i, .data_i, .ack_o, .data_o, .instr_o, .q_o,
    .a_t_o, .a_t_i, .m_t_o, .m_t_i, .dbl_t_o, .dbl_t_i, .sp0_o, .sp0_i, .sp1_o, .sp1_i,
    .rpos_o, .rpos_i, .neg_i, .lz_i, .need_norm_i, .sdv_i, .lsd_i,
    .dmem_addr_o, .dmem_we_o, .dmem_ctl_drive_o, .dmem_wdata_o, .dmem_rdata_i,
    .dptr_addr_o(dptr_addr), .dptr_we_o(dptr_we), .dptr_wdata_o(dptr_wdata),
    .dptr_rdata_i(dptr_rdata), .desc_addr_o(desc_addr), .desc_we_o(desc_we),
    .desc_wdata_o(desc_wdata), .desc_rdata_i(desc_rdata));

  mgmt_memory #(.HANDLE_BITS(HANDLE_BITS), .WIDTH(22)) u_mgmt (
    .clk, .dptr_addr_i(dptr_addr), .dptr_we_i(dptr_we), .dptr_wdata_i(dptr_wdata),
    .dptr_rdata_o(dptr_rdata), .desc_addr_i(desc_addr), .desc_we_i(desc_we),
    .desc_wdata_i(desc_wdata), .desc_rdata_o(desc_rdata));
endmodule
