// arith_module: one Cascade arithmetic module, an arithmetic chip and its
// 80-bit slice of digit memory. Address and write enable come from the
// control chip; the write data is the chip's XL output (register or
// distribution box) unless the control chip drives the bus itself
// (ctl_drive_i: number creation and garbage collection moves).
// The read data goes both to the chip's LX box and back to the control chip.
// The bus-driver assertion uses rst_n as a synchronous disable while the
// chip's registers use it as an asynchronous reset; the lint warning about
// this mixed use refers only to the assertion and stands.
// At the default 4 M-word digit memory the synthesized netlist is too large
// to write out (see digit_memory).
module arith_module
  import cascade_pkg::*;
#(
  parameter int unsigned DADDR_BITS = 22,
  parameter bit          IS_LOW     = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  instr_t                  instr_i,
  input  sd_digit_t               q_i,
  input  logic [DADDR_BITS-1:0]   mem_addr_i,
  input  logic                    mem_we_i,
  input  logic                    ctl_drive_i,
  input  logic [79:0]             ctl_wdata_i,
  output logic [79:0]             mem_rdata_o,
  input  logic signed [1:0]       a_t_i,
  output logic signed [1:0]       a_t_o,
  input  logic signed [3:0]       m_t_i,
  output logic signed [3:0]       m_t_o,
  input  logic signed [1:0]       dbl_t_i,
  output logic signed [1:0]       dbl_t_o,
  input  sd_digit_t               sp0_i,
  output sd_digit_t               sp0_o,
  input  sd_digit_t               sp1_i,
  output sd_digit_t               sp1_o,
  input  logic                    rpos_i,
  output logic                    rpos_o,
  output logic                    neg_o,
  output logic [4:0]              lz_o,
  output logic                    need_norm_o,
  output logic                    sdv_o,
  output sd_digit_t               lsd_o
);
  logic [79:0] chip_wdata;
  logic        chip_drive;

  arith_chip #(.DIGITS(16), .IS_LOW(IS_LOW)) u_chip (
    .clk, .rst_n, .instr_i, .q_i, .mem_rdata_i(mem_rdata_o), .mem_wdata_o(chip_wdata),
    .mem_drive_o(chip_drive), .a_t_i, .a_t_o, .m_t_i, .m_t_o, .dbl_t_i, .dbl_t_o,
    .sp0_i, .sp0_o, .sp1_i, .sp1_o, .rpos_i, .rpos_o, .neg_o, .lz_o, .need_norm_o,
    .sdv_o, .lsd_o);

  digit_memory #(.ADDR_BITS(DADDR_BITS), .WIDTH(80)) u_mem (
    .clk, .addr_i(mem_addr_i), .we_i(mem_we_i),
    .wdata_i(ctl_drive_i ? ctl_wdata_i : chip_wdata), .rdata_o(mem_rdata_o));

  // a write must have exactly one source on the bus
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
                                 mem_we_i |-> (ctl_drive_i != chip_drive));
endmodule
