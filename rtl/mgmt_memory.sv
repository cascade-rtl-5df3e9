// mgmt_memory: the management memory of the control module, 22 bits wide
// and split into two separately addressed parts:
//   * descriptor pointers, one word per handle (2^HANDLE_BITS words):
//     [21] handle free, [20] refers to garbage, [19:0] descriptor index;
//   * descriptors, four words each (2^(HANDLE_BITS+2) words), addressed by
//     {descriptor index, word}: word 0 [21] garbage, [19:0] handle;
//     word 1 [21] sign, [20:0] number of digits; word 2 address of the most
//     significant digit-memory word; word 3 address of the least significant.
// Each part is a synchronous single-port RAM (write at the edge, read data
// one cycle later) so the memory manager can access both in one cycle.
module mgmt_memory #(
  parameter int unsigned HANDLE_BITS = 20,
  parameter int unsigned WIDTH       = 22
) (
  input  logic                    clk,
  input  logic [HANDLE_BITS-1:0]  dptr_addr_i,
  input  logic                    dptr_we_i,
  input  logic [WIDTH-1:0]        dptr_wdata_i,
  output logic [WIDTH-1:0]        dptr_rdata_o,
  input  logic [HANDLE_BITS+1:0]  desc_addr_i,
  input  logic                    desc_we_i,
  input  logic [WIDTH-1:0]        desc_wdata_i,
  output logic [WIDTH-1:0]        desc_rdata_o
);
  logic [WIDTH-1:0] dptr [2**HANDLE_BITS];
  logic [WIDTH-1:0] desc [2**(HANDLE_BITS+2)];
  always_ff @(posedge clk) begin
    if (dptr_we_i) dptr[dptr_addr_i] <= dptr_wdata_i;
    dptr_rdata_o <= dptr[dptr_addr_i];
  end
  always_ff @(posedge clk) begin
    if (desc_we_i) desc[desc_addr_i] <= desc_wdata_i;
    desc_rdata_o <= desc[desc_addr_i];
  end
endmodule
