// digit_memory: the digit memory of one arithmetic module, WIDTH bits wide
// (16 digits of 5 bits) and 2^ADDR_BITS words deep. Numbers are stored one
// word per DIGITS-digit segment, least significant word at the lowest
// address. All control (address, write enable) comes from the control chip.
// Synchronous single-port RAM: a write takes effect at the clock edge, a
// read returns the addressed word on rdata_o one cycle later. Contents are
// not initialised; the memory manager never hands out a word before it has
// been written.
// Default depth is the paper's 4 mega-words ("This structure limits the size
// of digit memory to 4 mega-words"). At that size the array is 335 Mbit;
// it stands for the module's external RAM chips. A generic synthesis run
// keeps it as one memory cell, but a netlist dump of that cell (its
// all-unknown initial value alone is one character per bit) is larger than
// 256 MiB, so full-size netlists of this module and of the modules that
// contain it are not written; reduced ADDR_BITS synthesize normally.
module digit_memory #(
  parameter int unsigned ADDR_BITS = 22,
  parameter int unsigned WIDTH     = 80
) (
  input  logic                 clk,
  input  logic [ADDR_BITS-1:0] addr_i,
  input  logic                 we_i,
  input  logic [WIDTH-1:0]     wdata_i,
  output logic [WIDTH-1:0]     rdata_o
);
  logic [WIDTH-1:0] mem [2**ADDR_BITS];
  always_ff @(posedge clk) begin
    if (we_i) mem[addr_i] <= wdata_i;
    rdata_o <= mem[addr_i];
  end
endmodule
