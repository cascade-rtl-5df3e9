// digit_memory_tb: a reduced-depth digit memory (256 words) against an
// associative reference. Random writes and reads; the read data must appear
// exactly one cycle after the address and reflect all earlier writes.
module digit_memory_tb;
  logic clk = 0, we;
  logic [7:0] addr;
  logic [79:0] wdata, rdata, expect_d;
  logic [79:0] ref_mem [bit [7:0]];
  int checks = 0, failures = 0;
  digit_memory #(.ADDR_BITS(8), .WIDTH(80)) dut (.clk, .addr_i(addr), .we_i(we), .wdata_i(wdata), .rdata_o(rdata));
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we = 1; addr = 8'(a); wdata = {$urandom, $urandom, 16'($urandom)};
      ref_mem[8'(a)] = wdata;
    end
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      we = 1'($urandom); addr = 8'($urandom); wdata = {$urandom, $urandom, 16'($urandom)};
      expect_d = ref_mem[addr];
      if (we) ref_mem[addr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== expect_d) failures++;
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
