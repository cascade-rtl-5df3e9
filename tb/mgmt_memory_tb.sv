// mgmt_memory_tb: both parts of a reduced management memory (64 handles,
// 256 descriptor words) written and read independently and in the same
// cycle; each read returns the word one cycle after its address.
module mgmt_memory_tb;
  logic clk = 0, pwe, dwe;
  logic [5:0] pa;
  logic [7:0] da;
  logic [21:0] pw, pr, dw, dr, pexp, dexp;
  logic [21:0] pref [64], dref [256];
  int checks = 0, failures = 0;
  mgmt_memory #(.HANDLE_BITS(6)) dut (
    .clk, .dptr_addr_i(pa), .dptr_we_i(pwe), .dptr_wdata_i(pw), .dptr_rdata_o(pr),
    .desc_addr_i(da), .desc_we_i(dwe), .desc_wdata_i(dw), .desc_rdata_o(dr));
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      pwe = 1; dwe = 1; pa = 6'(a); da = 8'(a); pw = 22'($urandom); dw = 22'($urandom);
      pref[pa] = pw; dref[da] = dw;
    end
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      pwe = 1'($urandom); dwe = 1'($urandom); pa = 6'($urandom); da = 8'($urandom);
      pw = 22'($urandom); dw = 22'($urandom);
      pexp = pref[pa]; dexp = dref[da];
      if (pwe) pref[pa] = pw;
      if (dwe) dref[da] = dw;
      @(negedge clk);
      pwe = 0; dwe = 0;
      checks += 2;
      if (pr !== pexp) failures++;
      if (dr !== dexp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
