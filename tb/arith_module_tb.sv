// arith_module_tb: one arithmetic module (chip plus a 256-word digit
// memory). The testbench plays the control chip: it writes random words in
// the five-bit stored form, loads two of them into registers (address one
// cycle ahead of OP_LOAD), and writes their sum or difference straight back
// to memory through the distribution box (OP_ADDST/OP_SUBST) or through a
// register and OP_STORE. Every result word is read back from memory and
// compared with the testbench's arithmetic, the top transfer included.
module arith_module_tb;
  import cascade_pkg::*;
  localparam int D = 16, DA = 8;
  logic clk = 0, rst_n = 0, we, drive, neg, need, sdv, rpos_o;
  instr_t ins;
  logic [DA-1:0] addr;
  logic [79:0] wdata, rdata;
  logic signed [1:0] ato, dto;
  logic signed [3:0] mto;
  logic [5:0] sp0o, sp1o, lsd;
  logic [4:0] lz;
  logic signed [127:0] va, vb, e, p16;
  logic [79:0] wa, wb;
  int checks = 0, failures = 0, sel;
  arith_module #(.DADDR_BITS(DA), .IS_LOW(1'b1)) dut (
    .clk, .rst_n, .instr_i(ins), .q_i(6'd0), .mem_addr_i(addr), .mem_we_i(we), .ctl_drive_i(drive),
    .ctl_wdata_i(wdata), .mem_rdata_o(rdata), .a_t_i(2'sd0), .a_t_o(ato), .m_t_i(4'sd0), .m_t_o(mto),
    .dbl_t_i(2'sd0), .dbl_t_o(dto), .sp0_i(6'd0), .sp0_o(sp0o), .sp1_i(6'd0), .sp1_o(sp1o),
    .rpos_i(1'b0), .rpos_o(rpos_o), .neg_o(neg), .lz_o(lz), .need_norm_o(need), .sdv_o(sdv), .lsd_o(lsd));
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic signed [127:0] decode(input logic [79:0] w);
    logic signed [127:0] v;
    v = 0;
    for (int i = D - 1; i >= 0; i--) v = v * 16 + 128'(int'(w[i*5 +: 5]) - 10);
    return v;
  endfunction
  function automatic logic [79:0] rand_word();
    logic [79:0] w;
    for (int i = 0; i < D; i++) w[i*5 +: 5] = 5'($urandom_range(20));
    return w;
  endfunction
  task automatic cyc(input au_op_e op, input int rx_, input int ry_, input int rz_,
                     input int a_, input bit we_, input bit drv_);
    @(negedge clk);
    ins = '{op: op, rx: 2'(rx_), ry: 2'(ry_), rz: 2'(rz_)};
    addr = DA'(a_); we = we_; drive = drv_;
  endtask
  initial begin
    p16 = 128'sd1 <<< (4 * D);
    ins = '{op: OP_NOP, rx: 0, ry: 0, rz: 0}; addr = 0; we = 0; drive = 0; wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      wa = rand_word(); wb = rand_word(); va = decode(wa); vb = decode(wb);
      cyc(OP_NOP, 0, 0, 0, 10, 1, 1); wdata = wa;
      cyc(OP_NOP, 0, 0, 0, 11, 1, 1); wdata = wb;
      cyc(OP_NOP, 0, 0, 0, 10, 0, 0);           // read a
      cyc(OP_LOAD, 0, 0, 1, 11, 0, 0);          // r1 <- a, read b
      cyc(OP_LOAD, 0, 0, 2, 0, 0, 0);           // r2 <- b
      sel = int'($urandom_range(2));
      case (sel)
        0: begin cyc(OP_ADDST, 1, 2, 0, 20, 1, 0); #1; e = va + vb - p16 * 128'(ato); end
        1: begin cyc(OP_SUBST, 1, 2, 0, 20, 1, 0); #1; e = va - vb - p16 * 128'(ato); end
        default: begin
          cyc(OP_SUB, 2, 1, 3, 0, 0, 0); #1; e = vb - va - p16 * 128'(ato);
          cyc(OP_STORE, 3, 0, 0, 20, 1, 0);
        end
      endcase
      cyc(OP_NOP, 0, 0, 0, 20, 0, 0);
      cyc(OP_NOP, 0, 0, 0, 20, 0, 0); #1;
      checks++;
      if (decode(rdata) != e) begin
        failures++;
        if (failures < 5) $display("op %0d: %0d != %0d", sel, decode(rdata), e);
      end
      // the two source words are untouched
      cyc(OP_NOP, 0, 0, 0, 10, 0, 0);
      cyc(OP_NOP, 0, 0, 0, 11, 0, 0); #1;
      checks++; if (rdata !== wa) failures++;
      cyc(OP_NOP, 0, 0, 0, 11, 0, 0); #1;
      checks++; if (rdata !== wb) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
