// arith_chip_tb: one arithmetic chip driven with instruction words. Random
// words (often with zero upper digits, so every sensor outcome occurs) are
// loaded through the LX box, combined with add, sub, mac and msub, shifted,
// cleared, and stored back through the XL box or straight through the
// distribution box (addst/subst). Stored words are decoded here from the
// five-bit form and compared with the word-level arithmetic, transfers out
// of the chip included. The sign, leading-zero (all-zero case), normalization, single-digit
// and least-significant-digit outputs are checked on OP_NOP.
module arith_chip_tb;
  import tb_util_pkg::*;
  import cascade_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0, drive, rpos_o, neg, need, sdv;
  instr_t ins;
  logic [5:0] q, sp0o, sp1o, lsd;
  logic [D*5-1:0] rd, wdat;
  logic signed [1:0] ato, dto;
  logic signed [3:0] mto;
  logic [4:0] lz;
  logic signed [127:0] r [4], got, e, p16;
  int checks = 0, failures = 0, qv, dv [D], nz, top, opsel, a, b, z;
  arith_chip #(.DIGITS(D), .IS_LOW(1'b1)) dut (
    .clk, .rst_n, .instr_i(ins), .q_i(q), .mem_rdata_i(rd), .mem_wdata_o(wdat), .mem_drive_o(drive),
    .a_t_i(2'sd0), .a_t_o(ato), .m_t_i(4'sd0), .m_t_o(mto), .dbl_t_i(2'sd0), .dbl_t_o(dto),
    .sp0_i(6'd0), .sp0_o(sp0o), .sp1_i(6'd0), .sp1_o(sp1o), .rpos_i(1'b0), .rpos_o(rpos_o),
    .neg_o(neg), .lz_o(lz), .need_norm_o(need), .sdv_o(sdv), .lsd_o(lsd));
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic signed [127:0] decode(input logic [D*5-1:0] w);
    logic signed [127:0] v;
    v = 0;
    for (int i = D - 1; i >= 0; i--) v = v * 16 + 128'(int'(w[i*5 +: 5]) - 10);
    return v;
  endfunction
  task automatic issue(input au_op_e op, input int rx_, input int ry_, input int rz_);
    @(negedge clk);
    ins = '{op: op, rx: 2'(rx_), ry: 2'(ry_), rz: 2'(rz_)};
  endtask
  task automatic check_reg(input int rr);   // store register rr and compare
    issue(OP_STORE, rr, 0, 0); #1;
    checks += 2;
    if (!drive) failures++;
    if (decode(wdat) != r[rr]) begin
      failures++;
      if (failures < 6) $display("reg %0d: %0d != %0d", rr, decode(wdat), r[rr]);
    end
  endtask
  initial begin
    p16 = 128'sd1 <<< (4 * D);
    ins = '{op: OP_NOP, rx: 0, ry: 0, rz: 0}; q = 0; rd = '0;
    for (int i = 0; i < 4; i++) r[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      opsel = int'($urandom_range(9));
      a = int'($urandom_range(3)); b = int'($urandom_range(3)); z = int'($urandom_range(3));
      case (opsel)
        0, 1: begin  // load a word from memory
          nz = int'($urandom_range(D));
          e = 0;
          for (int i = D - 1; i >= 0; i--) begin
            dv[i] = (i < nz) ? rand_digit() : 0;
            if ($urandom_range(9) == 0 && i < nz) dv[i] = 0;
            rd[i*5 +: 5] = 5'(dv[i] + 10);
            e = e * 16 + 128'(dv[i]);
          end
          issue(OP_LOAD, 0, 0, z); r[z] = e;
        end
        2: begin issue(OP_ADD, a, b, z); #1; r[z] = r[a] + r[b] - p16 * 128'(ato); end
        3: begin issue(OP_SUB, a, b, z); #1; r[z] = r[a] - r[b] - p16 * 128'(ato); end
        4, 5: begin
          qv = rand_digit(); q = enc_rand(qv);
          if (opsel == 4) begin issue(OP_MAC, a, b, z); #1; r[z] = r[a] + 128'(qv) * r[b] - p16 * (128'(mto) + 128'(ato)); end
          else begin issue(OP_MSUB, a, b, z); #1; r[z] = r[a] - 128'(qv) * r[b] + p16 * (128'(mto) - 128'(ato)); end
        end
        6: begin
          if ($urandom_range(1) == 0) begin issue(OP_SHL, 0, 0, z); #1; r[z] = r[z] * 16 - p16 * 128'(dval(sp0o)); end
          else begin issue(OP_SHR, 0, 0, z); #1; r[z] = (r[z] - 128'(dval(sp1o))) / 16; end
        end
        7: begin issue(OP_CLR, 0, 0, z); r[z] = 0; end
        8: begin    // distribution box: result straight to memory
          if ($urandom_range(1) == 0) begin
            issue(OP_ADDST, a, b, 0); #1; e = r[a] + r[b] - p16 * 128'(ato);
          end else begin
            issue(OP_SUBST, a, b, 0); #1; e = r[a] - r[b] - p16 * 128'(ato);
          end
          checks += 2;
          if (!drive) failures++;
          if (decode(wdat) != e) failures++;
        end
        default: begin  // sensors on a register
          issue(OP_NOP, a, 0, 0); #1;
          checks += 5;
          if (neg != (r[a] < 0)) failures++;
          if (sdv && !(r[a] >= -10 && r[a] <= 10)) failures++;
          if (r[a] == 0 && !sdv) failures++;
          if ((lz == 5'(D)) != (r[a] == 0)) failures++;
          if (dval(lsd) != int'(r[a] - ((r[a] >>> 4) <<< 4)) && dval(lsd) != int'(r[a] - ((r[a] >>> 4) <<< 4)) - 16)
            failures++;
        end
      endcase
      check_reg(z);
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
