// cascade_top_tb: end-to-end test of the Cascade processor through its
// message port, at reduced memory sizes (32 handles, 64 installed words of
// digit memory) with two arithmetic modules (32-digit words), so that
// garbage collection and handle exhaustion are reachable.
// Every arithmetic result is read back with assim and compared with the
// testbench's own 1024-bit arithmetic. The run counts how often each
// mechanism occurred and fails if one never did: multiple-precision
// words, futures, destroy-after-use, in-place negation, handle reuse without
// collection, collection forced by allocation, explicit gc, fast and
// subtraction-based comparisons, setreg/getreg, rejected messages, save and
// restore of a multiword number.
module cascade_top_tb;
  localparam int unsigned N = 1, HB = 5, DA = 8;
  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0, ack;
  logic [19:0] din = '0, dout;
  int checks = 0, failures = 0;
  `include "cascade_host_tasks.svh"

  cascade_top #(.N(N), .HANDLE_BITS(HB), .DADDR_BITS(DA)) dut (
    .clk, .rst_n, .req_i(req), .data_i(din), .ack_o(ack), .data_o(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [19:0] h [40];
  logic signed [1023:0] val [40];
  logic [19:0] r, ha, hb, hc;
  logic signed [1023:0] e;
  int nd, n_multiword = 0, n_future = 0, n_dflag = 0, n_inplace = 0, n_fastcmp = 0,
      n_slowcmp = 0, n_gc_alloc = 0, n_gc_msg = 0, n_reuse = 0, n_reject = 0, n_reg = 0;
  int gc0, gc1, nfill, n_exhaust = 0, n_saverestore = 0;
  logic [19:0] fill [16];

  function automatic logic signed [1023:0] s32(input logic signed [31:0] x);
    return 1024'(x);
  endfunction

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    // installed digit memory: 128 words (register 0 holds top word / 4)
    xfer0({15'd0, M_SETREG}); xfer0(0); xfer0(20'd15); xfer(0, r);
    m_getreg(0, r); expect_eq("installed memory", r, 15); n_reg++;

    // ---------------- create / assim
    begin
      logic signed [31:0] cv [8];
      cv = '{0, 1, -1, 123456789, -2147483648, 2147483647, -559038737, 4096};
      for (int i = 0; i < 8; i++) begin
        m_create(cv[i], h[i]); val[i] = s32(cv[i]);
        expect_val("create", h[i], val[i]);
      end
    end
    m_unop(M_SIGN, 0, h[4], r); expect_eq("sign -2^31", r, 1);
    m_unop(M_SIGN, 0, h[5], r); expect_eq("sign 2^31-1", r, 0);
    m_digits(h[0], nd); expect_eq("digits 0", nd, 0);
    m_digits(h[7], nd); expect_eq("digits 4096", nd, 4);

    // ---------------- add / sub growing past one word
    m_binop(M_ADD, 0, h[3], h[6], h[8]); val[8] = val[3] + val[6]; expect_val("add", h[8], val[8]);
    m_binop(M_SUB, 0, h[4], h[5], h[9]); val[9] = val[4] - val[5]; expect_val("sub", h[9], val[9]);
    m_binop(M_MUL, 0, h[5], h[5], h[10]); val[10] = val[5] * val[5]; expect_val("mul", h[10], val[10]);
    m_binop(M_MUL, 0, h[10], h[10], h[11]); val[11] = val[10] * val[10];
    expect_val("mul 2 words", h[11], val[11]);
    m_binop(M_MUL, 0, h[11], h[9], h[12]); val[12] = val[11] * val[9];
    expect_val("mul 3 words", h[12], val[12]);
    m_digits(h[12], nd);
    if (nd > 32) n_multiword++;
    m_binop(M_SUB, 0, h[12], h[11], h[13]); val[13] = val[12] - val[11];
    expect_val("sub multiword", h[13], val[13]);
    m_binop(M_ADD, 0, h[13], h[11], h[14]); val[14] = val[13] + val[11];
    expect_val("add back", h[14], val[14]);
    m_digits(h[14], nd);
    if (nd > 32) n_multiword++;
    m_binop(M_MUL, 0, h[0], h[12], h[15]); val[15] = 0; expect_val("mul by zero", h[15], val[15]);
    m_binop(M_MUL, 0, h[2], h[12], h[16]); val[16] = -val[12]; expect_val("mul by -1", h[16], val[16]);

    // ---------------- neg, in place
    m_unop(M_NEG, 0, h[12], h[17]); val[17] = -val[12]; expect_val("neg", h[17], val[17]);
    m_unop(M_NEG, F_I, h[17], r); expect_eq("neg in place handle", r, h[17]);
    val[17] = val[12]; expect_val("neg in place", h[17], val[17]); n_inplace++;

    // ---------------- comparisons
    m_getreg(6, r); gc0 = int'(r);
    m_binop(M_CMP, 0, h[12], h[5], r); expect_eq("cmp big/small", r, (val[12] > val[5]) ? 1 : 20'hFFFFF);
    m_binop(M_CMP, 0, h[4], h[5], r); expect_eq("cmp signs", r, 20'hFFFFF);
    m_getreg(6, r); n_fastcmp = int'(r) - gc0;
    m_binop(M_CMP, 0, h[14], h[12], r); expect_eq("cmp equal", r, 0);
    m_binop(M_CMP, 0, h[3], h[7], r); expect_eq("cmp close", r, 1);
    m_binop(M_CMP, 0, h[7], h[3], r); expect_eq("cmp close rev", r, 20'hFFFFF);
    m_getreg(6, r); n_slowcmp = 3 - (int'(r) - gc0 - n_fastcmp);

    // ---------------- future: reply first, value later
    m_binop(M_MUL, F_F, h[12], h[12], h[18]); val[18] = val[12] * val[12];
    n_future++;
    expect_val("future mul", h[18], val[18]);

    // ---------------- destroy arguments after use
    m_create(32'sd77, ha); m_create(-32'sd5, hb);
    m_binop(M_ADD, F_D, ha, hb, hc); expect_val("add with d", hc, s32(72));
    m_unop(M_SIGN, 0, ha, r); expect_eq("destroyed operand rejected", r, 20'hFFFFD);
    n_dflag++; m_destroy(hc);

    // ---------------- unsupported message
    m_binop(M_DIV, 0, h[3], h[7], r); expect_eq("div rejected", r, 20'hFFFFD); n_reject++;

    // ---------------- reuse of a destroyed number's storage without collection
    m_getreg(7, r); gc0 = int'(r);
    m_destroy(h[10]);
    m_binop(M_ADD, 0, h[3], h[7], h[10]); val[10] = val[3] + val[7];
    expect_val("reuse", h[10], val[10]);
    m_getreg(7, r); n_reuse = int'(r) - gc0;

    // ---------------- explicit gc, values survive
    m_destroy(h[13]); m_destroy(h[15]); m_destroy(h[16]);
    m_getreg(4, r); gc0 = int'(r);
    xfer(20'(M_GC), r);
    m_getreg(4, r); n_gc_msg = int'(r) - gc0;
    for (int i = 0; i < 19; i++)
      if (i != 13 && i != 15 && i != 16) expect_val("after gc", h[i], val[i]);

    // ---------------- save and restore of a multiword number
    begin
      logic [19:0] d0, d1, cnt;
      m_save(h[18], d0, d1, cnt);
      m_digits(h[18], nd);
      expect_eq("save chunk count", cnt, (nd + 3) / 4);
      m_restore(d0, d1, cnt, hc);
      expect_val("restore", hc, val[18]);
      m_binop(M_CMP, 0, hc, h[18], r); expect_eq("restored equals saved", r, 0);
      if (cnt > 8) n_saverestore++;
      m_destroy(hc);
    end

    // ---------------- fill memory until allocation fails (collecting first)
    m_getreg(4, r); gc0 = int'(r);
    e = val[18] * val[12];
    nfill = 0;
    for (int t = 0; t < 12; t++) begin
      m_binop(M_MUL, 0, h[18], h[12], hc);
      if (hc >= 20'hFFFFD) begin
        n_exhaust++;
        expect_eq("exhaustion reply", hc, 20'hFFFFE);
        break;
      end
      fill[nfill] = hc; nfill++;
    end
    m_getreg(4, r); n_gc_alloc = int'(r) - gc0;
    for (int i = 0; i < nfill; i++) expect_val("fill", fill[i], e);
    for (int i = 0; i < nfill; i++) m_destroy(fill[i]);
    // same size again: a destroyed block is reused without collection
    m_getreg(7, r); gc0 = int'(r);
    m_binop(M_MUL, 0, h[18], h[12], hc);
    expect_val("reuse fill", hc, e);
    m_getreg(7, r); n_reuse += int'(r) - gc0;
    // a larger number fits no destroyed block: allocation collects, then succeeds
    m_getreg(4, r); gc0 = int'(r);
    m_binop(M_MUL, 0, hc, h[12], ha);
    expect_val("after forced gc", ha, e * val[12]);
    m_getreg(4, r); n_gc_alloc += int'(r) - gc0;
    for (int i = 0; i < 19; i++)
      if (i != 13 && i != 15 && i != 16) expect_val("after alloc gc", h[i], val[i]);
    m_getreg(2, r); expect_eq("live handles", r, 18);

    $display("mechanisms: multiword=%0d future=%0d dflag=%0d inplace=%0d fastcmp=%0d slowcmp=%0d",
             n_multiword, n_future, n_dflag, n_inplace, n_fastcmp, n_slowcmp);
    $display("            gc_alloc=%0d gc_msg=%0d reuse=%0d reject=%0d reg=%0d exhaust=%0d saverestore=%0d",
             n_gc_alloc, n_gc_msg, n_reuse, n_reject, n_reg, n_exhaust, n_saverestore);
    if (n_multiword == 0) begin failures++; $display("multiword never happened"); end
    if (n_future == 0 || n_dflag == 0 || n_inplace == 0 || n_reject == 0 || n_reg == 0) failures++;
    if (n_fastcmp == 0) begin failures++; $display("fast compare never happened"); end
    if (n_slowcmp == 0) begin failures++; $display("subtracting compare never happened"); end
    if (n_gc_alloc == 0) begin failures++; $display("allocation never collected"); end
    if (n_gc_msg == 0) begin failures++; $display("gc message did not collect"); end
    if (n_exhaust == 0) begin failures++; $display("memory never ran out"); end
    if (n_saverestore == 0) begin failures++; $display("no multiword save/restore"); end
    if (n_reuse == 0) begin failures++; $display("no reuse without collection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
