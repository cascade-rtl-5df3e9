// memory_manager_tb: the memory manager with a management memory and a
// digit memory, reduced to 32 handles and 48 installed words. A random mix
// of allocations (1-4 words), updates, lookups, destroys and explicit
// collections runs against a model of the live numbers. Each live number's
// used words carry a signature written by the testbench; after every
// operation that may move storage the signatures must be found again at the
// block the descriptor names. Allocated blocks must lie inside installed
// memory, be large enough and overlap no live block; handles must be unique.
// The run fails unless reuse of a garbage block, collection triggered by an
// allocation and allocation failure all occurred.
module memory_manager_tb;
  import cascade_pkg::*;
  localparam int HB = 5, DA = 7, TOPW = 47, NH = 2**HB;
  logic clk = 0, rst_n = 0, valid = 0, busy, done, sign_i, sign_o, set_top = 0;
  mm_cmd_e cmd;
  logic [HB-1:0] hin, hout, last_h;
  logic [DA:0] words, free_w;
  logic [20:0] nd_i, nd_o;
  logic [1:0] err;
  logic [DA-1:0] msw, lsw, top_o;
  logic [HB:0] free_d, live;
  logic [31:0] gcs, reuses;
  logic [HB-1:0] pa; logic [HB+1:0] da; logic pwe, dwe; logic [21:0] pwd, prd, dwd, drd;
  logic [DA-1:0] ma; logic mwe; logic [79:0] mwd, mrd;
  logic [79:0] dm [2**DA];
  logic tb_we = 0; logic [DA-1:0] tb_a; logic [79:0] tb_d;
  int checks = 0, failures = 0;
  bit is_live [NH];
  int m_nd [NH], m_sign [NH], m_lsw [NH], m_msw [NH];
  logic [79:0] sig [NH][4];
  logic [DA-1:0] lsw_keep, msw_keep;
  int n_reuse = 0, n_gc_alloc = 0, n_fail = 0, nlive = 0, g0, r0, w, used, hh;

  memory_manager #(.HANDLE_BITS(HB), .DADDR_BITS(DA)) dut (
    .clk, .rst_n, .cmd_valid_i(valid), .cmd_i(cmd), .handle_i(hin), .words_i(words),
    .sign_i(sign_i), .nd_i(nd_i), .busy_o(busy), .done_o(done), .err_o(err), .handle_o(hout),
    .sign_o(sign_o), .nd_o(nd_o), .msw_o(msw), .lsw_o(lsw), .set_top_i(set_top),
    .top_word_i(DA'(TOPW)), .installed_top_o(top_o), .free_words_o(free_w), .free_desc_o(free_d),
    .live_o(live), .last_handle_o(last_h), .gc_runs_o(gcs), .reuse_count_o(reuses),
    .dptr_addr_o(pa), .dptr_we_o(pwe), .dptr_wdata_o(pwd), .dptr_rdata_i(prd),
    .desc_addr_o(da), .desc_we_o(dwe), .desc_wdata_o(dwd), .desc_rdata_i(drd),
    .dmem_addr_o(ma), .dmem_we_o(mwe), .dmem_wdata_o(mwd), .dmem_rdata_i(mrd));
  mgmt_memory #(.HANDLE_BITS(HB)) u_mgmt (
    .clk, .dptr_addr_i(pa), .dptr_we_i(pwe), .dptr_wdata_i(pwd), .dptr_rdata_o(prd),
    .desc_addr_i(da), .desc_we_i(dwe), .desc_wdata_i(dwd), .desc_rdata_o(drd));
  always_ff @(posedge clk) begin
    if (tb_we) dm[tb_a] <= tb_d;
    else if (mwe) dm[ma] <= mwd;
    mrd <= dm[ma];
  end

  always #5 clk = ~clk;
  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int used_words(input int n);
    return (n + 15) / 16 == 0 ? 1 : (n + 15) / 16;
  endfunction

  task automatic run(input mm_cmd_e c, input int h_, input int w_, input int s_, input int n_);
    @(negedge clk);
    while (busy) @(negedge clk);
    valid = 1; cmd = c; hin = HB'(h_); words = (DA+1)'(w_); sign_i = 1'(s_); nd_i = 21'(n_);
    @(negedge clk); valid = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic write_sig(input int h_);
    for (int k = 0; k < used_words(m_nd[h_]); k++) begin
      @(negedge clk); tb_we = 1; tb_a = DA'(m_lsw[h_] + k);
      tb_d = {HB'(h_), 2'(k), 73'({$urandom, $urandom, $urandom})}; sig[h_][k] = tb_d;
      @(negedge clk); tb_we = 0;
    end
  endtask

  task automatic check_all();
    for (int h_ = 0; h_ < NH; h_++) if (is_live[h_]) begin
      run(MM_LOOKUP, h_, 0, 0, 0);
      checks += 4;
      if (err != 0) begin failures++; if (failures < 6) $display("t=%0t lookup err h %0d", $time, h_); end
      if (int'(nd_o) != m_nd[h_] || int'(sign_o) != m_sign[h_]) begin failures++; if (failures < 6) $display("t=%0t h %0d nd %0d/%0d", $time, h_, nd_o, m_nd[h_]); end
      if (int'(msw) - int'(lsw) + 1 < used_words(m_nd[h_]) || int'(msw) > TOPW) begin failures++; if (failures < 6) $display("t=%0t h %0d bounds %0d %0d", $time, h_, msw, lsw); end
      m_lsw[h_] = int'(lsw); m_msw[h_] = int'(msw);
      for (int k = 0; k < used_words(m_nd[h_]); k++)
        if (dm[m_lsw[h_] + k] !== sig[h_][k]) begin
          failures++;
          if (failures < 6) $display("t=%0t handle %0d word %0d lost", $time, h_, k);
        end
    end
    checks++;
    if (int'(live) != nlive) begin failures++; if (failures < 6) $display("t=%0t live %0d model %0d", $time, live, nlive); end
  endtask

  initial begin
    for (int i = 0; i < NH; i++) is_live[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    while (busy) @(negedge clk);
    set_top = 1; @(negedge clk); set_top = 0;
    checks++; if (top_o != DA'(TOPW)) failures++;
    for (int t = 0; t < 700; t++) begin
      case ($urandom_range(9))
        0, 1, 2, 3, 4: begin
          w = int'($urandom_range(1, 4));
          g0 = int'(gcs); r0 = int'(reuses);
          run(MM_ALLOC, 0, w, 0, 0);
          if (err != 0) begin
            n_fail++;
            checks++;
            if (int'(gcs) != g0) check_all();
            if (err == 1 && nlive < NH - 3) begin failures++; if (failures < 6) $display("t=%0t nohandle live %0d", $time, nlive); end   // a handle was free
          end else begin
            hh = int'(hout);
            // the collector may have moved the others: refresh their bounds first
            lsw_keep = lsw; msw_keep = msw;
            nlive++;
            if (int'(gcs) != g0) check_all();
            checks += 3;
            if (is_live[hh] || hh >= NH - 3) begin failures++; if (failures < 6) $display("t=%0t dup %0d", $time, hh); end
            if (int'(msw_keep) > TOPW || int'(msw_keep) - int'(lsw_keep) + 1 < w) begin failures++; if (failures < 6) $display("t=%0t alloc bounds", $time); end
            for (int o = 0; o < NH; o++)
              if (is_live[o] && !(int'(lsw_keep) > m_msw[o] || int'(msw_keep) < m_lsw[o])) begin failures++; if (failures < 6) $display("t=%0t overlap %0d %0d [%0d %0d] [%0d %0d]", $time, hh, o, lsw, msw, m_lsw[o], m_msw[o]); end
            if (int'(gcs) != g0) n_gc_alloc++;
            if (int'(reuses) != r0) n_reuse++;
            is_live[hh] = 1;
            m_lsw[hh] = int'(lsw_keep); m_msw[hh] = int'(msw_keep);
            m_nd[hh] = int'($urandom_range(1, 16 * w)); m_sign[hh] = int'($urandom_range(1));
            run(MM_UPDATE, hh, 0, m_sign[hh], m_nd[hh]);
            checks++; if (err != 0) begin failures++; $display("update err"); end
            write_sig(hh);
          end
        end
        5, 6, 7: if (nlive > 0) begin
          do hh = int'($urandom_range(NH - 4)); while (!is_live[hh]);
          run(MM_DESTROY, hh, 0, 0, 0);
          checks++; if (err != 0) failures++;
          is_live[hh] = 0; nlive--;
          run(MM_LOOKUP, hh, 0, 0, 0);
          checks++; if (err != 3) begin failures++; $display("lookup of destroyed"); end
        end
        8: begin run(MM_GC, 0, 0, 0, 0); check_all(); end
        default: check_all();
      endcase
    end
    check_all();
    $display("mechanisms: reuse=%0d gc_alloc=%0d alloc_fail=%0d collections=%0d", n_reuse, n_gc_alloc, n_fail, gcs);
    if (n_reuse == 0 || n_gc_alloc == 0 || n_fail == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
