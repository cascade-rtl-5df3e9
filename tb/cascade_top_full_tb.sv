// cascade_top_full_tb: the Cascade processor at its full default size (one
// arithmetic module, 2^20 handles, 2^22 digit-memory words). After the
// reset sweep of the handle table it creates two numbers, adds and
// multiplies them, saves the two-word product and restores it under a new
// handle, and reads the results back with assim, comparing with the
// testbench's own arithmetic.
module cascade_top_full_tb;
  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0, ack;
  logic [19:0] din = '0, dout;
  int checks = 0, failures = 0;
  `include "cascade_host_tasks.svh"

  cascade_top dut (.clk, .rst_n, .req_i(req), .data_i(din), .ack_o(ack), .data_o(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [19:0] ha, hb, hs, hp, hq, r;
  int nd;
  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    m_create(-32'sd1234567891, ha);
    m_create(32'sd987654321, hb);
    expect_val("create a", ha, -1024'sd1234567891);
    expect_val("create b", hb, 1024'sd987654321);
    m_binop(M_ADD, 0, ha, hb, hs);
    expect_val("add", hs, -1024'sd1234567891 + 1024'sd987654321);
    m_binop(M_MUL, 0, ha, hb, hp);
    expect_val("mul", hp, -1024'sd1234567891 * 1024'sd987654321);
    m_binop(M_MUL, 0, hp, hp, hq);
    expect_val("mul 2 words", hq, (1024'sd1234567891 * 1024'sd987654321) ** 2);
    m_digits(hq, nd);
    checks++;
    if (nd <= 16) begin failures++; $display("product fits one word"); end
    begin
      logic [19:0] d0, d1, cnt, hr;
      m_save(hq, d0, d1, cnt);
      expect_eq("save chunk count", cnt, (nd + 3) / 4);
      m_restore(d0, d1, cnt, hr);
      expect_val("restore", hr, (1024'sd1234567891 * 1024'sd987654321) ** 2);
      m_binop(M_CMP, F_D, hr, hq, r); expect_eq("restored equals saved", r, 0);
    end
    m_getreg(2, r); expect_eq("live handles", r, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
