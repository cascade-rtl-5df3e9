// cascade_host_tasks.svh: host-side message tasks for Cascade testbenches.
// Included inside a testbench module that declares clk, req, din (20 bits),
// ack, dout (20 bits), checks and failures. Each port transfer puts a word on
// din, raises req, waits for ack, takes dout and drops req.
localparam logic [4:0] M_CREATE = 0, M_DESTROY = 1, M_ASSIM = 2, M_SAVE = 3, M_RESTORE = 4, M_NEG = 5, M_ADD = 6,
                       M_SUB = 7, M_MUL = 8, M_DIV = 9, M_CMP = 13, M_SIGN = 14, M_DIGITS = 15,
                       M_SETREG = 16, M_GETREG = 17, M_GC = 18;
localparam logic [19:0] F_F = 20'h20, F_D = 20'h40, F_I = 20'h80;

int unsigned xfer_timeout = 2000000;

task automatic xfer(input logic [19:0] w, output logic [19:0] r);
  int n;
  @(negedge clk); din = w; req = 1'b1;
  n = 0;
  while (!ack) begin
    @(negedge clk); n++;
    if (n > xfer_timeout) begin failures++; $display("port timeout"); break; end
  end
  r = dout;
  req = 1'b0;
  while (ack) @(negedge clk);
endtask

task automatic xfer0(input logic [19:0] w);
  logic [19:0] r;
  xfer(w, r);
endtask

task automatic m_create(input logic signed [31:0] v, output logic [19:0] h);
  xfer0({15'd0, M_CREATE}); xfer0({4'd0, v[31:16]}); xfer0({4'd0, v[15:0]}); xfer(0, h);
endtask

task automatic m_unop(input logic [4:0] op, input logic [19:0] flags, input logic [19:0] a,
                      output logic [19:0] r);
  xfer0({15'd0, op} | flags); xfer0(a); xfer(0, r);
endtask

task automatic m_binop(input logic [4:0] op, input logic [19:0] flags, input logic [19:0] a,
                       input logic [19:0] b, output logic [19:0] r);
  xfer0({15'd0, op} | flags); xfer0(a); xfer0(b); xfer(0, r);
endtask

task automatic m_destroy(input logic [19:0] h);
  logic [19:0] r;
  m_unop(M_DESTROY, 0, h, r);
endtask

task automatic m_getreg(input int idx, output logic [19:0] r);
  m_unop(M_GETREG, 0, 20'(idx), r);
endtask

task automatic m_digits(input logic [19:0] h, output int nd);
  logic [19:0] ms, ls;
  xfer0({15'd0, M_DIGITS}); xfer0(h); xfer(0, ms); xfer(0, ls);
  nd = int'(ms) * 65536 + int'(ls);
endtask

// value of a number as a 1024-bit two's complement integer
task automatic m_assim(input logic [19:0] h, output logic signed [1023:0] v);
  logic [19:0] n, c;
  v = '0;
  xfer0({15'd0, M_ASSIM}); xfer0(h); xfer(0, n);
  for (int i = 0; i < int'(n); i++) begin
    xfer(0, c);
    if (i < 64) v[i*16 +: 16] = c[15:0];
    if (i == int'(n) - 1)
      for (int b = (i + 1) * 16; b < 1024; b++) v[b] = c[15];
  end
endtask

// save: pseudo-descriptor words, chunk count and up to 256 raw 4-digit chunks
logic [19:0] save_chunks [256];

task automatic m_save(input logic [19:0] h, output logic [19:0] d0, output logic [19:0] d1,
                      output logic [19:0] cnt);
  logic [19:0] c;
  xfer0({15'd0, M_SAVE}); xfer0(h); xfer(0, d0); xfer(0, d1); xfer(0, cnt);
  for (int i = 0; i < int'(cnt); i++) begin
    xfer(0, c);
    if (i < 256) save_chunks[i] = c;
  end
endtask

task automatic m_restore(input logic [19:0] d0, input logic [19:0] d1, input logic [19:0] cnt,
                         output logic [19:0] h);
  xfer0({15'd0, M_RESTORE}); xfer0(d0); xfer0(d1); xfer0(cnt);
  for (int i = 0; i < int'(cnt); i++) xfer0(save_chunks[i % 256]);
  xfer(0, h);
endtask

task automatic expect_val(input string what, input logic [19:0] h, input logic signed [1023:0] e);
  logic signed [1023:0] v;
  m_assim(h, v);
  checks++;
  if (v !== e) begin
    failures++;
    $display("%s: handle %0d value %0h expected %0h", what, h, v, e);
  end
endtask

task automatic expect_eq(input string what, input longint got, input longint e);
  checks++;
  if (got != e) begin
    failures++;
    $display("%s: got %0d expected %0d", what, got, e);
  end
endtask
