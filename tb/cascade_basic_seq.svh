// cascade_basic_seq.svh: a short message sequence shared by the control
// chip and control module testbenches, included inside an initial block
// after reset. It needs the host tasks, the checks/failures counters and
// the declarations below. Every result is read back with assim and
// compared with the testbench's own arithmetic. It ends with save and
// restore (a wide negative number and zero) and with the d flag on cmp,
// sign and digits.
begin : basic_seq
  logic [19:0] bh [12];
  logic signed [1023:0] bv [12];
  logic [19:0] br;
  int bnd;
  logic signed [31:0] cv [4];
  cv = '{-7, 305419896, -1985229329, 4660};
  for (int i = 0; i < 4; i++) begin
    m_create(cv[i], bh[i]); bv[i] = 1024'(cv[i]);
    expect_val("create", bh[i], bv[i]);
  end
  m_binop(M_ADD, 0, bh[1], bh[2], bh[4]); bv[4] = bv[1] + bv[2]; expect_val("add", bh[4], bv[4]);
  m_binop(M_SUB, 0, bh[0], bh[1], bh[5]); bv[5] = bv[0] - bv[1]; expect_val("sub", bh[5], bv[5]);
  m_binop(M_MUL, 0, bh[1], bh[2], bh[6]); bv[6] = bv[1] * bv[2]; expect_val("mul", bh[6], bv[6]);
  m_binop(M_MUL, 0, bh[6], bh[6], bh[7]); bv[7] = bv[6] * bv[6]; expect_val("mul wide", bh[7], bv[7]);
  m_unop(M_NEG, 0, bh[7], bh[8]); bv[8] = -bv[7]; expect_val("neg", bh[8], bv[8]);
  m_unop(M_SIGN, 0, bh[8], br); expect_eq("sign", br, bv[8] < 0);
  m_binop(M_CMP, 0, bh[8], bh[7], br); expect_eq("cmp", br, 20'hFFFFF);
  m_binop(M_CMP, 0, bh[3], bh[0], br); expect_eq("cmp", br, 1);
  m_binop(M_CMP, 0, bh[4], bh[4], br); expect_eq("cmp", br, 0);
  m_digits(bh[3], bnd); expect_eq("digits 4660", bnd, 4);
  m_destroy(bh[5]); m_destroy(bh[6]);
  xfer(20'(M_GC), br);
  m_binop(M_ADD, 0, bh[7], bh[3], bh[9]); bv[9] = bv[7] + bv[3]; expect_val("add after gc", bh[9], bv[9]);
  for (int i = 0; i < 10; i++)
    if (i != 5 && i != 6) expect_val("kept", bh[i], bv[i]);
  m_getreg(2, br); expect_eq("live handles", br, 8);
  m_getreg(4, br); expect_eq("collections", br, 1);
  // save and restore: a wide negative number and zero
  begin
    logic [19:0] d0, d1, cnt;
    m_save(bh[8], d0, d1, cnt);
    m_digits(bh[8], bnd);
    expect_eq("save digit count", int'({d0[0], d1}), bnd);
    expect_eq("save sign", d0[19], 1);
    expect_eq("save chunk count", cnt, (bnd + 3) / 4);
    m_restore(d0, d1, cnt, bh[10]); expect_val("restore", bh[10], bv[8]);
    m_digits(bh[10], bnd); expect_eq("restored digit count", bnd, int'({d0[0], d1}));
    m_create(0, bh[11]); m_save(bh[11], d0, d1, cnt); expect_eq("save zero", cnt, 0);
    m_restore(d0, d1, cnt, br); expect_val("restore zero", br, 0);
    m_getreg(2, br); expect_eq("live handles after restore", br, 11);
  end
  // d on the queries: the answer is given and the operands are destroyed
  begin
    logic [19:0] qa, qb, qc;
    m_create(-12345, qa); m_create(678, qb); m_create(9, qc);
    m_binop(M_CMP, F_D, qa, qb, br); expect_eq("cmp with d", br, 20'hFFFFF);
    m_unop(M_SIGN, F_D, qc, br); expect_eq("sign with d", br, 0);
    m_unop(M_SIGN, 0, qa, br); expect_eq("cmp operand destroyed", br, 20'hFFFFD);
    m_unop(M_SIGN, 0, qb, br); expect_eq("cmp operand destroyed", br, 20'hFFFFD);
    m_unop(M_SIGN, 0, qc, br); expect_eq("sign operand destroyed", br, 20'hFFFFD);
    m_create(-4096, qa);
    xfer0({15'd0, M_DIGITS} | F_D); xfer0(qa); xfer(0, qb); xfer(0, qc);
    expect_eq("digits with d", int'(qb) * 65536 + int'(qc), 4);
    m_unop(M_SIGN, 0, qa, br); expect_eq("digits operand destroyed", br, 20'hFFFFD);
    m_getreg(2, br); expect_eq("live handles after queries with d", br, 11);
  end
end
