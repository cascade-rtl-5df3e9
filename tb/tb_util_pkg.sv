// tb_util_pkg: testbench helpers for the Cascade digit format, written
// independently of the RTL package. A digit is six signals
// {n_hi, p_hi[1:0], n_lo, p_lo[1:0]} of value -8*n_hi + 4*(p_hi[1]+p_hi[0])
// - 2*n_lo + (p_lo[1]+p_lo[0]). enc_rand picks one of the (usually several)
// redundant encodings of a value at random, so the RTL is exercised on
// non-canonical inputs too.
package tb_util_pkg;
  function automatic int dval(input logic [5:0] d);
    return -8 * int'(d[5]) + 4 * (int'(d[4]) + int'(d[3]))
           - 2 * int'(d[2]) + int'(d[1]) + int'(d[0]);
  endfunction

  // random encoding of a radix-4 value -2..2 as {n, p1, p0}
  function automatic logic [2:0] r4_rand(input int v);
    logic [2:0] c [4];
    int n;
    n = 0;
    for (int e = 0; e < 8; e++)
      if (-2 * (e >> 2) + ((e >> 1) & 1) + (e & 1) == v) begin c[n] = 3'(e); n++; end
    return c[$urandom_range(n - 1)];
  endfunction

  function automatic logic [5:0] enc_rand(input int v);
    int hi, lo, opts [3], n;
    n = 0;
    for (int h = -2; h <= 2; h++)
      if (v - 4 * h >= -2 && v - 4 * h <= 2) begin opts[n] = h; n++; end
    hi = opts[$urandom_range(n - 1)];
    lo = v - 4 * hi;
    return {r4_rand(hi), r4_rand(lo)};
  endfunction

  function automatic int rand_digit();
    return int'($urandom_range(20)) - 10;
  endfunction
endpackage
