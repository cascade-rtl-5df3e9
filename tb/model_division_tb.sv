// model_division_tb: random three-digit divisor estimates D (normalized,
// 256 <= |D|) and two-digit remainder estimates P; after load and step the
// quotient digit must be round(16*P/D) limited to -10..10.
module model_division_tb;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, load, step;
  logic [17:0] d;
  logic [11:0] p;
  logic [5:0] q;
  int checks = 0, failures = 0, dv [3], pv [2], D, P, e, num;
  model_division dut (.clk, .rst_n, .load_d_i(load), .d_est_i(d), .step_i(step),
                      .p_est_i(p), .q_o(q));
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    load = 0; step = 0; d = '0; p = '0;
    #12 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      do begin
        for (int i = 0; i < 3; i++) dv[i] = rand_digit();
        D = 256 * dv[2] + 16 * dv[1] + dv[0];
      end while (D < 256 && D > -256);
      for (int i = 0; i < 2; i++) pv[i] = rand_digit();
      P = 16 * pv[1] + pv[0];
      for (int i = 0; i < 3; i++) d[i*6 +: 6] = enc_rand(dv[i]);
      for (int i = 0; i < 2; i++) p[i*6 +: 6] = enc_rand(pv[i]);
      @(negedge clk) load = 1; step = 1;   // the step uses the previous divisor
      @(negedge clk) load = 0;             // now step with the loaded one
      @(negedge clk) step = 0;
      // expected: nearest integer to 16P/D, ties away from zero, limited to 10
      num = 32 * (P < 0 ? -P : P);
      e = 0;
      for (int k = 1; k <= 10; k++) if (num >= (2 * k - 1) * (D < 0 ? -D : D)) e = k;
      if ((P < 0) != (D < 0)) e = -e;
      checks++;
      if (dval(q) != e) begin
        failures++;
        if (failures < 5) $display("D=%0d P=%0d q=%0d expected %0d", D, P, dval(q), e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
