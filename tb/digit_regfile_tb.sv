// digit_regfile_tb: random writes, whole- and half-digit shifts in both
// directions and root-position operations against a digit-value model of
// the four registers. Half-digit shifts are predicted from the radix-4
// components of the digits as read before the shift. The digits leaving
// on sp0/sp1 and the root position chain are checked every operation, and
// all four registers are read back through both read ports.
module digit_regfile_tb;
  import tb_util_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0, we, shl, shr, half, rload, rstep, rwe, rpos_i, rpos_o;
  logic [1:0] rx, ry, rz;
  logic [D*6-1:0] x, y, wd;
  logic [5:0] sp0i, sp0o, sp1i, sp1o, q;
  logic [D-1:0] rpos, rmodel;
  int checks = 0, failures = 0, m [4][D], nv [D], op, qv, exp_out, hi [D], lo [D];
  digit_regfile #(.DIGITS(D)) dut (
    .clk, .rst_n, .rx_i(rx), .ry_i(ry), .x_o(x), .y_o(y), .we_i(we), .rz_i(rz), .wdata_i(wd),
    .shl_i(shl), .shr_i(shr), .half_i(half), .sp0_i(sp0i), .sp0_o(sp0o), .sp1_i(sp1i),
    .sp1_o(sp1o), .root_load_i(rload), .root_step_i(rstep), .root_we_i(rwe), .q_i(q),
    .rpos_i(rpos_i), .rpos_o(rpos_o), .root_pos_o(rpos));
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int comp(input logic [2:0] c);   // radix-4 component value
    return -2 * int'(c[2]) + int'(c[1]) + int'(c[0]);
  endfunction
  task automatic idle();
    we = 0; shl = 0; shr = 0; half = 0; rload = 0; rstep = 0; rwe = 0; rpos_i = 0;
    sp0i = 0; sp1i = 0; q = 0; wd = '0;
  endtask
  task automatic check_all();
    for (int r = 0; r < 4; r++) begin
      rx = 2'(r); ry = 2'(3 - r); #1;
      for (int i = 0; i < D; i++) begin
        checks += 2;
        if (dval(x[i*6 +: 6]) != m[r][i]) failures++;
        if (dval(y[i*6 +: 6]) != m[3-r][i]) failures++;
      end
    end
  endtask
  initial begin
    idle(); rx = 0; ry = 0; rz = 0;
    for (int r = 0; r < 4; r++) for (int i = 0; i < D; i++) m[r][i] = 0;
    rmodel = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    check_all();
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      idle();
      op = (t < 8) ? 0 : int'($urandom_range(7));
      rz = 2'($urandom); rx = rz; ry = 2'($urandom);
      #1;
      for (int i = 0; i < D; i++) begin
        hi[i] = comp(x[i*6+3 +: 3]); lo[i] = comp(x[i*6 +: 3]);
      end
      exp_out = 0;
      case (op)
        0, 1: begin   // write
          we = 1;
          for (int i = 0; i < D; i++) begin nv[i] = rand_digit(); wd[i*6 +: 6] = enc_rand(nv[i]); end
          for (int i = 0; i < D; i++) m[rz][i] = nv[i];
        end
        2: begin      // shift up one digit
          shl = 1; qv = rand_digit(); sp0i = enc_rand(qv); exp_out = m[rz][D-1];
          for (int i = D - 1; i > 0; i--) m[rz][i] = m[rz][i-1];
          m[rz][0] = qv;
        end
        3: begin      // shift down one digit
          shr = 1; qv = rand_digit(); sp1i = enc_rand(qv); exp_out = m[rz][0];
          for (int i = 0; i < D - 1; i++) m[rz][i] = m[rz][i+1];
          m[rz][D-1] = qv;
        end
        4: begin      // shift up half a digit
          shl = 1; half = 1; qv = int'($urandom_range(4)) - 2; sp0i = enc_rand(qv);
          exp_out = hi[D-1];
          for (int i = 0; i < D; i++) m[rz][i] = 4 * lo[i] + ((i == 0) ? qv : hi[i-1]);
        end
        5: begin      // shift down half a digit
          shr = 1; half = 1; qv = int'($urandom_range(4)) - 2; sp1i = enc_rand(qv);
          exp_out = lo[0];
          for (int i = 0; i < D; i++) m[rz][i] = hi[i] + 4 * ((i == D - 1) ? qv : lo[i+1]);
        end
        6: begin      // root position load / step
          if ($urandom_range(1) == 0) begin rload = 1; rpos_i = 1; rmodel = {1'b1, {(D-1){1'b0}}}; end
          else begin rstep = 1; rpos_i = 0; rmodel = {1'b0, rmodel[D-1:1]}; end
        end
        default: begin  // root digit write into ry
          rwe = 1; qv = rand_digit(); q = enc_rand(qv);
          for (int i = 0; i < D; i++) if (rmodel[i]) m[ry][i] = qv;
        end
      endcase
      #1;
      checks += 2;
      if (op == 2 || op == 4) begin if (dval(sp0o) != exp_out) failures++; end
      else if (dval(sp0o) != 0) failures++;
      if (op == 3 || op == 5) begin if (dval(sp1o) != exp_out) failures++; end
      else if (dval(sp1o) != 0) failures++;
      checks++;
      if (rpos_o != rpos[0]) failures++;
      @(negedge clk);
      idle();
      checks++;
      if (rpos !== rmodel) failures++;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
