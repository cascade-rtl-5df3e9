// message_port_tb: a host drives random words through the four-phase
// handshake while a core model answers each received word with a function of
// it after a random delay and sometimes holds ready low. Checks: every word
// reaches the core exactly once and in order, every reply comes back on
// data_o with ack, ack stays high until req falls, and the handshake takes
// at least the minimum number of cycles.
module message_port_tb;
  logic clk = 0, rst_n = 0, req = 0, ack, ready, rxv, txv;
  logic [19:0] din, dout, rxd, txd, last_rx;
  int checks = 0, failures = 0, nrx = 0, cyc;
  message_port #(.DATA_BITS(20)) dut (
    .clk, .rst_n, .req_i(req), .data_i(din), .ack_o(ack), .data_o(dout),
    .ready_i(ready), .rx_valid_o(rxv), .rx_data_o(rxd), .tx_valid_i(txv), .tx_data_i(txd));
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // core model
  initial begin
    txv = 0; txd = 0; ready = 0;
    forever begin
      @(negedge clk);
      txv = 0;
      ready = ($urandom_range(3) != 0);
      if (rxv) begin
        last_rx = rxd; nrx++;
        repeat ($urandom_range(4)) @(negedge clk);
        txv = 1; txd = rxd ^ 20'hA5A5A;
      end
    end
  end
  initial begin
    din = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      din = 20'($urandom); req = 1; cyc = 0;
      while (!ack) begin @(negedge clk); cyc++; end
      checks += 4;
      if (dout !== (din ^ 20'hA5A5A)) failures++;
      if (last_rx !== din) failures++;
      if (nrx != t + 1) failures++;
      if (cyc < 2) failures++;
      @(negedge clk); checks++;
      if (!ack) failures++;
      req = 0;
      while (ack) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
