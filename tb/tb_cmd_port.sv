// tb_cmd_port: checks ring port 0. Receive: words of incoming messages come
// out of CMDPORTFIFO in order, the port holds the ring off when the FIFO
// (4 words here) is full, and a message-arrived pulse marks each message
// end. Transmit: words written to CMDPORTWRITE leave as one ring message with
// the first word as RAW and the word before CMDPORTCLOSE as last word,
// CMDPORTREADY is high while the channel is open, the acquired pulse fires
// once per message, and a RAW-only message works. A final phase sends 40
// random messages out and 30 in, with random stalls, and compares them.
module tb_cmd_port;
  import niu_pkg::*;
  logic clk = 0, rst_n = 0;
  ring_beat_t rx, tx;
  logic rx_ready, tx_ready, pop, rx_empty, rx_full, msg_in, write, close, chan_open, acquired;
  logic [31:0] rdata, wdata;
  int checks = 0, failures = 0;

  cmd_port #(.RX_DEPTH(4), .TX_DEPTH(8)) dut (.clk(clk), .rst_n(rst_n), .rx_i(rx), .rx_ready_o(rx_ready),
    .tx_o(tx), .tx_ready_i(tx_ready), .pop_i(pop), .rdata_o(rdata), .rx_empty_o(rx_empty),
    .rx_full_o(rx_full), .msg_in_o(msg_in), .write_i(write), .wdata_i(wdata), .close_i(close),
    .channel_open_o(chan_open), .acquired_o(acquired));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ring side: transmit sink with acquisition delay; receive source
  int msgs_in = 0, acq = 0, open_cycles = 0, acq_wait = 0;
  logic [31:0] txm[$][$];
  logic [31:0] cur[$];
  always @(negedge clk) begin
    tx_ready = 0;
    if (tx.valid && tx.sop) begin acq_wait++; tx_ready = acq_wait > 4; end
    else if (tx.valid) tx_ready = ($urandom % 3) != 0;
  end
  always @(posedge clk) begin
    if (msg_in) msgs_in++;
    if (acquired) acq++;
    if (chan_open) open_cycles++;
    if (tx.valid && tx_ready) begin
      if (tx.sop) begin cur.delete(); acq_wait = 0; end
      cur.push_back(tx.data);
      if (tx.eop) txm.push_back(cur);
    end
  end

  logic [31:0] sent[$];
  task automatic ring_send(input int n, input int base);
    for (int i = 0; i < n; i++) begin
      rx.valid = 1; rx.sop = (i == 0); rx.eop = (i == n - 1); rx.data = base + i;
      @(posedge clk);
      while (!rx_ready) @(posedge clk);
      sent.push_back(rx.data);
      @(negedge clk);
    end
    rx = '0;
  endtask

  logic [31:0] got[$];
  int stalls = 0;
  initial begin
    rx = '0; pop = 0; write = 0; close = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      begin ring_send(3, 'h100); ring_send(6, 'h200); end
      begin
        repeat (12) @(negedge clk);           // let the FIFO fill
        check(rx_full && !rx_ready, "ring held off while the FIFO is full");
        while (got.size() < 9) begin
          if (!rx_empty) begin
            got.push_back(rdata); pop = 1;
          end
          @(negedge clk); pop = 0;
          @(negedge clk);
        end
      end
    join
    check(got == sent, "received words in order");
    check(msgs_in == 2, "two message-arrived pulses");
    check(rx_empty, "FIFO drained");
    // transmit a 3-word message
    write = 1; wdata = 32'h0400_0005; @(negedge clk);
    write = 1; wdata = 32'haaaa; @(negedge clk);
    write = 0; @(negedge clk);
    write = 1; wdata = 32'hbbbb; @(negedge clk);
    write = 0; close = 1; @(negedge clk);
    close = 0;
    repeat (40) @(negedge clk);
    check(txm.size() == 1 && txm[0].size() == 3 && txm[0][0] == 32'h0400_0005 &&
          txm[0][1] == 32'haaaa && txm[0][2] == 32'hbbbb, "three-word message sent");
    check(acq == 1, "channel acquired once");
    check(open_cycles >= 2 && !chan_open, "CMDPORTREADY while open, low after close");
    // RAW-only message
    write = 1; wdata = 32'h0400_0006; @(negedge clk);
    write = 0; close = 1; @(negedge clk);
    close = 0;
    repeat (40) @(negedge clk);
    check(txm.size() == 2 && txm[1].size() == 1 && txm[1][0] == 32'h0400_0006, "RAW-only message sent");
    check(acq == 2, "second acquisition");
    // random traffic: messages of 1..6 words both ways, random pop and write gaps
    begin
      int bad_tx = 0, bad_rx = 0, nmsg = 0;
      logic [31:0] exp[$];
      sent.delete(); got.delete(); msgs_in = 0;
      for (int k = 0; k < 40; k++) begin
        int n = 1 + $urandom % 6;
        exp.delete();
        for (int i = 0; i < n; i++) begin
          exp.push_back($urandom);
          write = 1; wdata = exp[i]; @(negedge clk);
          write = 0; repeat ($urandom % 3) @(negedge clk);
        end
        close = 1; @(negedge clk); close = 0;
        repeat (60) @(negedge clk);
        if (txm.size() != 3 + k || txm[2 + k] != exp) bad_tx++;
      end
      check(bad_tx == 0, "40 random messages transmitted intact");
      check(acq == 42, "one acquisition per random message");
      fork
        for (int k = 0; k < 30; k++) begin ring_send(1 + $urandom % 6, $urandom); nmsg++; end
        begin
          int idle = 0;
          while (idle < 200) begin
            if (!rx_empty && ($urandom % 2)) begin got.push_back(rdata); pop = 1; idle = 0; end
            else idle++;
            @(negedge clk); pop = 0;
          end
        end
      join
      check(got == sent, $sformatf("%0d random received words in order", sent.size()));
      check(msgs_in == 30, "one arrival pulse per random message");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
