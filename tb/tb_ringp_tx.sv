// tb_ringp_tx: feeds the RingP engine a packet of RingP records from a
// model FIFO and plays the ring: a RAW addressed to node 127 is never
// acquired, other RAWs are acquired after a delay and data words see random
// stalls. Checks the messages delivered (RAW-only, multi-word, after a pad
// record), the sop/eop marks, the timeout drop and the continuation after
// it, the end of the packet (busy, done), the RINGP last-word and counter
// values, and DATAPORTABORT. Then 20 random packets (1 to 8 records, some
// pads) trickle into the FIFO while the engine runs, and each must come out
// record by record with one done pulse. TIMEOUT is reduced to 50 clocks.
module tb_ringp_tx;
  import niu_pkg::*;
  localparam int TIMEOUT = 50;
  logic clk = 0, rst_n = 0;
  logic start, abort, fifo_empty, fifo_arrived, fifo_pop, tx_ready, busy, done, tmo;
  logic [31:0] fifo_data, last;
  logic [15:0] count;
  ring_beat_t tx;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  ringp_tx #(.TIMEOUT(TIMEOUT)) dut (.clk(clk), .rst_n(rst_n), .start_i(start), .abort_i(abort),
    .fifo_data_i(fifo_data), .fifo_empty_i(fifo_empty), .fifo_arrived_i(fifo_arrived), .fifo_pop_o(fifo_pop),
    .tx_o(tx), .tx_ready_i(tx_ready), .busy_o(busy), .done_o(done), .timeout_o(tmo), .last_o(last),
    .count_o(count));

  always #5 clk = ~clk;
  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? 32'h0 : q[0];
  // the pop lands just after the edge so the DUT samples the word it popped
  always @(posedge clk) if (fifo_pop && q.size() != 0) begin #1; void'(q.pop_front()); end

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

  // ring model
  logic in_msg = 0;
  int acq_wait = 0, timeouts = 0, dones = 0;
  logic [31:0] msgs[$][$];
  logic [31:0] cur[$];
  always @(negedge clk) begin
    tx_ready = 0;
    if (tx.valid && tx.sop) begin
      if (tx.data[31:25] != 7'd127) begin
        acq_wait++;
        tx_ready = (acq_wait > 6);
      end
    end else if (tx.valid) tx_ready = ($urandom % 3) != 0;
  end
  always @(posedge clk) begin
    if (tmo) timeouts++;
    if (done) dones++;
    if (tx.valid && tx_ready) begin
      if (tx.sop) begin
        if (in_msg) begin failures++; $display("FAIL: sop inside a message"); end
        cur.delete(); in_msg = 1; acq_wait = 0;
      end else if (!in_msg) begin failures++; $display("FAIL: data outside a message"); end
      cur.push_back(tx.data);
      if (tx.eop) begin msgs.push_back(cur); in_msg = 0; end
    end
  end

  function automatic logic [31:0] raw(input int node, input int tag);
    return {7'(node), 25'(tag)};
  endfunction

  initial begin
    logic [31:0] m1[$], m2[$], m3[$];
    start = 0; abort = 0; fifo_arrived = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // records: pad, RAW-only message, 5-word message, message to node 127, 3-word message
    m1 = '{raw(5, 1)};
    m2 = '{raw(6, 2), 32'h11, 32'h22, 32'h33, 32'h44};
    m3 = '{raw(9, 3), 32'haa, 32'hbb};
    q.push_back(32'h0);
    q.push_back(32'd1); q = {q, m1};
    q.push_back(32'd5); q = {q, m2};
    q.push_back(32'd4); q = {q, raw(127, 9), 32'h1, 32'h2, 32'h3};
    q.push_back(32'd3); q = {q, m3};
    fifo_arrived = 1;
    @(negedge clk);
    check(!busy, "idle before DATAPORTXMIT");
    start = 1;
    @(negedge clk);
    start = 0;
    check(busy, "busy after DATAPORTXMIT");
    wait (!busy);
    @(negedge clk);
    @(negedge clk);
    check(msgs.size() == 3, "three messages delivered");
    if (msgs.size() == 3) begin
      check(msgs[0] == m1, "RAW-only message");
      check(msgs[1] == m2, "five-word message");
      check(msgs[2] == m3, "message after the timed-out one");
    end
    check(timeouts == 1, "one timeout");
    check(dones == 1, "done pulse at end of packet");
    check(last == 32'hbb, "RINGP holds the last word read");
    check(q.size() == 0, "FIFO emptied");
    // abort while waiting for a channel, then restart on a new record
    q.push_back(32'd2); q = {q, raw(127, 4), 32'h5};
    q.push_back(32'd2); q = {q, raw(8, 5), 32'h6};
    start = 1; @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    check(busy && count == 16'd2, "waiting for the channel, counter shows 2 words");
    abort = 1; @(negedge clk); abort = 0;
    check(!busy, "DATAPORTABORT stops the engine");
    void'(q.pop_front()); void'(q.pop_front());   // software skips the stuck record
    start = 1; @(negedge clk); start = 0;
    wait (!busy);
    @(negedge clk);
    check(msgs.size() == 4 && msgs[3].size() == 2 && msgs[3][1] == 32'h6, "next record delivered after abort");
    @(negedge clk);   // let the done pulse of that packet be counted
    // random packets: 1..8 records (some pads) of 1..20 words, the packet
    // trickling into the FIFO while RingP already runs
    begin
      logic [31:0] exp[$][$], words[$], m[$];
      int base_msgs, base_done, bad = 0;
      for (int p = 0; p < 20; p++) begin
        exp.delete(); words.delete();
        for (int r = 0, nr = 1 + $urandom % 8; r < nr; r++) begin
          if ($urandom % 5 == 0) begin words.push_back(32'h0); continue; end
          m.delete();
          m.push_back(raw($urandom % 127, $urandom));
          for (int i = 1, n = 1 + $urandom % 20; i < n; i++) m.push_back($urandom);
          words.push_back(32'(m.size()));
          words = {words, m};
          exp.push_back(m);
        end
        base_msgs = msgs.size(); base_done = dones;
        fifo_arrived = 0;
        start = 1; @(negedge clk); start = 0;
        foreach (words[i]) begin
          q.push_back(words[i]);
          repeat ($urandom % 3) @(negedge clk);
          @(negedge clk);
        end
        fifo_arrived = 1;
        wait (!busy);
        @(negedge clk); @(negedge clk);
        if (msgs.size() - base_msgs != exp.size() || dones - base_done != 1) begin
          bad++; $display("packet %0d: %0d messages, expected %0d, %0d done pulses", p, msgs.size() - base_msgs, exp.size(), dones - base_done);
        end
        else foreach (exp[i]) if (msgs[base_msgs + i] != exp[i]) bad++;
      end
      check(bad == 0, "20 random packets delivered record by record");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
