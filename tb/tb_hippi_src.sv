// tb_hippi_src: plays the remote HIPPI destination for the source port.
// Checks the connection request with the I-field, acceptance and rejection,
// that no burst starts without a READY credit, that a packet of header FIFO
// words plus a buffer window comes out in full 256-word bursts with the short
// burst last, each with good byte parity and a correct LLRC, and the
// SENDINGPKT / PACKETSENT / HEADERACTIVE status.
module tb_hippi_src;
  import niu_pkg::*;
  logic clk = 0, rst_n = 0;
  hippi_s2d_t s2d;
  hippi_d2s_t d2s;
  logic make_req, xmit, send_data;
  logic [11:0] len_m1, win_addr;
  logic [31:0] ifield, win_data, hdr_data;
  logic [6:0] hdr_count;
  logic hdr_pop, hdr_push, hdr_empty, hdr_full;
  logic [31:0] hdr_wdata;
  logic accepted, rejected, src_ic, have_pulses, sending, sent_flag, hdr_active;
  int checks = 0, failures = 0;
  logic [31:0] window [4096];

  sync_fifo #(.WIDTH(32), .DEPTH(64)) u_hdr (.clk(clk), .rst_n(rst_n), .clear_i(1'b0), .push_i(hdr_push),
    .wdata_i(hdr_wdata), .pop_i(hdr_pop), .rdata_o(hdr_data), .empty_o(hdr_empty), .full_o(hdr_full),
    .count_o(hdr_count));

  hippi_src dut (.clk(clk), .rst_n(rst_n), .s2d_o(s2d), .d2s_i(d2s), .make_request_i(make_req),
    .ifield_i(ifield), .xmit_i(xmit), .send_data_i(send_data), .len_m1_i(len_m1), .hdr_data_i(hdr_data),
    .hdr_count_i(hdr_count), .hdr_pop_o(hdr_pop), .win_addr_o(win_addr), .win_data_i(win_data),
    .accepted_o(accepted), .rejected_o(rejected), .src_intercon_o(src_ic), .have_pulses_o(have_pulses),
    .sending_o(sending), .packet_sent_o(sent_flag), .header_active_o(hdr_active));

  assign win_data = window[win_addr];
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // remote destination: collects bursts, checks parity and LLRC, counts credits
  logic [31:0] rx[$];
  int burst_len[$];
  int credits_given = 0, bursts = 0, par_err = 0, llrc_err = 0, hdr_active_seen = 0;
  int cur_len = 0;
  logic [31:0] llrc = 0;
  logic burst_q = 0;
  always @(posedge clk) begin
    if (s2d.packet && s2d.burst) begin
      if (!burst_q) begin
        bursts++;
        llrc = 0;
        cur_len = 0;
        if (bursts > credits_given) begin failures++; $display("FAIL: burst without credit"); end
      end
      rx.push_back(s2d.data);
      llrc ^= s2d.data;
      cur_len++;
      if (s2d.parity != odd_parity(s2d.data)) par_err++;
    end else if (burst_q) begin
      if (s2d.data != llrc) llrc_err++;
      burst_len.push_back(cur_len);
    end
    if (hdr_active) hdr_active_seen++;
    burst_q <= s2d.burst;
  end

  task automatic give_ready(input int n);
    repeat (n) begin
      @(negedge clk); d2s.ready = 1; credits_given++;
      @(negedge clk); d2s.ready = 0;
    end
  endtask

  initial begin
    logic [31:0] expect_q[$];
    s2d = '0;
    d2s = '0; make_req = 0; xmit = 0; send_data = 0; len_m1 = 0; ifield = 32'h00c0_ffee;
    hdr_push = 0; hdr_wdata = 0;
    foreach (window[i]) window[i] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    d2s.intercon = 1;
    @(negedge clk);
    make_req = 1;
    @(negedge clk);
    check(s2d.request && s2d.data == 32'h00c0_ffee && s2d.parity == odd_parity(32'h00c0_ffee),
          "REQUEST with I-field");
    check(!accepted && src_ic, "not yet accepted");
    d2s.connect = 1;
    @(negedge clk);
    check(accepted && !rejected, "ACCEPTED");
    // header: 3 words
    for (int i = 0; i < 3; i++) begin
      hdr_push = 1; hdr_wdata = 32'h4848_0000 + i; expect_q.push_back(hdr_wdata);
      @(negedge clk);
    end
    hdr_push = 0;
    send_data = 1; len_m1 = 599;
    for (int i = 0; i < 600; i++) expect_q.push_back(window[i]);
    xmit = 1;
    @(negedge clk);
    xmit = 0;
    check(sending, "SENDINGPKT set");
    repeat (20) @(negedge clk);
    check(rx.size() == 0 && s2d.packet, "PACKET up but no burst without READY");
    give_ready(1);
    repeat (300) @(negedge clk);
    check(rx.size() == 256, "one burst per credit");
    check(!have_pulses, "credit used");
    give_ready(2);
    wait (!sending);
    @(negedge clk);
    check(rx == expect_q, "header then window words, in order");
    check(burst_len.size() == 3 && burst_len[0] == 256 && burst_len[1] == 256 && burst_len[2] == 91,
          "bursts of 256, 256 and a short last burst");
    check(par_err == 0 && llrc_err == 0, "parity and LLRC good");
    check(sent_flag, "PACKETSENT");
    check(hdr_active_seen >= 3, "HEADERACTIVE during header words");
    check(hdr_empty, "header FIFO drained");
    // credits given early are kept: header-only packet
    give_ready(1);
    hdr_push = 1; hdr_wdata = 32'h1234_5678;
    @(negedge clk);
    hdr_push = 0; send_data = 0;
    rx.delete();
    xmit = 1;
    @(negedge clk);
    xmit = 0;
    check(!sent_flag, "PACKETSENT cleared by a new packet");
    wait (!sending);
    @(negedge clk);
    check(rx.size() == 1 && rx[0] == 32'h1234_5678, "header-only packet");
    // rejection
    make_req = 0;
    @(negedge clk);
    d2s.connect = 0;
    make_req = 1;
    @(negedge clk);
    d2s.connect = 1;
    repeat (4) @(negedge clk);
    d2s.connect = 0;
    @(negedge clk); @(negedge clk);
    check(rejected && !accepted, "REJECTED after CONNECT drops");
    make_req = 0;
    @(negedge clk);
    check(!rejected, "REJECTED cleared with MAKEREQUEST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
