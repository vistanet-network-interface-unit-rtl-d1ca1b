// tb_niu_top: end-to-end test of the NIU at its full default sizes.
//
// The testbench plays the processor software (through the register bus),
// the PXPL5 ring board (ring ports 0 and 1, with channel acquisition delays
// and a node 127 that never answers) and the network: the HIPPI source port
// is looped back into the HIPPI destination port, with a switch that can
// corrupt one parity bit on the way.
//
// Scenario:
//  1. command port: a PING-like message arrives on ring port 0; software
//     reads it from CMDPORTFIFO and answers through CMDPORTWRITE/CLOSE.
//  2. processor ERROR halt: the NIU resets the processor and reports it.
//  3. a 301-word ring message enters data port 1 into a network-bound
//     window; software reads RAW, length and checksum, opens a HIPPI
//     connection (checking the I-field as the destination), writes a header
//     (two HIPPI-FP words, a RingP pad, the RingP header and the translated
//     RAW) and sends header plus window. The packet is two bursts, the last
//     short; the destination gives one ready pulse first and the rest after
//     reading the header from the ring-bound FIFO; the checksum is compared
//     and RingP delivers the message on ring port 1.
//  4. a header-only packet with three RingP messages, one to the missing
//     node 127: it lands in the other ring-bound FIFO, the missing node
//     times out (65536 clocks) and the messages before and after arrive.
//  4b. the largest packet, 4096 words in 16 full bursts, from a 4093-word
//     ring message held in bank 1 window 5, delivered back to the ring at
//     one word per clock.
//  5. a packet corrupted on the wire: XMITERR is seen and it is discarded.
//  6. a packet longer than a ring-bound FIFO (17 bursts): LONGPKT.
//  7. DATAPORTABORT stops RingP waiting on node 127; this is the third
//     packet whose checksum was left unread, so the queue reports SUMERROR.
//  7b. the processor writes a window through its test path into the
//     network-bound memory and sends it (a software data source).
//  8. connection rejection.
// Every interrupt level (7..2) must be seen on the interrupt request lines.
module tb_niu_top;
  import niu_pkg::*;
  logic clk = 0, rst_n = 1;
  logic bus_sel, bus_we;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic [3:0] irl, leds;
  logic cpu_error, cpu_reset_n;
  hippi_s2d_t hsrc, hdst_in;
  hippi_d2s_t hdst_out;
  ring_beat_t rp0_rx, rp0_tx, rp1_rx, rp1_tx;
  logic rp0_rx_ready, rp0_tx_ready, rp1_rx_ready, rp1_tx_ready;
  int checks = 0, failures = 0;

  niu_top dut (
    .clk(clk), .rst_n(rst_n), .bus_sel(bus_sel), .bus_we(bus_we), .bus_addr(bus_addr), .bus_wdata(bus_wdata),
    .bus_rdata(bus_rdata), .irl(irl), .cpu_error(cpu_error), .cpu_reset_n(cpu_reset_n), .soft_led_n(leds),
    .hdst_i(hdst_in), .hdst_o(hdst_out), .hsrc_o(hsrc), .hsrc_i(hdst_out),
    .rp0_rx(rp0_rx), .rp0_rx_ready(rp0_rx_ready), .rp0_tx(rp0_tx), .rp0_tx_ready(rp0_tx_ready),
    .rp1_rx(rp1_rx), .rp1_rx_ready(rp1_rx_ready), .rp1_tx(rp1_tx), .rp1_tx_ready(rp1_tx_ready));

  always #20 clk = ~clk;   // 25 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ network loopback
  logic corrupt_arm = 0;
  int   wire_words = 0;
  always_comb begin
    hdst_in = hsrc;
    if (corrupt_arm && hsrc.burst && wire_words == 5) hdst_in.parity[0] = ~hsrc.parity[0];
  end
  // network monitor: bursts, their lengths, stalls waiting for READY
  int bursts = 0, short_bursts = 0, full_bursts = 0, long_bursts = 0, stall_cycles = 0, cur_burst = 0;
  logic burst_q = 0;
  logic [31:0] wire_q[$];
  always @(posedge clk) begin
    if (hsrc.packet && hsrc.burst) begin
      if (!burst_q) begin bursts++; cur_burst = 0; end
      cur_burst++;
      wire_words++;
      wire_q.push_back(hsrc.data);
    end else if (burst_q) begin
      if (cur_burst < 256) short_bursts++;
      else if (cur_burst == 256) full_bursts++;
      else long_bursts++;
    end
    if (hsrc.packet && !hsrc.burst && !burst_q) stall_cycles++;
    burst_q <= hsrc.burst;
  end

  // ------------------------------------------------------------ ring board model
  int acq1 = 0, acq0 = 0;
  bit full_rate = 0;          // ring takes a word every clock once acquired
  longint cycle = 0, sop_cycle = 0, eop_cycle = 0;
  always @(posedge clk) cycle++;
  always @(negedge clk) begin
    rp1_tx_ready = 0;
    if (rp1_tx.valid && rp1_tx.sop) begin
      if (rp1_tx.data[31:25] != 7'd127) begin acq1++; rp1_tx_ready = acq1 > 8; end
    end else if (rp1_tx.valid) rp1_tx_ready = full_rate || ($urandom % 4) != 0;
    rp0_tx_ready = 0;
    if (rp0_tx.valid && rp0_tx.sop) begin acq0++; rp0_tx_ready = acq0 > 3; end
    else if (rp0_tx.valid) rp0_tx_ready = 1;
  end
  logic [31:0] ring1_msgs[$][$], ring0_msgs[$][$];
  logic [31:0] cur1[$], cur0[$];
  always @(posedge clk) begin
    if (rp1_tx.valid && rp1_tx_ready) begin
      if (rp1_tx.sop) begin cur1.delete(); acq1 = 0; sop_cycle = cycle; end
      if (rp1_tx.eop) eop_cycle = cycle;
      cur1.push_back(rp1_tx.data);
      if (rp1_tx.eop) ring1_msgs.push_back(cur1);
    end
    if (rp0_tx.valid && rp0_tx_ready) begin
      if (rp0_tx.sop) begin cur0.delete(); acq0 = 0; end
      cur0.push_back(rp0_tx.data);
      if (rp0_tx.eop) ring0_msgs.push_back(cur0);
    end
  end

  task automatic ring_send(input int port, input logic [31:0] m[$]);
    for (int i = 0; i < m.size(); i++) begin
      if (port == 0) begin
        rp0_rx.valid = 1; rp0_rx.sop = (i == 0); rp0_rx.eop = (i == m.size() - 1); rp0_rx.data = m[i];
        @(posedge clk); while (!rp0_rx_ready) @(posedge clk);
      end else begin
        rp1_rx.valid = 1; rp1_rx.sop = (i == 0); rp1_rx.eop = (i == m.size() - 1); rp1_rx.data = m[i];
        @(posedge clk); while (!rp1_rx_ready) @(posedge clk);
      end
      @(negedge clk);
    end
    rp0_rx = '0; rp1_rx = '0;
  endtask

  // ------------------------------------------------------------ interrupt monitor
  int irq_seen[8];
  logic [3:0] irl_q = 0;
  always @(posedge clk) begin
    if (irl != irl_q && irl != 0) irq_seen[irl]++;
    irl_q <= irl;
  end

  // ------------------------------------------------------------ processor bus
  task automatic wr(input logic [7:0] off, input logic [31:0] d);
    @(negedge clk); bus_sel = 1; bus_we = 1; bus_addr = {24'hffffff, off}; bus_wdata = d;
    @(negedge clk); bus_sel = 0; bus_we = 0;
  endtask
  task automatic rd(input logic [7:0] off, output logic [31:0] d);
    @(negedge clk); bus_sel = 1; bus_we = 0; bus_addr = {24'hffffff, off};
    #1 d = bus_rdata;
    @(negedge clk); bus_sel = 0;
  endtask
  // processor test path into the network-bound memory: word {bank, window, address}
  task automatic wrm(input int bank, input int win, input int addr, input logic [31:0] d);
    @(negedge clk); bus_sel = 1; bus_we = 1; bus_addr = 32'hfff0_0000 + 32'((bank * 8 + win) * 4096 + addr) * 4;
    bus_wdata = d;
    @(negedge clk); bus_sel = 0; bus_we = 0;
  endtask
  task automatic rdm(input int bank, input int win, input int addr, output logic [31:0] d);
    @(negedge clk); bus_sel = 1; bus_we = 0; bus_addr = 32'hfff0_0000 + 32'((bank * 8 + win) * 4096 + addr) * 4;
    #1 d = bus_rdata;
    @(negedge clk); bus_sel = 0;
  endtask
  task automatic poll(input logic [7:0] off, input logic [31:0] mask, input logic [31:0] val, input int limit);
    logic [31:0] d;
    int n = 0;
    do begin rd(off, d); n++; end while ((d & mask) != val && n < limit);
    if ((d & mask) != val) begin failures++; $display("FAIL: poll %h mask %h", off, mask); end
  endtask

  function automatic logic [15:0] fold(input logic [31:0] s);
    logic [31:0] t = s;
    while (t[31:16] != 0) t = t[15:0] + t[31:16];
    return t[15:0];
  endfunction
  function automatic logic [31:0] sum2(input logic [31:0] w[$]);
    logic [31:0] h = 0, l = 0;
    foreach (w[i]) begin h += w[i][31:16]; l += w[i][15:0]; end
    return {fold(h), fold(l)};
  endfunction

  // software copy of the writable HIPPICTRL fields
  logic [31:0] hctrl = 32'h0f00_0000;
  localparam logic [31:0] MAKEREQ = 32'h1 << HC_MAKEREQUEST, HCONN = 32'h1 << HC_HIPPICONNECT,
                          HSINT = 32'h1 << HC_HSINTENABLE;

  // mechanisms seen
  int n_pingpong = 0, n_parity_err = 0, n_long = 0, n_sumerr = 0, n_timeout_ok = 0, n_abort = 0;
  int n_max_pkt = 0, n_testpath = 0;
  int n_reject = 0, n_pad = 0, n_cmd_rx = 0, n_cmd_tx = 0, n_err_reset = 0, n_multi_burst = 0;
  int used_fifo[2];

  // Send one packet through the loopback and take it in at the destination.
  // hdr: header FIFO words; ndata: window words (0 = none); fp: HIPPI-FP words the
  // processor reads and removes. Returns the ring-bound FIFO used and its words.
  task automatic net_packet(input logic [31:0] hdr[$], input int ndata, input int fp,
                            output int fifo, output logic [31:0] words[$], input logic [31:0] nbctrl = 32'h42);
    logic [31:0] d;
    int total, more;
    total = hdr.size() + ndata;
    foreach (hdr[i]) wr(A_RBFIFO0_NBHD, hdr[i]);
    if (ndata > 0) wr(A_DPLEN_HSLEN, ndata - 1);
    wr(A_NETBNDCTRL, (ndata > 0 ? 32'h80 : 32'h0) | nbctrl);   // default: bank 1 in, read bank 0 window 2
    wr(A_HIPPICTRL, hctrl | 32'd1);          // one ready pulse for the first burst
    wire_q.delete();
    wr(A_HIPPIXMIT, 0);
    // destination: which FIFO is arriving?
    do rd(A_RINGBNDCTRL, d); while (!(d[RC_PKTARRIVING] || d[RC_PKTARRIVING + 4]));
    fifo = d[RC_PKTARRIVING] ? 0 : 1;
    used_fifo[fifo]++;
    wr(A_RINGBNDCTRL, (fifo == 0 ? 32'h1 << RC_RBFIFOSELECT : 32'h0) | (32'h1 << RC_RBINTENABLE));
    // read the HIPPI-FP header words as they arrive
    for (int i = 0; i < fp; i++) begin
      poll(A_RINGBNDCTRL, 32'h1 << (RC_FIFOEMPTY_L + fifo), 32'h1 << (RC_FIFOEMPTY_L + fifo), 1000);
      rd(fifo == 0 ? A_RBFIFO0_NBHD : A_RINGBNDFIFO1, d);
      check(d == hdr[i], "HIPPI-FP header word read by the processor");
    end
    more = (total + 255) / 256 - 1;
    if (more > 63) more = 63;
    if (more > 0) wr(A_HIPPICTRL, hctrl | 32'(more));
    poll(A_RINGBNDCTRL, 32'h1 << (RC_PKTARRIVED + 4 * fifo), 32'h1 << (RC_PKTARRIVED + 4 * fifo), 100000);
    poll(A_HIPPICTRL, 32'h1 << HC_SENDINGPKT, 0, 1000);
    if ((total + 255) / 256 > 1) n_multi_burst++;
    words = wire_q;
  endtask

  initial begin
    logic [31:0] d, raw, m[$], hdr[$], words[$], sent[$];
    int fifo;
    bus_sel = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0; cpu_error = 0;
    rp0_rx = '0; rp1_rx = '0;
    #1 rst_n = 0;               // power-on reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    check(cpu_reset_n, "processor out of reset");
    // enable all interrupts
    wr(A_RINGCTRL, (32'h1 << GC_CPRXINTENABLE) | (32'h1 << GC_CPTXINTENABLE) | (32'h1 << GC_DPARRVINTEN) |
                   (32'h1 << GC_DPININTEN) | (32'h1 << GC_DPTXINTEN));
    wr(A_RINGBNDCTRL, 32'h1 << RC_RBINTENABLE);
    hctrl = hctrl | HSINT;
    wr(A_HIPPICTRL, hctrl);

    // ---------------------------------------------------------- 1. command port
    m = '{{7'h20, 5'd0, 16'd0, 4'd0}, {7'h31, 25'h5}};      // PING, reply RAW
    ring_send(0, m);
    poll(A_RINGCTRL, 32'h1 << GC_CMDFIFOAVAIL, 32'h1 << GC_CMDFIFOAVAIL, 100);
    rd(A_CMDPORT, d); check(d == m[0], "command RAW read");
    rd(A_CMDPORT, d); check(d == m[1], "command word read");
    rd(A_RINGCTRL, d); check(!d[GC_CMDFIFOAVAIL] && !d[GC_CMDFIFOEMPTY_L], "command FIFO empty");
    n_cmd_rx++;
    wr(A_CMDPORT, m[1]);
    wr(A_CMDPORTCLOSE, 0);
    repeat (20) @(negedge clk);
    check(ring0_msgs.size() == 1 && ring0_msgs[0].size() == 1 && ring0_msgs[0][0] == m[1], "PING reply sent");
    if (ring0_msgs.size() == 1) n_cmd_tx++;
    rd(A_RINGCTRL, d);

    // ---------------------------------------------------------- 2. error reset
    cpu_error = 1; @(negedge clk); cpu_error = 0;
    check(!cpu_reset_n, "processor reset after ERROR halt");
    repeat (20) @(negedge clk);
    rd(A_NIUSTATUS, d); check(d[NS_ERRORRESET], "ERRORRESET reported");
    wr(A_CLEARERROR, 0);
    rd(A_NIUSTATUS, d); check(!d[NS_ERRORRESET], "ERRORRESET cleared");
    n_err_reset++;

    // ---------------------------------------------------------- 3. ring -> network -> ring
    wr(A_NETBNDCTRL, 32'd2);                       // data enters bank 0 window 2
    wr(A_DATAPORTOPEN, 0);
    raw = {7'h10, 4'h0, 4'h3, 17'h0};              // to the NIU, table index 3
    m = '{raw};
    for (int i = 0; i < 300; i++) m.push_back($urandom);
    ring_send(1, m);
    poll(A_RINGCTRL, 32'h1 << GC_DPWAITING, 32'h1 << GC_DPWAITING, 100);
    rd(A_DATAPORTRAW, d); check(d == raw, "DATAPORTRAW");
    rd(A_DPLEN_HSLEN, d); check(d == 301, "DATAPORTLEN");
    rd(A_NETBNDCKSM, d);  check(d == sum2(m[1:$]), "network-bound checksum");
    // connection: our own destination sees the request
    wr(A_HIPPIIFIELD, 32'h0300_0777);
    hctrl = hctrl | MAKEREQ;
    wr(A_HIPPICTRL, hctrl);
    poll(A_HIPPICTRL, 32'h1 << HC_CONNECTREQUEST, 32'h1 << HC_CONNECTREQUEST, 100);
    rd(A_HIPPIIFIELD, d); check(d == 32'h0300_0777, "received I-field");
    rd(A_HIPPICTRL, d);   check(d[HC_IFLDPARITY +: 4] == 4'hf, "I-field parity good");
    hctrl = hctrl | HCONN;
    wr(A_HIPPICTRL, hctrl);
    poll(A_HIPPICTRL, 32'h1 << HC_ACCEPTED, 32'h1 << HC_ACCEPTED, 100);
    hdr = '{32'h0400_0000, 32'h0000_0010, 32'h0, 32'd301, {7'h22, raw[24:0]}};
    net_packet(hdr, 300, 2, fifo, words);
    sent = {hdr, m[1:$]};
    check(words == sent, "HIPPI packet = header FIFO words then window");
    check(fifo == 0, "first packet into FIFO 0");
    rd(A_RINGBNDCTRL, d);
    check(d[RC_XMITERR] == 0 && d[RC_CHKSUMSTATE +: 2] == SUMQUED1, "no error, one checksum queued");
    rd(A_RINGBNDCKSM, d); check(d == {sum2(sent)[15:0], sum2(sent)[31:16]}, "ring-bound checksum of the whole packet");
    rd(A_NETBNDCTRL, d);  check(d[NC_PACKETSENT] && d[NC_HEADEREMPTY_L] == 0, "PACKETSENT, header FIFO empty");
    wr(A_RINGBNDCTRL, (32'h0) | (32'h1 << RC_RBINTENABLE));       // RingP reads FIFO 0
    wr(A_DATAPORTXMIT, 0);
    poll(A_RINGCTRL, 32'h1 << GC_DATAPORTBUSY_L, 32'h1 << GC_DATAPORTBUSY_L, 10000);
    check(ring1_msgs.size() == 1, "one message on ring port 1");
    if (ring1_msgs.size() == 1) begin
      check(ring1_msgs[0].size() == 301 && ring1_msgs[0][0] == {7'h22, raw[24:0]} && ring1_msgs[0][1:$] == m[1:$],
            "ring message delivered with translated RAW");
      n_pad++;
    end
    wr(A_RESETFIFO0, 0);

    // ---------------------------------------------------------- 4. timeout, other FIFO
    hdr = '{32'h0400_0000, 32'h0000_0011,
            32'd3, {7'd9, 25'h1}, 32'ha1, 32'ha2,
            32'd2, {7'd127, 25'h2}, 32'hb1,
            32'd1, {7'd11, 25'h3}};
    net_packet(hdr, 0, 2, fifo, words);
    check(fifo == 1, "second packet into FIFO 1");
    if (fifo == 1) n_pingpong++;
    rd(A_RINGBNDCKSM, d); check(d == {sum2(hdr)[15:0], sum2(hdr)[31:16]}, "checksum of the second packet");
    wr(A_RINGBNDCTRL, (32'h1 << RC_RBFIFOSELECT) | (32'h1 << RC_RBINTENABLE));   // RingP reads FIFO 1
    wr(A_DATAPORTXMIT, 0);
    poll(A_RINGCTRL, 32'h1 << GC_DATAPORTBUSY_L, 32'h1 << GC_DATAPORTBUSY_L, 100000);
    check(ring1_msgs.size() == 3, "two more messages, the one to node 127 dropped");
    if (ring1_msgs.size() == 3) begin
      check(ring1_msgs[1].size() == 3 && ring1_msgs[1][2] == 32'ha2, "message before the timeout");
      check(ring1_msgs[2].size() == 1 && ring1_msgs[2][0] == {7'd11, 25'h3}, "message after the timeout");
      n_timeout_ok++;
    end
    wr(A_RESETFIFO1, 0);

    // ---------------------------------------------------------- 4b. largest packet
    // 4096 words (the largest HIPPI packet) through bank 1 window 5: a
    // 4093-word ring message, 2 HIPPI-FP words, RingP header and RAW.
    wr(A_NETBNDCTRL, 32'h40 | (32'd5 << 3) | 32'd2);   // data enters bank 1 window 5
    wr(A_DATAPORTOPEN, 0);
    raw = {7'h10, 4'h0, 4'h7, 17'h0};
    m = '{raw};
    for (int i = 0; i < 4092; i++) m.push_back($urandom);
    ring_send(1, m);
    poll(A_RINGCTRL, 32'h1 << GC_DPWAITING, 32'h1 << GC_DPWAITING, 100);
    rd(A_DPLEN_HSLEN, d); check(d == 4093, "DATAPORTLEN of the largest message");
    rd(A_NETBNDCKSM, d);  check(d == sum2(m[1:$]), "network-bound checksum, largest message");
    begin
      int bad = 0;
      for (int i = 0; i < 24; i++) begin
        int a = (i < 2) ? i * 4091 : $urandom % 4092;
        rdm(1, 5, a, d);
        if (d != m[a + 1]) bad++;
      end
      check(bad == 0, "processor test path reads the data port's words in bank 1 window 5");
      n_testpath++;
    end
    hdr = '{32'h0400_0000, 32'h0000_0015, 32'd4093, {7'h23, raw[24:0]}};
    net_packet(hdr, 4092, 2, fifo, words, (32'd5 << 3) | 32'd2);   // source reads bank 1 window 5
    sent = {hdr, m[1:$]};
    check(words.size() == 4096 && words == sent, "4096-word packet sent from bank 1 window 5");
    rd(A_RINGBNDCTRL, d);
    check(!d[RC_LONGPKT + 4 * fifo] && !d[RC_XMITERR + 4 * fifo], "largest packet fits one ring-bound FIFO");
    rd(A_RINGBNDCKSM, d); check(d == {sum2(sent)[15:0], sum2(sent)[31:16]}, "checksum of the largest packet");
    wr(A_RINGBNDCTRL, (fifo == 1 ? 32'h1 << RC_RBFIFOSELECT : 32'h0) | (32'h1 << RC_RBINTENABLE));
    full_rate = 1;
    wr(A_DATAPORTXMIT, 0);
    poll(A_RINGCTRL, 32'h1 << GC_DATAPORTBUSY_L, 32'h1 << GC_DATAPORTBUSY_L, 10000);
    full_rate = 0;
    m[0] = {7'h23, raw[24:0]};
    check(ring1_msgs.size() == 4 && ring1_msgs[3] == m, "largest message delivered");
    // once the channel is acquired, one word per 40 ns clock (25 Mword/s,
    // above the ring's 20 Mword/s)
    check(eop_cycle - sop_cycle == 4092, $sformatf("4093 words on the ring in %0d clocks", eop_cycle - sop_cycle + 1));
    n_max_pkt++;
    wr(fifo == 0 ? A_RESETFIFO0 : A_RESETFIFO1, 0);

    // ---------------------------------------------------------- 5. corrupted packet
    corrupt_arm = 1; wire_words = 0;
    hdr = '{32'h0400_0000, 32'h0000_0012, 32'd2, {7'd9, 25'h4}, 32'hc1, 32'hc2, 32'hc3};
    net_packet(hdr, 0, 2, fifo, words);
    corrupt_arm = 0;
    rd(A_RINGBNDCTRL, d);
    check(d[RC_XMITERR + 4 * fifo], "parity error reported for the packet");
    if (d[RC_XMITERR + 4 * fifo]) n_parity_err++;
    wr(fifo == 0 ? A_RESETFIFO0 : A_RESETFIFO1, 0);   // discard, checksum left unread
    rd(A_RINGBNDCTRL, d);
    check(!d[RC_PKTARRIVED + 4 * fifo] && !d[RC_XMITERR + 4 * fifo], "discarded packet cleared");

    // ---------------------------------------------------------- 6. long packet
    hdr = '{32'h0400_0000, 32'h0000_0013, 32'd1, {7'd9, 25'h5}};
    net_packet(hdr, 4096, 2, fifo, words);
    check(words.size() == 4100, "4100 words sent in 17 bursts");
    rd(A_RINGBNDCTRL, d);
    check(d[RC_LONGPKT + 4 * fifo], "LONGPKT for a packet larger than the FIFO");
    if (d[RC_LONGPKT + 4 * fifo]) n_long++;
    check(d[RC_CHKSUMSTATE +: 2] == SUMQUED2, "two checksums left unread");
    wr(fifo == 0 ? A_RESETFIFO0 : A_RESETFIFO1, 0);

    // ---------------------------------------------------------- 7. abort
    hdr = '{32'h0400_0000, 32'h0000_0014, 32'd2, {7'd127, 25'h6}, 32'hd1};
    net_packet(hdr, 0, 2, fifo, words);
    rd(A_RINGBNDCTRL, d);
    check(d[RC_CHKSUMSTATE +: 2] == SUMERROR, "third unread checksum: queue overflow reported");
    if (d[RC_CHKSUMSTATE +: 2] == SUMERROR) n_sumerr++;
    rd(A_RINGBNDCKSM, d);
    rd(A_RINGBNDCTRL, d); check(d[RC_CHKSUMSTATE +: 2] == SUMQUED1, "SUMERROR cleared by a read");
    rd(A_RINGBNDCKSM, d);
    wr(A_RINGBNDCTRL, (fifo == 1 ? 32'h1 << RC_RBFIFOSELECT : 32'h0) | (32'h1 << RC_RBINTENABLE));
    wr(A_DATAPORTXMIT, 0);
    repeat (200) @(negedge clk);
    rd(A_RINGCTRL, d); check(!d[GC_DATAPORTBUSY_L], "RingP busy waiting for node 127");
    wr(A_RINGCTRL, 32'h1 << GC_RINGPCOUNTER);
    rd(A_RINGP, d); check(d == 2, "RingP counter shows the stuck message");
    wr(A_DATAPORTABRT, 0);
    rd(A_RINGCTRL, d); check(d[GC_DATAPORTBUSY_L], "DATAPORTABORT stops RingP");
    if (d[GC_DATAPORTBUSY_L]) n_abort++;
    wr(fifo == 0 ? A_RESETFIFO0 : A_RESETFIFO1, 0);

    // ---------------------------------------------------------- 7b. software data source
    // the processor fills bank 0 window 7 through the test path and sends it
    for (int i = 0; i < 300; i++) wrm(0, 7, i, 32'h5a00_0000 + i);
    begin
      int bad = 0;
      for (int i = 0; i < 300; i += 37) begin rdm(0, 7, i, d); if (d != 32'h5a00_0000 + i) bad++; end
      check(bad == 0, "test path write then read");
    end
    hdr = '{32'h0400_0000, 32'h0000_0016, 32'd301, {7'd9, 25'h7}};
    net_packet(hdr, 300, 2, fifo, words, 32'h40 | 32'd7);   // source reads bank 0 window 7
    sent = hdr;
    for (int i = 0; i < 300; i++) sent.push_back(32'h5a00_0000 + i);
    check(words == sent, "packet sent from processor-written window");
    if (words == sent) n_testpath++;
    wr(fifo == 0 ? A_RESETFIFO0 : A_RESETFIFO1, 0);
    rd(A_RINGBNDCKSM, d);

    // ---------------------------------------------------------- 8. rejection
    hctrl = hctrl & ~HCONN;                        // destination drops CONNECT
    wr(A_HIPPICTRL, hctrl);
    repeat (3) @(negedge clk);
    rd(A_HIPPICTRL, d);
    check(d[HC_REJECTED] && !d[HC_ACCEPTED], "REJECTED when the destination drops the connection");
    if (d[HC_REJECTED]) n_reject++;
    hctrl = hctrl & ~MAKEREQ;
    wr(A_HIPPICTRL, hctrl);
    rd(A_HIPPICTRL, d); check(!d[HC_REJECTED], "REJECTED cleared");

    // ---------------------------------------------------------- mechanisms
    wait (irq_seen[2] > 0 || $time > 64'd400000 * 40);
    rd(A_NIUSTATUS, d);
    check(used_fifo[0] > 0 && used_fifo[1] > 0 && n_pingpong > 0, "both ring-bound FIFOs used");
    check(n_multi_burst >= 2, "multi-burst packets");
    check(short_bursts >= 2, "short last bursts");
    // a burst is 256 words on 256 consecutive 40 ns clocks (800 Mbit/s while BURST is high)
    check(full_bursts >= 17 && long_bursts == 0, "full bursts of exactly 256 clocks");
    check(stall_cycles > 0, "source waited for READY");
    check(n_pad > 0, "RingP pad skipped");
    check(n_max_pkt > 0, "largest packet end to end");
    check(n_testpath >= 2, "processor test path to the network-bound memory");
    check(n_timeout_ok > 0, "ring timeout");
    check(n_abort > 0, "DATAPORTABORT");
    check(n_parity_err > 0, "parity error detection");
    check(n_long > 0, "long packet");
    check(n_sumerr > 0, "checksum queue overflow");
    check(n_reject > 0, "connection rejection");
    check(n_cmd_rx > 0 && n_cmd_tx > 0, "command port receive and transmit");
    check(n_err_reset > 0, "error reset");
    for (int l = 2; l < 8; l++) begin
      check(irq_seen[l] > 0, $sformatf("interrupt level %0d raised", l));
    end
    $display("mechanisms: bursts=%0d short=%0d stall_cycles=%0d fifo0=%0d fifo1=%0d timeout=%0d abort=%0d parity=%0d long=%0d sumerr=%0d reject=%0d irq=%p",
             bursts, short_bursts, stall_cycles, used_fifo[0], used_fifo[1], n_timeout_ok, n_abort, n_parity_err,
             n_long, n_sumerr, n_reject, irq_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
