// tb_niu_regs: checks the processor register block against the register
// map: writable fields of HIPPICTRL, NETBNDCTRL, RINGBNDCTRL and RINGCTRL,
// the strobes of every trigger register, FIFO pops on reads, the read-back
// of status bits at their masks (with low-active bits inverted), address
// sharing between read-only and write-only registers, and the interrupt
// events with their enables.
module tb_niu_regs;
  import niu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sel, we;
  logic [31:0] addr, wdata, rdata;
  niu_ctrl_t ctrl;
  niu_stat_t stat;
  logic cp_msg_in, clock_ovf;
  logic [7:0] irq_ev;
  int checks = 0, failures = 0;

  niu_regs dut (.clk(clk), .rst_n(rst_n), .bus_sel_i(sel), .bus_we_i(we), .bus_addr_i(addr),
    .bus_wdata_i(wdata), .bus_rdata_o(rdata), .ctrl_o(ctrl), .stat_i(stat), .cp_msg_in_i(cp_msg_in),
    .clock_ovf_i(clock_ovf), .irq_event_o(irq_ev));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // strobe capture
  niu_ctrl_t seen;
  always @(posedge clk) seen <= ctrl;

  task automatic wr(input logic [7:0] off, input logic [31:0] d);
    @(negedge clk); sel = 1; we = 1; addr = {24'hffffff, off}; wdata = d;
    @(negedge clk); sel = 0; we = 0;
  endtask
  task automatic rd(input logic [7:0] off, output logic [31:0] d);
    @(negedge clk); sel = 1; we = 0; addr = {24'hffffff, off};
    #1 d = rdata;
    @(negedge clk); sel = 0;
  endtask

  initial begin
    logic [31:0] d;
    sel = 0; we = 0; addr = 0; wdata = 0; stat = '0; cp_msg_in = 0; clock_ovf = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // HIPPICTRL writes
    wr(A_HIPPICTRL, 32'h0a03_0105);
    check(ctrl.make_request && ctrl.hs_int_en && ctrl.hippi_connect && ctrl.soft_led_n == 4'ha, "HIPPICTRL fields");
    check(seen.pulse_load && seen.pulse_count == 6'd5, "PULSECOUNT load strobe");
    wr(A_HIPPICTRL, 32'h0a03_0100);
    check(!seen.pulse_load, "zero PULSECOUNT loads nothing");
    wr(A_HIPPIIFIELD, 32'hcafe_f00d);
    check(ctrl.src_ifield == 32'hcafe_f00d, "source I-field");
    wr(A_DPLEN_HSLEN, 32'h0000_0abc);
    check(ctrl.hippi_len_m1 == 12'habc, "HIPPILEN");
    wr(A_NETBNDCTRL, 32'h0000_00e5);   // window0=5 window1=4 bank=1 senddata=1
    check(ctrl.nb_window0 == 3'd5 && ctrl.nb_window1 == 3'd4 && ctrl.bank_select && ctrl.send_data, "NETBNDCTRL fields");
    wr(A_RINGBNDCTRL, 32'h0003_c000);
    check(ctrl.rb_select && ctrl.rb_int_en && ctrl.test_bits == 2'b11, "RINGBNDCTRL fields");
    wr(A_RINGCTRL, 32'h3c00_0003);
    check(ctrl.cp_rx_int_en && ctrl.cp_tx_int_en && ctrl.dp_arrv_int_en && ctrl.dp_in_int_en &&
          ctrl.dp_tx_int_en && ctrl.ringp_counter_sel, "RINGCTRL enables");
    // triggers
    wr(A_CMDPORTCLOSE, 0);  check(seen.cp_close, "CMDPORTCLOSE");
    wr(A_RESETFIFO0, 0);    check(seen.rb_reset == 2'b01, "RESETFIFO0");
    wr(A_RESETFIFO1, 0);    check(seen.rb_reset == 2'b10, "RESETFIFO1");
    wr(A_DATAPORTXMIT, 0);  check(seen.dp_xmit, "DATAPORTXMIT");
    wr(A_HIPPIXMIT, 0);     check(seen.hippi_xmit, "HIPPIXMIT");
    wr(A_CLEARERROR, 0);    check(seen.clear_error, "CLEARERROR");
    wr(A_DATAPORTABRT, 0);  check(seen.dp_abort, "DATAPORTABORT");
    wr(A_DATAPORTOPEN, 0);  check(seen.dp_open, "DATAPORTOPEN");
    wr(A_RBFIFO0_NBHD, 32'h77); check(seen.nb_hdr_push && seen.wdata == 32'h77 && !seen.rb_proc_pop[0], "NETBNDHEADER write");
    wr(A_CMDPORT, 32'h88);  check(seen.cp_write && seen.wdata == 32'h88, "CMDPORTWRITE");
    // reads and pops
    stat.rb_proc_data = 32'h1234; stat.cp_data = 32'h5678; stat.cp_empty = 0;
    rd(A_RBFIFO0_NBHD, d); check(d == 32'h1234 && seen.rb_proc_pop == 2'b01 && !seen.nb_hdr_push, "RINGBNDFIFO0 read pops");
    rd(A_RINGBNDFIFO1, d); check(seen.rb_proc_pop == 2'b10, "RINGBNDFIFO1 read pops");
    rd(A_CMDPORT, d);      check(d == 32'h5678 && seen.cp_pop && !seen.cp_write, "CMDPORTFIFO read pops");
    stat.cp_empty = 1;
    rd(A_CMDPORT, d);      check(!seen.cp_pop, "no pop from an empty command FIFO");
    stat.rb_cksum = 32'haaaa_5555; stat.nb_cksum = 32'h1111_2222;
    rd(A_RINGBNDCKSM, d);  check(seen.rb_cksum_pop, "RINGBNDCHKSUM read pops");
    check(d == 32'h5555_aaaa, "RINGBNDCHKSUM halves crossed over");
    rd(A_NETBNDCKSM, d);   check(d == 32'h1111_2222, "NETBNDCHKSUM straight");
    stat.dp_len = 16'd42;
    rd(A_DPLEN_HSLEN, d);  check(d == 32'd42, "DATAPORTLEN");
    stat.ringp_count = 7; stat.ringp_last = 32'h99;
    rd(A_RINGP, d);        check(d == 7, "RINGP counter selected");
    // status bits
    stat.accepted = 1; stat.sending_pkt = 1; stat.ifield_parity_ok = 4'hf; stat.conn_request = 1;
    rd(A_HIPPICTRL, d);    check(d == 32'h0023_0079, "HIPPICTRL status");
    stat.rb_arrived = 2'b10; stat.rb_empty = 2'b01; stat.cksum_state = SUMQUED1; stat.rb_xmiterr = 2'b10;
    rd(A_RINGBNDCTRL, d);  check(d == 32'h0003_eea0, "RINGBNDCTRL status");
    stat.ringp_busy = 1; stat.dp_receiving = 1; stat.cp_empty = 1; stat.cp_ready = 1;
    rd(A_RINGCTRL, d);     check(d == 32'h0100_000a, "RINGCTRL status");
    stat.hdr_empty = 1; stat.packet_sent = 1;
    rd(A_NETBNDCTRL, d);   check(d == 32'h0000_0012, "NETBNDCTRL status");
    stat.clock = 16'h1357; stat.error_reset = 1;
    rd(A_NIUSTATUS, d);    check(d == 32'h0001_1357, "NIUSTATUS");
    check(seen.irq_clear[IRQ_CLOCKOVF], "NIUSTATUS read clears level 2");
    // interrupt events
    @(negedge clk);
    stat.rb_arriving = 2'b01;
    #1 check(irq_ev[IRQ_RINGBOUND], "PKTARRIVING rise -> level 7");
    @(negedge clk);
    #1 check(!irq_ev[IRQ_RINGBOUND], "one event per edge");
    stat.ringp_busy = 0;
    #1 check(irq_ev[IRQ_DPWRITE], "RingP finished -> level 5");
    @(negedge clk);
    stat.dp_receiving = 0;
    #1 check(irq_ev[IRQ_NETBOUND], "DPRECEIVING fall -> level 6");
    @(negedge clk);
    stat.sending_pkt = 0;
    #1 check(irq_ev[IRQ_HIPPISRC], "SENDINGPKT fall -> level 4");
    @(negedge clk);
    cp_msg_in = 1; clock_ovf = 1;
    #1 check(irq_ev[IRQ_CMDPORT] && irq_ev[IRQ_CLOCKOVF], "command message and clock overflow");
    @(negedge clk);
    cp_msg_in = 0; clock_ovf = 0;
    wr(A_RINGCTRL, 32'h0);
    stat.dp_receiving = 1;
    #1 check(!irq_ev[IRQ_NETBOUND], "disabled interrupt stays quiet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
