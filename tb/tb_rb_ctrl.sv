// tb_rb_ctrl: checks the ring-bound buffer controller with 16-word FIFOs:
// packets alternate between the two FIFOs, flags follow the packet life
// (arriving, arrived, error, long), a packet with both FIFOs busy is
// discarded, the processor may read the header while the packet is still
// arriving, RBFIFOSELECT routes the RingP and processor reads, a processor
// pop of the RingP-side FIFO is ignored, and RESETFIFOx frees a FIFO. Ends
// with 20 random-length packets read out by RingP and compared.
module tb_rb_ctrl;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic pkt_start, pkt_end, wr_valid, err, rb_sel, rp_pop;
  logic [31:0] wr_data, proc_data, rp_data;
  logic [1:0] reset, proc_pop, arriving, arrived, longpkt, xmiterr, empty, full;
  logic rp_empty, rp_arrived;
  int checks = 0, failures = 0;

  rb_ctrl #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .pkt_start_i(pkt_start), .pkt_end_i(pkt_end),
    .wr_valid_i(wr_valid), .wr_data_i(wr_data), .err_i(err), .rb_select_i(rb_sel), .reset_i(reset),
    .proc_pop_i(proc_pop), .proc_data_o(proc_data), .rp_pop_i(rp_pop), .rp_data_o(rp_data),
    .rp_empty_o(rp_empty), .rp_arrived_o(rp_arrived), .arriving_o(arriving), .arrived_o(arrived),
    .longpkt_o(longpkt), .xmiterr_o(xmiterr), .empty_o(empty), .full_o(full));

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

  task automatic start_pkt();
    @(negedge clk); pkt_start = 1;
    @(negedge clk); pkt_start = 0;
  endtask
  task automatic words(input int n, input int base, input int err_at);
    for (int i = 0; i < n; i++) begin
      wr_valid = 1; wr_data = base + i; err = (i == err_at);
      @(negedge clk);
    end
    wr_valid = 0; err = 0;
  endtask
  task automatic end_pkt();
    pkt_end = 1;
    @(negedge clk); pkt_end = 0;
  endtask

  initial begin
    pkt_start = 0; pkt_end = 0; wr_valid = 0; err = 0; rb_sel = 0; rp_pop = 0;
    wr_data = 0; reset = 0; proc_pop = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // packet A -> FIFO 0, processor reads its header while it arrives
    rb_sel = 1;                       // processor reads FIFO 0
    start_pkt();
    check(arriving == 2'b01, "A arriving in FIFO 0");
    words(3, 'h100, -1);
    check(proc_data == 'h100, "header word readable while arriving");
    proc_pop = 2'b01; @(negedge clk); proc_pop = 0;
    check(proc_data == 'h101, "processor popped one header word");
    words(7, 'h103, -1);
    end_pkt();
    check(arrived == 2'b01 && arriving == 2'b00 && xmiterr == 0, "A arrived, no error");
    // packet B -> FIFO 1 with an error
    start_pkt();
    check(arriving == 2'b10, "B arriving in FIFO 1");
    words(5, 'h200, 2);
    end_pkt();
    check(arrived == 2'b11 && xmiterr == 2'b10, "B arrived with error");
    // packet C: both busy -> discarded
    start_pkt();
    words(4, 'h300, -1);
    end_pkt();
    check(arriving == 0 && arrived == 2'b11, "C discarded");
    // RingP reads FIFO 0 (select 0), processor FIFO 1
    rb_sel = 0;
    @(negedge clk);
    check(rp_data == 'h101 && rp_arrived && !rp_empty, "RingP sees rest of A");
    check(proc_data == 'h200, "processor sees B");
    proc_pop = 2'b01; @(negedge clk); proc_pop = 0;
    check(rp_data == 'h101, "processor pop of the RingP FIFO ignored");
    for (int i = 0; i < 9; i++) begin
      check(rp_data == 'h101 + i, "A data to RingP");
      rp_pop = 1; @(negedge clk); rp_pop = 0;
    end
    check(rp_empty && empty[0], "FIFO 0 drained");
    // reset FIFO 0, then a long packet goes there
    reset = 2'b01; @(negedge clk); reset = 0;
    check(arrived == 2'b10 && empty[0], "FIFO 0 freed");
    start_pkt();
    check(arriving == 2'b01, "D into FIFO 0");
    words(20, 'h400, -1);
    end_pkt();
    check(longpkt == 2'b01 && full[0], "long packet flagged, FIFO full");
    reset = 2'b11; @(negedge clk); reset = 0;
    check(arrived == 0 && longpkt == 0 && xmiterr == 0 && empty == 2'b11, "all cleared");
    // random phase: packets of 1..16 words, each drained by RingP with random
    // gaps from whichever FIFO took it, then freed
    begin
      int bad = 0, f, n, base;
      for (int k = 0; k < 20; k++) begin
        start_pkt();
        if (arriving != 2'b01 && arriving != 2'b10) bad++;
        f = arriving[1];
        n = 1 + $urandom % DEPTH; base = $urandom;
        words(n, base, -1);
        end_pkt();
        if (!arrived[f] || longpkt[f] || xmiterr[f]) bad++;
        rb_sel = f[0];
        @(negedge clk);
        for (int i = 0; i < n; i++) begin
          repeat ($urandom % 3) @(negedge clk);
          if (rp_data != 32'(base + i) || rp_empty) bad++;
          rp_pop = 1; @(negedge clk); rp_pop = 0;
        end
        if (!rp_empty) bad++;
        reset = 2'(1 << f); @(negedge clk); reset = 0;
      end
      check(bad == 0, "20 random packets through the FIFOs to RingP");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
