// tb_dp_rx: sends ring messages into the data port receiver. Checks that the
// port only accepts a message after DATAPORTOPEN, that the RAW is kept in
// its register and not written to the buffer, that the data words land at
// window addresses 0.. of the selected bank and window, the length (RAW
// counted) and partial checksum (RAW not counted), the DPRECEIVING and
// DPWAITING flags including for a RAW-only message, and that words past the
// window end (16 words here) are not written. Ends with 30 random messages
// to random banks and windows, checked against a model.
module tb_dp_rx;
  import niu_pkg::*;
  localparam int WIN_AW = 4;
  logic clk = 0, rst_n = 0;
  logic open, rx_ready, bank, nb_we, nb_bank, receiving, waiting;
  logic [2:0] window, nb_window;
  logic [WIN_AW-1:0] nb_addr;
  logic [31:0] nb_data, raw, cksum;
  logic [15:0] len;
  ring_beat_t rx;
  int checks = 0, failures = 0;
  logic [31:0] mem [2][8][16];
  int writes = 0, recv_rise = 0;

  dp_rx #(.WIN_AW(WIN_AW)) dut (.clk(clk), .rst_n(rst_n), .open_i(open), .rx_i(rx), .rx_ready_o(rx_ready),
    .bank_i(bank), .window_i(window), .nb_we_o(nb_we), .nb_bank_o(nb_bank), .nb_window_o(nb_window),
    .nb_addr_o(nb_addr), .nb_data_o(nb_data), .receiving_o(receiving), .waiting_o(waiting), .raw_o(raw),
    .len_o(len), .cksum_o(cksum));

  always #5 clk = ~clk;
  logic recv_q = 0;
  always @(posedge clk) begin
    if (nb_we) begin mem[nb_bank][nb_window][nb_addr] <= nb_data; writes++; end
    if (receiving && !recv_q) recv_rise++;
    recv_q <= receiving;
  end

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

  function automatic logic [15:0] fold(input logic [31:0] s);
    logic [31:0] t = s;
    while (t[31:16] != 0) t = t[15:0] + t[31:16];
    return t[15:0];
  endfunction

  // offers the message word by word, honouring rx_ready; returns clocks stalled before the RAW went in
  task automatic send(input logic [31:0] m[$], output int stalled);
    stalled = 0;
    for (int i = 0; i < m.size(); i++) begin
      rx.valid = 1; rx.sop = (i == 0); rx.eop = (i == m.size() - 1); rx.data = m[i];
      @(posedge clk);
      while (!rx_ready) begin if (i == 0) stalled++; @(posedge clk); end
      @(negedge clk);
    end
    rx = '0;
  endtask

  initial begin
    logic [31:0] m[$];
    logic [31:0] h, l;
    int st, w0;
    rx = '0; open = 0; bank = 1; window = 3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(waiting && !rx_ready, "closed after reset");
    m = '{32'h0a00_0001, 32'h1111_2222, 32'h3333_4444, 32'hffff_0001, 32'h0000_ffff};
    h = 0; l = 0;
    for (int i = 1; i < m.size(); i++) begin h += m[i][31:16]; l += m[i][15:0]; end
    fork
      send(m, st);
      begin repeat (8) @(negedge clk); open = 1; @(negedge clk); open = 0; end
    join
    check(st >= 8, "message held off until DATAPORTOPEN");
    @(negedge clk);
    check(raw == 32'h0a00_0001, "RAW captured");
    check(len == 16'd5, "length counts the RAW");
    check(cksum == {fold(h), fold(l)}, "partial checksum without the RAW");
    check(writes == 4, "only data words written");
    check(mem[1][3][0] == 32'h1111_2222 && mem[1][3][3] == 32'h0000_ffff, "data in bank 1 window 3");
    check(waiting && !receiving && !rx_ready, "port closed again");
    check(recv_rise == 1, "DPRECEIVING rose once");
    // RAW-only message into bank 0 window 5
    bank = 0; window = 5;
    open = 1; @(negedge clk); open = 0;
    check(!waiting && rx_ready, "armed");
    w0 = writes;
    m = '{32'h0b00_0002};
    send(m, st);
    @(negedge clk); @(negedge clk);
    check(raw == 32'h0b00_0002 && len == 16'd1 && writes == w0, "RAW-only message");
    check(recv_rise == 2 && waiting, "DPRECEIVING pulsed for the RAW-only message");
    // longer than a window: 1 RAW + 20 data words, 16 stored
    open = 1; @(negedge clk); open = 0;
    m = '{32'h0c00_0003};
    for (int i = 0; i < 20; i++) m.push_back(32'h100 + i);
    w0 = writes;
    send(m, st);
    @(negedge clk);
    check(len == 16'd21, "length of the long message");
    check(writes - w0 == 16, "only a window's worth written");
    check(mem[0][5][15] == 32'h10f, "last word that fits");
    // random phase: messages of 1..16 words to random banks and windows,
    // the port opened after a random delay
    begin
      int bad = 0;
      for (int k = 0; k < 30; k++) begin
        bank = 1'($urandom); window = 3'($urandom);
        m.delete();
        for (int i = 0, n = 1 + $urandom % 16; i < n; i++) m.push_back($urandom);
        h = 0; l = 0;
        for (int i = 1; i < m.size(); i++) begin h += m[i][31:16]; l += m[i][15:0]; end
        w0 = writes;
        fork
          send(m, st);
          begin repeat ($urandom % 4) @(negedge clk); open = 1; @(negedge clk); open = 0; end
        join
        @(negedge clk);
        if (raw != m[0] || len != 16'(m.size()) || cksum != {fold(h), fold(l)} || writes - w0 != m.size() - 1) bad++;
        for (int i = 1; i < m.size(); i++) if (mem[bank][window][i - 1] != m[i]) bad++;
      end
      check(bad == 0, "30 random messages stored with RAW, length and checksum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
