// tb_hippi_dst: drives the HIPPI destination port as a remote HIPPI source.
// Checks I-field capture and its parity report, that CONNECT follows
// software, that a PULSECOUNT load produces exactly that many READY pulses,
// that burst words, packet edges and a short last burst come through, and
// that a parity error and an LLRC error are both flagged while a good packet
// is not.
module tb_hippi_dst;
  import niu_pkg::*;
  logic clk = 0, rst_n = 0;
  hippi_s2d_t s2d;
  hippi_d2s_t d2s;
  logic connect_en, pulse_load;
  logic [5:0] pulse_count;
  logic conn_req, dst_ic, pulse_zero, pkt_start, pkt_end, wvalid, err;
  logic [31:0] ifield, word;
  logic [3:0] par_ok;
  int checks = 0, failures = 0;

  hippi_dst dut (.clk(clk), .rst_n(rst_n), .s2d_i(s2d), .d2s_o(d2s), .connect_en_i(connect_en),
    .pulse_load_i(pulse_load), .pulse_count_i(pulse_count), .conn_request_o(conn_req),
    .dst_intercon_o(dst_ic), .ifield_o(ifield), .ifield_par_ok_o(par_ok), .pulse_zero_o(pulse_zero),
    .pkt_start_o(pkt_start), .pkt_end_o(pkt_end), .word_valid_o(wvalid), .word_o(word), .err_o(err));

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

  // monitors
  int readies = 0, starts = 0, ends = 0, errs = 0;
  logic [31:0] got[$];
  always @(posedge clk) begin
    if (d2s.ready) readies++;
    if (pkt_start) starts++;
    if (pkt_end) ends++;
    if (err) errs++;
    if (wvalid) got.push_back(word);
  end

  // send one packet of n words; bad_par / bad_llrc corrupt word 3 / the first LLRC
  task automatic send_packet(input int n, input bit bad_par, input bit bad_llrc, output logic [31:0] sent[$]);
    int i = 0;
    sent.delete();
    @(negedge clk);
    s2d.packet = 1;
    @(negedge clk);
    while (i < n) begin
      logic [31:0] l = 0;
      int b = 0;
      while (b < 256 && i < n) begin
        s2d.burst  = 1;
        s2d.data   = $urandom;
        s2d.parity = odd_parity(s2d.data);
        if (bad_par && i == 3) s2d.parity[2] = ~s2d.parity[2];
        l ^= s2d.data;
        sent.push_back(s2d.data);
        b++; i++;
        @(negedge clk);
      end
      s2d.burst  = 0;
      s2d.data   = bad_llrc ? ~l : l;
      bad_llrc   = 0;
      s2d.parity = odd_parity(s2d.data);
      @(negedge clk);
      s2d.data = 0;
      s2d.parity = odd_parity(0);
      @(negedge clk);
    end
    s2d.packet = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] sent[$];
    int t0;
    s2d = '0; connect_en = 0; pulse_load = 0; pulse_count = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    s2d.intercon = 1;
    s2d.request  = 1;
    s2d.data     = 32'h0102_0304;
    s2d.parity   = odd_parity(32'h0102_0304);
    repeat (3) @(negedge clk);
    check(conn_req && dst_ic, "request and interconnect seen");
    check(ifield == 32'h0102_0304 && par_ok == 4'hf, "I-field and good parity");
    check(!d2s.connect, "no CONNECT before software agrees");
    s2d.parity[1] = ~s2d.parity[1];
    @(negedge clk); @(negedge clk);
    check(par_ok == 4'b1101, "I-field parity error in byte 1 reported");
    s2d.parity = odd_parity(s2d.data);
    @(negedge clk);
    connect_en = 1;
    @(negedge clk);
    check(d2s.connect, "CONNECT raised");
    // ready pulses
    check(pulse_zero, "counter empty");
    pulse_load = 1; pulse_count = 5;
    @(negedge clk);
    pulse_load = 0;
    check(!pulse_zero, "counter loaded");
    t0 = readies;
    repeat (30) @(negedge clk);
    check(readies - t0 == 5, "exactly five READY pulses");
    check(pulse_zero, "counter back to zero");
    // a good packet of 300 words: one full burst and a short one
    got.delete();
    send_packet(300, 0, 0, sent);
    check(got.size() == 300, "all words delivered");
    check(got == sent, "words delivered in order");
    check(starts == 1 && ends == 1, "one packet start and end");
    check(errs == 0, "no error on a good packet");
    // parity error
    send_packet(20, 1, 0, sent);
    check(errs == 1, "parity error flagged");
    // LLRC error
    send_packet(20, 0, 1, sent);
    check(errs == 2, "LLRC error flagged");
    check(starts == 3 && ends == 3, "three packets");
    // connection drop
    s2d.request = 0;
    @(negedge clk);
    check(!d2s.connect, "CONNECT falls with REQUEST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
