// tb_rb_cksum_q: sends packets of random words through the ring-bound
// checksum and checks each queued sum against a reference, the CHKSUMSTATE
// codes for zero, one and two queued sums, the loss of a third sum
// (SUMERROR) and its clearing by the next read.
module tb_rb_cksum_q;
  import niu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pkt_start, pkt_end, wvalid, pop;
  logic [31:0] word, sum;
  logic [1:0] state;
  int checks = 0, failures = 0;

  rb_cksum_q dut (.clk(clk), .rst_n(rst_n), .pkt_start_i(pkt_start), .pkt_end_i(pkt_end),
    .word_valid_i(wvalid), .word_i(word), .pop_i(pop), .sum_o(sum), .state_o(state));
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

  function automatic logic [15:0] fold(input logic [31:0] s);
    logic [31:0] t = s;
    while (t[31:16] != 0) t = t[15:0] + t[31:16];
    return t[15:0];
  endfunction

  task automatic packet(input int n, output logic [31:0] ref_sum);
    logic [31:0] h, l;
    h = 0; l = 0;
    @(negedge clk); pkt_start = 1;
    @(negedge clk); pkt_start = 0;
    for (int i = 0; i < n; i++) begin
      wvalid = 1; word = $urandom; h += word[31:16]; l += word[15:0];
      pkt_end = (i == n - 1);
      @(negedge clk);
    end
    wvalid = 0; pkt_end = 0;
    @(negedge clk);
    ref_sum = {fold(h), fold(l)};
  endtask

  task automatic read(output logic [31:0] v);
    v = sum; pop = 1;
    @(negedge clk); pop = 0;
  endtask

  initial begin
    logic [31:0] r1, r2, r3, v;
    pkt_start = 0; pkt_end = 0; wvalid = 0; pop = 0; word = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == SUMQUED0, "nothing queued");
    packet(100, r1);
    check(state == SUMQUED1, "one sum queued");
    packet(37, r2);
    check(state == SUMQUED2, "two sums queued");
    read(v);
    check(v == r1, "first packet sum");
    check(state == SUMQUED1, "one left");
    packet(256, r3);
    check(state == SUMQUED2, "two again");
    packet(5, r1);
    check(state == SUMERROR, "third sum lost");
    read(v);
    check(v == r2, "second packet sum");
    check(state == SUMQUED1, "error cleared by the read");
    read(v);
    check(v == r3, "third packet sum");
    check(state == SUMQUED0, "empty");
    for (int k = 0; k < 20; k++) begin
      packet(1 + $urandom % 400, r1);
      read(v);
      check(v == r1, "random packet sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
