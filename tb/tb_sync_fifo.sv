// tb_sync_fifo: self-checking test of the first-word-fall-through FIFO used
// as the network-bound header FIFO. Random pushes and pops are compared with
// a queue model; full, empty, count, ignored over/underflow and clear are
// checked. DEPTH is reduced to 8 so that the full case is reached often.
module tb_sync_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic clear, push, pop;
  logic [31:0] wdata, rdata;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [31:0] model[$];

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .clear_i(clear), .push_i(push), .wdata_i(wdata),
    .pop_i(pop), .rdata_o(rdata), .empty_o(empty), .full_o(full), .count_o(count));

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

  int full_seen = 0;
  initial begin
    clear = 0; push = 0; pop = 0; wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      check(count == model.size(), "count");
      if (model.size() != 0) check(rdata == model[0], "head word");
      if (full) full_seen++;
      clear = (i % 997 == 996);
      push  = ($urandom % 3) != 0;
      pop   = ($urandom % 2) != 0;
      if (i > 1500) pop = ($urandom % 4) == 0;   // drive towards full
      wdata = $urandom;
      @(posedge clk);
      #1;
      if (clear) model.delete();
      else begin
        bit pushed, popped;
        popped = pop && model.size() != 0;
        pushed = push && model.size() != DEPTH;
        if (popped) void'(model.pop_front());
        if (pushed) model.push_back(wdata);
      end
      @(negedge clk);
      push = 0; pop = 0; clear = 0;
    end
    check(full_seen > 0, "FIFO was filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
