// tb_irq_ctrl: checks that interrupt events latch per level, that the SPARC
// interrupt level is the highest pending level, that clears work, and that
// an event in the same clock as its clear wins.
module tb_irq_ctrl;
  logic clk = 0, rst_n = 0;
  logic [7:0] ev, clr, pending;
  logic [3:0] irl;
  int checks = 0, failures = 0;
  logic [7:0] model;

  irq_ctrl dut (.clk(clk), .rst_n(rst_n), .event_i(ev), .clear_i(clr), .pending_o(pending), .irl_o(irl));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [3:0] top_level(input logic [7:0] p);
    for (int l = 7; l >= 2; l--) if (p[l]) return 4'(l);
    return 0;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ev = 0; clr = 0; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(irl == 0, "idle level");
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ev  = ($urandom % 4 == 0) ? 8'($urandom) : 8'h00;
      clr = ($urandom % 3 == 0) ? 8'($urandom) : 8'h00;
      @(posedge clk);
      model = ((model & ~clr) | ev) & 8'hfc;
      @(negedge clk);
      ev = 0; clr = 0;
      check(pending == model, "pending flags");
      check(irl == top_level(model), "interrupt level is the highest pending");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
