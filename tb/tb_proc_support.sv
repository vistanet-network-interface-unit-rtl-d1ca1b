// tb_proc_support: checks the 16-bit tick clock (one tick per clock at the
// default divider, i.e. every 40 ns at 25 MHz), its overflow pulse exactly at
// the wrap, the processor reset after an ERROR halt with the ERRORRESET flag,
// and CLEARERROR. A second instance checks a divider of 3.
module tb_proc_support;
  logic clk = 0, rst_n = 0;
  logic cpu_error, clear_error;
  logic cpu_reset_n, error_reset, ovf, ovf3;
  logic cpu_reset_n3, error_reset3;
  logic [15:0] clock, clock3;
  int checks = 0, failures = 0;

  proc_support dut (.clk(clk), .rst_n(rst_n), .cpu_error_i(cpu_error), .clear_error_i(clear_error),
    .cpu_reset_n_o(cpu_reset_n), .error_reset_o(error_reset), .clock_o(clock), .overflow_o(ovf));
  proc_support #(.TICK_DIV(3), .RESET_CYCLES(4)) dut3 (.clk(clk), .rst_n(rst_n), .cpu_error_i(1'b0),
    .clear_error_i(1'b0), .cpu_reset_n_o(cpu_reset_n3), .error_reset_o(error_reset3), .clock_o(clock3),
    .overflow_o(ovf3));

  always #20 clk = ~clk;   // 40 ns

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ovf_count = 0, ovf_at = -1, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ovf) begin ovf_count++; ovf_at = cyc; end
  end

  initial begin
    cpu_error = 0; clear_error = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(cpu_reset_n == 0, "processor held in reset after board reset");
    rst_n = 1;
    repeat (16) @(negedge clk);
    check(cpu_reset_n == 1, "processor released after 16 clocks");
    check(error_reset == 0, "no error reset yet");
    begin
      logic [15:0] c0;
      c0 = clock;
      repeat (100) @(negedge clk);
      check(clock == c0 + 16'd100, "clock advances once per 40 ns clock");
      check(clock3 == 16'((18 + 100) / 3) || clock3 == 16'((18 + 100) / 3 - 1) ||
            clock3 == 16'((18 + 100) / 3 + 1), "divided clock");
    end
    // run to the wrap
    wait (clock == 16'hfffe);
    @(posedge clk);
    @(negedge clk);
    check(ovf == 0, "no overflow before the wrap");
    @(negedge clk);
    check(clock == 16'h0000, "clock wrapped");
    check(ovf == 1, "overflow pulse at the wrap");
    @(negedge clk);
    check(ovf == 0, "overflow is one clock");
    check(ovf_count == 1, "exactly one overflow");
    // processor halts in ERROR
    cpu_error = 1;
    @(negedge clk);
    cpu_error = 0;
    check(cpu_reset_n == 0, "processor reset after ERROR");
    check(error_reset == 1, "ERRORRESET set");
    repeat (15) @(negedge clk);
    check(cpu_reset_n == 0, "reset still held after 15 clocks");
    @(negedge clk);
    check(cpu_reset_n == 1, "reset lasts 16 clocks");
    check(error_reset == 1, "ERRORRESET stays");
    clear_error = 1;
    @(negedge clk);
    clear_error = 0;
    check(error_reset == 0, "CLEARERROR clears ERRORRESET");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
