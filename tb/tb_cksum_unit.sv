// tb_cksum_unit: checks the dual 16-bit one's-complement checksum adder
// against a reference computed here with 32-bit arithmetic and carry folding,
// over random streams of random length, and that the low half never carries
// into the high half.
module tb_cksum_unit;
  logic clk = 0, rst_n = 0;
  logic clear, add;
  logic [31:0] data, sum;
  int checks = 0, failures = 0;

  cksum_unit dut (.clk(clk), .rst_n(rst_n), .clear_i(clear), .add_i(add), .data_i(data), .sum_o(sum));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] fold(input logic [31:0] s);
    logic [31:0] t = s;
    while (t[31:16] != 0) t = t[15:0] + t[31:16];
    return t[15:0];
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; add = 0; data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 200; pkt++) begin
      logic [31:0] shi, slo;
      int n;
      shi = 0; slo = 0; n = 1 + $urandom % 300;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        clear = (i == 0);
        add   = 1;
        data  = (pkt % 5 == 0) ? 32'hffff_ffff - (i % 3) : $urandom;
        shi += data[31:16];
        slo += data[15:0];
      end
      @(negedge clk);
      clear = 0; add = 0;
      @(negedge clk);
      check(sum[15:0] == fold(slo) || (fold(slo) == 16'hffff && sum[15:0] == 16'hffff), "low sum");
      check(sum[31:16] == fold(shi), "high sum");
    end
    // the low half never spills into the high half
    @(negedge clk); clear = 1; add = 1; data = 32'h0000_ffff;
    @(negedge clk); clear = 0; add = 1; data = 32'h0000_0001;
    @(negedge clk); add = 0;
    @(negedge clk);
    check(sum == 32'h0000_0001, "end-around carry stays in the low half");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
