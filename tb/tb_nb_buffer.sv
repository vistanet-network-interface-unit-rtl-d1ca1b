// tb_nb_buffer: fills windows of the write bank through the write port while
// reading the other bank, then swaps banks and reads every written word back,
// checking bank and window isolation. A last phase writes and reads random
// locations every clock against a model. Reduced to 4 windows of 64 words.
module tb_nb_buffer;
  localparam int WINDOWS = 4, WIN_WORDS = 64;
  logic clk = 0;
  logic we, wbank, rbank;
  logic [1:0] wwin, rwin;
  logic [5:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;

  nb_buffer #(.WINDOWS(WINDOWS), .WIN_WORDS(WIN_WORDS)) dut (
    .clk(clk), .wr_en_i(we), .wr_bank_i(wbank), .wr_window_i(wwin), .wr_addr_i(waddr), .wr_data_i(wdata),
    .rd_bank_i(rbank), .rd_window_i(rwin), .rd_addr_i(raddr), .rd_data_o(rdata));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] pattern(input int b, input int w, input int a);
    return {8'(b * 16 + w), 8'hA5, 16'(a * 7 + 3)};
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wbank = 0; rbank = 1; wwin = 0; rwin = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int b = 0; b < 2; b++) begin
      wbank = b[0]; rbank = ~b[0];
      for (int w = 0; w < WINDOWS; w++)
        for (int a = 0; a < WIN_WORDS; a++) begin
          @(negedge clk);
          we = 1; wwin = 2'(w); waddr = 6'(a); wdata = pattern(b, w, a);
        end
      @(negedge clk);
      we = 0;
    end
    for (int b = 0; b < 2; b++)
      for (int w = 0; w < WINDOWS; w++)
        for (int a = 0; a < WIN_WORDS; a += 5) begin
          @(negedge clk);
          rbank = b[0]; wbank = ~b[0]; rwin = 2'(w); raddr = 6'(a);
          #1;
          check(rdata == pattern(b, w, a), "read back");
        end
    // overwrite one word while reading the other bank in the same clock
    @(negedge clk);
    we = 1; wbank = 0; wwin = 1; waddr = 9; wdata = 32'hdead_beef;
    rbank = 1; rwin = 1; raddr = 9;
    #1 check(rdata == pattern(1, 1, 9), "other bank unaffected during write");
    @(negedge clk);
    we = 0; rbank = 0; wbank = 1;
    #1 check(rdata == 32'hdead_beef, "new word visible");
    // random phase: a write and a read anywhere in each clock, against a model
    begin
      logic [31:0] model [2*WINDOWS*WIN_WORDS];
      int bad = 0;
      logic [8:0] wi, ri;
      for (int b = 0; b < 2; b++)
        for (int w = 0; w < WINDOWS; w++)
          for (int a = 0; a < WIN_WORDS; a++) model[b * WINDOWS * WIN_WORDS + w * WIN_WORDS + a] = pattern(b, w, a);
      model[WIN_WORDS + 9] = 32'hdead_beef;
      repeat (3000) begin
        @(negedge clk);
        wi = 9'($urandom); ri = 9'($urandom);
        we = ($urandom % 2) != 0; {wbank, wwin, waddr} = wi; wdata = $urandom;
        {rbank, rwin, raddr} = ri;
        #1 if (rdata != model[ri]) bad++;
        @(posedge clk);
        if (we) model[wi] = wdata;
      end
      check(bad == 0, "3000 random write and read clocks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
