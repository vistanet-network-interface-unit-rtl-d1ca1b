// proc_support: tick clock and error reset of the NIU processor subsystem.
//
// Tick clock: a 16-bit counter (NIUSTATUS CLOCK) advances once every
// TICK_DIV clocks; with the 25 MHz board clock and TICK_DIV = 1 that is the
// specified 40 ns tick. When it wraps from 0xffff to 0 overflow_o pulses,
// which raises the CLOCKOVERFLOW interrupt; software counts the overflows
// to extend the clock for protocol time-outs.
//
// Error reset: when the SPARC halts in its ERROR state (cpu_error_i) the
// NIU resets it, holding cpu_reset_n_o low for RESET_CYCLES clocks, and
// sets ERRORRESET (error_reset_o) so the restarted software can tell.
// CLEARERROR (clear_error_i) clears that flag. Board reset also resets the
// processor. The reset pulse length is this design's choice.
module proc_support #(
  parameter int unsigned TICK_DIV     = 1,
  parameter int unsigned RESET_CYCLES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cpu_error_i,
  input  logic        clear_error_i,
  output logic        cpu_reset_n_o,
  output logic        error_reset_o,
  output logic [15:0] clock_o,
  output logic        overflow_o
);
  localparam int unsigned DW = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;
  localparam int unsigned RW = $clog2(RESET_CYCLES + 1);

  logic [DW-1:0] div;
  logic          tick;
  assign tick = (TICK_DIV <= 1) ? 1'b1 : (div == DW'(TICK_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div        <= '0;
      clock_o    <= '0;
      overflow_o <= 1'b0;
    end else begin
      overflow_o <= 1'b0;
      div <= tick ? '0 : div + 1'b1;
      if (tick) begin
        clock_o <= clock_o + 1'b1;
        if (clock_o == 16'hffff) overflow_o <= 1'b1;
      end
    end
  end

  logic [RW-1:0] rst_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_cnt       <= RW'(RESET_CYCLES);
      error_reset_o <= 1'b0;
    end else begin
      if (cpu_error_i && cpu_reset_n_o) begin
        rst_cnt       <= RW'(RESET_CYCLES);
        error_reset_o <= 1'b1;
      end else begin
        if (rst_cnt != '0) rst_cnt <= rst_cnt - 1'b1;
        if (clear_error_i) error_reset_o <= 1'b0;
      end
    end
  end
  assign cpu_reset_n_o = (rst_cnt == '0);
endmodule
