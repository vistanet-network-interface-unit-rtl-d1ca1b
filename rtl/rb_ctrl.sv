// rb_ctrl: ring-bound packet buffers and their buffer controller.
//
// Two packet FIFOs, each large enough for one full HIPPI packet (4K words),
// are used alternately: while one is filled from the HIPPI destination port,
// the ring side empties the other. At the start of each arriving packet the
// controller picks a FIFO that is neither arriving nor holding an arrived
// packet, preferring the one after the FIFO it filled last; if both are
// busy the packet is discarded (software only grants bursts when a buffer is
// free). Per FIFO it keeps the flags software sees in RINGBNDCTRL:
//   arriving - a packet is entering (the processor may already read its
//              header from the FIFO while the rest arrives);
//   arrived  - the whole packet is in, until the FIFO is reset;
//   longpkt  - the packet did not fit, the excess was dropped;
//   xmiterr  - a parity or LLRC error was seen in the packet.
// A FIFO waiting for the processor's verdict is simply one that has arrived
// and not been reset. A RESETFIFOx strobe empties FIFO x and clears its
// flags, which is also how software discards a bad packet.
//
// rb_select_i (RBFIFOSELECT) routes the reads: 0 gives FIFO 0 to the RingP
// engine and FIFO 1 to the processor, 1 the reverse. A processor pop of FIFO
// x takes effect only when x is the processor's FIFO.
module rb_ctrl #(
  parameter int unsigned DEPTH = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the HIPPI destination port
  input  logic        pkt_start_i,
  input  logic        pkt_end_i,
  input  logic        wr_valid_i,
  input  logic [31:0] wr_data_i,
  input  logic        err_i,
  // software control
  input  logic        rb_select_i,
  input  logic [1:0]  reset_i,
  input  logic [1:0]  proc_pop_i,
  output logic [31:0] proc_data_o,
  // RingP side
  input  logic        rp_pop_i,
  output logic [31:0] rp_data_o,
  output logic        rp_empty_o,
  output logic        rp_arrived_o,
  // status
  output logic [1:0]  arriving_o,
  output logic [1:0]  arrived_o,
  output logic [1:0]  longpkt_o,
  output logic [1:0]  xmiterr_o,
  output logic [1:0]  empty_o,
  output logic [1:0]  full_o
);
  logic        fill_next;     // FIFO to prefer for the next packet
  logic        fill_sel;      // FIFO being filled
  logic        filling;       // a packet is being stored
  logic [1:0]  busy;
  logic [31:0] rdata [2];
  logic [1:0]  push, pop;

  assign busy = arriving_o | arrived_o;

  // FIFO chosen for a packet starting now
  logic start_ok, start_sel;
  always_comb begin
    start_ok  = 1'b1;
    start_sel = fill_next;
    if (busy[fill_next] || reset_i[fill_next]) begin
      start_sel = ~fill_next;
      start_ok  = !busy[~fill_next] && !reset_i[~fill_next];
    end
  end

  logic       cur_on;    // words of this clock are stored
  logic       cur_sel;   // ... into this FIFO
  assign cur_on  = pkt_start_i ? start_ok  : filling;
  assign cur_sel = pkt_start_i ? start_sel : fill_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_next  <= 1'b0;
      fill_sel   <= 1'b0;
      filling    <= 1'b0;
      arriving_o <= '0;
      arrived_o  <= '0;
      longpkt_o  <= '0;
      xmiterr_o  <= '0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (reset_i[i]) begin
          arriving_o[i] <= 1'b0;
          arrived_o[i]  <= 1'b0;
          longpkt_o[i]  <= 1'b0;
          xmiterr_o[i]  <= 1'b0;
        end
      end
      if (pkt_start_i) begin
        filling <= start_ok;
        if (start_ok) begin
          fill_sel              <= start_sel;
          arriving_o[start_sel] <= 1'b1;
          if (start_sel == fill_next) fill_next <= ~fill_next;
        end
      end
      if (cur_on) begin
        if (err_i) xmiterr_o[cur_sel] <= 1'b1;
        if (wr_valid_i && full_o[cur_sel]) longpkt_o[cur_sel] <= 1'b1;
        if (pkt_end_i && !pkt_start_i) begin
          filling              <= 1'b0;
          arriving_o[fill_sel] <= 1'b0;
          arrived_o[fill_sel]  <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    push = '0;
    if (cur_on && wr_valid_i) push[cur_sel] = 1'b1;
    pop = '0;
    pop[rb_select_i]  = rp_pop_i;
    pop[~rb_select_i] = proc_pop_i[~rb_select_i];
  end

  for (genvar g = 0; g < 2; g++) begin : g_fifo
    sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_fifo (
      .clk     (clk),
      .rst_n   (rst_n),
      .clear_i (reset_i[g]),
      .push_i  (push[g]),
      .wdata_i (wr_data_i),
      .pop_i   (pop[g]),
      .rdata_o (rdata[g]),
      .empty_o (empty_o[g]),
      .full_o  (full_o[g]),
      .count_o ()
    );
  end

  assign proc_data_o  = rdata[~rb_select_i];
  assign rp_data_o    = rdata[rb_select_i];
  assign rp_empty_o   = empty_o[rb_select_i];
  assign rp_arrived_o = arrived_o[rb_select_i];
endmodule
