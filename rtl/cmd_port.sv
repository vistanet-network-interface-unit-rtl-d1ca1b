// cmd_port: ring port 0, the NIU's command port.
//
// Receive: every word of every ring message sent to port 0 (RAW first) goes
// into a FIFO the processor drains through CMDPORTFIFO; the port accepts
// words while the FIFO has room. msg_in_o pulses when a message's last word
// is stored (the command-port receive interrupt). Messages are not separated
// in the FIFO; command messages carry their length in the RAW.
//
// Transmit: the first word software writes to CMDPORTWRITE is the RAW that
// acquires a ring channel; later words follow on that channel until
// CMDPORTCLOSE releases it. Each written word is held back until the next
// write or the close, so that the last word of the message can be marked as
// such; the words then queue in a small transmit FIFO towards the ring.
// channel_open_o (CMDPORTREADY) is high from the ring's acceptance of the
// RAW until the last word has gone, and acquired_o pulses when it rises.
// FIFO depths are this design's choice.
module cmd_port
  import niu_pkg::*;
#(
  parameter int unsigned RX_DEPTH = 512,
  parameter int unsigned TX_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // ring port 0 receive
  input  ring_beat_t  rx_i,
  output logic        rx_ready_o,
  // ring port 0 transmit
  output ring_beat_t  tx_o,
  input  logic        tx_ready_i,
  // processor side
  input  logic        pop_i,
  output logic [31:0] rdata_o,
  output logic        rx_empty_o,
  output logic        rx_full_o,
  output logic        msg_in_o,
  input  logic        write_i,
  input  logic [31:0] wdata_i,
  input  logic        close_i,
  output logic        channel_open_o,
  output logic        acquired_o
);
  // ------------------------------------------------------------ receive
  logic rx_push;
  assign rx_ready_o = !rx_full_o;
  assign rx_push    = rx_i.valid && rx_ready_o;
  assign msg_in_o   = rx_push && rx_i.eop;

  sync_fifo #(.WIDTH(32), .DEPTH(RX_DEPTH)) u_rx (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear_i (1'b0),
    .push_i  (rx_push),
    .wdata_i (rx_i.data),
    .pop_i   (pop_i),
    .rdata_o (rdata_o),
    .empty_o (rx_empty_o),
    .full_o  (rx_full_o),
    .count_o ()
  );

  // ------------------------------------------------------------ transmit
  logic        pend_valid;     // a written word waits for its successor
  logic        pend_sop;
  logic [31:0] pend_data;
  logic        in_msg;         // a RAW has been written and not closed

  logic        tx_push;
  logic [33:0] tx_wdata;       // {sop, eop, data}
  logic [33:0] tx_head;
  logic        tx_empty, tx_full;

  assign tx_push  = pend_valid && (write_i || close_i);
  assign tx_wdata = {pend_sop, close_i, pend_data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_valid <= 1'b0;
      pend_sop   <= 1'b0;
      pend_data  <= '0;
      in_msg     <= 1'b0;
    end else begin
      if (close_i) begin
        pend_valid <= 1'b0;
        in_msg     <= 1'b0;
      end else if (write_i) begin
        pend_valid <= 1'b1;
        pend_sop   <= !in_msg;
        pend_data  <= wdata_i;
        in_msg     <= 1'b1;
      end
    end
  end

  sync_fifo #(.WIDTH(34), .DEPTH(TX_DEPTH)) u_tx (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear_i (1'b0),
    .push_i  (tx_push),
    .wdata_i (tx_wdata),
    .pop_i   (tx_o.valid && tx_ready_i),
    .rdata_o (tx_head),
    .empty_o (tx_empty),
    .full_o  (tx_full),
    .count_o ()
  );

  assign tx_o.valid = !tx_empty;
  assign tx_o.sop   = tx_head[33];
  assign tx_o.eop   = tx_head[32];
  assign tx_o.data  = tx_head[31:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) channel_open_o <= 1'b0;
    else if (tx_o.valid && tx_ready_i) begin
      if (tx_o.eop)      channel_open_o <= 1'b0;
      else if (tx_o.sop) channel_open_o <= 1'b1;
    end
  end

  assign acquired_o = tx_o.valid && tx_ready_i && tx_o.sop;

  // software must not overrun the transmit queue
  a_no_overrun: assert property (@(posedge clk) tx_push |-> !tx_full);
endmodule
