// rb_cksum_q: ring-bound checksum with its two-entry result queue.
//
// Every HIPPI packet arriving at the destination port is summed, over all of
// its words, by a cksum_unit (two 16-bit one's-complement sums). When the
// packet ends the sum is queued for the processor, which reads the oldest
// value through RINGBNDCHKSUM (pop_i). The queue holds two values, one per
// ring-bound FIFO; a third packet ending while two are queued loses its sum
// and sets the SUMERROR state. state_o is the CHKSUMSTATE field:
// SUMQUED0 (nothing queued; the register value is then invalid), SUMQUED1,
// SUMQUED2, SUMERROR. SUMERROR stays until the next read, this design's
// choice since the specification does not say how it clears.
module rb_cksum_q
  import niu_pkg::*;
#(
  parameter int unsigned QDEPTH = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pkt_start_i,
  input  logic        pkt_end_i,
  input  logic        word_valid_i,
  input  logic [31:0] word_i,
  input  logic        pop_i,
  output logic [31:0] sum_o,
  output logic [1:0]  state_o
);
  logic [31:0] acc;
  logic [31:0] acc_final;
  logic        lost;

  cksum_unit u_sum (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear_i (pkt_start_i),
    .add_i   (word_valid_i),
    .data_i  (word_i),
    .sum_o   (acc)
  );

  // include a word arriving in the same clock as the end of the packet
  assign acc_final = word_valid_i ? {add1c(acc[31:16], word_i[31:16]),
                                     add1c(acc[15:0],  word_i[15:0])} : acc;

  logic q_full, q_empty;
  logic [1:0] q_count;

  sync_fifo #(.WIDTH(32), .DEPTH(QDEPTH)) u_q (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear_i (1'b0),
    .push_i  (pkt_end_i && !q_full),
    .wdata_i (acc_final),
    .pop_i   (pop_i),
    .rdata_o (sum_o),
    .empty_o (q_empty),
    .full_o  (q_full),
    .count_o (q_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     lost <= 1'b0;
    else if (pkt_end_i && q_full)   lost <= 1'b1;
    else if (pop_i)                 lost <= 1'b0;
  end

  always_comb begin
    if (lost)          state_o = SUMERROR;
    else if (q_empty)  state_o = SUMQUED0;
    else if (q_count == 2'd1) state_o = SUMQUED1;
    else               state_o = SUMQUED2;
  end
endmodule
