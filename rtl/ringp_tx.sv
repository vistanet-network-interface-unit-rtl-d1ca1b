// ringp_tx: the RingP engine, which delivers ring-bound messages to the ring.
//
// After software has accepted a packet in a ring-bound FIFO it strobes
// DATAPORTXMIT (start_i). The engine then reads the FIFO given to the ring
// side word by word. Each RingP record is a header word whose low 16 bits
// are the message length in words (RAW included), followed by that message.
// A length of zero is a pad and is skipped. For a message the engine puts
// the RAW on ring data port 1 as the channel request (sop), waits for the
// ring to acquire the receiver (tx_ready_i), then sends the rest of the
// message, marking the last word (eop). It stops when the FIFO is empty and
// the whole packet has arrived; busy_o falls and done_o pulses.
//
// If the channel is not acquired within TIMEOUT clocks (a corrupted RAW may
// name a ring node that does not exist) the message is dropped, timeout_o
// pulses and the engine goes on with the next record. DATAPORTABORT
// (abort_i) stops the engine at once; the next word it reads is taken as a
// RingP header. last_o holds the last word read from the FIFO and count_o
// the words still to send of the current message (the RINGP register).
// The timeout length and the behaviour after a timeout are this design's
// choices; the specification only asks for a timeout.
module ringp_tx
  import niu_pkg::*;
#(
  parameter int unsigned TIMEOUT = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic        abort_i,
  // ring-bound FIFO read side
  input  logic [31:0] fifo_data_i,
  input  logic        fifo_empty_i,
  input  logic        fifo_arrived_i,
  output logic        fifo_pop_o,
  // ring data port transmit
  output ring_beat_t  tx_o,
  input  logic        tx_ready_i,
  // status
  output logic        busy_o,
  output logic        done_o,
  output logic        timeout_o,
  output logic [31:0] last_o,
  output logic [15:0] count_o
);
  typedef enum logic [2:0] {R_IDLE, R_HDR, R_RAW, R_DATA, R_SKIP} state_t;
  state_t state;

  logic [15:0] left;                       // words of the message not yet sent
  logic [$clog2(TIMEOUT+1)-1:0] wait_cnt;

  logic have_word;
  assign have_word = !fifo_empty_i;

  always_comb begin
    tx_o       = '0;
    fifo_pop_o = 1'b0;
    timeout_o  = 1'b0;
    case (state)
      R_HDR:  fifo_pop_o = have_word;
      R_RAW: begin
        tx_o.valid = have_word;
        tx_o.sop   = 1'b1;
        tx_o.eop   = (left == 16'd1);
        tx_o.data  = fifo_data_i;
        timeout_o  = have_word && !tx_ready_i && (wait_cnt == TIMEOUT[$clog2(TIMEOUT+1)-1:0]);
        fifo_pop_o = have_word && (tx_ready_i || timeout_o);
      end
      R_DATA: begin
        tx_o.valid = have_word;
        tx_o.eop   = (left == 16'd1);
        tx_o.data  = fifo_data_i;
        fifo_pop_o = have_word && tx_ready_i;
      end
      R_SKIP: fifo_pop_o = have_word;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= R_IDLE;
      left     <= '0;
      wait_cnt <= '0;
      last_o   <= '0;
      done_o   <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (fifo_pop_o) last_o <= fifo_data_i;
      if (abort_i) begin
        state <= R_IDLE;
        left  <= '0;
      end else begin
        case (state)
          R_IDLE: if (start_i) state <= R_HDR;
          R_HDR: begin
            if (have_word) begin
              left     <= ringp_len(fifo_data_i);
              wait_cnt <= '0;
              if (ringp_len(fifo_data_i) != 16'd0) state <= R_RAW;
            end else if (fifo_arrived_i) begin
              state  <= R_IDLE;
              done_o <= 1'b1;
            end
          end
          R_RAW: begin
            if (have_word && !tx_ready_i) wait_cnt <= wait_cnt + 1'b1;
            if (fifo_pop_o) begin
              left <= left - 1'b1;
              if (timeout_o)          state <= (left == 16'd1) ? R_HDR : R_SKIP;
              else if (left == 16'd1) state <= R_HDR;
              else                    state <= R_DATA;
            end else if (!have_word && fifo_arrived_i) begin
              state  <= R_IDLE;          // packet ended inside a record
              done_o <= 1'b1;
            end
          end
          R_DATA, R_SKIP: begin
            if (fifo_pop_o) begin
              left <= left - 1'b1;
              if (left == 16'd1) state <= R_HDR;
            end else if (!have_word && fifo_arrived_i) begin
              state  <= R_IDLE;
              done_o <= 1'b1;
            end
          end
          default: state <= R_IDLE;
        endcase
      end
    end
  end

  assign busy_o  = (state != R_IDLE);
  assign count_o = left;

  // a ring word is only offered while a message is being sent
  a_valid_state: assert property (@(posedge clk) tx_o.valid |-> (state == R_RAW || state == R_DATA));
endmodule
