// hippi_src: HIPPI-PH source port of the NIU (the network-bound output).
//
// Connection: software writes the remote I-field (HIPPIIFIELD) and sets
// MAKEREQUEST; the port raises REQUEST with the I-field on the data bus.
// accepted_o is high while the destination holds CONNECT. If CONNECT falls
// while REQUEST is still up, rejected_o latches until MAKEREQUEST is cleared.
// Clearing MAKEREQUEST breaks the connection.
//
// Flow control: every READY pulse from the destination adds one burst credit
// (have_pulses_o while any is held); this count is kept entirely in hardware.
// Credits are forgotten when the connection ends.
//
// Transmission: a xmit_i strobe while connected sends one packet made of all
// words then held in the header FIFO, followed, when send_data_i is set, by
// len_m1_i+1 words of the selected buffer window (read asynchronously through
// win_addr_o/win_data_i). The packet is cut into full 256-word bursts with a
// short burst, if any, last; each burst waits for a credit, carries odd byte
// parity on every word, and is followed by one clock with its LLRC (XOR of
// the burst words) on the bus. sending_o is high from the strobe until PACKET
// falls; packet_sent_o then stays high until the next strobe.
// header_active_o is high while header FIFO words are being sent.
module hippi_src
  import niu_pkg::*;
#(
  parameter int unsigned BURST_WORDS = 256,
  parameter int unsigned WIN_AW      = 12,
  parameter int unsigned HDR_CW      = 7     // width of the header FIFO count
) (
  input  logic              clk,
  input  logic              rst_n,
  output hippi_s2d_t        s2d_o,
  input  hippi_d2s_t        d2s_i,
  // software control
  input  logic              make_request_i,
  input  logic [31:0]       ifield_i,
  input  logic              xmit_i,
  input  logic              send_data_i,
  input  logic [WIN_AW-1:0] len_m1_i,
  // header FIFO read side
  input  logic [31:0]       hdr_data_i,
  input  logic [HDR_CW-1:0] hdr_count_i,
  output logic              hdr_pop_o,
  // buffer window read side
  output logic [WIN_AW-1:0] win_addr_o,
  input  logic [31:0]       win_data_i,
  // status
  output logic              accepted_o,
  output logic              rejected_o,
  output logic              src_intercon_o,
  output logic              have_pulses_o,
  output logic              sending_o,
  output logic              packet_sent_o,
  output logic              header_active_o
);
  typedef enum logic [2:0] {S_IDLE, S_PKT, S_WAIT, S_BURST, S_LLRC, S_END} state_t;
  state_t state;

  logic               seen_connect;
  logic [7:0]         credits;
  logic [HDR_CW-1:0]  hdr_left;
  logic [WIN_AW:0]    data_left;
  logic [WIN_AW-1:0]  rd_addr;
  logic [$clog2(BURST_WORDS+1)-1:0] burst_left;
  logic [31:0]        llrc;
  logic               use_credit;

  logic connected;
  assign connected = make_request_i && d2s_i.connect && !rejected_o;

  logic words_remain;
  assign words_remain = (hdr_left != '0) || (data_left != '0);

  logic [31:0] cur_word;
  assign cur_word = (hdr_left != '0) ? hdr_data_i : win_data_i;

  // connection state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_connect <= 1'b0;
      rejected_o   <= 1'b0;
    end else if (!make_request_i) begin
      seen_connect <= 1'b0;
      rejected_o   <= 1'b0;
    end else begin
      if (d2s_i.connect) seen_connect <= 1'b1;
      if (seen_connect && !d2s_i.connect) rejected_o <= 1'b1;
    end
  end

  // burst credits from READY pulses
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credits <= '0;
    else if (!connected) credits <= '0;
    else credits <= credits + (d2s_i.ready ? 8'd1 : 8'd0) - (use_credit ? 8'd1 : 8'd0);
  end

  assign use_credit = (state == S_WAIT) && words_remain && (credits != '0);

  // packet sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      hdr_left      <= '0;
      data_left     <= '0;
      rd_addr       <= '0;
      burst_left    <= '0;
      llrc          <= '0;
      packet_sent_o <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (xmit_i && connected) begin
          hdr_left      <= hdr_count_i;
          data_left     <= send_data_i ? {1'b0, len_m1_i} + 1'b1 : '0;
          rd_addr       <= '0;
          packet_sent_o <= 1'b0;
          state         <= S_PKT;
        end
        S_PKT:  state <= S_WAIT;           // PACKET up one clock before the first burst
        S_WAIT: begin
          if (!connected)        state <= S_END;
          else if (!words_remain) state <= S_END;
          else if (use_credit) begin
            burst_left <= BURST_WORDS[$clog2(BURST_WORDS+1)-1:0];
            llrc       <= '0;
            state      <= S_BURST;
          end
        end
        S_BURST: begin
          llrc       <= llrc ^ cur_word;
          burst_left <= burst_left - 1'b1;
          if (hdr_left != '0) hdr_left <= hdr_left - 1'b1;
          else begin
            data_left <= data_left - 1'b1;
            rd_addr   <= rd_addr + 1'b1;
          end
          if (burst_left == 1 || ({{(WIN_AW+1-HDR_CW){1'b0}}, hdr_left} + data_left) == 1) state <= S_LLRC;
        end
        S_LLRC: state <= S_WAIT;
        S_END: begin
          packet_sent_o <= 1'b1;
          state         <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign hdr_pop_o  = (state == S_BURST) && (hdr_left != '0);
  assign win_addr_o = rd_addr;

  always_comb begin
    s2d_o          = '0;
    s2d_o.intercon = 1'b1;
    s2d_o.request  = make_request_i;
    s2d_o.packet   = (state == S_WAIT) || (state == S_BURST) || (state == S_LLRC);
    s2d_o.burst    = (state == S_BURST);
    if (state == S_BURST)     s2d_o.data = cur_word;
    else if (state == S_LLRC) s2d_o.data = llrc;
    else if (state == S_IDLE || state == S_END) s2d_o.data = ifield_i;
    s2d_o.parity   = odd_parity(s2d_o.data);
  end

  assign accepted_o      = connected;
  assign src_intercon_o  = d2s_i.intercon;
  assign have_pulses_o   = (credits != '0);
  assign sending_o       = (state != S_IDLE);
  assign header_active_o = (state != S_IDLE) && (hdr_left != '0);

  // HIPPI-PH: BURST only inside PACKET, and a credit is never overdrawn.
  a_burst_in_packet: assert property (@(posedge clk) s2d_o.burst |-> s2d_o.packet);
  a_credit: assert property (@(posedge clk) use_credit |-> credits != '0);
endmodule
