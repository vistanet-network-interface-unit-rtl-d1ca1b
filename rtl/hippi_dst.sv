// hippi_dst: HIPPI-PH destination port of the NIU (the ring-bound input).
//
// The remote source raises REQUEST with the I-field on the data bus. The port
// captures the I-field and its byte parity check (IFLDPARITY) and reports the
// request; software answers by setting HIPPICONNECT, which raises CONNECT.
// CONNECT falls when either side drops.
//
// Flow control is under software control, as the specification asks: a write
// of a nonzero PULSECOUNT loads the destination ready pulse counter, and the
// port then sends that many one-clock READY pulses, one every second clock,
// while connected. pulse_zero_o reports an empty counter. The intended use is
// one pulse for the first burst of a packet and the rest once the HIPPI-FP
// header has been read.
//
// While PACKET is high, every clock with BURST high delivers one word on
// word_valid_o/word_o. Each word's odd byte parity is checked, and the
// column-wise XOR of the burst (LLRC) is compared with the word the source
// puts on the bus in the clock after BURST falls. A failing check pulses
// err_o; the buffer controller keeps it as the packet's error flag.
// pkt_start_o and pkt_end_o pulse on the edges of PACKET. Parity and LLRC
// rules and the LLRC timing are those of the HIPPI-PH standard.
module hippi_dst
  import niu_pkg::*;
#(
  parameter int unsigned PULSE_W = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  hippi_s2d_t         s2d_i,
  output hippi_d2s_t         d2s_o,
  // software control
  input  logic               connect_en_i,   // HIPPICONNECT
  input  logic               pulse_load_i,   // PULSECOUNT written nonzero
  input  logic [PULSE_W-1:0] pulse_count_i,
  // status
  output logic               conn_request_o,
  output logic               dst_intercon_o,
  output logic [31:0]        ifield_o,
  output logic [3:0]         ifield_par_ok_o,
  output logic               pulse_zero_o,
  // received words
  output logic               pkt_start_o,
  output logic               pkt_end_o,
  output logic               word_valid_o,
  output logic [31:0]        word_o,
  output logic               err_o
);
  logic               connected;
  logic [PULSE_W-1:0] pulses;
  logic               ready_q;
  logic               packet_q, burst_q;
  logic [31:0]        llrc;
  logic [3:0]         par_ok_now;

  assign connected   = connect_en_i && s2d_i.request;
  assign par_ok_now  = ~(odd_parity(s2d_i.data) ^ s2d_i.parity);

  // I-field capture while a connection is requested but not yet made
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ifield_o        <= '0;
      ifield_par_ok_o <= '0;
    end else if (s2d_i.request && !connected) begin
      ifield_o        <= s2d_i.data;
      ifield_par_ok_o <= par_ok_now;
    end
  end

  // ready pulse counter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pulses  <= '0;
      ready_q <= 1'b0;
    end else begin
      ready_q <= 1'b0;
      if (pulse_load_i && pulse_count_i != '0) begin
        pulses <= pulse_count_i;
      end else if (connected && pulses != '0 && !ready_q) begin
        pulses  <= pulses - 1'b1;
        ready_q <= 1'b1;
      end
    end
  end

  // burst reception, parity and LLRC
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      packet_q <= 1'b0;
      burst_q  <= 1'b0;
      llrc     <= '0;
    end else begin
      packet_q <= connected && s2d_i.packet;
      burst_q  <= connected && s2d_i.burst;
      if (connected && s2d_i.burst) llrc <= (burst_q ? llrc : '0) ^ s2d_i.data;
    end
  end

  logic llrc_slot;
  assign llrc_slot = connected && burst_q && !s2d_i.burst;

  assign word_valid_o = connected && s2d_i.packet && s2d_i.burst;
  assign word_o       = s2d_i.data;
  assign pkt_start_o  = connected && s2d_i.packet && !packet_q;
  assign pkt_end_o    = packet_q && !(connected && s2d_i.packet);
  assign err_o        = (word_valid_o && par_ok_now != 4'hf) ||
                        (llrc_slot && (s2d_i.data != llrc || par_ok_now != 4'hf));

  assign d2s_o.intercon = 1'b1;
  assign d2s_o.connect  = connected;
  assign d2s_o.ready    = ready_q;

  assign conn_request_o = s2d_i.request;
  assign dst_intercon_o = s2d_i.intercon;
  assign pulse_zero_o   = (pulses == '0);

endmodule
