// dp_rx: receive side of ring data port 1 (network-bound input).
//
// Software arms the port with DATAPORTOPEN (open_i); only then does the port
// let the ring acquire it (rx_ready_o). The first word of the next message,
// its Ring Address Word, is kept in the DATAPORTRAW register instead of the
// buffer, so the processor can start building the HIPPI-FP and protocol
// headers at once. The remaining words are written, from address 0, into the
// network-bound window selected by BANKSELECT and NETBNDWINDOWx (the bank
// and window are sampled when the message starts), and are summed by a
// cksum_unit (RAW excluded). When the last word is in, the port closes
// again: receiving_o falls, waiting_o rises, and DATAPORTLEN holds the
// message length in words with the RAW counted, as RingP counts it.
// Words past the end of a 4K-word window are not stored.
module dp_rx
  import niu_pkg::*;
#(
  parameter int unsigned WIN_AW = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              open_i,
  input  ring_beat_t        rx_i,
  output logic              rx_ready_o,
  input  logic              bank_i,
  input  logic [2:0]        window_i,
  // network-bound buffer write
  output logic              nb_we_o,
  output logic              nb_bank_o,
  output logic [2:0]        nb_window_o,
  output logic [WIN_AW-1:0] nb_addr_o,
  output logic [31:0]       nb_data_o,
  // status
  output logic              receiving_o,
  output logic              waiting_o,
  output logic [31:0]       raw_o,
  output logic [15:0]       len_o,
  output logic [31:0]       cksum_o
);
  logic       armed;
  logic       bank_q;
  logic [2:0] window_q;
  logic       finish_q;   // a RAW-only message ends this clock

  assign rx_ready_o = armed || (receiving_o && !finish_q);

  logic take, take_sop, take_data;
  assign take      = rx_i.valid && rx_ready_o;
  assign take_sop  = take && rx_i.sop && armed;
  assign take_data = take && !rx_i.sop && receiving_o && !finish_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed       <= 1'b0;
      receiving_o <= 1'b0;
      waiting_o   <= 1'b1;
      raw_o       <= '0;
      len_o       <= '0;
      bank_q      <= 1'b0;
      window_q    <= '0;
      finish_q    <= 1'b0;
    end else begin
      finish_q <= 1'b0;
      if (finish_q) begin
        receiving_o <= 1'b0;
        waiting_o   <= 1'b1;
      end
      if (open_i && !receiving_o) begin
        armed     <= 1'b1;
        waiting_o <= 1'b0;
      end
      if (take_sop) begin
        armed    <= 1'b0;
        raw_o    <= rx_i.data;
        len_o    <= 16'd1;
        bank_q   <= bank_i;
        window_q <= window_i;
        receiving_o <= 1'b1;
        finish_q    <= rx_i.eop;
      end else if (take_data) begin
        len_o <= len_o + 1'b1;
        if (rx_i.eop) begin
          receiving_o <= 1'b0;
          waiting_o   <= 1'b1;
        end
      end
    end
  end

  cksum_unit u_sum (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear_i (take_sop),
    .add_i   (take_data),
    .data_i  (rx_i.data),
    .sum_o   (cksum_o)
  );

  // data word n (n = len-1) goes to window address n
  logic [15:0] word_idx;
  assign word_idx    = len_o - 16'd1;
  assign nb_we_o     = take_data && (word_idx < 16'(1 << WIN_AW));
  assign nb_bank_o   = bank_q;
  assign nb_window_o = window_q;
  assign nb_addr_o   = word_idx[WIN_AW-1:0];
  assign nb_data_o   = rx_i.data;
endmodule
