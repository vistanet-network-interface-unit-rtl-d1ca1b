// niu_top: the VISTAnet Network Interface Unit (NIU) hardware.
//
// The NIU connects the Pixel-Planes 5 ring to a gigabit network through a
// pair of simplex HIPPI channels. Ring-bound, a HIPPI packet arriving at the
// destination port (hippi_dst) is stored whole in one of two alternating
// packet FIFOs (rb_ctrl) while its checksum is formed (rb_cksum_q); the
// processor reads the HIPPI-FP and protocol header straight from the FIFO,
// decides, and then lets the RingP engine (ringp_tx) place the encapsulated
// ring messages on ring data port 1. Network-bound, a ring message entering
// data port 1 (dp_rx) has its RAW captured for the processor and its data
// written into a window of the network-bound SRAM (nb_buffer) with a running
// checksum; the processor writes the packet header into the header FIFO and
// the HIPPI source port (hippi_src) sends header plus window in 256-word
// bursts. Ring port 0 (cmd_port) carries control messages to and from the
// processor. niu_regs maps all of this into the processor's address space,
// irq_ctrl forms its interrupt level and proc_support supplies the tick
// clock and the reset after a processor ERROR halt. For testing, the
// processor can also read and write the network-bound memory directly
// (0xfff00000-0xfff3ffff); that test path is asked for by the specification,
// its address range is this design's choice.
//
// Outside this module: the SPARC processor with its RAM and boot EPROM (the
// bus_* ports), the ECL/TTL line converters of the HIPPI cables (hdst_*,
// hsrc_* carry TTL-level HIPPI-PH signals) and the PXPL5 ring board (rp0_*,
// rp1_* are its two port pairs). Everything runs on one 25 MHz clock.
module niu_top
  import niu_pkg::*;
#(
  parameter int unsigned RB_DEPTH     = 4096,   // ring-bound FIFO, one 16 KB packet
  parameter int unsigned NB_WINDOWS   = 8,      // windows per network-bound bank
  parameter int unsigned NB_WIN_WORDS = 4096,   // words per window
  parameter int unsigned HDR_DEPTH    = 64,
  parameter int unsigned CP_RX_DEPTH  = 512,
  parameter int unsigned RING_TIMEOUT = 65536,
  parameter int unsigned TICK_DIV     = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor bus
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [31:0] bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic [3:0]  irl,
  input  logic        cpu_error,
  output logic        cpu_reset_n,
  output logic [3:0]  soft_led_n,
  // HIPPI destination port (ring-bound input)
  input  hippi_s2d_t  hdst_i,
  output hippi_d2s_t  hdst_o,
  // HIPPI source port (network-bound output)
  output hippi_s2d_t  hsrc_o,
  input  hippi_d2s_t  hsrc_i,
  // ring port 0: command port
  input  ring_beat_t  rp0_rx,
  output logic        rp0_rx_ready,
  output ring_beat_t  rp0_tx,
  input  logic        rp0_tx_ready,
  // ring port 1: data port
  input  ring_beat_t  rp1_rx,
  output logic        rp1_rx_ready,
  output ring_beat_t  rp1_tx,
  input  logic        rp1_tx_ready
);
  localparam int unsigned WIN_AW = $clog2(NB_WIN_WORDS);
  localparam int unsigned HDR_CW = $clog2(HDR_DEPTH + 1);

  niu_ctrl_t ctrl;
  niu_stat_t stat;
  logic [7:0] irq_event;

  // ------------------------------------------------------------ HIPPI destination
  logic        d_pkt_start, d_pkt_end, d_word_valid, d_err;
  logic [31:0] d_word;

  hippi_dst u_hdst (
    .clk             (clk),
    .rst_n           (rst_n),
    .s2d_i           (hdst_i),
    .d2s_o           (hdst_o),
    .connect_en_i    (ctrl.hippi_connect),
    .pulse_load_i    (ctrl.pulse_load),
    .pulse_count_i   (ctrl.pulse_count),
    .conn_request_o  (stat.conn_request),
    .dst_intercon_o  (stat.dst_interconnect),
    .ifield_o        (stat.dst_ifield),
    .ifield_par_ok_o (stat.ifield_parity_ok),
    .pulse_zero_o    (stat.pulse_zero),
    .pkt_start_o     (d_pkt_start),
    .pkt_end_o       (d_pkt_end),
    .word_valid_o    (d_word_valid),
    .word_o          (d_word),
    .err_o           (d_err)
  );

  // ------------------------------------------------------------ ring-bound buffers
  logic [31:0] rp_data;
  logic        rp_empty, rp_arrived, rp_pop;

  rb_ctrl #(.DEPTH(RB_DEPTH)) u_rb (
    .clk          (clk),
    .rst_n        (rst_n),
    .pkt_start_i  (d_pkt_start),
    .pkt_end_i    (d_pkt_end),
    .wr_valid_i   (d_word_valid),
    .wr_data_i    (d_word),
    .err_i        (d_err),
    .rb_select_i  (ctrl.rb_select),
    .reset_i      (ctrl.rb_reset),
    .proc_pop_i   (ctrl.rb_proc_pop),
    .proc_data_o  (stat.rb_proc_data),
    .rp_pop_i     (rp_pop),
    .rp_data_o    (rp_data),
    .rp_empty_o   (rp_empty),
    .rp_arrived_o (rp_arrived),
    .arriving_o   (stat.rb_arriving),
    .arrived_o    (stat.rb_arrived),
    .longpkt_o    (stat.rb_longpkt),
    .xmiterr_o    (stat.rb_xmiterr),
    .empty_o      (stat.rb_empty),
    .full_o       (stat.rb_full)
  );

  rb_cksum_q u_rbsum (
    .clk          (clk),
    .rst_n        (rst_n),
    .pkt_start_i  (d_pkt_start),
    .pkt_end_i    (d_pkt_end),
    .word_valid_i (d_word_valid),
    .word_i       (d_word),
    .pop_i        (ctrl.rb_cksum_pop),
    .sum_o        (stat.rb_cksum),
    .state_o      (stat.cksum_state)
  );

  logic [15:0] ringp_left;
  logic        ringp_done, ringp_timeout;

  ringp_tx #(.TIMEOUT(RING_TIMEOUT)) u_ringp (
    .clk            (clk),
    .rst_n          (rst_n),
    .start_i        (ctrl.dp_xmit),
    .abort_i        (ctrl.dp_abort),
    .fifo_data_i    (rp_data),
    .fifo_empty_i   (rp_empty),
    .fifo_arrived_i (rp_arrived),
    .fifo_pop_o     (rp_pop),
    .tx_o           (rp1_tx),
    .tx_ready_i     (rp1_tx_ready),
    .busy_o         (stat.ringp_busy),
    .done_o         (ringp_done),
    .timeout_o      (ringp_timeout),
    .last_o         (stat.ringp_last),
    .count_o        (ringp_left)
  );
  assign stat.ringp_count = {16'd0, ringp_left};

  // ------------------------------------------------------------ network-bound
  logic              nb_we, nb_wbank;
  logic [2:0]        nb_wwin;
  logic [WIN_AW-1:0] nb_waddr, nb_raddr;
  logic [31:0]       nb_wdata, nb_rdata;
  logic              rd_bank;
  logic [2:0]        wr_window_sel, rd_window_sel;

  // BANKSELECT = 0: data enters bank 0, the source port reads bank 1
  assign rd_bank       = ~ctrl.bank_select;
  assign wr_window_sel = ctrl.bank_select ? ctrl.nb_window1 : ctrl.nb_window0;
  assign rd_window_sel = rd_bank          ? ctrl.nb_window1 : ctrl.nb_window0;

  dp_rx #(.WIN_AW(WIN_AW)) u_dprx (
    .clk         (clk),
    .rst_n       (rst_n),
    .open_i      (ctrl.dp_open),
    .rx_i        (rp1_rx),
    .rx_ready_o  (rp1_rx_ready),
    .bank_i      (ctrl.bank_select),
    .window_i    (wr_window_sel),
    .nb_we_o     (nb_we),
    .nb_bank_o   (nb_wbank),
    .nb_window_o (nb_wwin),
    .nb_addr_o   (nb_waddr),
    .nb_data_o   (nb_wdata),
    .receiving_o (stat.dp_receiving),
    .waiting_o   (stat.dp_waiting),
    .raw_o       (stat.dp_raw),
    .len_o       (stat.dp_len),
    .cksum_o     (stat.nb_cksum)
  );

  // Processor test path: every word of the memory is also reachable from the
  // bus at 0xfff00000 + 4*{bank, window, address}. A processor write takes
  // the write port for that clock and a processor read takes the read port;
  // it is meant for diagnostics and for software data sources while the
  // data port and the source port are idle.
  localparam int unsigned NB_WW = $clog2(NB_WINDOWS);
  localparam int unsigned NB_IW = 1 + NB_WW + WIN_AW;
  logic             pm_hit, pm_we, pm_rd;
  logic [NB_IW-1:0] pm_idx;
  logic [31:0]      regs_rdata;
  assign pm_hit = bus_sel && (bus_addr[31:18] == 14'h3ffc);
  assign pm_we  = pm_hit &&  bus_we;
  assign pm_rd  = pm_hit && !bus_we;
  assign pm_idx = bus_addr[NB_IW+1:2];
  assign bus_rdata = pm_hit ? nb_rdata : regs_rdata;
  if (NB_IW > 16) begin : g_pm_size
    $error("niu_top: network-bound memory larger than the 256 KB test window");
  end

  nb_buffer #(.WINDOWS(NB_WINDOWS), .WIN_WORDS(NB_WIN_WORDS)) u_nbuf (
    .clk         (clk),
    .wr_en_i     (nb_we || pm_we),
    .wr_bank_i   (pm_we ? pm_idx[NB_IW-1] : nb_wbank),
    .wr_window_i (pm_we ? pm_idx[WIN_AW +: NB_WW] : nb_wwin[NB_WW-1:0]),
    .wr_addr_i   (pm_we ? pm_idx[WIN_AW-1:0] : nb_waddr),
    .wr_data_i   (pm_we ? bus_wdata : nb_wdata),
    .rd_bank_i   (pm_rd ? pm_idx[NB_IW-1] : rd_bank),
    .rd_window_i (pm_rd ? pm_idx[WIN_AW +: NB_WW] : rd_window_sel[NB_WW-1:0]),
    .rd_addr_i   (pm_rd ? pm_idx[WIN_AW-1:0] : nb_raddr),
    .rd_data_o   (nb_rdata)
  );

  // the data port never writes the bank the source port reads
  a_banks: assert property (@(posedge clk) (nb_we && !pm_hit) |-> nb_wbank != rd_bank);

  logic [31:0]       hdr_data;
  logic [HDR_CW-1:0] hdr_count;
  logic              hdr_pop;

  sync_fifo #(.WIDTH(32), .DEPTH(HDR_DEPTH)) u_hdr (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear_i (1'b0),
    .push_i  (ctrl.nb_hdr_push),
    .wdata_i (ctrl.wdata),
    .pop_i   (hdr_pop),
    .rdata_o (hdr_data),
    .empty_o (stat.hdr_empty),
    .full_o  (stat.hdr_full),
    .count_o (hdr_count)
  );

  hippi_src #(.BURST_WORDS(256), .WIN_AW(WIN_AW), .HDR_CW(HDR_CW)) u_hsrc (
    .clk             (clk),
    .rst_n           (rst_n),
    .s2d_o           (hsrc_o),
    .d2s_i           (hsrc_i),
    .make_request_i  (ctrl.make_request),
    .ifield_i        (ctrl.src_ifield),
    .xmit_i          (ctrl.hippi_xmit),
    .send_data_i     (ctrl.send_data),
    .len_m1_i        (ctrl.hippi_len_m1[WIN_AW-1:0]),
    .hdr_data_i      (hdr_data),
    .hdr_count_i     (hdr_count),
    .hdr_pop_o       (hdr_pop),
    .win_addr_o      (nb_raddr),
    .win_data_i      (nb_rdata),
    .accepted_o      (stat.accepted),
    .rejected_o      (stat.rejected),
    .src_intercon_o  (stat.src_interconnect),
    .have_pulses_o   (stat.have_pulses),
    .sending_o       (stat.sending_pkt),
    .packet_sent_o   (stat.packet_sent),
    .header_active_o (stat.header_active)
  );

  // ------------------------------------------------------------ command port
  logic cp_msg_in, cp_acquired;

  cmd_port #(.RX_DEPTH(CP_RX_DEPTH)) u_cp (
    .clk            (clk),
    .rst_n          (rst_n),
    .rx_i           (rp0_rx),
    .rx_ready_o     (rp0_rx_ready),
    .tx_o           (rp0_tx),
    .tx_ready_i     (rp0_tx_ready),
    .pop_i          (ctrl.cp_pop),
    .rdata_o        (stat.cp_data),
    .rx_empty_o     (stat.cp_empty),
    .rx_full_o      (stat.cp_full),
    .msg_in_o       (cp_msg_in),
    .write_i        (ctrl.cp_write),
    .wdata_i        (ctrl.wdata),
    .close_i        (ctrl.cp_close),
    .channel_open_o (stat.cp_ready),
    .acquired_o     (cp_acquired)
  );

  // ------------------------------------------------------------ processor side
  logic clock_ovf;

  proc_support #(.TICK_DIV(TICK_DIV)) u_ps (
    .clk           (clk),
    .rst_n         (rst_n),
    .cpu_error_i   (cpu_error),
    .clear_error_i (ctrl.clear_error),
    .cpu_reset_n_o (cpu_reset_n),
    .error_reset_o (stat.error_reset),
    .clock_o       (stat.clock),
    .overflow_o    (clock_ovf)
  );

  niu_regs u_regs (
    .clk         (clk),
    .rst_n       (rst_n),
    .bus_sel_i   (bus_sel),
    .bus_we_i    (bus_we),
    .bus_addr_i  (bus_addr),
    .bus_wdata_i (bus_wdata),
    .bus_rdata_o (regs_rdata),
    .ctrl_o      (ctrl),
    .stat_i      (stat),
    .cp_msg_in_i (cp_msg_in),
    .clock_ovf_i (clock_ovf),
    .irq_event_o (irq_event)
  );

  irq_ctrl u_irq (
    .clk       (clk),
    .rst_n     (rst_n),
    .event_i   (irq_event),
    .clear_i   (ctrl.irq_clear),
    .pending_o (),
    .irl_o     (irl)
  );

  assign soft_led_n = ctrl.soft_led_n;
endmodule
