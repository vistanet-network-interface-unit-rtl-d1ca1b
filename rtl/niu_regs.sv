// niu_regs: the processor's view of the NIU hardware.
//
// Decodes the memory-mapped NIU registers at 0xffffff00-0xffffff5c, keeps
// their writable fields, turns writes to trigger registers into one-clock
// strobes, turns reads of FIFO registers into pops, and multiplexes status
// onto the read data. Register addresses, bit masks and polarities follow
// the NIU register definitions; where two registers share an address one is
// read-only and the other write-only. Bits a hardware signal drives low when
// active (FIFO empty/full, DATAPORTBUSY) read as that signal does.
//
// It also forms the interrupt events: rising PKTARRIVING/PKTARRIVED of
// either FIFO (level 7, RBINTENABLE), DPRECEIVING rising (level 6,
// DPARRVINTENABLE) and falling (level 6, DPININTENABLE), RingP finished
// (level 5, DPTXINTENABLE), SENDINGPKT falling (level 4, HSINTENABLE),
// command message arrived (level 3, CPRXINTENABLE) or CMDPORTREADY rising
// (level 3, CPTXINTENABLE), and tick clock overflow (level 2, always). A read
// of RINGBNDCTRL, RINGCTRL, HIPPICTRL or NIUSTATUS clears the levels whose
// cause it reports.
//
// RINGBNDCHKSUM presents the ring-bound sums crossed over, as the register
// definition has it: the sum of the upper half-words of the packet reads in
// the lower half of the register and vice versa. NETBNDCHKSUM is straight.
//
// Bus: one access per clock. bus_sel_i with bus_we_i and bus_addr_i select
// the register; bus_rdata_o is valid in the same clock and all side effects
// (writes, strobes, pops) happen at the clock edge that ends the access.
// The single-cycle bus is this design's own; the SPARC bus cycle is not
// modelled.
module niu_regs
  import niu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_sel_i,
  input  logic        bus_we_i,
  input  logic [31:0] bus_addr_i,
  input  logic [31:0] bus_wdata_i,
  output logic [31:0] bus_rdata_o,
  output niu_ctrl_t   ctrl_o,
  input  niu_stat_t   stat_i,
  input  logic        cp_msg_in_i,     // command message arrived
  input  logic        clock_ovf_i,     // tick clock wrapped
  output logic [7:0]  irq_event_o
);
  logic       hit, rd, wr;
  logic [7:0] a;
  assign hit = bus_sel_i && (bus_addr_i[31:8] == REG_PAGE);
  assign a   = bus_addr_i[7:0];
  assign rd  = hit && !bus_we_i;
  assign wr  = hit &&  bus_we_i;

  // ------------------------------------------------------------ writable state
  logic        hippi_connect, make_request, hs_int_en;
  logic [3:0]  soft_led_n;
  logic [31:0] src_ifield;
  logic [11:0] hippi_len_m1;
  logic [2:0]  nb_window0, nb_window1;
  logic        bank_select, send_data;
  logic        rb_select, rb_int_en;
  logic [1:0]  test_bits;
  logic        cp_rx_int_en, cp_tx_int_en, dp_arrv_int_en, dp_in_int_en, dp_tx_int_en;
  logic        ringp_counter_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hippi_connect     <= 1'b0;
      make_request      <= 1'b0;
      hs_int_en         <= 1'b0;
      soft_led_n        <= 4'hf;
      src_ifield        <= '0;
      hippi_len_m1      <= '0;
      nb_window0        <= '0;
      nb_window1        <= '0;
      bank_select       <= 1'b0;
      send_data         <= 1'b0;
      rb_select         <= 1'b0;
      rb_int_en         <= 1'b0;
      test_bits         <= '0;
      cp_rx_int_en      <= 1'b0;
      cp_tx_int_en      <= 1'b0;
      dp_arrv_int_en    <= 1'b0;
      dp_in_int_en      <= 1'b0;
      dp_tx_int_en      <= 1'b0;
      ringp_counter_sel <= 1'b0;
    end else if (wr) begin
      case (a)
        A_HIPPICTRL: begin
          hippi_connect <= bus_wdata_i[HC_HIPPICONNECT];
          make_request  <= bus_wdata_i[HC_MAKEREQUEST];
          hs_int_en     <= bus_wdata_i[HC_HSINTENABLE];
          soft_led_n    <= bus_wdata_i[HC_SOFTLED +: 4];
        end
        A_HIPPIIFIELD: src_ifield   <= bus_wdata_i;
        A_DPLEN_HSLEN: hippi_len_m1 <= bus_wdata_i[11:0];
        A_NETBNDCTRL: begin
          nb_window0  <= bus_wdata_i[NC_WINDOW0 +: 3];
          nb_window1  <= bus_wdata_i[NC_WINDOW1 +: 3];
          bank_select <= bus_wdata_i[NC_BANKSELECT];
          send_data   <= bus_wdata_i[NC_SENDDATA];
        end
        A_RINGBNDCTRL: begin
          rb_select <= bus_wdata_i[RC_RBFIFOSELECT];
          rb_int_en <= bus_wdata_i[RC_RBINTENABLE];
          test_bits <= bus_wdata_i[RC_TESTBIT0 +: 2];
        end
        A_RINGCTRL: begin
          cp_rx_int_en      <= bus_wdata_i[GC_CPRXINTENABLE];
          cp_tx_int_en      <= bus_wdata_i[GC_CPTXINTENABLE];
          dp_arrv_int_en    <= bus_wdata_i[GC_DPARRVINTEN];
          dp_in_int_en      <= bus_wdata_i[GC_DPININTEN];
          dp_tx_int_en      <= bus_wdata_i[GC_DPTXINTEN];
          ringp_counter_sel <= bus_wdata_i[GC_RINGPCOUNTER];
        end
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------ control out
  always_comb begin
    ctrl_o                   = '0;
    ctrl_o.hippi_connect     = hippi_connect;
    ctrl_o.make_request      = make_request;
    ctrl_o.hs_int_en         = hs_int_en;
    ctrl_o.soft_led_n        = soft_led_n;
    ctrl_o.pulse_load        = wr && a == A_HIPPICTRL && bus_wdata_i[5:0] != '0;
    ctrl_o.pulse_count       = bus_wdata_i[5:0];
    ctrl_o.src_ifield        = src_ifield;
    ctrl_o.hippi_len_m1      = hippi_len_m1;
    ctrl_o.hippi_xmit        = wr && a == A_HIPPIXMIT;
    ctrl_o.nb_window0        = nb_window0;
    ctrl_o.nb_window1        = nb_window1;
    ctrl_o.bank_select       = bank_select;
    ctrl_o.send_data         = send_data;
    ctrl_o.nb_hdr_push       = wr && a == A_RBFIFO0_NBHD;
    ctrl_o.rb_select         = rb_select;
    ctrl_o.rb_int_en         = rb_int_en;
    ctrl_o.test_bits         = test_bits;
    ctrl_o.rb_reset[0]       = wr && a == A_RESETFIFO0;
    ctrl_o.rb_reset[1]       = wr && a == A_RESETFIFO1;
    ctrl_o.rb_proc_pop[0]    = rd && a == A_RBFIFO0_NBHD;
    ctrl_o.rb_proc_pop[1]    = rd && a == A_RINGBNDFIFO1;
    ctrl_o.rb_cksum_pop      = rd && a == A_RINGBNDCKSM;
    ctrl_o.cp_rx_int_en      = cp_rx_int_en;
    ctrl_o.cp_tx_int_en      = cp_tx_int_en;
    ctrl_o.dp_arrv_int_en    = dp_arrv_int_en;
    ctrl_o.dp_in_int_en      = dp_in_int_en;
    ctrl_o.dp_tx_int_en      = dp_tx_int_en;
    ctrl_o.ringp_counter_sel = ringp_counter_sel;
    ctrl_o.cp_pop            = rd && a == A_CMDPORT && !stat_i.cp_empty;
    ctrl_o.cp_write          = wr && a == A_CMDPORT;
    ctrl_o.cp_close          = wr && a == A_CMDPORTCLOSE;
    ctrl_o.dp_open           = wr && a == A_DATAPORTOPEN;
    ctrl_o.dp_xmit           = wr && a == A_DATAPORTXMIT;
    ctrl_o.dp_abort          = wr && a == A_DATAPORTABRT;
    ctrl_o.clear_error       = wr && a == A_CLEARERROR;
    ctrl_o.wdata             = bus_wdata_i;
    ctrl_o.irq_clear[IRQ_RINGBOUND] = rd && a == A_RINGBNDCTRL;
    ctrl_o.irq_clear[IRQ_NETBOUND]  = rd && a == A_RINGCTRL;
    ctrl_o.irq_clear[IRQ_DPWRITE]   = rd && a == A_RINGCTRL;
    ctrl_o.irq_clear[IRQ_CMDPORT]   = rd && a == A_RINGCTRL;
    ctrl_o.irq_clear[IRQ_HIPPISRC]  = rd && a == A_HIPPICTRL;
    ctrl_o.irq_clear[IRQ_CLOCKOVF]  = rd && a == A_NIUSTATUS;
  end

  // ------------------------------------------------------------ read mux
  logic [31:0] hippictrl_r, netbndctrl_r, ringbndctrl_r, ringctrl_r;

  always_comb begin
    hippictrl_r = '0;
    hippictrl_r[HC_CONNECTREQUEST]  = stat_i.conn_request;
    hippictrl_r[HC_PULSEZERO]       = stat_i.pulse_zero;
    hippictrl_r[HC_DSTINTERCONN]    = stat_i.dst_interconnect;
    hippictrl_r[HC_IFLDPARITY +: 4] = stat_i.ifield_parity_ok;
    hippictrl_r[HC_MAKEREQUEST]     = make_request;
    hippictrl_r[HC_ACCEPTED]        = stat_i.accepted;
    hippictrl_r[HC_REJECTED]        = stat_i.rejected;
    hippictrl_r[HC_SRCINTERCONN]    = stat_i.src_interconnect;
    hippictrl_r[HC_HAVEPULSES]      = stat_i.have_pulses;
    hippictrl_r[HC_SENDINGPKT]      = stat_i.sending_pkt;

    netbndctrl_r = '0;
    netbndctrl_r[NC_HEADEREMPTY_L] = !stat_i.hdr_empty;
    netbndctrl_r[NC_HEADERFULL_L]  = !stat_i.hdr_full;
    netbndctrl_r[NC_HEADERACTIVE]  = stat_i.header_active;
    netbndctrl_r[NC_PACKETSENT]    = stat_i.packet_sent;

    ringbndctrl_r = '0;
    for (int x = 0; x < 2; x++) begin
      ringbndctrl_r[RC_PKTARRIVING + 4*x] = stat_i.rb_arriving[x];
      ringbndctrl_r[RC_PKTARRIVED  + 4*x] = stat_i.rb_arrived[x];
      ringbndctrl_r[RC_LONGPKT     + 4*x] = stat_i.rb_longpkt[x];
      ringbndctrl_r[RC_XMITERR     + 4*x] = stat_i.rb_xmiterr[x];
      ringbndctrl_r[RC_FIFOEMPTY_L + x]   = !stat_i.rb_empty[x];
      ringbndctrl_r[RC_FIFOFULL_L  + x]   = !stat_i.rb_full[x];
    end
    ringbndctrl_r[RC_CHKSUMSTATE +: 2] = stat_i.cksum_state;
    ringbndctrl_r[RC_RBFIFOSELECT]     = rb_select;
    ringbndctrl_r[RC_RBINTENABLE]      = rb_int_en;
    ringbndctrl_r[RC_TESTBIT0 +: 2]    = test_bits;

    ringctrl_r = '0;
    ringctrl_r[GC_CMDFIFOEMPTY_L] = !stat_i.cp_empty;
    ringctrl_r[GC_CMDFIFOFULL_L]  = !stat_i.cp_full;
    ringctrl_r[GC_CMDPORTREADY]   = stat_i.cp_ready;
    ringctrl_r[GC_CMDFIFOAVAIL]   = !stat_i.cp_empty;
    ringctrl_r[GC_DATAPORTBUSY_L] = !stat_i.ringp_busy;
    ringctrl_r[GC_DPRECEIVING]    = stat_i.dp_receiving;
    ringctrl_r[GC_DPWAITING]      = stat_i.dp_waiting;

    case (a)
      A_NIUSTATUS:    bus_rdata_o = {15'd0, stat_i.error_reset, stat_i.clock};
      A_CMDPORT:      bus_rdata_o = stat_i.cp_data;
      A_RINGCTRL:     bus_rdata_o = ringctrl_r;
      A_HIPPICTRL:    bus_rdata_o = hippictrl_r;
      A_HIPPIIFIELD:  bus_rdata_o = stat_i.dst_ifield;
      A_RINGBNDCKSM:  bus_rdata_o = {stat_i.rb_cksum[15:0], stat_i.rb_cksum[31:16]};  // halves swapped
      A_RBFIFO0_NBHD,
      A_RINGBNDFIFO1: bus_rdata_o = stat_i.rb_proc_data;
      A_DATAPORTRAW:  bus_rdata_o = stat_i.dp_raw;
      A_DPLEN_HSLEN:  bus_rdata_o = {16'd0, stat_i.dp_len};
      A_NETBNDCKSM:   bus_rdata_o = stat_i.nb_cksum;
      A_NETBNDCTRL:   bus_rdata_o = netbndctrl_r;
      A_RINGBNDCTRL:  bus_rdata_o = ringbndctrl_r;
      A_RINGP:        bus_rdata_o = ringp_counter_sel ? stat_i.ringp_count : stat_i.ringp_last;
      default:        bus_rdata_o = '0;
    endcase
  end

  // ------------------------------------------------------------ interrupt events
  logic [1:0] arriving_q, arrived_q;
  logic       receiving_q, ringp_busy_q, sending_q, cp_ready_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arriving_q   <= '0;
      arrived_q    <= '0;
      receiving_q  <= 1'b0;
      ringp_busy_q <= 1'b0;
      sending_q    <= 1'b0;
      cp_ready_q   <= 1'b0;
    end else begin
      arriving_q   <= stat_i.rb_arriving;
      arrived_q    <= stat_i.rb_arrived;
      receiving_q  <= stat_i.dp_receiving;
      ringp_busy_q <= stat_i.ringp_busy;
      sending_q    <= stat_i.sending_pkt;
      cp_ready_q   <= stat_i.cp_ready;
    end
  end

  always_comb begin
    irq_event_o = '0;
    irq_event_o[IRQ_RINGBOUND] = rb_int_en &&
      (|(stat_i.rb_arriving & ~arriving_q) || |(stat_i.rb_arrived & ~arrived_q));
    irq_event_o[IRQ_NETBOUND]  = (dp_arrv_int_en && stat_i.dp_receiving && !receiving_q) ||
                                 (dp_in_int_en && !stat_i.dp_receiving && receiving_q);
    irq_event_o[IRQ_DPWRITE]   = dp_tx_int_en && !stat_i.ringp_busy && ringp_busy_q;
    irq_event_o[IRQ_HIPPISRC]  = hs_int_en && !stat_i.sending_pkt && sending_q;
    irq_event_o[IRQ_CMDPORT]   = (cp_rx_int_en && cp_msg_in_i) ||
                                 (cp_tx_int_en && stat_i.cp_ready && !cp_ready_q);
    irq_event_o[IRQ_CLOCKOVF]  = clock_ovf_i;
  end
endmodule
