// niu_pkg: types, register map and helper functions shared by the VISTAnet
// Network Interface Unit (NIU) hardware.
//
// The NIU joins a Pixel-Planes 5 ring to a HIPPI network link. This package
// holds what several blocks need to agree on:
//  - the HIPPI-PH signal bundles of a simplex channel (source to destination
//    and back) and the odd byte parity / LLRC rules of HIPPI-PH;
//  - the ring port word bundle (a word with out-of-band start and end marks);
//  - the 16-bit one's-complement adder used by both checksum units;
//  - the processor register offsets and bit positions (the register map
//    follows the NIU hardware register definitions; the bus itself is this
//    design's own single-cycle bus);
//  - the control and status structs passed between the register block and
//    the datapath blocks.
package niu_pkg;

  // ---------------------------------------------------------------- HIPPI-PH
  // Source -> destination signals of one simplex channel.
  typedef struct packed {
    logic        intercon;   // INTERCONNECT
    logic        request;
    logic        packet;
    logic        burst;
    logic [31:0] data;
    logic [3:0]  parity;   // odd parity, one bit per byte
  } hippi_s2d_t;

  // Destination -> source signals.
  typedef struct packed {
    logic intercon;   // INTERCONNECT
    logic connect;
    logic ready;           // one-clock pulse grants one burst
  } hippi_d2s_t;

  // Odd parity per byte: each byte plus its parity bit has an odd number of 1s.
  function automatic logic [3:0] odd_parity(input logic [31:0] d);
    logic [3:0] p;
    for (int b = 0; b < 4; b++) p[b] = ~(^d[8*b +: 8]);
    return p;
  endfunction

  // ---------------------------------------------------------------- ring port
  // One word on a ring port. sop marks the Ring Address Word (RAW) that
  // opens a channel, eop the last word of the message.
  typedef struct packed {
    logic        valid;
    logic        sop;
    logic        eop;
    logic [31:0] data;
  } ring_beat_t;

  // RingP header: the low 16 bits hold the message length in words, RAW
  // included. Zero marks a pad word with no message.
  function automatic logic [15:0] ringp_len(input logic [31:0] hdr);
    return hdr[15:0];
  endfunction

  // ---------------------------------------------------------------- checksum
  // 16-bit one's-complement addition (end-around carry).
  function automatic logic [15:0] add1c(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

  // ---------------------------------------------------------------- registers
  // Offsets inside the 0xffffff00 register page.
  localparam logic [23:0] REG_PAGE = 24'hffffff;
  localparam logic [7:0]
    A_NIUSTATUS    = 8'h00,
    A_CMDPORT      = 8'h04,  // read CMDPORTFIFO, write CMDPORTWRITE
    A_RINGCTRL     = 8'h08,
    A_HIPPICTRL    = 8'h0c,
    A_HIPPIIFIELD  = 8'h10,  // write: source I-field, read: received I-field
    A_RINGBNDCKSM  = 8'h14,
    A_RBFIFO0_NBHD = 8'h18,  // read RINGBNDFIFO0, write NETBNDHEADER
    A_RINGBNDFIFO1 = 8'h1c,
    A_DATAPORTRAW  = 8'h20,
    A_DPLEN_HSLEN  = 8'h24,  // read DATAPORTLEN, write HIPPILEN
    A_NETBNDCKSM   = 8'h28,
    A_NETBNDCTRL   = 8'h2c,
    A_RINGBNDCTRL  = 8'h30,
    A_RINGP        = 8'h34,
    A_CMDPORTCLOSE = 8'h40,
    A_RESETFIFO0   = 8'h44,
    A_RESETFIFO1   = 8'h48,
    A_DATAPORTXMIT = 8'h4c,
    A_HIPPIXMIT    = 8'h50,
    A_CLEARERROR   = 8'h54,
    A_DATAPORTABRT = 8'h58,
    A_DATAPORTOPEN = 8'h5c;

  // HIPPICTRL bits
  localparam int HC_CONNECTREQUEST = 0;   // R
  localparam int HC_PULSEZERO      = 1;   // R
  localparam int HC_DSTINTERCONN   = 2;   // R
  localparam int HC_IFLDPARITY     = 3;   // R, 4 bits [6:3]
  localparam int HC_HIPPICONNECT   = 8;   // W
  localparam int HC_MAKEREQUEST    = 16;  // R/W
  localparam int HC_ACCEPTED       = 17;  // R
  localparam int HC_HSINTENABLE    = 17;  // W
  localparam int HC_REJECTED       = 18;  // R
  localparam int HC_SRCINTERCONN   = 19;  // R
  localparam int HC_HAVEPULSES     = 20;  // R
  localparam int HC_SENDINGPKT     = 21;  // R
  localparam int HC_SOFTLED        = 24;  // W, 4 bits, 0 = LED on

  // NETBNDCTRL bits
  localparam int NC_HEADEREMPTY_L = 0;    // R, 0 when empty
  localparam int NC_HEADERFULL_L  = 1;    // R, 0 when full
  localparam int NC_HEADERACTIVE  = 2;    // R
  localparam int NC_PACKETSENT    = 4;    // R
  localparam int NC_WINDOW0       = 0;    // W, 3 bits
  localparam int NC_WINDOW1       = 3;    // W, 3 bits
  localparam int NC_BANKSELECT    = 6;    // W
  localparam int NC_SENDDATA      = 7;    // W

  // NIUSTATUS bits
  localparam int NS_ERRORRESET = 16;

  // RINGBNDCTRL bits (FIFO x uses bit + 4*x for bits 0..3)
  localparam int RC_PKTARRIVING = 0;
  localparam int RC_PKTARRIVED  = 1;
  localparam int RC_LONGPKT     = 2;
  localparam int RC_XMITERR     = 3;
  localparam int RC_FIFOEMPTY_L = 8;      // +x
  localparam int RC_FIFOFULL_L  = 10;     // +x
  localparam int RC_CHKSUMSTATE = 12;     // 2 bits
  localparam int RC_RBFIFOSELECT = 14;
  localparam int RC_RBINTENABLE  = 15;
  localparam int RC_TESTBIT0     = 16;    // 2 bits

  // CHKSUMSTATE codes
  localparam logic [1:0] SUMERROR = 2'd0, SUMQUED2 = 2'd1, SUMQUED1 = 2'd2, SUMQUED0 = 2'd3;

  // RINGCTRL bits
  localparam int GC_CMDFIFOEMPTY_L = 0;   // R
  localparam int GC_CMDFIFOFULL_L  = 1;   // R
  localparam int GC_CMDPORTREADY   = 3;   // R
  localparam int GC_CMDFIFOAVAIL   = 4;   // R
  localparam int GC_DATAPORTBUSY_L = 16;  // R, 0 while RingP is busy
  localparam int GC_DPRECEIVING    = 24;  // R
  localparam int GC_DPWAITING      = 25;  // R
  localparam int GC_CPRXINTENABLE  = 0;   // W
  localparam int GC_CPTXINTENABLE  = 1;   // W
  localparam int GC_DPARRVINTEN    = 26;  // W
  localparam int GC_DPININTEN      = 27;  // W
  localparam int GC_DPTXINTEN      = 28;  // W
  localparam int GC_RINGPCOUNTER   = 29;  // W

  // Interrupt levels
  localparam int IRQ_RINGBOUND  = 7;
  localparam int IRQ_NETBOUND   = 6;
  localparam int IRQ_DPWRITE    = 5;
  localparam int IRQ_HIPPISRC   = 4;
  localparam int IRQ_CMDPORT    = 3;
  localparam int IRQ_CLOCKOVF   = 2;

  // ---------------------------------------------------------------- control
  // Everything the register block drives into the datapath.
  typedef struct packed {
    // HIPPICTRL
    logic        hippi_connect;
    logic        make_request;
    logic        hs_int_en;
    logic [3:0]  soft_led_n;
    logic        pulse_load;        // strobe: nonzero PULSECOUNT written
    logic [5:0]  pulse_count;
    logic [31:0] src_ifield;
    logic [11:0] hippi_len_m1;
    logic        hippi_xmit;        // strobe
    // NETBNDCTRL
    logic [2:0]  nb_window0;
    logic [2:0]  nb_window1;
    logic        bank_select;
    logic        send_data;
    logic        nb_hdr_push;       // strobe, data = wdata
    // RINGBNDCTRL
    logic        rb_select;
    logic        rb_int_en;
    logic [1:0]  test_bits;
    logic [1:0]  rb_reset;          // strobes RESETFIFO0/1
    logic [1:0]  rb_proc_pop;       // strobes: processor read of FIFO x
    logic        rb_cksum_pop;      // strobe
    // RINGCTRL
    logic        cp_rx_int_en;
    logic        cp_tx_int_en;
    logic        dp_arrv_int_en;
    logic        dp_in_int_en;
    logic        dp_tx_int_en;
    logic        ringp_counter_sel;
    logic        cp_pop;            // strobe
    logic        cp_write;          // strobe, data = wdata
    logic        cp_close;          // strobe
    logic        dp_open;           // strobe
    logic        dp_xmit;           // strobe
    logic        dp_abort;          // strobe
    // NIUSTATUS
    logic        clear_error;       // strobe
    logic [31:0] wdata;
    // interrupt clears on status reads
    logic [7:0]  irq_clear;
  } niu_ctrl_t;

  // Everything the register block reads back.
  typedef struct packed {
    // HIPPI destination
    logic        conn_request;
    logic        pulse_zero;
    logic        dst_interconnect;
    logic [3:0]  ifield_parity_ok;
    logic [31:0] dst_ifield;
    // HIPPI source
    logic        accepted;
    logic        rejected;
    logic        src_interconnect;
    logic        have_pulses;
    logic        sending_pkt;
    logic        header_active;
    logic        packet_sent;
    logic        hdr_empty;
    logic        hdr_full;
    // ring-bound
    logic [1:0]  rb_arriving;
    logic [1:0]  rb_arrived;
    logic [1:0]  rb_longpkt;
    logic [1:0]  rb_xmiterr;
    logic [1:0]  rb_empty;
    logic [1:0]  rb_full;
    logic [31:0] rb_proc_data;      // head of the processor-side FIFO
    logic [1:0]  cksum_state;
    logic [31:0] rb_cksum;
    logic [31:0] ringp_last;
    logic [31:0] ringp_count;
    logic        ringp_busy;
    // data port
    logic        dp_receiving;
    logic        dp_waiting;
    logic [31:0] dp_raw;
    logic [15:0] dp_len;
    logic [31:0] nb_cksum;
    // command port
    logic        cp_empty;
    logic        cp_full;
    logic        cp_ready;
    logic [31:0] cp_data;
    // processor subsystem
    logic [15:0] clock;
    logic        error_reset;
  } niu_stat_t;

endpackage
