// ops_pkg: constants and types shared by the test-electronics logic.
//
// A network packet occupies one slot of 64 bit periods (25.6 ns at
// 2.5 Gbps). Frame and the routing bits are high for the first 56 bit
// periods and low for an 8-bit dead time. Inside the frame a 5-bit guard
// time sits on either side of a 46-bit window that holds the
// source-synchronous clock; the clock window holds PRE_CLOCKS pre-clocks,
// 32 data bits and the remaining post-clocks. The slot sizes are the
// document's. The 8/6 split of the 14 clock-only bits is this design's
// choice: 8 pre-clocks put the first data bit on a word boundary of the
// deserialized stream.
//
// One PCI Express packet of 128 ns is 32 symbols on the 2.5 Gbps lane.
// 32 symbols of 8 bits are 256 bits: 8 payload channels of 32 bits.
// Symbol s of a packet travels on channel s % 8 as byte s / 8 of that
// channel's 32 bits, first byte first and MSB first (this design's mapping).
`timescale 1ps / 1ps
package ops_pkg;

  localparam int unsigned SLOT_BITS   = 64;
  localparam int unsigned GUARD_BITS  = 5;
  localparam int unsigned DEAD_BITS   = 8;
  localparam int unsigned WINDOW_BITS = 46;
  localparam int unsigned DATA_BITS   = 32;
  localparam int unsigned PRE_CLOCKS  = 8;
  localparam int unsigned POST_CLOCKS = WINDOW_BITS - DATA_BITS - PRE_CLOCKS;
  localparam int unsigned PAYLOAD_CH  = 8;
  localparam int unsigned ROUTE_BITS  = 8;
  localparam int unsigned SER_W       = 8;
  localparam int unsigned PKT_SYMS    = 32;
  localparam int unsigned PKT_W       = PKT_SYMS * 8;
  localparam int unsigned N_DELAY     = 28;   // 18 outgoing + 10 incoming signals
  localparam int unsigned DELAY_W     = 10;   // 0..1000 steps of 10 ps

  // PCI Express framing symbols (K-codes) as seen on the PIPE bus.
  localparam logic [7:0] K_STP = 8'hFB;  // K27.7, start of TLP
  localparam logic [7:0] K_END = 8'hFD;  // K29.7, end of packet

  typedef logic [PKT_W-1:0] pkt_t;

  typedef enum logic [1:0] {
    SRC_PCIE    = 2'd0,
    SRC_PRBS    = 2'd1,
    SRC_PATTERN = 2'd2
  } src_mode_e;

  typedef enum logic [1:0] {
    MANIP_PASS    = 2'd0,
    MANIP_CORRUPT = 2'd1,
    MANIP_DROP    = 2'd2
  } manip_mode_e;

  // Configuration written over the control (USB) link.
  typedef struct packed {
    logic        tx_enable;
    src_mode_e   src_mode;
    logic        inline_fill;
    logic        selftest_en;
    logic        selftest_clear;
    logic        prbs_reseed;
    manip_mode_e manip_mode;
    logic [7:0]  manip_every;
    logic [31:0] manip_mask;
    logic [7:0]  synth_route;
    logic [3:0]  pattern_sel;
    logic [4:0]  route_sym;
    logic [2:0]  win_advance;   // clock/data window moved earlier, bits
  } cfg_t;

  // Counters read back over the control link.
  typedef struct packed {
    logic [15:0] pcie_rx_pkts;
    logic [15:0] pcie_rx_bad;
    logic [15:0] fifo_overflow;
    logic [15:0] slots_sent;
    logic [15:0] net_rx_pkts;
    logic [15:0] manip_corrupted;
    logic [15:0] manip_dropped;
    logic [15:0] st_pkts;
    logic [15:0] st_pkt_errors;
    logic [31:0] st_bit_errors;
    logic [15:0] st_missing;
    logic [15:0] st_lost;
    logic [15:0] pcie_tx_lost;
  } status_t;

endpackage
