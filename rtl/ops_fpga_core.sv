// ops_fpga_core: the FPGA logic of the optical-packet test electronics.
//
// Transmit path (FPGA clock `clk`, 312.5 MHz = 2.5 Gbps / 8):
//   PXPIPE RX bus -> pipe_rx_capture (in the PHY's RXCLK domain) ->
//   toggle_handoff -> pkt_fifo (packet buffer) -> source_select, which
//   also sees prbs_gen and pattern_mem -> packet_formatter -> one 8-bit
//   word per clock for each of the 8 payload channels and the clock
//   channel, plus Frame and the 8 routing bits. route_xlate derives the
//   routing bits of a PCIe packet from the packet at the buffer head.
// Receive path:
//   the deserializers' burst word clock `rx_wclk` -> rx_packet_decoder ->
//   toggle_handoff -> rx_monitor_mem (received data) and pkt_manipulator
//   (simulated corruption and loss) -> selftest_checker, and through a
//   held register and toggle -> pipe_tx_sender on the PXPIPE TX bus
//   (`pipe_pclk` domain).
// ctrl_regs is the register file of the USB link, on `clk`; it sets the
// modes and the delay codes of the board's delay lines and reads the
// counters. The PHY-side error and loss counters (pcie_rx_bad,
// pcie_tx_lost) come from other clock domains and are read without
// synchronization; they change rarely and are for inspection only.
// The structure follows the document's description of the FPGA memory,
// data sources, inverse multiplexing, received and manipulated data.
// All clock-domain crossings and the register map are this design's.
// Some block outputs are left unconnected here because nothing in the
// core needs them: the buffer's full flag (overflow is counted inside it),
// the formatter's slot_start/sent markers and the PIPE sender's busy flag.
`timescale 1ps / 1ps
module ops_fpga_core
  import ops_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst_n,
  // PXPIPE receive (from the PHY)
  input  logic                             pipe_rxclk,
  input  logic [7:0]                       pipe_rxdata,
  input  logic                             pipe_rxdatak,
  // PXPIPE transmit (to the PHY)
  input  logic                             pipe_pclk,
  output logic [7:0]                       pipe_txdata,
  output logic                             pipe_txdatak,
  // control link
  input  logic                             bus_we,
  input  logic [11:0]                      bus_addr,
  input  logic [31:0]                      bus_wdata,
  output logic [31:0]                      bus_rdata,
  // to the serializers and low-speed drivers
  output logic [PAYLOAD_CH-1:0][SER_W-1:0] tx_word,
  output logic [SER_W-1:0]                 tx_clk_word,
  output logic                             tx_frame,
  output logic [ROUTE_BITS-1:0]            tx_route,
  // from the deserializers
  input  logic                             rx_wclk,
  input  logic                             rx_frame,
  input  logic [PAYLOAD_CH-1:0][SER_W-1:0] rx_word,
  // to the delay lines
  output logic [N_DELAY-1:0][DELAY_W-1:0]  delay_code
);

  cfg_t    cfg;
  status_t status;

  // ---------------- transmit path ----------------
  logic [PKT_W-1:0] cap_pkt, cap_pkt_clk, fifo_head, prbs_pkt, pat_pkt, sel_pkt;
  logic             cap_toggle, cap_valid;
  logic [15:0]      cap_count, cap_bad, fifo_ovf;
  logic             fifo_empty, fifo_full, fifo_pop;
  logic [ROUTE_BITS-1:0] pcie_route, sel_route;
  logic             prbs_next, sel_valid, sel_synth, slot_req, slot_start, sent;
  logic             tbl_we, pat_we;
  logic [3:0]       tbl_addr;
  logic [ROUTE_BITS-1:0] tbl_data;
  logic [6:0]       pat_addr;
  logic [31:0]      pat_data;
  logic [15:0]      slots_sent;

  pipe_rx_capture u_cap (
    .rxclk(pipe_rxclk), .rst_n, .rxdata(pipe_rxdata), .rxdatak(pipe_rxdatak),
    .pkt(cap_pkt), .pkt_toggle(cap_toggle), .pkt_count(cap_count), .trunc_count(cap_bad));

  toggle_handoff #(.W(PKT_W)) u_cap_sync (
    .clk, .rst_n, .src_data(cap_pkt), .src_toggle(cap_toggle),
    .dst_data(cap_pkt_clk), .dst_valid(cap_valid));

  pkt_fifo #(.W(PKT_W), .DEPTH(4)) u_fifo (
    .clk, .rst_n, .wr_en(cap_valid), .wr_data(cap_pkt_clk), .rd_en(fifo_pop),
    .rd_data(fifo_head), .empty(fifo_empty), .full(fifo_full), .overflow_count(fifo_ovf));

  route_xlate #(.KEY_BITS(4)) u_route (
    .clk, .rst_n, .tbl_we, .tbl_addr, .tbl_data, .key_sym(cfg.route_sym),
    .pkt(fifo_head), .route(pcie_route));

  prbs_gen #(.W(PKT_W)) u_prbs (
    .clk, .rst_n, .seed_load(cfg.prbs_reseed), .next(prbs_next), .data(prbs_pkt));

  pattern_mem #(.NPAT(16)) u_pat (
    .clk, .rst_n, .wr_en(pat_we), .wr_addr(pat_addr), .wr_data(pat_data),
    .rd_sel(cfg.pattern_sel), .rd_data(pat_pkt));

  source_select u_sel (
    .mode(cfg.src_mode), .inline_fill(cfg.inline_fill), .slot_req,
    .pcie_empty(fifo_empty), .pcie_pkt(fifo_head), .pcie_route, .pcie_pop(fifo_pop),
    .prbs_pkt, .prbs_next, .pat_pkt, .synth_route(cfg.synth_route),
    .pkt(sel_pkt), .route(sel_route), .pkt_valid(sel_valid), .synth(sel_synth));

  packet_formatter u_fmt (
    .clk, .rst_n, .enable(cfg.tx_enable), .pkt_valid(sel_valid), .pkt(sel_pkt),
    .route(sel_route), .advance(cfg.win_advance), .slot_req, .ch_word(tx_word), .clk_word(tx_clk_word),
    .frame(tx_frame), .route_out(tx_route), .slot_start, .sent);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) slots_sent <= '0;
    else if (slot_req && sel_valid) slots_sent <= slots_sent + 16'd1;
  end

  // ---------------- receive path ----------------
  logic [PKT_W-1:0] dec_pkt, rx_pkt, man_pkt, out_hold;
  logic             dec_toggle, rx_valid, man_valid, out_toggle, tx_busy;
  logic [15:0]      mon_count, man_corr, man_drop, tx_lost;
  logic [5:0]       mon_addr;
  logic [31:0]      mon_data;
  logic [15:0]      st_pkts, st_pkt_err, st_missing, st_lost;
  logic [31:0]      st_bit_err;

  rx_packet_decoder u_dec (
    .wclk(rx_wclk), .rst_n, .frame_n_rst(rx_frame), .ch_word(rx_word),
    .pkt(dec_pkt), .pkt_toggle(dec_toggle));

  toggle_handoff #(.W(PKT_W)) u_rx_sync (
    .clk, .rst_n, .src_data(dec_pkt), .src_toggle(dec_toggle),
    .dst_data(rx_pkt), .dst_valid(rx_valid));

  rx_monitor_mem #(.NPKT(8)) u_mon (
    .clk, .rst_n, .wr_en(rx_valid), .wr_pkt(rx_pkt), .rd_addr(mon_addr),
    .rd_data(mon_data), .count(mon_count));

  pkt_manipulator u_man (
    .clk, .rst_n, .mode(cfg.manip_mode), .every(cfg.manip_every), .mask(cfg.manip_mask),
    .in_valid(rx_valid), .in_pkt(rx_pkt), .out_valid(man_valid), .out_pkt(man_pkt),
    .corrupted(man_corr), .dropped(man_drop));

  selftest_checker #(.DEPTH(8)) u_st (
    .clk, .rst_n, .enable(cfg.selftest_en), .clear(cfg.selftest_clear),
    .tx_valid(slot_req && sel_valid && sel_synth), .tx_pkt(sel_pkt),
    .rx_valid(man_valid), .rx_pkt(man_pkt),
    .pkts(st_pkts), .pkt_errors(st_pkt_err), .bit_errors(st_bit_err),
    .lost(st_lost), .missing(st_missing));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_hold   <= '0;
      out_toggle <= 1'b0;
    end else if (man_valid) begin
      out_hold   <= man_pkt;
      out_toggle <= ~out_toggle;
    end
  end

  pipe_tx_sender u_tx (
    .pclk(pipe_pclk), .rst_n, .pkt(out_hold), .pkt_toggle(out_toggle),
    .txdata(pipe_txdata), .txdatak(pipe_txdatak), .busy(tx_busy), .lost(tx_lost));

  // ---------------- control ----------------
  always_comb begin
    status.pcie_rx_pkts    = cap_count;
    status.pcie_rx_bad     = cap_bad;
    status.fifo_overflow   = fifo_ovf;
    status.slots_sent      = slots_sent;
    status.net_rx_pkts     = mon_count;
    status.manip_corrupted = man_corr;
    status.manip_dropped   = man_drop;
    status.st_pkts         = st_pkts;
    status.st_pkt_errors   = st_pkt_err;
    status.st_bit_errors   = st_bit_err;
    status.st_missing      = st_missing;
    status.pcie_tx_lost    = tx_lost;
    status.st_lost         = st_lost;
  end

  ctrl_regs u_regs (
    .clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .cfg, .status,
    .delay_code, .tbl_we, .tbl_addr, .tbl_data, .pat_we, .pat_addr, .pat_data,
    .mon_addr, .mon_data);

endmodule
