// ops_test_electronics: the test-electronics board between a PCI Express
// lane and the optical packet switched network.
//
// It joins the FPGA logic (ops_fpga_core) with models of the board's
// high-speed parts:
//   - nine pecl_serializer channels (8 payload + the source-synchronous
//     clock), all running from the 2.5 GHz reference clock `refclk`; the
//     clock channel's serializer also provides the 312.5 MHz word clock
//     that the FPGA runs on (brought out as `fpga_clk`);
//   - a delay_line on every signal that leaves the board (8 payload,
//     clock, Frame, 8 routing) and on every signal that enters it
//     (8 payload, clock, Frame), each set by its delay code in the FPGA's
//     register file (codes 0-17 outgoing, 18-27 incoming);
//   - eight pecl_deserializer channels, all clocked by the one received
//     clock and held in reset while the received Frame is low. The word
//     clock of the first one clocks the FPGA's packet decoder.
// Only the clock channel's serializer word clock and the first
// deserializer's word clock are used; the others are identical copies
// and stay unconnected.
// Frame and routing leave the FPGA as single bits: they change only at
// 8-bit boundaries of the slot and need no serializer.
// The PXPIPE buses of the PCI Express PHY, the control (USB) register bus
// and the network-side signals are the ports. The PHY, the USB device,
// the electro-optic modules and the network are outside this module.
// Timing: one network slot is 64 refclk periods (25.6 ns); outgoing
// signals appear half a word clock after the FPGA word that carries them,
// plus each signal's programmed delay. Calibration: the outgoing clock
// needs about half a bit period (code 20, 200 ps) more delay than the
// data so that its edges fall in the middle of the data bits, and Frame
// and routing, which skip the serializers, need the serializers' latency
// of half a word (code 160, 1.6 ns) to line up with the slot. The
// deserializers must see Frame high before the first received clock
// edge; with the window moved fully into the leading guard this needs
// that Frame alignment.
`timescale 1ps / 1ps
module ops_test_electronics
  import ops_pkg::*;
(
  input  logic                  refclk,
  input  logic                  rst_n,
  output logic                  fpga_clk,
  // PXPIPE
  input  logic                  pipe_rxclk,
  input  logic [7:0]            pipe_rxdata,
  input  logic                  pipe_rxdatak,
  input  logic                  pipe_pclk,
  output logic                  pipe_txclk,
  output logic [7:0]            pipe_txdata,
  output logic                  pipe_txdatak,
  // control (USB) bus, on fpga_clk
  input  logic                  bus_we,
  input  logic [11:0]           bus_addr,
  input  logic [31:0]           bus_wdata,
  output logic [31:0]           bus_rdata,
  // to the E/O modules
  output logic [PAYLOAD_CH-1:0] net_tx_payload,
  output logic                  net_tx_clock,
  output logic                  net_tx_frame,
  output logic [ROUTE_BITS-1:0] net_tx_route,
  // from the O/E modules
  input  logic [PAYLOAD_CH-1:0] net_rx_payload,
  input  logic                  net_rx_clock,
  input  logic                  net_rx_frame
);

  logic [PAYLOAD_CH-1:0][SER_W-1:0] tx_word, rx_word;
  logic [SER_W-1:0]                 tx_clk_word;
  logic                             tx_frame;
  logic [ROUTE_BITS-1:0]            tx_route;
  logic [N_DELAY-1:0][DELAY_W-1:0]  delay_code;
  logic [PAYLOAD_CH-1:0]            ser_out, ser_wclk, des_in, des_wclk;
  logic                             ser_clk_out, rx_clock_d, rx_frame_d;

  assign pipe_txclk = pipe_pclk;

  ops_fpga_core u_core (
    .clk(fpga_clk), .rst_n,
    .pipe_rxclk, .pipe_rxdata, .pipe_rxdatak,
    .pipe_pclk, .pipe_txdata, .pipe_txdatak,
    .bus_we, .bus_addr, .bus_wdata, .bus_rdata,
    .tx_word, .tx_clk_word, .tx_frame, .tx_route,
    .rx_wclk(des_wclk[0]), .rx_frame(rx_frame_d), .rx_word,
    .delay_code);

  // ---- outgoing ----
  pecl_serializer u_ser_clk (
    .refclk, .rst_n, .word(tx_clk_word), .sout(ser_clk_out), .wclk(fpga_clk));

  for (genvar c = 0; c < PAYLOAD_CH; c++) begin : g_tx
    pecl_serializer u_ser (
      .refclk, .rst_n, .word(tx_word[c]), .sout(ser_out[c]), .wclk(ser_wclk[c]));
    delay_line u_dly (
      .din(ser_out[c]), .code(delay_code[c]), .dout(net_tx_payload[c]));
  end

  delay_line u_dly_tx_clk (
    .din(ser_clk_out), .code(delay_code[8]), .dout(net_tx_clock));
  delay_line u_dly_tx_frame (
    .din(tx_frame), .code(delay_code[9]), .dout(net_tx_frame));

  for (genvar r = 0; r < ROUTE_BITS; r++) begin : g_route
    delay_line u_dly (
      .din(tx_route[r]), .code(delay_code[10 + r]), .dout(net_tx_route[r]));
  end

  // ---- incoming ----
  delay_line u_dly_rx_clk (
    .din(net_rx_clock), .code(delay_code[26]), .dout(rx_clock_d));
  delay_line u_dly_rx_frame (
    .din(net_rx_frame), .code(delay_code[27]), .dout(rx_frame_d));

  for (genvar c = 0; c < PAYLOAD_CH; c++) begin : g_rx
    delay_line u_dly (
      .din(net_rx_payload[c]), .code(delay_code[18 + c]), .dout(des_in[c]));
    pecl_deserializer u_des (
      .rclk(rx_clock_d), .rst_n(rst_n && rx_frame_d), .sin(des_in[c]),
      .word(rx_word[c]), .wclk(des_wclk[c]));
  end

endmodule
