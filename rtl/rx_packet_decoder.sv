// rx_packet_decoder: rebuilds a packet from the received burst.
//
// The deserializers of the eight payload channels share the received
// source-synchronous clock and present one 8-bit word per channel on each
// rising edge of their word clock `wclk`, which runs only while a packet
// is arriving. The first received bit of each channel is its first
// pre-clock bit. This block keeps the first NW = ceil((PRE_CLOCKS + 32) / 8)
// words of every channel, drops the PRE_CLOCKS leading bits and maps the
// 32 data bits back to packet symbols: channel c carries symbols c, c+8,
// c+16, c+24, each MSB first. On the NW-th word `pkt` is updated and
// `pkt_toggle` flips, for toggle_handoff into the FPGA clock.
// Received Frame low (the dead time between packets) asynchronously
// clears the word counter, so each packet starts afresh; the counter
// also has a configuration (power-up) value of zero, so the first burst
// after configuration is counted correctly even though Frame has not
// yet fallen. The post-clocks
// after the data flush the deserializer pipeline so the last word arrives
// before the clock stops.
//
// The document describes the deserializing receiver, the parallel clock
// and the pre/post-clocks; the counting scheme, the reset by Frame and
// the bit mapping (inverse of packet_formatter) are this design's.
`timescale 1ps / 1ps
module rx_packet_decoder
  import ops_pkg::*;
(
  input  logic                             wclk,
  input  logic                             rst_n,
  input  logic                             frame_n_rst,
  input  logic [PAYLOAD_CH-1:0][SER_W-1:0] ch_word,
  output logic [PKT_W-1:0]                 pkt,
  output logic                             pkt_toggle
);

  localparam int unsigned NW = (PRE_CLOCKS + DATA_BITS + SER_W - 1) / SER_W;

  logic [$clog2(NW+1)-1:0]                 wcnt = '0;  // configuration value
  logic [PAYLOAD_CH-1:0][NW*SER_W-1:0]     acc;   // first word in the top bits
  logic [PAYLOAD_CH-1:0][NW*SER_W-1:0]     acc_next;
  logic [PKT_W-1:0]                        pkt_next;
  logic                                    done;

  assign done = (wcnt == $clog2(NW+1)'(NW - 1));

  always_comb begin
    for (int c = 0; c < int'(PAYLOAD_CH); c++)
      acc_next[c] = {acc[c][NW*SER_W-SER_W-1:0], ch_word[c]};
    for (int c = 0; c < int'(PAYLOAD_CH); c++)
      for (int k = 0; k < int'(DATA_BITS / 8); k++)
        pkt_next[8*(c + PAYLOAD_CH*k) +: 8] =
          acc_next[c][NW*SER_W-1-PRE_CLOCKS-8*k -: 8];
  end

  always_ff @(posedge wclk or negedge frame_n_rst) begin
    if (!frame_n_rst) begin
      wcnt <= '0;
      acc  <= '0;
    end else if (wcnt != $clog2(NW+1)'(NW)) begin
      wcnt <= wcnt + 1'b1;
      acc  <= acc_next;
    end
  end

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      pkt        <= '0;
      pkt_toggle <= 1'b0;
    end else if (done) begin
      pkt        <= pkt_next;
      pkt_toggle <= ~pkt_toggle;
    end
  end

endmodule
