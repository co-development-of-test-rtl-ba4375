// packet_formatter: inverse multiplexing of one packet into a network slot.
//
// The network accepts one packet every 64 bit periods. At 8 bits per FPGA
// clock per channel a slot is 8 clocks; `cnt` counts them. In the last
// clock of a slot (`slot_req` high) the formatter takes the offered packet
// for the next slot; with nothing offered, or `enable` low, the next slot
// stays dark (Frame low, no clock, no data).
//
// Bit b (0..63, b = 0 sent first) of a loaded slot is, per signal:
//   Frame, routing   high for b < 56, low in the 8-bit dead time;
//                    routing bit r carries route[r] over the same span.
//                    These change only at word boundaries (56 = 7 words),
//                    so they come out as single bits per clock.
//   clock channel    a 1,0,1,0 pattern over the 46-bit window
//                    b = 5 .. 50, zero in the guard times.
//   payload c        32 data bits at b = 5 + PRE_CLOCKS .. +31, zero
//                    elsewhere. Channel c sends symbols c, c+8, c+16,
//                    c+24 of the packet, each MSB first.
// `advance` (sampled with the packet, clamped to GUARD_BITS) moves the
// clock window and the data earlier by that many bit periods, into the
// leading guard time; Frame and routing do not move. The relative timing
// of clock and data is unchanged, so the receiver needs no setting.
// Word k of a channel holds bits 8k..8k+7 with bit 8k in word[7]; the
// serializers send word[7] first.
// Outputs are decoded from registers and are stable for the whole clock.
// `sent` is high through a slot that carries a packet; `slot_start` marks
// its first clock.
//
// From the document: the 64-bit slot, 5-bit guards, 46-bit clock window,
// 32 data bits, 8-bit dead time, the clock channel, eight payload
// channels and eight routing bits, and the 8-bit bus per channel.
// Also from the document: the clock and payload may sit anywhere in the
// slot provided their relative timing is kept, and earlier works better
// than centred. This design's choices: the symbol-to-channel mapping, the
// pre-clock count, the bit order and the 0..5-bit advance control.
`timescale 1ps / 1ps
module packet_formatter
  import ops_pkg::*;
(
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                enable,
  input  logic                                pkt_valid,
  input  logic [PKT_W-1:0]                    pkt,
  input  logic [ROUTE_BITS-1:0]               route,
  input  logic [2:0]                          advance,
  output logic                                slot_req,
  output logic [PAYLOAD_CH-1:0][SER_W-1:0]    ch_word,
  output logic [SER_W-1:0]                    clk_word,
  output logic                                frame,
  output logic [ROUTE_BITS-1:0]               route_out,
  output logic                                slot_start,
  output logic                                sent
);

  localparam int unsigned WORDS     = SLOT_BITS / SER_W;  // 8 clocks per slot
  localparam int unsigned FRAME_END = SLOT_BITS - DEAD_BITS;
  localparam int unsigned DATA_LO   = GUARD_BITS + PRE_CLOCKS;

  logic [$clog2(WORDS)-1:0] cnt;
  logic                     running;
  logic                     cur_valid;
  logic [PKT_W-1:0]         cur_pkt;
  logic [ROUTE_BITS-1:0]    cur_route;
  logic [2:0]               cur_adv;
  logic [2:0]               adv_lim;

  assign adv_lim = (advance > 3'(GUARD_BITS)) ? 3'(GUARD_BITS) : advance;

  assign slot_req = enable && (cnt == $clog2(WORDS)'(WORDS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      running   <= 1'b0;
      cur_valid <= 1'b0;
      cur_pkt   <= '0;
      cur_route <= '0;
      cur_adv   <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == $clog2(WORDS)'(WORDS - 1)) begin
        running   <= enable;
        cur_valid <= enable && pkt_valid;
        if (enable && pkt_valid) begin
          cur_pkt   <= pkt;
          cur_route <= route;
          cur_adv   <= adv_lim;
        end
      end
    end
  end

  // Slot images, one 64-bit vector per signal, index = bit period; the
  // nominal images are shifted towards bit 0 by the advance.
  logic [PAYLOAD_CH-1:0][SLOT_BITS-1:0] data_nom, data_img;
  logic [SLOT_BITS-1:0]                 clk_nom, clk_img;

  always_comb begin
    clk_nom = '0;
    for (int b = 0; b < int'(WINDOW_BITS); b++)
      clk_nom[GUARD_BITS + b] = ((b % 2) == 0);
    clk_img = clk_nom >> cur_adv;
    for (int c = 0; c < int'(PAYLOAD_CH); c++) begin
      data_nom[c] = '0;
      for (int k = 0; k < int'(DATA_BITS / 8); k++)
        for (int i = 0; i < 8; i++)
          data_nom[c][DATA_LO + 8*k + i] = cur_pkt[8*(c + PAYLOAD_CH*k) + 7 - i];
      data_img[c] = data_nom[c] >> cur_adv;
    end
  end

  always_comb begin
    for (int c = 0; c < int'(PAYLOAD_CH); c++)
      for (int i = 0; i < int'(SER_W); i++)
        ch_word[c][SER_W-1-i] = cur_valid && data_img[c][SER_W*cnt + i];
    for (int i = 0; i < int'(SER_W); i++)
      clk_word[SER_W-1-i] = cur_valid && clk_img[SER_W*cnt + i];
    frame      = cur_valid && (SER_W*cnt < FRAME_END);
    route_out  = frame ? cur_route : '0;
    slot_start = running && (cnt == '0);
    sent       = cur_valid;
  end

endmodule
