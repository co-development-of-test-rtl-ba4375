// pipe_tx_sender: sends received packets to the destination PC's PHY.
//
// Works in the PXPIPE transmit clock `pclk`. A packet is handed over as a
// held 256-bit word plus a toggle from the FPGA clock domain; a
// two-flop synchronizer detects the toggle and the packet is copied.
// Its 32 symbols then go out one per clock, symbol 0 first, with TXDATAK
// high on the first (STP) and last (END) symbols, which is how the
// packets were framed when they entered the source board. Between
// packets the bus carries logical idle (data 0, TXDATAK 0). A packet that
// arrives while one is being sent is counted in `lost` and not sent. A
// packet of 32 symbols takes 32 clocks (128 ns at 250 MHz), longer than
// one 25.6 ns network slot, so the destination can keep up only when
// packets arrive no faster than the PCI Express lane can carry them.
// The document says received data goes through the FPGA to the
// destination PC; the framing rule and idle are this design's.
`timescale 1ps / 1ps
module pipe_tx_sender
  import ops_pkg::*;
(
  input  logic             pclk,
  input  logic             rst_n,
  input  logic [PKT_W-1:0] pkt,
  input  logic             pkt_toggle,
  output logic [7:0]       txdata,
  output logic             txdatak,
  output logic             busy,
  output logic [15:0]      lost
);

  logic [2:0]             sync;
  logic [PKT_W-1:0]       buf_q;
  logic [$clog2(PKT_SYMS)-1:0] idx;
  logic                   new_pkt;

  assign new_pkt = sync[2] ^ sync[1];

  always_ff @(posedge pclk or negedge rst_n) begin
    if (!rst_n) begin
      sync    <= '0;
      buf_q   <= '0;
      idx     <= '0;
      busy    <= 1'b0;
      lost    <= '0;
      txdata  <= '0;
      txdatak <= 1'b0;
    end else begin
      sync <= {sync[1:0], pkt_toggle};
      if (busy) begin
        txdata  <= buf_q[idx*8 +: 8];
        txdatak <= (idx == '0) || (idx == $clog2(PKT_SYMS)'(PKT_SYMS - 1));
        idx     <= idx + 1'b1;
        if (idx == $clog2(PKT_SYMS)'(PKT_SYMS - 1)) busy <= 1'b0;
        if (new_pkt) lost <= lost + 16'd1;
      end else begin
        txdata  <= '0;
        txdatak <= 1'b0;
        if (new_pkt) begin
          buf_q <= pkt;
          busy  <= 1'b1;
          idx   <= '0;
        end
      end
    end
  end

endmodule
