// pipe_rx_capture: packet framing on the PXPIPE receive bus.
//
// The PHY delivers one 8-bit symbol per RXCLK cycle with RXDATAK marking
// control symbols. A packet starts with the K-symbol STP. From STP on,
// the next PKT_SYMS symbols (STP included, END expected last) are
// collected in a shadow register. When the last symbol arrives the packet
// is copied to `pkt` and `pkt_toggle` flips; `pkt` then holds still for at
// least one packet time, which lets the FPGA clock domain take it through
// toggle_handoff. An END before the last symbol, or a last symbol that is
// not END, counts in `trunc_count` and the packet is discarded.
//
// The document says packets from the PHY are buffered in FPGA memory and
// that the project uses 128 ns packets; the fixed 32-symbol length, STP/END
// framing rule and toggle handoff are this design's reading of that.
// Timing: `pkt` updates on the RXCLK edge that takes the last symbol.
// The last shadow slot is never read: the END symbol is taken straight
// from the bus into `pkt`.
`timescale 1ps / 1ps
module pipe_rx_capture
  import ops_pkg::*;
#(
  parameter int unsigned NSYM = PKT_SYMS
) (
  input  logic              rxclk,
  input  logic              rst_n,
  input  logic [7:0]        rxdata,
  input  logic              rxdatak,
  output logic [NSYM*8-1:0] pkt,
  output logic              pkt_toggle,
  output logic [15:0]       pkt_count,
  output logic [15:0]       trunc_count
);

  localparam int unsigned CW = $clog2(NSYM + 1);

  logic [NSYM*8-1:0] shadow;
  logic [CW-1:0]     idx;      // next symbol position; 0 = idle
  logic              is_stp, is_end, last;

  assign is_stp = rxdatak && (rxdata == K_STP);
  assign is_end = rxdatak && (rxdata == K_END);
  assign last   = (idx == CW'(NSYM - 1));

  always_ff @(posedge rxclk or negedge rst_n) begin
    if (!rst_n) begin
      shadow      <= '0;
      idx         <= '0;
      pkt         <= '0;
      pkt_toggle  <= 1'b0;
      pkt_count   <= '0;
      trunc_count <= '0;
    end else if (idx == '0) begin
      if (is_stp) begin
        shadow[7:0] <= rxdata;
        idx         <= CW'(1);
      end
    end else begin
      shadow[idx*8 +: 8] <= rxdata;
      if (last) begin
        idx <= '0;
        if (is_end) begin
          pkt        <= {rxdata, shadow[(NSYM-1)*8-1:0]};
          pkt_toggle <= ~pkt_toggle;
          pkt_count  <= pkt_count + 16'd1;
        end else begin
          trunc_count <= trunc_count + 16'd1;
        end
      end else if (is_end) begin
        idx         <= '0;
        trunc_count <= trunc_count + 16'd1;
      end else begin
        idx <= idx + CW'(1);
      end
    end
  end

endmodule
