// route_xlate: turns a PCI Express packet into the network routing bits.
//
// The routing key is the low KEY_BITS bits of symbol `key_sym` of the
// buffered packet. With the default key_sym of 11 that is the top address
// byte of a 32-bit-address memory request: STP, two sequence-number
// bytes and eight header bytes come before it. The key indexes a table of
// 2**KEY_BITS entries written over the control link; the entry is the
// 8-bit header placed on the routing channels. The table clears to zero
// at reset. `route` is combinational from `pkt`. The upper bits of the
// key symbol are deliberately ignored.
//
// The document says routing information is extracted from the PCI Express
// packet and translated into routing bits, that the board drives eight
// routing bits, and that the current network needs four. The choice of
// field and the table are this design's.
`timescale 1ps / 1ps
module route_xlate
  import ops_pkg::*;
#(
  parameter int unsigned KEY_BITS = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                tbl_we,
  input  logic [KEY_BITS-1:0] tbl_addr,
  input  logic [ROUTE_BITS-1:0] tbl_data,
  input  logic [4:0]          key_sym,
  input  logic [PKT_W-1:0]    pkt,
  output logic [ROUTE_BITS-1:0] route
);

  logic [ROUTE_BITS-1:0] tbl [2**KEY_BITS];
  logic [7:0]            sym;

  assign sym   = pkt[key_sym*8 +: 8];
  assign route = tbl[sym[KEY_BITS-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2**KEY_BITS; i++) tbl[i] <= '0;
    end else if (tbl_we) begin
      tbl[tbl_addr] <= tbl_data;
    end
  end

endmodule
