// rx_monitor_mem: received packets kept for inspection over the control link.
//
// A ring of NPKT packet slots. Every packet written with `wr_en` goes to
// the next slot, overwriting the oldest; `count` counts all packets
// written. The control link reads one 32-bit word at a time:
// rd_addr = {slot, word}, word w being bits [32w+31:32w]; `rd_data` is
// read combinationally. Monitoring is not real-time: the
// ring holds the last NPKT packets only. The document says traffic can be
// monitored over the USB link, not in real time; the ring and its size
// are this design's choice.
`timescale 1ps / 1ps
module rx_monitor_mem
  import ops_pkg::*;
#(
  parameter int unsigned NPKT = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        wr_en,
  input  logic [PKT_W-1:0]            wr_pkt,
  input  logic [$clog2(NPKT)+2:0]     rd_addr,
  output logic [31:0]                 rd_data,
  output logic [15:0]                 count
);

  localparam int unsigned AW = $clog2(NPKT);

  logic [7:0][31:0] mem [NPKT];
  logic [AW-1:0]    wp;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp] <= wr_pkt;
  end

  assign rd_data = mem[rd_addr[AW+2:3]][rd_addr[2:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      count <= '0;
    end else if (wr_en) begin
      wp    <= wp + 1'b1;
      count <= count + 16'd1;
    end
  end

endmodule
