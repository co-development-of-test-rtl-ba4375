// pkt_fifo: the packet buffer between PCIe capture and the network side.
//
// A synchronous FIFO of whole packets, DEPTH entries of W bits, held in a
// memory array with read and write pointers one bit wider than the
// address. `rd_data` shows the head entry whenever `empty` is low; `rd_en`
// pops it on the clock edge. A push while full is refused and counted in
// `overflow_count`; a pop while empty is ignored. A push and a pop in the
// same cycle both happen. The document says only that packets are buffered
// briefly in FPGA memory; depth and width are this design's choice.
`timescale 1ps / 1ps
module pkt_fifo #(
  parameter int unsigned W     = 256,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic [15:0]  overflow_count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;
  logic         do_wr, do_rd;

  assign empty   = (wp == rp);
  assign full    = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp             <= '0;
      rp             <= '0;
      overflow_count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      if (wr_en && full) overflow_count <= overflow_count + 16'd1;
    end
  end

endmodule
