// pattern_mem: stored data patterns for data synthesis and self-test.
//
// NPAT patterns of 256 bits, each written as 8 words of 32 bits over the
// control link: wr_addr = {pattern, word}, word w filling bits
// [32w+31:32w]. `rd_data` is the whole pattern chosen by `rd_sel`, read
// combinationally. All patterns clear to zero at reset. The document
// says stored patterns are configurable over the USB link; the count,
// word layout and clearing are this design's choice.
`timescale 1ps / 1ps
module pattern_mem #(
  parameter int unsigned NPAT = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic [$clog2(NPAT)+2:0]   wr_addr,
  input  logic [31:0]               wr_data,
  input  logic [$clog2(NPAT)-1:0]   rd_sel,
  output logic [255:0]              rd_data
);

  logic [7:0][31:0] mem [NPAT];

  assign rd_data = mem[rd_sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < int'(NPAT); p++) mem[p] <= '0;
    end else if (wr_en) begin
      mem[wr_addr[$clog2(NPAT)+2:3]][wr_addr[2:0]] <= wr_data;
    end
  end

endmodule
