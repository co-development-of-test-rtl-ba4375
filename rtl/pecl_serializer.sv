// pecl_serializer: behavioural model of one 8:1 high-speed PECL
// serializer channel (not synthesizable logic; stands for the board's
// multiplexer parts driven by the shared 2.5 GHz reference clock).
//
// A 3-bit phase counter runs on the reference clock `refclk`. The model
// outputs the word clock `wclk` = refclk / 8, rising at phase 0; the
// board uses it as the FPGA clock, so all nine serializers and the FPGA
// share one timing. At phase 4, the middle of the FPGA clock period when
// the FPGA's registered word is stable, the model loads `word` and sends
// word[7] on `sout`; the other seven bits follow on the next seven
// reference clock edges, one per 400 ps bit period. Latency: the first
// bit of a word appears half a word clock after the edge that produced
// it. The 8-bit bus per channel and the 2.5 Gbps rate are the document's;
// the phase scheme is this design's model.
`timescale 1ps / 1ps
module pecl_serializer (
  input  logic       refclk,
  input  logic       rst_n,
  input  logic [7:0] word,
  output logic       sout,
  output logic       wclk
);

  logic [2:0] ph;
  logic [6:0] sh;

  always @(posedge refclk or negedge rst_n) begin
    if (!rst_n) begin
      ph   <= 3'd0;
      sh   <= '0;
      sout <= 1'b0;
      wclk <= 1'b0;
    end else begin
      ph   <= ph + 3'd1;
      wclk <= (ph < 3'd4);
      if (ph == 3'd4) begin
        sout <= word[7];
        sh   <= word[6:0];
      end else begin
        sout <= sh[6];
        sh   <= {sh[5:0], 1'b0};
      end
    end
  end

endmodule
