// toggle_handoff: carries a held data word into another clock domain.
//
// The source domain updates `src_data` and then flips `src_toggle`, and
// keeps `src_data` unchanged until its next flip. The destination domain
// passes the toggle through two flip-flops, detects the change with a
// third, and on that cycle copies `src_data` into `dst_data` and pulses
// `dst_valid` for one cycle. Latency: 3 to 4 destination clock edges
// after the toggle. The source must not flip again within about 4
// destination cycles; both users here hold a packet for much longer
// (128 ns for PCIe packets, 25.6 ns per network slot against 3.2 ns
// destination cycles). The document says only that the data is
// buffered; this synchronizer is this design's choice.
`timescale 1ps / 1ps
module toggle_handoff #(
  parameter int unsigned W = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] src_data,
  input  logic         src_toggle,
  output logic [W-1:0] dst_data,
  output logic         dst_valid
);

  logic [2:0] sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= '0;
      dst_data  <= '0;
      dst_valid <= 1'b0;
    end else begin
      sync      <= {sync[1:0], src_toggle};
      dst_valid <= sync[2] ^ sync[1];
      if (sync[2] ^ sync[1]) dst_data <= src_data;
    end
  end

endmodule
