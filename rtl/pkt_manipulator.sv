// pkt_manipulator: simulated network failures on received packets.
//
// Each packet arriving with `in_valid` is counted. In MANIP_PASS it goes
// out unchanged one clock later. In MANIP_CORRUPT every `every`-th packet
// (every packet when `every` is 0 or 1) leaves with its first 32 bits
// XORed with `mask`; in MANIP_DROP every `every`-th packet is not passed
// on at all. The packet counter restarts when the mode changes. Counters
// of corrupted and dropped packets are kept. Latency one clock.
// The document names corrupted and lost packets as the failures the FPGA
// logic simulates; the every-Nth rule and the mask are this design's.
`timescale 1ps / 1ps
module pkt_manipulator
  import ops_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  manip_mode_e       mode,
  input  logic [7:0]        every,
  input  logic [31:0]       mask,
  input  logic              in_valid,
  input  logic [PKT_W-1:0]  in_pkt,
  output logic              out_valid,
  output logic [PKT_W-1:0]  out_pkt,
  output logic [15:0]       corrupted,
  output logic [15:0]       dropped
);

  logic [7:0]  n;          // packets since the last one acted on
  manip_mode_e mode_q;
  logic [7:0]  n_eff;
  logic        hit;

  assign n_eff = (mode != mode_q) ? 8'd0 : n;
  assign hit   = (every <= 8'd1) || (n_eff == every - 8'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n         <= '0;
      mode_q    <= MANIP_PASS;
      out_valid <= 1'b0;
      out_pkt   <= '0;
      corrupted <= '0;
      dropped   <= '0;
    end else begin
      mode_q    <= mode;
      out_valid <= 1'b0;
      if (mode != mode_q) n <= '0;
      if (in_valid) begin
        n <= hit ? 8'd0 : n_eff + 8'd1;
        unique case (mode)
          MANIP_CORRUPT: begin
            out_valid <= 1'b1;
            out_pkt   <= hit ? (in_pkt ^ PKT_W'(mask)) : in_pkt;
            if (hit) corrupted <= corrupted + 16'd1;
          end
          MANIP_DROP: begin
            out_valid <= !hit;
            out_pkt   <= in_pkt;
            if (hit) dropped <= dropped + 16'd1;
          end
          default: begin
            out_valid <= 1'b1;
            out_pkt   <= in_pkt;
          end
        endcase
      end
    end
  end

endmodule
