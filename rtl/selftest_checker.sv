// selftest_checker: loopback self-test of the whole transmit/receive path.
//
// While `enable` is high, every synthesized packet sent (`tx_valid`) is
// queued, up to DEPTH outstanding; a send into a full queue is not
// queued. Each packet received (`rx_valid`) is compared with the oldest
// outstanding one:
//   equal to the oldest              good packet, oldest removed;
//   equal to the second oldest       the oldest was lost in the network:
//                                    `lost` counts it, both removed;
//   neither                          `pkt_errors` counts it and
//                                    `bit_errors` adds the number of
//                                    differing bits; oldest removed;
//   queue empty                      `missing` counts an unexpected packet.
// `pkts` counts all received packets compared. `clear` empties the queue
// and zeroes the counters. Results appear one clock after `rx_valid`.
// The document describes automated loopback self-test with random or
// stored patterns; this comparison scheme is this design's.
`timescale 1ps / 1ps
module selftest_checker
  import ops_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             clear,
  input  logic             tx_valid,
  input  logic [PKT_W-1:0] tx_pkt,
  input  logic             rx_valid,
  input  logic [PKT_W-1:0] rx_pkt,
  output logic [15:0]      pkts,
  output logic [15:0]      pkt_errors,
  output logic [31:0]      bit_errors,
  output logic [15:0]      lost,
  output logic [15:0]      missing
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [PKT_W-1:0] q [DEPTH];
  logic [AW:0]      wp, rp, used;
  logic             match0, match1, have2, push, cmp;
  logic [PKT_W-1:0] diff;
  logic [8:0]       ndiff;

  assign used   = wp - rp;
  assign have2  = used >= (AW+1)'(2);
  assign match0 = (q[rp[AW-1:0]] == rx_pkt);
  assign match1 = have2 && (q[rp[AW-1:0] + 1'b1] == rx_pkt);
  assign diff   = q[rp[AW-1:0]] ^ rx_pkt;
  assign push   = enable && tx_valid && (used != (AW+1)'(DEPTH));
  assign cmp    = enable && rx_valid;

  always_comb begin
    ndiff = '0;
    for (int i = 0; i < int'(PKT_W); i++) ndiff = ndiff + 9'(diff[i]);
  end

  always_ff @(posedge clk) begin
    if (push) q[wp[AW-1:0]] <= tx_pkt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0;
      pkts <= '0; pkt_errors <= '0; bit_errors <= '0; lost <= '0; missing <= '0;
    end else if (clear) begin
      wp <= '0; rp <= '0;
      pkts <= '0; pkt_errors <= '0; bit_errors <= '0; lost <= '0; missing <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (cmp) begin
        if (used == '0) begin
          missing <= missing + 16'd1;
        end else begin
          pkts <= pkts + 16'd1;
          if (match0) begin
            rp <= rp + 1'b1;
          end else if (match1) begin
            rp   <= rp + (AW+1)'(2);
            lost <= lost + 16'd1;
          end else begin
            rp         <= rp + 1'b1;
            pkt_errors <= pkt_errors + 16'd1;
            bit_errors <= bit_errors + 32'(ndiff);
          end
        end
      end
    end
  end

endmodule
