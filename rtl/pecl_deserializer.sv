// pecl_deserializer: behavioural model of one 1:8 high-speed PECL
// deserializer channel of the receiver (not synthesizable logic; stands
// for the board's demultiplexer parts).
//
// The received source-synchronous clock `rclk` toggles once per bit, so
// the model samples `sin` on both of its edges (2.5 Gbps from a 1.25 GHz
// clock). Every 8 samples make a word, first sample in word[7]. The word
// is presented PIPE_BITS - 1 samples after its last bit, and the word
// clock `wclk` rises one sample later and falls four samples after that:
// the internal pipeline needs PIPE_BITS further clock edges after a word
// before it comes out, which is why the packet carries post-clocks.
// `wclk` only runs while `rclk` does. `rst_n` low (the board holds it
// low while the received Frame is low) clears the sample count so each
// burst starts a new word with its first clock edge. The deserializing
// with the parallel clock is the document's; the pipeline depth and
// word-clock timing are this design's model.
`timescale 1ps / 1ps
module pecl_deserializer #(
  parameter int unsigned PIPE_BITS = 2
) (
  input  logic       rclk,
  input  logic       rst_n,
  input  logic       sin,
  output logic [7:0] word,
  output logic       wclk
);

  logic [2:0] n;       // position of the next sample within its word
  logic [6:0] sh;
  logic [7:0] done_w;  // last complete word, waiting in the pipeline
  logic       have;

  localparam logic [2:0] OUT_AT  = 3'(PIPE_BITS - 1);
  localparam logic [2:0] RISE_AT = 3'(PIPE_BITS);
  localparam logic [2:0] FALL_AT = 3'(PIPE_BITS + 4);

  // power-up state of the part (the reset input only acts on an edge)
  initial begin
    n      = 3'd0;
    sh     = '0;
    done_w = '0;
    have   = 1'b0;
    word   = '0;
    wclk   = 1'b0;
  end

  always @(posedge rclk or negedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      n      <= 3'd0;
      sh     <= '0;
      done_w <= '0;
      have   <= 1'b0;
      word   <= '0;
      wclk   <= 1'b0;
    end else begin
      n  <= n + 3'd1;
      sh <= {sh[5:0], sin};
      if (n == 3'd7) begin
        done_w <= {sh, sin};
        have   <= 1'b1;
      end
      if (have && n == OUT_AT)  word <= done_w;
      if (have && n == RISE_AT) wclk <= 1'b1;
      if (n == FALL_AT)         wclk <= 1'b0;
    end
  end

endmodule
