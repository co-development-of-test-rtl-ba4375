// tb_rx_packet_decoder: feeds per-channel word streams as the
// deserializers would deliver them (first the pre-clock word, then the
// four data words, then a stray post-clock word) with Frame low between
// bursts, and checks the rebuilt packet and the toggle for each burst.
`timescale 1ps / 1ps
module tb_rx_packet_decoder;
  import ops_pkg::*;
  logic wclk = 0, rst_n = 0, frame_n_rst = 0;
  logic [7:0][7:0] ch_word = 0;
  logic [255:0] pkt;
  logic pkt_toggle;
  int checks = 0, failures = 0;

  rx_packet_decoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic word_edge(input logic [7:0][7:0] w);
    ch_word = w; #1600 wclk = 1; #1600 wclk = 0;
  endtask

  initial begin
    #5000 rst_n = 1;
    for (int n = 0; n < 12; n++) begin
      logic [255:0] p;
      logic [7:0][7:0] w;
      logic t0;
      p = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      t0 = pkt_toggle;
      #3000 frame_n_rst = 1;
      // pre-clock word: all zero on the payload channels
      word_edge('0);
      for (int k = 0; k < 4; k++) begin
        for (int c = 0; c < 8; c++) w[c] = p[8*(c + 8*k) +: 8];
        word_edge(w);
        if (k < 3) check(pkt_toggle == t0, "no packet before the last word");
      end
      check(pkt_toggle != t0, "toggle after the last data word");
      check(pkt == p, "rebuilt packet");
      // a further (post-clock) word must not disturb the result
      if (n % 2 == 0) word_edge({8{8'hFF}});
      check(pkt == p, "packet held after post-clocks");
      #1000 frame_n_rst = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
