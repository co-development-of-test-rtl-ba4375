// tb_packet_formatter: offers random packets and routes, collects the 8
// words of every channel in each slot into 64-bit serial streams, and
// checks them bit by bit against the slot layout: Frame and routing high
// for bit periods 0..55, clock 1010.. over 5..50, data over 13..44 with
// channel c carrying symbols c, c+8, c+16, c+24 MSB first, with clock and
// data both moved earlier by the slot's advance (random 0..7, which the
// block limits to the 5-bit guard). Also checks
// the slot period of 8 clocks (64 bit periods), dark slots when no
// packet is offered and when disabled.
`timescale 1ps / 1ps
module tb_packet_formatter;
  import ops_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, pkt_valid = 0;
  logic [255:0] pkt = 0;
  logic [7:0] route = 0;
  logic [2:0] advance = 0;
  logic slot_req, frame, slot_start, sent;
  logic [7:0][7:0] ch_word;
  logic [7:0] clk_word, route_out;
  int checks = 0, failures = 0;
  int last_req = -1, cyc = 0, n_sent = 0, n_dark = 0;

  packet_formatter dut (.*);

  always #1600 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Slot requests must come every 8 clocks while enabled.
  always @(posedge clk) if (rst_n && slot_req) begin
    if (last_req >= 0) check(cyc - last_req == 8, "slot period 8 clocks");
    last_req = cyc;
  end

  logic [255:0] q_pkt[$];
  logic [7:0]   q_route[$];
  logic         q_valid[$];
  int           q_adv[$];
  int           n_adv5 = 0;

  // Offer packets at each request (driven after the edge).
  always @(negedge clk) begin
    pkt_valid <= ($urandom % 4) != 0;
    pkt   <= {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    route <= 8'($urandom);
    advance <= 3'($urandom);
  end
  always @(posedge clk) if (rst_n && slot_req) begin
    q_valid.push_back(pkt_valid);
    q_pkt.push_back(pkt);
    q_route.push_back(route);
    q_adv.push_back((advance > 5) ? 5 : int'(advance));
  end

  // Collect each slot's streams and check them.
  logic [63:0] s_data [8];
  logic [63:0] s_clk;
  logic [7:0]  s_frame;
  logic [7:0]  s_route [8];
  int k = -1;
  always @(negedge clk) if (rst_n) begin
    if (slot_start) k = 0;
    if (k >= 0) begin
      for (int c = 0; c < 8; c++)
        for (int i = 0; i < 8; i++) s_data[c][8*k + i] = ch_word[c][7-i];
      for (int i = 0; i < 8; i++) s_clk[8*k + i] = clk_word[7-i];
      s_frame[k] = frame;
      s_route[k] = route_out;
      k++;
      if (k == 8) begin
        logic v; logic [255:0] p; logic [7:0] r; int a;
        k = -1;
        v = q_valid.pop_front(); p = q_pkt.pop_front(); r = q_route.pop_front();
        a = q_adv.pop_front();
        if (v) n_sent++; else n_dark++;
        if (v && a == 5) n_adv5++;
        for (int b = 0; b < 64; b++) begin
          logic ec;
          ec = v && b >= 5 - a && b <= 50 - a && ((b - 5 + a) % 2 == 0);
          checks++;
          if (s_clk[b] !== ec) begin failures++; $display("FAIL: clock bit %0d", b); end
        end
        for (int c = 0; c < 8; c++)
          for (int b = 0; b < 64; b++) begin
            logic ed;
            ed = 0;
            if (v && b >= 13 - a && b <= 44 - a)
              ed = p[8*(c + 8*((b - 13 + a) / 8)) + 7 - ((b - 13 + a) % 8)];
            checks++;
            if (s_data[c][b] !== ed) begin failures++; $display("FAIL: ch %0d bit %0d", c, b); end
          end
        for (int w = 0; w < 8; w++) begin
          check(s_frame[w] == (v && w < 7), "frame span");
          check(s_route[w] == ((v && w < 7) ? r : 8'h00), "routing bits");
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    enable = 1;
    repeat (8 * 40) @(posedge clk);
    enable = 0;
    repeat (20) @(posedge clk);
    #1 check(!frame && clk_word == 0, "dark when disabled");
    check(n_sent > 10 && n_dark > 2, "both loaded and dark slots seen");
    check(n_adv5 > 0, "slots at the largest advance seen");
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
