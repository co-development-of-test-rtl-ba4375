// tb_ops_test_electronics: end-to-end test of the whole board at its
// default sizes, in a loopback: the network outputs come straight back
// to the network inputs, with an optional extra skew on payload channel 3
// standing for dispersion in the network.
//
// Exercised and counted (each must happen at least once):
//   slot timing     Frame period 25.6 ns, Frame width 22.4 ns, 46 clock
//                   edges per packet on the outgoing clock
//   prbs            random packets in place of system data, loopback
//                   self-test with no errors, monitor contents checked
//                   against an independent PRBS31 model
//   pattern         stored pattern written over the control link
//   advance         clock and data moved 5 bits earlier in the slot:
//                   first clock edge 2 ns earlier, loopback still clean
//   corrupt / drop  simulated network failures seen by the self-test
//   skew / deskew   a one-bit skew on a channel breaks reception; delay
//                   codes on the receive side compensate it
//   pcie            PCIe packets from the PIPE RX bus crossing the
//                   network and leaving on the PIPE TX bus unchanged,
//                   with routing bits from the route table
//   inline          synthetic packets filling idle slots around PCIe data
//   overflow        packet buffer overflow while transmission is off
//   tx_lost         received packets arriving faster than the PCIe lane
`timescale 1ps / 1ps
module tb_ops_test_electronics;
  import ops_pkg::*;

  logic refclk = 0, rst_n = 1, fpga_clk;
  logic pipe_rxclk = 0, pipe_pclk = 0, pipe_txclk;
  logic [7:0] pipe_rxdata = 0, pipe_txdata;
  logic pipe_rxdatak = 0, pipe_txdatak;
  logic bus_we = 0;
  logic [11:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic [7:0] net_tx_payload, net_tx_route, net_rx_payload;
  logic net_tx_clock, net_tx_frame, net_rx_clock, net_rx_frame;

  ops_test_electronics dut (.*);

  always #200 refclk = ~refclk;        // 2.5 GHz reference
  always #2000 pipe_rxclk = ~pipe_rxclk;  // 250 MHz PIPE clocks
  always #2000 pipe_pclk = ~pipe_pclk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- network loopback with skew on channel 3 ----------
  int skew3 = 0;
  logic ch3_skewed = 0;
  always @(net_tx_payload[3]) ch3_skewed <= #(skew3) net_tx_payload[3];
  assign net_rx_payload = {net_tx_payload[7:4], ch3_skewed, net_tx_payload[2:0]};
  assign net_rx_clock   = net_tx_clock;
  assign net_rx_frame   = net_tx_frame;

  // ---------------- control bus ----------------
  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge fpga_clk); bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge fpga_clk); bus_we = 0;
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge fpga_clk); bus_addr = a; #1; d = bus_rdata;
  endtask
  task automatic slots(input int n);
    repeat (8 * n) @(posedge fpga_clk);
  endtask

  localparam logic [11:0] A_CTRL = 12'h000, A_RCFG = 12'h004, A_EVERY = 12'h008,
                          A_MASK = 12'h00C, A_CMD = 12'h010;
  localparam logic [11:0] S_PCIE_RX = 12'h040, S_OVF = 12'h048, S_SLOTS = 12'h04C,
                          S_NETRX = 12'h050, S_CORR = 12'h054, S_DROP = 12'h058,
                          S_STPK = 12'h05C, S_STERR = 12'h060, S_STBIT = 12'h064,
                          S_STMISS = 12'h068, S_TXLOST = 12'h06C, S_STLOST = 12'h070;
  function automatic logic [31:0] ctrl(input bit tx, input int src, input bit inl,
                                       input bit st, input int man);
    return {25'd0, 2'(man), st, inl, 2'(src), tx};
  endfunction

  // ---------------- mechanism counters ----------------
  int n_prbs_ok = 0, n_pattern_ok = 0, n_corrupt = 0, n_drop = 0, n_skew_err = 0,
      n_deskew_ok = 0, n_pcie = 0, n_route_ok = 0, n_inline = 0, n_overflow = 0,
      n_txlost = 0, n_timing = 0, n_advance = 0;

  // ---------------- slot timing on the network side ----------------
  time fr_rise = 0, fr_prev = 0;
  int clk_edges = 0;
  time clk_lead = 0;   // first outgoing clock edge after the Frame rise
  int timing_checks = 0;
  always @(posedge net_tx_frame) begin
    fr_prev = fr_rise;
    fr_rise = $time;
    if (timing_checks < 20 && fr_prev != 0 && fr_rise - fr_prev == 25600 && clk_edges != 0) begin
      check(clk_edges == 46, $sformatf("46 clock edges per packet (%0d)", clk_edges));
      timing_checks++;
      n_timing++;
    end
    clk_edges = 0;
  end
  always @(net_tx_clock) begin
    if (clk_edges == 0) clk_lead = $time - fr_rise;
    clk_edges++;
  end
  always @(negedge net_tx_frame)
    if (timing_checks < 20 && fr_rise != 0)
      check($time - fr_rise == 22400, "Frame high for 56 bit periods");

  // ---------------- independent PRBS31 model ----------------
  function automatic logic [255:0] prbs_pkt(inout logic [30:0] s);
    logic [255:0] r;
    for (int i = 0; i < 256; i++) begin
      r[i] = s[30] ^ s[27];
      s = {s[29:0], r[i]};
    end
    return r;
  endfunction

  // ---------------- PIPE RX driver and PIPE TX monitor ----------------
  task automatic pipe_send(input logic [255:0] p);
    for (int i = 0; i < 32; i++) begin
      @(negedge pipe_rxclk);
      pipe_rxdata = p[8*i +: 8];
      pipe_rxdatak = (i == 0) || (i == 31);
    end
    @(negedge pipe_rxclk);
    pipe_rxdata = 0; pipe_rxdatak = 0;
  endtask
  function automatic logic [255:0] mk_tlp(input logic [3:0] key);
    logic [255:0] p;
    p = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    p[7:0] = K_STP;
    p[255:248] = K_END;
    p[8*11 +: 8] = {4'hA, key};
    return p;
  endfunction

  logic [255:0] tx_seen[$];
  int tidx = -1;
  logic [255:0] tgot;
  always @(posedge pipe_pclk) if (rst_n) begin
    if (tidx < 0) begin
      if (pipe_txdatak) begin tidx = 1; tgot[7:0] = pipe_txdata; end
    end else begin
      tgot[8*tidx +: 8] = pipe_txdata;
      tidx++;
      if (tidx == 32) begin tidx = -1; tx_seen.push_back(tgot); end
    end
  end

  // routing bits sampled in the middle of every frame
  logic [7:0] route_seen[$];
  always @(posedge net_tx_frame) begin
    #11200 route_seen.push_back(net_tx_route);
  end

  // ---------------- test sequence ----------------
  logic [31:0] v, v2;
  logic [7:0] rtab [16];
  initial begin
    #1000 rst_n = 0;  // power-on reset pulse
    #9000 rst_n = 1;
    slots(2);
    // calibration: outgoing clock half a bit later than the data
    wr(12'h400 + 12'(4*8), 32'd20);
    // Frame and routing leave the FPGA unserialized: delay them by the
    // serializers' half-word latency (1.6 ns) to line up with the slot
    for (int i = 9; i < 18; i++) wr(12'h400 + 12'(4*i), 32'd160);
    for (int i = 0; i < 16; i++) begin
      rtab[i] = 8'(i * 17 + 3);
      wr(12'h100 + 12'(4*i), {24'd0, rtab[i]});
    end
    wr(A_RCFG, {11'd0, 5'd11, 4'd0, 4'd3, 8'h96});      // synthetic route 0x96, pattern 3

    // ---- PRBS in place of system data, loopback self-test ----
    wr(A_CMD, 32'h3);
    wr(A_CTRL, ctrl(1, 1, 0, 1, 0));
    slots(40);
    // 5-bit guard, then the clock (its line 200 ps later than the data)
    check(clk_lead == 2200, $sformatf("clock window after the guard (%0d ps)", clk_lead));
    wr(A_CTRL, ctrl(0, 1, 0, 1, 0));
    slots(4);
    rd(S_STPK, v);  check(v >= 35, $sformatf("self-test packets %0d", v));
    rd(S_STERR, v2); check(v2 == 0, "no self-test errors in clean loopback");
    rd(S_STMISS, v2); check(v2 == 0, "no unexpected packets");
    if (v >= 35 && v2 == 0) n_prbs_ok++;
    begin
      // the monitor ring holds packets 33..40 of the PRBS31 sequence
      logic [30:0] s;
      logic [255:0] e;
      int total;
      rd(S_NETRX, v); total = int'(v);
      s = 31'h1;
      for (int n = 0; n < total; n++) begin
        e = prbs_pkt(s);
        if (n == total - 1)
          for (int w = 0; w < 8; w++) begin
            rd(12'h800 + 12'(32*((total - 1) % 8) + 4*w), v2);
            check(v2 == e[32*w +: 32], "monitor holds the PRBS packet");
          end
      end
    end
    // outgoing routing bits of synthetic packets
    check(route_seen.size() > 30 && route_seen[5] == 8'h96, "synthetic routing bits");
    // received packets every slot are more than the PCIe lane can take
    rd(S_TXLOST, v); if (v > 0) n_txlost++;

    // ---- stored pattern ----
    for (int w = 0; w < 8; w++) wr(12'h200 + 12'(32*3 + 4*w), 32'hC0DE_0000 + 32'(w));
    wr(A_CMD, 32'h1);
    wr(A_CTRL, ctrl(1, 2, 0, 1, 0));
    slots(10);
    wr(A_CTRL, ctrl(0, 2, 0, 1, 0));
    slots(4);
    rd(S_STPK, v); rd(S_STERR, v2);
    check(v >= 8 && v2 == 0, "pattern loopback");
    rd(S_NETRX, v);
    rd(12'h800 + 12'(32*((v - 1) % 8) + 4*5), v2);
    check(v2 == 32'hC0DE_0005, "monitor holds the stored pattern");
    if (v2 == 32'hC0DE_0005) n_pattern_ok++;

    // ---- clock and data moved into the leading guard time ----
    wr(A_CMD, 32'h1);
    wr(A_CTRL, ctrl(1, 1, 0, 1, 0) | 32'(5 << 8));
    slots(12);
    check(clk_lead == 200, $sformatf("clock window 5 bits earlier (%0d ps)", clk_lead));
    wr(A_CTRL, ctrl(0, 1, 0, 1, 0));
    slots(4);
    rd(S_STPK, v); rd(S_STERR, v2);
    check(v >= 10 && v2 == 0, "loopback with the advanced window");
    if (clk_lead == 200 && v >= 10 && v2 == 0) n_advance++;

    // ---- simulated corruption ----
    wr(A_MASK, 32'h0000_0101);
    wr(A_EVERY, 32'd4);
    wr(A_CMD, 32'h1);
    wr(A_CTRL, ctrl(1, 1, 0, 1, 1));
    slots(20);
    wr(A_CTRL, ctrl(0, 1, 0, 1, 1));
    slots(4);
    rd(S_CORR, v); rd(S_STERR, v2);
    check(v > 0 && v2 == v, "every corrupted packet detected");
    rd(S_STBIT, v2); check(v2 == 2 * v, "two bit errors per corrupted packet");
    if (v > 0) n_corrupt++;

    // ---- simulated loss ----
    wr(A_EVERY, 32'd3);
    wr(A_CMD, 32'h1);
    wr(A_CTRL, ctrl(1, 1, 0, 1, 2));
    slots(20);
    wr(A_CTRL, ctrl(0, 1, 0, 1, 2));
    slots(4);
    rd(S_DROP, v); rd(S_STLOST, v2);
    check(v > 0 && v2 == v, "every dropped packet detected as lost");
    rd(S_STERR, v2); check(v2 == 0, "no errors from drops");
    if (v > 0) n_drop++;
    wr(A_CTRL, ctrl(0, 1, 0, 1, 0));

    // ---- skew on channel 3 and its compensation ----
    skew3 = 400;                 // one bit period late
    wr(A_CMD, 32'h1);
    wr(A_CTRL, ctrl(1, 1, 0, 1, 0));
    slots(10);
    wr(A_CTRL, ctrl(0, 1, 0, 1, 0));
    slots(4);
    rd(S_STERR, v);
    check(v > 0, "uncompensated skew breaks reception");
    if (v > 0) n_skew_err++;
    // delay every other incoming payload channel and the clock by 400 ps
    for (int c = 0; c < 8; c++) if (c != 3) wr(12'h400 + 12'(4*(18 + c)), 32'd40);
    wr(12'h400 + 12'(4*26), 32'd40);
    wr(12'h400 + 12'(4*27), 32'd40);
    wr(A_CMD, 32'h1);
    wr(A_CTRL, ctrl(1, 1, 0, 1, 0));
    slots(10);
    wr(A_CTRL, ctrl(0, 1, 0, 1, 0));
    slots(4);
    rd(S_STPK, v); rd(S_STERR, v2);
    check(v >= 8 && v2 == 0, "deskewed reception is clean");
    if (v >= 8 && v2 == 0) n_deskew_ok++;

    // ---- PCIe traffic end to end ----
    wr(A_CTRL, ctrl(1, 0, 0, 0, 0));
    begin
      logic [255:0] sent[$];
      int rs0;
      tx_seen.delete();
      rs0 = route_seen.size();
      for (int n = 0; n < 6; n++) begin
        logic [255:0] p;
        p = mk_tlp(4'(n * 5));
        sent.push_back(p);
        pipe_send(p);
        repeat (10) @(negedge pipe_rxclk);
      end
      slots(20);
      check(tx_seen.size() == 6, $sformatf("PCIe packets out %0d", tx_seen.size()));
      for (int n = 0; n < 6 && n < tx_seen.size(); n++) begin
        check(tx_seen[n] == sent[n], "PCIe packet unchanged end to end");
        if (tx_seen[n] == sent[n]) n_pcie++;
      end
      check(route_seen.size() - rs0 == 6, "one network packet per PCIe packet");
      for (int n = 0; n < 6 && rs0 + n < route_seen.size(); n++) begin
        check(route_seen[rs0 + n] == rtab[(n * 5) % 16], "routing bits from the route table");
        if (route_seen[rs0 + n] != rtab[(n * 5) % 16]) $display("  route %h exp %h", route_seen[rs0 + n], rtab[(n * 5) % 16]);
        if (route_seen[rs0 + n] == rtab[(n * 5) % 16]) n_route_ok++;
      end
    end

    // ---- PRBS filling idle slots around PCIe data ----
    begin
      logic [31:0] s0, s1;
      logic [255:0] p;
      int rs0, n_pcie_route, n_fill_route;
      rd(S_SLOTS, s0);
      rs0 = route_seen.size();
      wr(A_CTRL, ctrl(1, 1, 1, 0, 0));
      p = mk_tlp(4'h2);
      pipe_send(p);
      slots(12);
      wr(A_CTRL, ctrl(0, 1, 1, 0, 0));
      rd(S_SLOTS, s1);
      check(s1 - s0 >= 11, "every slot used when filling in-line");
      n_pcie_route = 0; n_fill_route = 0;
      for (int i = rs0; i < route_seen.size(); i++) begin
        if (route_seen[i] == rtab[2]) n_pcie_route++;
        if (route_seen[i] == 8'h96)   n_fill_route++;
      end
      check(n_pcie_route == 1, "the PCIe packet goes out once among the fill");
      check(n_fill_route >= 10, "synthetic packets fill the other slots");
      if (s1 - s0 >= 11 && n_pcie_route == 1 && n_fill_route >= 10) n_inline++;
    end

    // ---- buffer overflow with transmission off ----
    slots(10);
    wr(A_CTRL, ctrl(0, 0, 0, 0, 0));
    for (int n = 0; n < 6; n++) pipe_send(mk_tlp(4'h1));
    slots(2);
    rd(S_OVF, v);
    check(v == 2, $sformatf("two packets refused by the full buffer (%0d)", v));
    if (v == 2) n_overflow++;
    rd(S_PCIE_RX, v); check(v == 13, $sformatf("PCIe packets captured (%0d)", v));

    // ---- every mechanism must have happened ----
    check(n_timing > 0, "slot timing seen");
    check(n_prbs_ok > 0, "prbs seen");
    check(n_pattern_ok > 0, "pattern seen");
    check(n_advance > 0, "advanced window seen");
    check(n_corrupt > 0, "corruption seen");
    check(n_drop > 0, "drop seen");
    check(n_skew_err > 0, "skew error seen");
    check(n_deskew_ok > 0, "deskew seen");
    check(n_pcie > 0, "PCIe end to end seen");
    check(n_route_ok > 0, "route translation seen");
    check(n_inline > 0, "in-line fill seen");
    check(n_overflow > 0, "overflow seen");
    check(n_txlost > 0, "PIPE TX loss seen");
    $display("mechanisms: timing=%0d prbs=%0d pattern=%0d corrupt=%0d drop=%0d skew=%0d deskew=%0d pcie=%0d route=%0d inline=%0d overflow=%0d tx_lost=%0d advance=%0d",
             n_timing, n_prbs_ok, n_pattern_ok, n_corrupt, n_drop, n_skew_err, n_deskew_ok,
             n_pcie, n_route_ok, n_inline, n_overflow, n_txlost, n_advance);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
