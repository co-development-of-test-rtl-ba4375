// tb_ops_fpga_core: the FPGA logic alone, with a word-level loopback in
// place of the serializers, network and deserializers. The testbench
// rebuilds each slot's serial streams from the outgoing words, starts the
// received stream at the first clock bit as the deserializers would, and
// delivers five 8-bit words per channel on its own word clock with the
// received Frame low between packets. Checks: random-data self-test with
// no errors, PCIe packets through to the PIPE TX bus unchanged, and the
// outgoing slot rate of one packet per 8 FPGA clocks.
`timescale 1ps / 1ps
module tb_ops_fpga_core;
  import ops_pkg::*;

  logic clk = 0, rst_n = 1, pipe_rxclk = 0, pipe_pclk = 0;
  logic [7:0] pipe_rxdata = 0, pipe_txdata;
  logic pipe_rxdatak = 0, pipe_txdatak;
  logic bus_we = 0;
  logic [11:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic [7:0][7:0] tx_word, rx_word;
  logic [7:0] tx_clk_word, tx_route;
  logic tx_frame, rx_wclk = 0, rx_frame = 0;
  logic [27:0][9:0] delay_code;
  int checks = 0, failures = 0;

  ops_fpga_core dut (.*);

  always #1600 clk = ~clk;
  always #2000 pipe_rxclk = ~pipe_rxclk;
  always #2000 pipe_pclk = ~pipe_pclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_we = 0;
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; #1; d = bus_rdata;
  endtask

  // ---- word-level loopback ----
  logic [63:0] s_data [8];
  logic [63:0] s_clk;
  int k = 0, frames = 0, last_frame_cyc = -1, cyc = 0;
  logic [4:0][7:0][7:0] rxq[$];
  logic [4:0][7:0][7:0] pend;
  always @(negedge clk) begin
    cyc++;
    if (!tx_frame && k > 0) k = 0;
    if (tx_frame) begin
      if (k == 0) begin
        if (last_frame_cyc >= 0 && frames < 30) check(cyc - last_frame_cyc == 8, "one slot per 8 clocks");
        last_frame_cyc = cyc;
        frames++;
      end
      for (int c = 0; c < 8; c++)
        for (int i = 0; i < 8; i++) s_data[c][8*k + i] = tx_word[c][7-i];
      for (int i = 0; i < 8; i++) s_clk[8*k + i] = tx_clk_word[7-i];
      k++;
      if (k == 7) begin
        int first;
        first = -1;
        for (int b = 55; b >= 0; b--) if (s_clk[b]) first = b;
        for (int w = 0; w < 5; w++)
          for (int c = 0; c < 8; c++)
            for (int i = 0; i < 8; i++) pend[w][c][7-i] = s_data[c][first + 8*w + i];
        rxq.push_back(pend);
      end
    end
  end
  initial forever begin
    logic [4:0][7:0][7:0] p;
    wait (rxq.size() > 0);
    p = rxq.pop_front();
    #2000 rx_frame = 1;
    for (int w = 0; w < 5; w++) begin
      #1000 rx_word = p[w];
      #1000 rx_wclk = 1;
      #1600 rx_wclk = 0;
    end
    #1000 rx_frame = 0;
  end

  // ---- PIPE ----
  task automatic pipe_send(input logic [255:0] p);
    for (int i = 0; i < 32; i++) begin
      @(negedge pipe_rxclk);
      pipe_rxdata = p[8*i +: 8];
      pipe_rxdatak = (i == 0) || (i == 31);
    end
    @(negedge pipe_rxclk);
    pipe_rxdata = 0; pipe_rxdatak = 0;
  endtask
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

  initial begin
    logic [31:0] v;
    logic [255:0] sent[$];
    #1000 rst_n = 0;  // power-on reset pulse
    #9000 rst_n = 1;
    repeat (4) @(posedge clk);
    // random data with self-test
    wr(12'h010, 32'h3);
    wr(12'h000, 32'b1_0_01_1);
    repeat (8 * 30) @(posedge clk);
    wr(12'h000, 32'b1_0_01_0);
    repeat (8 * 6) @(posedge clk);
    rd(12'h05C, v); check(v >= 25, $sformatf("self-test packets %0d", v));
    rd(12'h060, v); check(v == 0, "self-test errors");
    rd(12'h068, v); check(v == 0, "unexpected packets");
    // PCIe end to end
    repeat (60) @(posedge pipe_pclk);    // let the last random packet leave
    wr(12'h000, 32'b0_0_00_1);
    tx_seen.delete();
    for (int n = 0; n < 4; n++) begin
      logic [255:0] p;
      p = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      p[7:0] = K_STP; p[255:248] = K_END;
      sent.push_back(p);
      pipe_send(p);
      repeat (8) @(negedge pipe_rxclk);
    end
    repeat (8 * 20) @(posedge clk);
    check(tx_seen.size() == 4, $sformatf("four PCIe packets out (%0d)", tx_seen.size()));
    for (int n = 0; n < 4 && n < tx_seen.size(); n++) check(tx_seen[n] == sent[n], "PCIe packet unchanged");
    check(frames > 30, "slots sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
