// tb_pipe_tx_sender: hands packets over from a 312.5 MHz domain to the
// 250 MHz transmit clock, records the PXPIPE TX bus and checks each packet
// goes out as 32 consecutive symbols with K on the first and last, idle
// between packets, and that a packet arriving mid-send is counted lost.
`timescale 1ps / 1ps
module tb_pipe_tx_sender;
  import ops_pkg::*;
  logic pclk = 0, clk = 0, rst_n = 0, pkt_toggle = 0;
  logic [255:0] pkt = 0;
  logic [7:0] txdata;
  logic txdatak, busy;
  logic [15:0] lost;
  int checks = 0, failures = 0;
  logic [255:0] expq[$];

  pipe_tx_sender dut (.*);

  always #2000 pclk = ~pclk;
  always #1600 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Monitor: collect symbols between the K flags.
  int idx = -1;
  logic [255:0] got;
  int n_rx = 0;
  always @(posedge pclk) if (rst_n) begin
    if (idx < 0) begin
      if (txdatak) begin idx = 1; got[7:0] = txdata; end
      else check(txdata == 8'h00, "logical idle between packets");
    end else begin
      got[8*idx +: 8] = txdata;
      check(txdatak == (idx == 31), "K flag only on first and last");
      idx++;
      if (idx == 32) begin
        idx = -1;
        n_rx++;
        check(expq.size() > 0 && got == expq.pop_front(), "packet sent unchanged");
      end
    end
  end

  task automatic hand(input logic [255:0] p);
    @(posedge clk); pkt <= p; pkt_toggle <= ~pkt_toggle;
  endtask

  function automatic logic [255:0] mk();
    logic [255:0] p;
    p = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    p[7:0] = K_STP; p[255:248] = K_END;
    return p;
  endfunction

  initial begin
    logic [255:0] p;
    repeat (3) @(posedge pclk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      p = mk(); expq.push_back(p); hand(p);
      repeat (45) @(posedge clk);   // > 32 pclk cycles
    end
    // second packet while the first is still going out
    p = mk(); expq.push_back(p); hand(p);
    repeat (12) @(posedge clk);
    hand(mk());
    repeat (60) @(posedge clk);
    check(lost == 1, "packet during send counted lost");
    check(n_rx == 5, "five packets sent");
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
