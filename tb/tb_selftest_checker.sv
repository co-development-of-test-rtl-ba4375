// tb_selftest_checker: sends a run of packets and returns them with one
// lost, one with 3 flipped bits, and one unexpected extra; checks every
// counter, then that clear zeroes them and that nothing is counted while
// disabled.
`timescale 1ps / 1ps
module tb_selftest_checker;
  logic clk = 0, rst_n = 0, enable = 0, clear = 0, tx_valid = 0, rx_valid = 0;
  logic [255:0] tx_pkt = 0, rx_pkt = 0;
  logic [15:0] pkts, pkt_errors, lost, missing;
  logic [31:0] bit_errors;
  logic [255:0] sent [10];
  int checks = 0, failures = 0;

  selftest_checker #(.DEPTH(8)) dut (.*);

  always #1600 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tx(input logic [255:0] p);
    @(negedge clk); tx_valid = 1; tx_pkt = p; @(negedge clk); tx_valid = 0;
  endtask
  task automatic rx(input logic [255:0] p);
    @(negedge clk); rx_valid = 1; rx_pkt = p; @(negedge clk); rx_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    enable = 1;
    for (int i = 0; i < 6; i++) begin
      sent[i] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      tx(sent[i]);
    end
    rx(sent[0]);                          // good
    rx(sent[2]);                          // sent[1] lost
    rx(sent[3] ^ 256'h8000_0000_0000_0000_0000_0000_0000_0000_0000_0000_0000_0000_0000_0000_0000_0101);
    rx(sent[4]);                          // good
    rx(sent[5]);                          // good
    rx(256'h1234);                        // nothing outstanding
    #1;
    check(pkts == 5, "packets compared");
    check(lost == 1, "lost packet detected");
    check(pkt_errors == 1, "corrupted packet detected");
    check(bit_errors == 3, "bit errors counted");
    check(missing == 1, "unexpected packet");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(pkts == 0 && lost == 0 && pkt_errors == 0 && bit_errors == 0 && missing == 0, "clear");
    enable = 0;
    tx(sent[0]); rx(sent[1]);
    #1 check(pkts == 0 && missing == 0, "idle while disabled");
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
