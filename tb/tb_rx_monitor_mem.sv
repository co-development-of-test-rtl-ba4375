// tb_rx_monitor_mem: writes 13 packets into the 8-slot ring and reads
// every word back: the slots must hold the last 8 packets in ring order.
`timescale 1ps / 1ps
module tb_rx_monitor_mem;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [255:0] wr_pkt = 0;
  logic [5:0] rd_addr = 0;
  logic [31:0] rd_data;
  logic [15:0] count;
  logic [255:0] sent [13];
  int checks = 0, failures = 0;

  rx_monitor_mem #(.NPKT(8)) dut (.*);

  always #1600 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 13; n++) begin
      sent[n] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      @(negedge clk); wr_en = 1; wr_pkt = sent[n];
      @(negedge clk); wr_en = 0;
      check(count == 16'(n + 1), "count");
    end
    for (int s = 0; s < 8; s++) begin
      int n;
      n = (s < 5) ? s + 8 : s;   // slots 0-4 rewritten by packets 8-12
      for (int w = 0; w < 8; w++) begin
        rd_addr = 6'(8*s + w); #1;
        check(rd_data == sent[n][32*w +: 32], $sformatf("slot %0d word %0d", s, w));
      end
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
