// tb_pkt_fifo: random pushes and pops against a queue model, including
// pushes into a full FIFO (refused and counted) and pops of an empty one.
`timescale 1ps / 1ps
module tb_pkt_fifo;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic empty, full;
  logic [15:0] overflow_count;
  int checks = 0, failures = 0, ovf = 0, fulls = 0;
  logic [31:0] model[$];

  pkt_fifo #(.W(32), .DEPTH(4)) dut (.*);

  always #1600 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      logic w, r;
      int pre;
      logic [31:0] d;
      w = ($urandom % 100) < ((i < 200) ? 70 : 30);
      r = ($urandom % 100) < ((i < 200) ? 30 : 70);
      d = $urandom;
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == 4), "full flag");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      if (full) fulls++;
      wr_en = w; rd_en = r; wr_data = d;
      pre = model.size();
      @(posedge clk);
      #1;
      if (r && pre > 0) void'(model.pop_front());
      if (w) begin
        if (pre < 4) model.push_back(d);
        else ovf++;
      end
      check(overflow_count == 16'(ovf), "overflow count");
    end
    check(fulls > 0, "full reached");
    check(ovf > 0, "overflow exercised");
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
