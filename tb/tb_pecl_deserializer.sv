// tb_pecl_deserializer: sends bursts as the network would deliver them: a
// 1010 clock over 46 bit periods with its edges in the middle of the data
// bits, 8 pre-clock zeros, 32 random data bits and post-clocks, with the
// reset (Frame) low between bursts. Checks that the words come out in
// order on the word clock and that the last data word appears before the
// clock stops.
`timescale 1ps / 1ps
module tb_pecl_deserializer;
  logic rclk = 0, rst_n = 0, sin = 0, wclk;
  logic [7:0] word;
  int checks = 0, failures = 0;
  logic [7:0] got[$];

  pecl_deserializer #(.PIPE_BITS(2)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge wclk) got.push_back(word);

  initial begin
    #2000;
    for (int b = 0; b < 6; b++) begin
      logic [47:0] bits;
      logic [31:0] d;
      d = $urandom;
      bits = {8'h00, d, 8'h00};      // bits[47] first
      got.delete();
      rst_n = 1;
      #2000;
      fork
        for (int i = 0; i < 46; i++) begin sin = bits[47 - i]; #400; end
        begin #200; for (int i = 0; i < 46; i++) begin rclk = ~rclk; #400; end end
      join
      sin = 0;
      rclk = 0;
      #2000;
      check(got.size() == 5, $sformatf("five words delivered (%0d)", got.size()));
      if (got.size() == 5) begin
        check(got[0] == 8'h00, "pre-clock word");
        check({got[1], got[2], got[3], got[4]} == d, "data words");
      end
      rst_n = 0;
      #1000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
