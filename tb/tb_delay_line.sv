// tb_delay_line: measures the delay of single edges and of a pulse
// shorter than the delay, for several codes, and checks clamping above
// the 10 ns range.
`timescale 1ps / 1ps
module tb_delay_line;
  logic din = 0, dout;
  logic [9:0] code = 0;
  int checks = 0, failures = 0;

  delay_line dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(input int c, input int expect_ps);
    time t0, t1;
    code = 10'(c);
    #20000;
    t0 = $time; din = ~din;
    @(dout);
    t1 = $time;
    check(int'(t1 - t0) == expect_ps, $sformatf("code %0d delay %0t", c, t1 - t0));
    check(dout == din, "level follows");
  endtask

  initial begin
    #1000;
    measure(1, 10);
    measure(20, 200);
    measure(357, 3570);
    measure(1000, 10000);
    measure(1023, 10000);   // clamped to the 10 ns range
    // a 150 ps pulse through a 2 ns delay must survive intact
    code = 10'd200;
    #20000;
    din = 1; #150 din = 0;
    #(2000 - 150 + 1) check(dout == 1, "short pulse high after the delay");
    #150 check(dout == 0, "short pulse low again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
