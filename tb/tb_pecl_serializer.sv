// tb_pecl_serializer: gives the serializer a new random word on every
// rising edge of its own word clock, samples the serial output in the
// middle of each 400 ps bit and checks the bit sequence (MSB first), the
// word clock period of 8 reference clocks, and the output latency.
`timescale 1ps / 1ps
module tb_pecl_serializer;
  logic refclk = 0, rst_n = 0, sout, wclk;
  logic [7:0] word = 0;
  int checks = 0, failures = 0;
  logic [7:0] q[$];

  pecl_serializer dut (.*);

  always #200 refclk = ~refclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  time last_rise = 0;
  always @(posedge wclk) begin
    logic [7:0] w;
    if (last_rise != 0) check($time - last_rise == 3200, "word clock period 3.2 ns");
    last_rise = $time;
    w = 8'($urandom);
    #100 word = w;                // FPGA output changes shortly after its edge
    q.push_back(w);
  end

  initial begin
    #1000 rst_n = 1;
    @(posedge wclk);
    // the word driven after this edge starts half a word clock (1.6 ns)
    // later; sample the middle of each bit
    #1600;
    #200;
    for (int n = 0; n < 40; n++) begin
      logic [7:0] got;
      for (int i = 7; i >= 0; i--) begin
        got[i] = sout;
        #400;
      end
      check(q.size() > 0 && got == q.pop_front(), $sformatf("word %0d", n));
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
