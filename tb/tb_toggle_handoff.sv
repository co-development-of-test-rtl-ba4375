// tb_toggle_handoff: source and destination on unrelated clocks. Each
// source update flips the toggle; the destination must present exactly
// that word with one dst_valid pulse, 3 to 4 destination clocks later.
`timescale 1ps / 1ps
module tb_toggle_handoff;
  logic clk = 0, sclk = 0, rst_n = 0;
  logic [15:0] src_data = 0, dst_data;
  logic src_toggle = 0, dst_valid;
  int checks = 0, failures = 0, pulses = 0;

  toggle_handoff #(.W(16)) dut (.*);

  always #1600 clk = ~clk;
  always #2300 sclk = ~sclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (dst_valid) pulses++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 1; n <= 20; n++) begin
      int cyc, start_pulses;
      logic [15:0] v;
      v = 16'($urandom);
      @(posedge sclk);
      src_data <= v; src_toggle <= ~src_toggle;
      start_pulses = pulses;
      cyc = 0;
      @(posedge clk);
      while (!dst_valid && cyc < 10) begin @(posedge clk); cyc++; end
      check(dst_valid, "no dst_valid");
      check(dst_data == v, "wrong data");
      check(cyc >= 2 && cyc <= 4, $sformatf("latency %0d", cyc));
      repeat (6) @(posedge clk);
      check(pulses == start_pulses + 1, "exactly one pulse");
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
