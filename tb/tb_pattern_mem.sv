// tb_pattern_mem: writes random words into every pattern through the
// 32-bit port and reads back whole 256-bit patterns; checks reset clears.
`timescale 1ps / 1ps
module tb_pattern_mem;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [6:0] wr_addr = 0;
  logic [31:0] wr_data = 0;
  logic [3:0] rd_sel = 0;
  logic [255:0] rd_data;
  logic [255:0] model [16];
  int checks = 0, failures = 0;

  pattern_mem #(.NPAT(16)) dut (.*);

  always #1600 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 16; p++) begin
      rd_sel = 4'(p); #1;
      check(rd_data == '0, "cleared at reset");
      model[p] = '0;
    end
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom % 128;
      @(negedge clk);
      wr_en = 1; wr_addr = 7'(a); wr_data = $urandom;
      model[a / 8][32*(a % 8) +: 32] = wr_data;
      @(negedge clk);
      wr_en = 0;
      rd_sel = 4'($urandom % 16); #1;
      check(rd_data == model[rd_sel], "pattern read");
    end
    for (int p = 0; p < 16; p++) begin
      rd_sel = 4'(p); #1;
      check(rd_data == model[p], "final pattern");
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
