// tb_route_xlate: fills the 16-entry table, then offers packets whose
// key symbol varies and checks the routing bits; also moves the key to
// another symbol position.
`timescale 1ps / 1ps
module tb_route_xlate;
  logic clk = 0, rst_n = 0, tbl_we = 0;
  logic [3:0] tbl_addr = 0;
  logic [7:0] tbl_data = 0, route;
  logic [4:0] key_sym = 5'd11;
  logic [255:0] pkt = 0;
  logic [7:0] model [16];
  int checks = 0, failures = 0;

  route_xlate #(.KEY_BITS(4)) dut (.*);

  always #1600 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check(route == 8'h00, "table cleared at reset");
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      model[i] = 8'($urandom) | 8'h01;
      tbl_we = 1; tbl_addr = 4'(i); tbl_data = model[i];
    end
    @(negedge clk); tbl_we = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      key_sym = (i < 50) ? 5'd11 : 5'(2 + $urandom % 28);
      pkt = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      check(route == model[pkt[8*key_sym +: 4]], "route lookup");
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
