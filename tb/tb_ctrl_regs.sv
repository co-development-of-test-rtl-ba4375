// tb_ctrl_regs: writes and reads back the configuration registers, checks
// the decoded cfg fields, the one-cycle command pulses, all 28 delay
// codes, the status words, and the write strobes and read port of the
// route table, pattern memory and monitor windows.
`timescale 1ps / 1ps
module tb_ctrl_regs;
  import ops_pkg::*;
  logic clk = 0, rst_n = 0, bus_we = 0;
  logic [11:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata, pat_data, mon_data;
  cfg_t cfg;
  status_t status;
  logic [27:0][9:0] delay_code;
  logic tbl_we, pat_we;
  logic [3:0] tbl_addr;
  logic [7:0] tbl_data;
  logic [6:0] pat_addr;
  logic [5:0] mon_addr;
  int checks = 0, failures = 0;

  ctrl_regs dut (.*);

  always #1600 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_we = 0;
  endtask
  task automatic rdchk(input logic [11:0] a, input logic [31:0] e, input string what);
    bus_addr = a; #1; check(bus_rdata == e, what);
    if (bus_rdata != e) $display("  addr %h got %h exp %h", a, bus_rdata, e);
  endtask

  assign mon_data = {26'h0, mon_addr} ^ 32'hCAFE_0000;

  initial begin
    status = '0;
    status.pcie_rx_pkts = 16'd11; status.slots_sent = 16'd44; status.st_bit_errors = 32'd99_999;
    status.st_lost = 16'd7;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check(cfg.route_sym == 5'd11 && !cfg.tx_enable, "reset values");
    wr(12'h000, 32'b101_0_01_1_1_01_1);
    check(cfg.tx_enable && cfg.src_mode == SRC_PRBS && cfg.inline_fill && cfg.selftest_en
          && cfg.manip_mode == MANIP_CORRUPT && cfg.win_advance == 3'd5, "CTRL fields");
    rdchk(12'h000, 32'b101_0_01_1_1_01_1, "CTRL readback");
    wr(12'h004, 32'h0013_0A5C);
    check(cfg.synth_route == 8'h5C && cfg.pattern_sel == 4'hA && cfg.route_sym == 5'h13, "ROUTE_CFG");
    rdchk(12'h004, 32'h0013_0A5C, "ROUTE_CFG readback");
    wr(12'h008, 32'd3);  check(cfg.manip_every == 8'd3, "MANIP_EVERY");
    wr(12'h00C, 32'hDEAD_BEEF); rdchk(12'h00C, 32'hDEAD_BEEF, "MANIP_MASK");
    // command pulses last one cycle
    @(negedge clk); bus_we = 1; bus_addr = 12'h010; bus_wdata = 32'h3;
    @(negedge clk); bus_we = 0;
    check(cfg.selftest_clear && cfg.prbs_reseed, "command pulse high");
    @(negedge clk);
    check(!cfg.selftest_clear && !cfg.prbs_reseed, "command pulse one cycle");
    for (int i = 0; i < 28; i++) wr(12'h400 + 12'(4*i), 32'(i*37 + 5));
    for (int i = 0; i < 28; i++) begin
      check(delay_code[i] == 10'(i*37 + 5), "delay code output");
      rdchk(12'h400 + 12'(4*i), {22'd0, 10'(i*37 + 5)}, "delay code readback");
    end
    rdchk(12'h040, 32'd11, "status pcie_rx_pkts");
    rdchk(12'h04C, 32'd44, "status slots_sent");
    rdchk(12'h064, 32'd99_999, "status bit errors");
    rdchk(12'h070, 32'd7, "status st_lost");
    // strobes
    @(negedge clk); bus_we = 1; bus_addr = 12'h124; bus_wdata = 32'h77; #1;
    check(tbl_we && tbl_addr == 4'd9 && tbl_data == 8'h77 && !pat_we, "route table strobe");
    bus_addr = 12'h2E8; #1;
    check(pat_we && pat_addr == 7'h3A && pat_data == 32'h77 && !tbl_we, "pattern strobe");
    @(negedge clk); bus_we = 0;
    rdchk(12'h8A4, (32'hCAFE_0000 ^ 32'h29), "monitor window read");
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
