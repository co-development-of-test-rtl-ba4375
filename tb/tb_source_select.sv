// tb_source_select: walks every mode (PCIe, random, pattern), in place and
// in-line, with and without a PCIe packet waiting, and checks which packet
// and route are offered and which sources are popped or advanced.
`timescale 1ps / 1ps
module tb_source_select;
  import ops_pkg::*;
  src_mode_e mode;
  logic inline_fill, slot_req, pcie_empty, pcie_pop, prbs_next, pkt_valid, synth;
  logic [255:0] pcie_pkt, prbs_pkt, pat_pkt, pkt;
  logic [7:0] pcie_route, synth_route, route;
  int checks = 0, failures = 0;

  source_select dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    pcie_pkt = {8{32'hA5A5_0001}}; prbs_pkt = {8{32'h5A5A_0002}}; pat_pkt = {8{32'h0F0F_0003}};
    pcie_route = 8'h31; synth_route = 8'hC2;
    for (int m = 0; m < 3; m++)
      for (int f = 0; f < 2; f++)
        for (int e = 0; e < 2; e++)
          for (int s = 0; s < 2; s++) begin
            logic use_pcie;
            mode = src_mode_e'(m); inline_fill = f[0]; pcie_empty = e[0]; slot_req = s[0];
            #1;
            use_pcie = (m == 0) || (f == 1 && e == 0);
            check(synth == !use_pcie, "synth flag");
            check(pkt_valid == (use_pcie ? (e == 0) : 1'b1), "pkt_valid");
            if (use_pcie) begin
              check(pkt == pcie_pkt && route == pcie_route, "PCIe packet offered");
            end else begin
              check(pkt == ((m == 1) ? prbs_pkt : pat_pkt), "synthetic packet offered");
              check(route == synth_route, "synthetic route");
            end
            check(pcie_pop == (s == 1 && e == 0), "PCIe pop (used or substituted)");
            check(prbs_next == (s == 1 && !use_pcie && m == 1), "PRBS advance");
          end
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
