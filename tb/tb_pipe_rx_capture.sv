// tb_pipe_rx_capture: drives the PXPIPE receive bus with idle symbols,
// well-formed 32-symbol packets (STP ... END), a packet cut short by an
// early END and one whose 32nd symbol is not END. Checks the captured
// packet, the toggle, both counters, and that the packet appears on the
// clock edge that takes its last symbol.
`timescale 1ps / 1ps
module tb_pipe_rx_capture;
  import ops_pkg::*;
  logic rxclk = 0, rst_n = 0;
  logic [7:0] rxdata = 0;
  logic rxdatak = 0;
  logic [255:0] pkt;
  logic pkt_toggle;
  logic [15:0] pkt_count, trunc_count;
  int checks = 0, failures = 0;

  pipe_rx_capture dut (.*);

  always #2000 rxclk = ~rxclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic sym(input logic [7:0] d, input logic k);
    rxdata <= d; rxdatak <= k; @(posedge rxclk);
  endtask

  logic [255:0] exp_pkt;
  int n_good = 0;

  task automatic send_good();
    exp_pkt = '0;
    exp_pkt[7:0] = K_STP;
    for (int i = 1; i < 31; i++) exp_pkt[8*i +: 8] = 8'($urandom);
    exp_pkt[255:248] = K_END;
    for (int i = 0; i < 32; i++) begin
      logic t0;
      t0 = pkt_toggle;
      sym(exp_pkt[8*i +: 8], (i == 0) || (i == 31));
      #1;
      if (i < 31) check(pkt_toggle == t0, "toggle changed before last symbol");
      else        check(pkt_toggle != t0, "toggle did not change on last symbol");
    end
    n_good++;
    check(pkt == exp_pkt, "captured packet differs");
    check(pkt_count == 16'(n_good), "pkt_count");
  endtask

  initial begin
    repeat (3) @(posedge rxclk);
    rst_n = 1;
    repeat (2) sym(8'h00, 0);
    send_good();
    sym(8'hBC, 1);       // a K symbol that is not STP: ignored
    send_good();
    send_good();         // back to back
    // early END
    sym(K_STP, 1);
    for (int i = 0; i < 10; i++) sym(8'(i), 0);
    sym(K_END, 1);
    #1 check(trunc_count == 1, "early END counted");
    check(pkt_count == 3, "early END not captured");
    // 32nd symbol not END
    sym(K_STP, 1);
    for (int i = 0; i < 31; i++) sym(8'h11, 0);
    #1 check(trunc_count == 2, "missing END counted");
    check(pkt_count == 3, "missing END not captured");
    repeat (3) sym(8'h00, 0);
    send_good();
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
