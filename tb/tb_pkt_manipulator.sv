// tb_pkt_manipulator: streams packets through pass, corrupt-every-3rd and
// drop-every-2nd modes and compares the output with a reference model,
// including the counters and the restart of the count on a mode change.
`timescale 1ps / 1ps
module tb_pkt_manipulator;
  import ops_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  manip_mode_e mode = MANIP_PASS;
  logic [7:0] every = 0;
  logic [31:0] mask = 32'h0000_00F1;
  logic [255:0] in_pkt = 0, out_pkt;
  logic [15:0] corrupted, dropped;
  int checks = 0, failures = 0, ecorr = 0, edrop = 0;

  pkt_manipulator dut (.*);

  always #1600 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input manip_mode_e m, input int ev, input int npk);
    int cnt;
    cnt = 0;
    @(negedge clk); mode = m; every = 8'(ev);
    for (int i = 0; i < npk; i++) begin
      logic [255:0] p;
      logic hit;
      p = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      in_valid = 1; in_pkt = p;
      @(negedge clk);
      in_valid = 0;
      cnt++;
      hit = (ev <= 1) || (cnt % ev == 0);
      case (m)
        MANIP_PASS: check(out_valid && out_pkt == p, "pass");
        MANIP_CORRUPT: begin
          if (hit) ecorr++;
          check(out_valid && out_pkt == (hit ? p ^ 256'(mask) : p), "corrupt");
        end
        default: begin
          if (hit) edrop++;
          check(out_valid == !hit, "drop");
          if (!hit) check(out_pkt == p, "kept packet");
        end
      endcase
      check(corrupted == 16'(ecorr) && dropped == 16'(edrop), "counters");
      @(negedge clk);
      check(!out_valid, "single-cycle valid");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(MANIP_PASS, 0, 5);
    run(MANIP_CORRUPT, 3, 10);
    run(MANIP_DROP, 2, 9);
    run(MANIP_CORRUPT, 1, 3);
    run(MANIP_DROP, 4, 8);
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
