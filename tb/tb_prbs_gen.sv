// tb_prbs_gen: compares the packets with a bit-serial PRBS31 reference
// (x^31 + x^28 + 1) written independently here, over several packets,
// across a reseed, and checks that the state holds without `next`.
`timescale 1ps / 1ps
module tb_prbs_gen;
  logic clk = 0, rst_n = 0, seed_load = 0, next = 0;
  logic [255:0] data;
  int checks = 0, failures = 0;
  logic [30:0] ref_s;

  prbs_gen #(.W(256), .SEED(31'h1234_5678)) dut (.*);

  always #1600 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [255:0] ref_pkt(inout logic [30:0] s);
    logic [255:0] r;
    for (int i = 0; i < 256; i++) begin
      r[i] = s[30] ^ s[27];
      s = {s[29:0], r[i]};
    end
    return r;
  endfunction

  initial begin
    logic [255:0] e;
    logic [30:0] s0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ref_s = 31'h1234_5678;
    for (int p = 0; p < 6; p++) begin
      @(negedge clk);
      e = ref_pkt(ref_s);
      check(data == e, $sformatf("packet %0d", p));
      next = 1; @(negedge clk); next = 0;
      ref_s = ref_s; // state already advanced in ref_pkt
      // undo: the loop's next ref_pkt call uses advanced state
      e = ref_pkt(ref_s);
      check(data == e, $sformatf("packet %0d+1", p));
      repeat (2) @(negedge clk);
      check(data == e, "holds without next");
      next = 1; @(negedge clk); next = 0;
    end
    // the sequence must not be trivially constant
    check(data != '0 && data != '1, "nonzero data");
    seed_load = 1; @(negedge clk); seed_load = 0;
    s0 = 31'h1234_5678;
    e = ref_pkt(s0);
    check(data == e, "reseed restarts the sequence");
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
