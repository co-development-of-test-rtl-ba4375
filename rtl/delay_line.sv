// delay_line: behavioural model of one programmable delay part (not
// synthesizable logic; stands for the board's analog delay device).
//
// Every signal entering or leaving the board passes through one of these.
// The output follows the input `code` x STEP_PS picoseconds later, so
// 0 to 10 ns in 10 ps steps with the default 1000-step range; codes above
// MAX_CODE are treated as MAX_CODE. Every input edge is kept (transport
// delay), so pulses shorter than the delay survive, as on a delay line.
// A code change affects edges that arrive after it. The range and step
// are the document's; the model's behaviour on a code change is this
// design's simplification.
`timescale 1ps / 1ps
module delay_line #(
  parameter int unsigned STEP_PS  = 10,
  parameter int unsigned MAX_CODE = 1000
) (
  input  logic       din,
  input  logic [9:0] code,
  output logic       dout
);

  int unsigned dly;

  assign dly = ((int'(code) > int'(MAX_CODE)) ? MAX_CODE : int'(code)) * STEP_PS;

  initial dout = 1'b0;

  always @(din) dout <= #(dly) din;

endmodule
