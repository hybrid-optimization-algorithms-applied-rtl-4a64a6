// delay_line: behavioural model of the programmable delay line that sets the
// period of a ring-oscillator local clock.
// Behavioural model: the real part is a chain of delay cells tapped by a
// multiplexer; here the delay is a simulated transport delay.
//
// Every edge of din appears on dout after ctrl * STEP_PS picoseconds. The
// delay is sampled when the edge arrives, so a new ctrl value takes effect
// from the next edge on. ctrl = 0 gives the minimum delay of one STEP_PS.
// The model is meant for pulses at least as long as the delay, which is all
// a ring oscillator built on it produces; shorter pulses may be swallowed.
module delay_line #(
  parameter int CTRL_W  = 12,         // width of the delay control word
  parameter int STEP_PS = 10          // delay per control step in ps
) (
  input  logic              din,
  input  logic [CTRL_W-1:0] ctrl,
  output logic              dout
);
  timeunit 1ps;
  timeprecision 1ps;

  int unsigned dly;

  assign dly = (ctrl == '0) ? STEP_PS : int'(ctrl) * STEP_PS;

  initial dout = 1'b0;

  always @(din) dout <= #(dly) din;

endmodule
