// c_element: behavioural model of a two-input Muller C element.
// Behavioural model: a C element is a state-holding asynchronous gate; the
// model gives it a propagation delay T_PS and is not meant for synthesis.
//
// The output takes the common value of the inputs T_PS after both inputs
// agree and keeps its value while they differ. INIT is its value at time 0.
// In the pausable clock generator it joins the arbitration block's output and
// the delayed clock; its inverted output is the local clock.
module c_element #(
  parameter int T_PS = 10,            // propagation delay in ps
  parameter bit INIT = 1'b0
) (
  input  logic a,
  input  logic b,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  initial y = INIT;

  always @(a or b)
    if (a == b) y <= #(T_PS) a;

endmodule
