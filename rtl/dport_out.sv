// dport_out: behavioural model of a demand-type (D-type) output port
// controller of a GALS wrapper.
// Behavioural model: the controller is an asynchronous finite state machine;
// it is written as a sequence of waits with a gate delay GD_PS per step and
// is not synthesizable.
//
// The locally synchronous island starts a transfer by toggling pen (a
// transition, either direction, is a request; the level carries no meaning).
// The controller then
//   1. raises ri to pause the local clock and waits for ai (clock paused),
//   2. raises req towards the receiving module and waits for ack,
//   3. lowers req and waits for ack to fall (four-phase handshake),
//   4. lowers ri and waits for ai to fall (clock released),
//   5. toggles ta so that ta == pen again: the transfer is complete.
// The data bus is driven by the island and must stay stable from the pen
// transition to the ta transition (bundled data). Because the clock is paused
// as soon as the transfer is requested, a slow receiver stretches the
// sender's clock.
//
// ta is a transition (two-phase) acknowledge that follows pen; this, and the
// reset to ta = 0, are this design's choice. The handshake order follows the
// demand-port timing described for these wrappers.
module dport_out #(
  parameter int GD_PS = 50            // delay of each controller step in ps
) (
  input  logic rst_n,
  input  logic pen,
  output logic ta,
  output logic ri,
  input  logic ai,
  output logic req,
  input  logic ack
);
  timeunit 1ps;
  timeprecision 1ps;

  initial begin
    ta  = 1'b0;
    ri  = 1'b0;
    req = 1'b0;
  end

  // The handshake runs while rst_n is high; a low rst_n aborts it at any
  // step and returns every output to its idle value.
  always begin : afsm
    wait (rst_n);
    fork
      forever begin
        wait (pen != ta);
        #(GD_PS) ri = 1'b1;
        wait (ai);
        #(GD_PS) req = 1'b1;
        wait (ack);
        #(GD_PS) req = 1'b0;
        wait (!ack);
        #(GD_PS) ri = 1'b0;
        wait (!ai);
        #(GD_PS) ta = ~ta;
      end
      wait (!rst_n);
    join_any
    disable fork;
    ta  = 1'b0;
    ri  = 1'b0;
    req = 1'b0;
  end

  // the receiver may only acknowledge a pending request
  always @(posedge ack)
    if (rst_n && $time > 0) assert (req) else $error("dport_out: ack rose without req");

endmodule
