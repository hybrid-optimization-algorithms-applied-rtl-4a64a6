// pport_in: behavioural model of a poll-type (P-type) input port controller of
// a GALS wrapper, with its input data latch.
// Behavioural model: an asynchronous finite state machine written as a
// sequence of waits with a gate delay GD_PS per step; not synthesizable.
//
// The locally synchronous island arms the port by toggling pen ("ready for
// one word") and keeps running. The local clock is left alone until the
// sender raises req. The controller then
//   1. raises ri to pause the local clock and waits for ai,
//   2. latches data_in into data_q and raises ack,
//   3. waits for req to fall, then lowers ack and ri,
//   4. waits for ai to fall (clock released) and toggles ta, so ta == pen
//      again: data_q holds a new word.
// While the port is not armed a request waits, which in turn keeps the
// sender's clock paused.
//
// The data latch inside the port, the two-phase ta and the reset values are
// this design's choices; the poll behaviour (pause only once the partner's
// handshake signal arrives) follows the poll-port description.
module pport_in #(
  parameter int DATA_W = 16,
  parameter int GD_PS  = 50
) (
  input  logic              rst_n,
  input  logic              pen,
  output logic              ta,
  output logic              ri,
  input  logic              ai,
  input  logic              req,
  output logic              ack,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_q
);
  timeunit 1ps;
  timeprecision 1ps;

  initial begin
    ta     = 1'b0;
    ri     = 1'b0;
    ack    = 1'b0;
    data_q = '0;
  end

  // The handshake runs while rst_n is high; a low rst_n aborts it at any
  // step and returns every output to its idle value.
  always begin : afsm
    wait (rst_n);
    fork
      forever begin
        wait (pen != ta);
        wait (req);
        #(GD_PS) ri = 1'b1;
        wait (ai);
        #(GD_PS);
        data_q = data_in;
        ack    = 1'b1;
        wait (!req);
        #(GD_PS);
        ack = 1'b0;
        ri  = 1'b0;
        wait (!ai);
        #(GD_PS) ta = ~ta;
      end
      wait (!rst_n);
    join_any
    disable fork;
    ta     = 1'b0;
    ri     = 1'b0;
    ack    = 1'b0;
    data_q = '0;
  end

  // the sender must hold req until it has seen ack
  always @(negedge req)
    if (rst_n && $time > 0) assert (ack) else $error("pport_in: req fell before ack");

endmodule
