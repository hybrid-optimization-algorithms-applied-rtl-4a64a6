// mutex: behavioural model of a two-way mutual exclusion element (MUTEX).
// Behavioural model: a real MUTEX is an analog cross-coupled latch with a
// metastability filter; this model reproduces only its logic behaviour and
// delay, so it is not synthesizable.
//
// Two requests r1 and r2 compete for one resource. At most one grant (g1 or
// g2) is high at any time. A grant rises T_PS after its request when the other
// side is idle; when both requests are pending, the one that rose first wins,
// and r1 wins an exact tie. A grant falls T_PS after its request falls, and
// only then can the other request be granted. A request that is withdrawn
// before it is granted is simply dropped.
//
// In the pausable clock generator one side is a port controller's clock-pause
// request (Ri, granted as Ai) and the other the ring oscillator's delayed
// clock, so a pause can never cut a clock pulse short.
module mutex #(
  parameter int T_PS = 20             // grant / release delay in ps
) (
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);
  timeunit 1ps;
  timeprecision 1ps;

  longint t1, t2;                     // time each request last rose

  initial begin
    g1 = 1'b0;
    g2 = 1'b0;
    t1 = 0;
    t2 = 0;
  end

  always @(posedge r1) t1 <= $time;
  always @(posedge r2) t2 <= $time;

  always begin : arbiter
    wait (r1 || r2);
    #(T_PS);
    if (r1 && (!r2 || t1 <= t2)) begin
      g1 = 1'b1;
      wait (!r1);
      #(T_PS);
      g1 = 1'b0;
    end else if (r2) begin
      g2 = 1'b1;
      wait (!r2);
      #(T_PS);
      g2 = 1'b0;
    end
  end

  always @(g1 or g2)
    assert (!(g1 && g2)) else $error("mutex: both grants high");

endmodule
