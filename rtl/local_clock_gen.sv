// local_clock_gen: behavioural model of a pausable local clock generator.
// Behavioural model: the generator is a ring oscillator, so it is built from
// the behavioural mutex, c_element and delay_line models and has no
// synthesizable equivalent.
//
// Structure (one MUTEX per port, an AND over their clock-side grants, an
// inverting C element and a programmable delay line closing the ring):
//
//   lclk --> delay_line --> d --+--> mutex[k].r2 ... g2[k] --> AND --> C.a
//                                \-------------------------------------> C.b
//   lclk = ~C.y
//
// When d rises and every MUTEX grants it, the C element goes high and lclk
// falls; when d falls the grants drop, the C element goes low and lclk rises.
// Each half period therefore lasts ctrl * STEP_PS + MUTEX_PS + C_PS.
//
// Pausing: a port raises ri[k]. Its MUTEX can grant it (ai[k] = 1) only while
// d is low, i.e. after the rising edge of lclk. While ai[k] is high the MUTEX
// cannot pass the next rising d, so the C element stays low and lclk stays
// high: the high phase is stretched and no new rising edge appears. When the
// port lowers ri[k], ai[k] falls, the pending d is granted and the clock
// continues with a falling edge followed one half period later by a rising
// edge. Several ports can pause the clock at once; it runs only when all ri
// are low.
//
// Start-up and reset: while rst_n is low the ring is held with lclk high and
// no edges. OFFSET_PS after rst_n rises the ring starts; the first rising edge
// of lclk comes two half periods later. OFFSET_PS gives each module of a
// system its own start phase. The reset input and the start offset are this
// design's additions; the ring, arbitration and pausing follow the usual
// pausable-clock scheme.
module local_clock_gen #(
  parameter int N_PORTS   = 2,
  parameter int CTRL_W    = 12,
  parameter int STEP_PS   = 10,
  parameter int MUTEX_PS  = 20,
  parameter int C_PS      = 10,
  parameter int OFFSET_PS = 0
) (
  input  logic               rst_n,
  input  logic [CTRL_W-1:0]  delay_ctrl,
  input  logic [N_PORTS-1:0] ri,
  output logic [N_PORTS-1:0] ai,
  output logic               lclk
);
  timeunit 1ps;
  timeprecision 1ps;

  logic               start;
  logic               ring_in;
  logic               d;
  logic [N_PORTS-1:0] g_clk;
  logic               all_g;
  logic               c_out;

  initial start = 1'b0;

  always @(rst_n)
    if (!rst_n) start = 1'b0;
    else        start <= #(OFFSET_PS) 1'b1;

  assign ring_in = lclk & start;

  delay_line #(.CTRL_W(CTRL_W), .STEP_PS(STEP_PS)) u_dl (
    .din (ring_in),
    .ctrl(delay_ctrl),
    .dout(d)
  );

  for (genvar k = 0; k < N_PORTS; k++) begin : g_arb
    mutex #(.T_PS(MUTEX_PS)) u_mx (
      .r1(ri[k]),
      .r2(d),
      .g1(ai[k]),
      .g2(g_clk[k])
    );
  end

  assign all_g = &g_clk;

  c_element #(.T_PS(C_PS), .INIT(1'b0)) u_c (
    .a(all_g),
    .b(d),
    .y(c_out)
  );

  assign lclk = ~c_out;

endmodule
