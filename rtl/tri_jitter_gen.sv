// tri_jitter_gen: behavioural model of a linear (triangular) clock period
// modulator. Behavioural model: the delay elements are simulated transport
// delays; the single-hot selection counter is ordinary synthesizable logic.
//
// The input clock runs through a chain of seven delay segments of 1, 2, 3, 4,
// 3, 2 and 1 times DELTA_PS, giving eight taps delayed by 0, 1, 3, 6, 10, 13,
// 15 and 16 DELTA. A 16-input multiplexer, inputs 0..15, passes one of them to
// clk_out (ClkMux); inputs i and 15-i share tap i, so walking the inputs
// 0, 1, .., 15 delays the clock by 0, 1, 3, 6, 10, 13, 15, 16, 16, 15, .., 1
// DELTA. The input is picked by a 16-bit single-hot counter that rotates by
// one place per cycle. Each output period is therefore the input period plus
// +1, +2, +3, +4, +3, +2, +1, 0, -1, -2, -3, -4, -3, -2, -1, 0 DELTA: a
// triangle between T - 4 DELTA and T + 4 DELTA with a 16-cycle period and an
// unchanged mean frequency; the high time stays the same.
//
// The counter is clocked by clk_out delayed by 4 DELTA and inverted, so it
// steps 4 DELTA after each falling edge of clk_out. Neighbouring inputs are at
// most 4 DELTA apart, so both are low at that moment and the multiplexer
// switches without a glitch, provided the low time of the input clock exceeds
// 20 DELTA (3 ns at the default). rst_n (asynchronous, active low) selects
// input 0.
//
// The delay structure, the 4 DELTA delay and inverter in front of the
// counter, single-hot selection and DELTA = 0.15 ns follow the published
// generator; that the counter steps on the falling edge of the delayed clock
// is read from the inverter in its clock path, and the reset state is this
// design's choice.
module tri_jitter_gen #(
  parameter int DELTA_PS = 150
) (
  input  logic        rst_n,
  input  logic        clk_in,
  output logic        clk_out,
  output logic [15:0] sel      // single-hot multiplexer selection
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int NSEG = 7;
  localparam int SEG [NSEG] = '{1, 2, 3, 4, 3, 2, 1};   // segment delays in DELTA

  logic tap [1:NSEG];      // tap[i]: clock after segments 1..i (tap 0 is clk_in)
  logic mux_dly;           // clk_out delayed by 4 DELTA
  logic cnt_clk;

  for (genvar i = 1; i <= NSEG; i++) begin : g_seg
    if (i == 1) begin : g_first
      initial tap[i] = 1'b0;
      always @(clk_in) tap[i] <= #(SEG[i-1] * DELTA_PS) clk_in;
    end else begin : g_next
      initial tap[i] = 1'b0;
      always @(tap[i-1]) tap[i] <= #(SEG[i-1] * DELTA_PS) tap[i-1];
    end
  end

  always_comb begin
    clk_out = 1'b0;
    for (int i = 0; i < 16; i++)
      if (sel[i]) clk_out = (i == 0 || i == 15) ? clk_in : tap[(i < 8) ? i : 15 - i];
  end

  initial mux_dly = 1'b0;
  always @(clk_out) mux_dly <= #(4 * DELTA_PS) clk_out;
  assign cnt_clk = ~mux_dly;

  always_ff @(posedge cnt_clk or negedge rst_n) begin
    if (!rst_n) sel <= 16'h0001;
    else        sel <= {sel[14:0], sel[15]};
  end

endmodule
