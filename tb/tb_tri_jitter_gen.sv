// tb_tri_jitter_gen: self-checking test of the triangular clock period
// modulator at its default DELTA of 150 ps on a 50 MHz input clock.
// The expected delay of each output edge is worked out from the tap table
// (0, 1, 3, 6, 10, 13, 15, 16 DELTA, inputs i and 15-i sharing tap i) and a
// testbench counter of cycles since reset. It checks, for 40 triangle
// periods, that every rising edge of clk_out has that delay, that the output
// periods run through +1, +2, +3, +4, +3, +2, +1, 0, -1, .., -4, .., 0 DELTA,
// that the selection stays single-hot, that there is exactly one rising edge
// per input cycle (no glitches), that the high time is unchanged and that the
// mean period over a whole triangle equals the input period.
module tb_tri_jitter_gen;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int D = 150;
  localparam int HALF = 10000;
  localparam int TAPD [8] = '{0, 1, 3, 6, 10, 13, 15, 16};
  localparam int DP [16] = '{1, 2, 3, 4, 3, 2, 1, 0, -1, -2, -3, -4, -3, -2, -1, 0};
  localparam int NTRI = 40;

  int checks = 0;
  int failures = 0;

  logic        rst_n = 1'b1, clk_in = 1'b0;
  logic        clk_out;
  logic [15:0] sel;

  tri_jitter_gen dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(64'd2 * HALF * (16 * NTRI + 50));
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t_in, t_out, t_out_prev, t_out_fall, t_first;
  int     n_rise = 0;
  always @(posedge clk_in)  t_in = $time;
  always @(posedge clk_out) begin t_out_prev = t_out; t_out = $time; n_rise++; end
  always @(negedge clk_out) t_out_fall = $time;

  initial begin
    int bad_delay, bad_period, bad_hot, bad_glitch, bad_high;
    int k, r0, dly;
    bad_delay = 0; bad_period = 0; bad_hot = 0; bad_glitch = 0; bad_high = 0;
    #1 rst_n = 1'b0;
    #(5000) rst_n = 1'b1;
    chk(sel == 16'h0001, "reset selects input 0");
    #(5000 - 1);
    for (int c = 0; c < 16 * NTRI; c++) begin
      k = c % 16;
      dly = TAPD[(k < 8) ? k : 15 - k] * D;
      r0 = n_rise;
      clk_in = 1'b1;
      #(4000);
      if (n_rise != r0 + 1) bad_glitch++;
      if (t_out - t_in != dly) bad_delay++;
      if (c == 0) t_first = t_out;
      if (c > 0 && t_out - t_out_prev != 2 * HALF + DP[(k + 15) % 16] * D) bad_period++;
      if ($countones(sel) != 1) bad_hot++;
      #(HALF - 4000);
      clk_in = 1'b0;
      #(4000);
      if (t_out_fall - t_out != HALF) bad_high++;
      if (clk_out != 1'b0) bad_glitch++;
      #(HALF - 4000);
    end
    chk(bad_delay == 0, $sformatf("output delay follows the tap table (%0d wrong)", bad_delay));
    chk(bad_period == 0, $sformatf("periods follow the triangle (%0d wrong)", bad_period));
    chk(bad_hot == 0, $sformatf("selection single-hot (%0d wrong)", bad_hot));
    chk(bad_glitch == 0, $sformatf("one clean pulse per cycle (%0d wrong)", bad_glitch));
    chk(bad_high == 0, $sformatf("high time unchanged (%0d wrong)", bad_high));
    // after a whole number of triangles the output is back in phase
    chk((t_out - t_first) == longint'(16 * NTRI - 1) * 2 * HALF,
        $sformatf("mean period over %0d triangles equals the input period", NTRI));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
