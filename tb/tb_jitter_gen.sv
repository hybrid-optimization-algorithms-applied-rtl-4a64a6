// tb_jitter_gen: self-checking test of the pseudo-random jitter generator at
// its default size (15-bit LFSR, 32 taps of 62 ps) on a 50 MHz input clock.
// A reference 15-bit Fibonacci LFSR (x^15 + x^14 + 1, written out here) is
// stepped on every falling edge of the most delayed clock. For every input
// cycle the testbench checks that
//   * clk_dly is the input delayed by 32 elements (1984 ps),
//   * clk_out rises exactly sel * 62 ps after the input, sel being the low
//     5 bits of the reference register,
//   * the high time of clk_out equals that of the input and clk_out has one
//     rising edge per input cycle (no glitches),
// that most of the 32 delays occur, that en = 0 freezes the delay, and that
// the mean output period equals the input period.
module tb_jitter_gen;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int DE = 62;
  localparam int HALF = 10000;

  int checks = 0;
  int failures = 0;

  logic       rst_n = 1'b1, en = 1'b1, clk_in = 1'b0;
  logic       clk_out, clk_dly;
  logic [4:0] sel;

  jitter_gen dut (.rst_n, .en, .clk_in, .clk_out, .clk_dly, .sel);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  logic [14:0] ref_q;
  logic        ref_run = 1'b0;
  always @(negedge clk_dly)
    if (ref_run && en) ref_q = {ref_q[13:0], ref_q[14] ^ ref_q[13]};

  longint t_in_rise, t_out_rise;
  int     out_rises = 0;
  always @(posedge clk_in)  t_in_rise = $time;
  always @(posedge clk_out) begin t_out_rise = $time; out_rises++; end

  int bad_delay = 0, bad_width = 0, bad_dly = 0, bad_glitch = 0;
  int seen [32];
  bit measure = 1'b0;
  longint first_out, last_out;
  int n_out;

  initial begin : watchdog
    #(200_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_cycle(input bit check_delay);
    int r0;
    logic [4:0] exp_sel;
    exp_sel = ref_q[4:0];
    r0 = out_rises;
    clk_in = 1'b1;
    #(3000);
    if (check_delay) begin
      if (t_out_rise - t_in_rise != longint'(exp_sel) * DE) bad_delay++;
      seen[exp_sel]++;
      if (n_out == 0) first_out = t_out_rise;
      last_out = t_out_rise;
      n_out++;
    end
    if (out_rises != r0 + 1) bad_glitch++;
    #(HALF - 3000);
    clk_in = 1'b0;
    #(1984 - 1);
    if (!clk_dly) bad_dly++;
    #(2);
    if (clk_dly) bad_dly++;
    #(3000 - 1);
    if (clk_out != 1'b0) bad_width++;
    if (t_out_rise + HALF > $time) bad_width++;
    #(HALF - 1985 - 3000);
  endtask

  initial begin
    int distinct;
    logic [4:0] frozen;
    for (int i = 0; i < 32; i++) seen[i] = 0;
    n_out = 0;
    #1 rst_n = 1'b0;
    #5000 rst_n = 1'b1;
    ref_q = 15'h1;
    ref_run = 1'b1;
    #5000;
    chk(sel == 5'd1, "seed selects tap 1 after reset");
    for (int i = 0; i < 2000; i++) one_cycle(1'b1);
    chk(bad_delay == 0, $sformatf("output delay = sel * 62 ps (%0d wrong)", bad_delay));
    chk(bad_glitch == 0, $sformatf("one output edge per cycle (%0d wrong)", bad_glitch));
    chk(bad_dly == 0, $sformatf("clk_dly is the input + 1984 ps (%0d wrong)", bad_dly));
    chk(bad_width == 0, $sformatf("output high time kept (%0d wrong)", bad_width));
    distinct = 0;
    for (int i = 0; i < 32; i++) if (seen[i] > 0) distinct++;
    chk(distinct == 32, $sformatf("%0d of 32 delays used", distinct));
    // mean period: first and last output edge, 1999 periods apart
    chk(((last_out - first_out) + 1000) / 1999 >= 2 * HALF - 1 &&
        ((last_out - first_out)) / 1999 <= 2 * HALF + 1,
        $sformatf("mean output period %0d ps", (last_out - first_out) / 1999));
    // freeze
    en = 1'b0;
    frozen = sel;
    for (int i = 0; i < 50; i++) one_cycle(1'b1);
    chk(sel == frozen && bad_delay == 0, "en = 0 keeps the delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
