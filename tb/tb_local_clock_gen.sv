// tb_local_clock_gen: self-checking test of the pausable local clock
// generator (two ports).
// Checks: the clock is held high with no edges in reset; the first rising
// edge comes OFFSET + 2 half periods after reset; the free-running period is
// 2 * (ctrl * 10 + 30) ps with a 50 % duty cycle; a pause request is granted
// (ai) only after a rising edge, holds the clock high with no rising edge for
// as long as it lasts, and after release the clock falls within the
// arbitration delay and rises one half period later; two overlapping pauses
// from both ports keep the clock stopped until the later one ends; and a
// change of the delay control word changes the period.
module tb_local_clock_gen;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int OFFSET = 3000;

  int checks = 0;
  int failures = 0;

  logic        rst_n = 1'b1;
  logic [11:0] ctrl = 12'd997;
  logic [1:0]  ri = 2'b00;
  logic [1:0]  ai;
  logic        lclk;

  local_clock_gen #(.N_PORTS(2), .CTRL_W(12), .STEP_PS(10), .MUTEX_PS(20),
                    .C_PS(10), .OFFSET_PS(OFFSET)) dut (
    .rst_n(rst_n), .delay_ctrl(ctrl), .ri(ri), .ai(ai), .lclk(lclk));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  longint t_rise = 0, t_fall = 0, t_prev_rise = 0;
  int     n_rise = 0;
  always @(posedge lclk) begin t_prev_rise = t_rise; t_rise = $time; n_rise++; end
  always @(negedge lclk) t_fall = $time;

  initial begin : watchdog
    #(20_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, per, hi;
    int n0;
    #1 rst_n = 1'b0;
    #50_000;
    n0 = n_rise;
    #50_000;
    chk(lclk == 1'b1 && n_rise == n0, "held high without edges in reset");
    rst_n = 1'b1;
    t0 = $time;
    @(posedge lclk);
    chk($time - t0 == OFFSET + 2 * 10000,
        $sformatf("first rising edge after %0d ps", $time - t0));
    repeat (5) @(posedge lclk);
    per = t_rise - t_prev_rise;
    chk(per == 20000, $sformatf("period %0d ps, expected 20000", per));
    @(negedge lclk);
    hi = $time - t_rise;
    chk(hi == 10000, $sformatf("high time %0d ps, expected 10000", hi));
    // pause request issued while the clock is low: granted only after the rise
    #2000;
    chk(lclk == 1'b0, "clock low before pause request");
    ri[0] = 1'b1;
    #100 chk(ai[0] == 1'b0, "no grant while the clock is low");
    @(posedge lclk);
    t0 = $time;
    wait (ai[0]);
    chk($time - t0 <= 100, $sformatf("grant %0d ps after the rising edge", $time - t0));
    n0 = n_rise;
    #50_000;
    chk(lclk == 1'b1 && n_rise == n0, "clock held high while paused");
    ri[0] = 1'b0;
    t0 = $time;
    @(negedge lclk);
    chk($time - t0 <= 100, $sformatf("clock falls %0d ps after release", $time - t0));
    t0 = $time;
    @(posedge lclk);
    chk($time - t0 == 10000, $sformatf("then rises after %0d ps", $time - t0));
    chk(ai == 2'b00, "grant released");
    // overlapping pauses from both ports
    ri[1] = 1'b1;
    wait (ai[1]);
    #3000 ri[0] = 1'b1;
    wait (ai[0]);
    chk(ai == 2'b11, "both ports pause at once");
    n0 = n_rise;
    #20_000 ri[1] = 1'b0;
    #30_000;
    chk(n_rise == n0 && lclk == 1'b1, "still paused while one port holds");
    ri[0] = 1'b0;
    t0 = $time;
    @(posedge lclk);
    chk($time - t0 >= 10000 && $time - t0 <= 10100, "restarts after the last release");
    // pause requested in the high phase: granted at once, no shortened pulse
    @(posedge lclk);
    #1000 ri[0] = 1'b1;
    #100 chk(ai[0] == 1'b1, "grant in the high phase");
    #40_000 ri[0] = 1'b0;
    @(negedge lclk);
    hi = $time - t_rise;
    chk(hi >= 10000, $sformatf("stretched high phase %0d ps", hi));
    // new delay control word
    ctrl = 12'd497;
    repeat (4) @(posedge lclk);
    per = t_rise - t_prev_rise;
    chk(per == 10000, $sformatf("period %0d ps after ctrl = 497", per));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
