// tb_mutex: self-checking test of the two-way mutual exclusion element.
// Directed cases check the grant delay, first-come-first-served arbitration,
// the tie rule, release and hand-over, and a withdrawn request; a random phase
// then toggles both requests and checks that the grants are never both high,
// that a grant is only held with its request, and that every held request is
// eventually granted.
module tb_mutex;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 20;

  int checks = 0;
  int failures = 0;

  logic r1 = 1'b0, r2 = 1'b0;
  logic g1, g2;

  mutex #(.T_PS(T)) dut (.r1, .r2, .g1, .g2);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  int both_high = 0;
  int orphan = 0;
  always @(g1 or g2) if (g1 && g2) both_high++;
  longint tf1 = 0, tf2 = 0;
  always @(negedge r1) tf1 = $time;
  always @(negedge r2) tf2 = $time;
  bit sample_en = 1'b0;   // random phase: stimulus on even, sampling on odd ps
  always #1 if (sample_en && $time % 2 == 1 &&
                ((g1 && !r1 && $time - tf1 > T) || (g2 && !r2 && $time - tf2 > T))) begin
    if (orphan < 3) $display("orphan @%0t g1=%b r1=%b tf1=%0d g2=%b r2=%b tf2=%0d", $time, g1, r1, tf1, g2, r2, tf2);
    orphan++;
  end

  initial begin : watchdog
    #(50_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    chk(!g1 && !g2, "idle: no grant");
    // single request, grant after T
    r1 = 1'b1;
    #(T - 1) chk(!g1, "g1 not before T");
    #2       chk(g1 && !g2, "g1 after T");
    r1 = 1'b0;
    #(T + 1) chk(!g1, "g1 released after T");
    // r2 alone
    #100 r2 = 1'b1;
    #(T + 1) chk(g2 && !g1, "g2 after T");
    // r1 arrives while g2 held: waits
    r1 = 1'b1;
    #200 chk(g2 && !g1, "r1 waits while g2 is held");
    r2 = 1'b0;
    #(T + 1) chk(!g2, "g2 released");
    #(T + 1) chk(g1, "r1 granted after hand-over");
    r1 = 1'b0;
    #100;
    // first come wins inside the grant delay: r2 5 ps before r1
    r2 = 1'b1;
    #5 r1 = 1'b1;
    #(T + 5) chk(g2 && !g1, "earlier r2 wins");
    r1 = 1'b0; r2 = 1'b0;
    #100;
    r1 = 1'b1;
    #5 r2 = 1'b1;
    #(T + 5) chk(g1 && !g2, "earlier r1 wins");
    r1 = 1'b0; r2 = 1'b0;
    #100;
    // tie
    r1 = 1'b1; r2 = 1'b1;
    #(T + 1) chk(g1 && !g2, "tie goes to r1");
    r1 = 1'b0;
    #(2 * T + 2) chk(g2 && !g1, "then r2");
    r2 = 1'b0;
    #100;
    // withdrawn request
    r1 = 1'b1;
    #5 r1 = 1'b0;
    #(2 * T) chk(!g1 && !g2, "withdrawn request not granted");
    // random phase
    #(($time % 2 == 1) ? 1 : 0);
    sample_en = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      #(2 * $urandom_range(1, 40));
      if ($urandom_range(0, 1)) r1 = ~r1; else r2 = ~r2;
    end
    r1 = 1'b1; r2 = 1'b1;
    #(4 * T) chk(g1 ^ g2, "one of two held requests granted");
    r1 = 1'b0;
    #(4 * T) chk(g2, "remaining request granted");
    r2 = 1'b0;
    #(4 * T);
    chk(both_high == 0, $sformatf("grants never both high (%0d)", both_high));
    chk(orphan == 0, $sformatf("no grant without request (%0d)", orphan));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
