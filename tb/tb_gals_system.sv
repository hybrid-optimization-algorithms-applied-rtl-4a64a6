// tb_gals_system: end-to-end test of the default GALS system (4 modules in a
// line, plesiochronous clocks 49.5 / 51.02 / 50 / 49.01 MHz, medium traffic,
// jitter on), with every parameter at its default.
//
// It releases reset, runs until every link has carried TARGET words (or the
// time limit), and checks
//   * every word arrives, in order (no sequence errors, and the receiver's
//     count at most two words behind the sender's),
//   * each link carries about as many words as its pattern asks for,
//   * each ring clock runs at its nominal period when not paused,
//   * every module's clock gets paused, and some clock periods are stretched
//     by a handshake,
//   * the island clock of every module is the ring clock delayed by a
//     pseudo-random amount of at most 31 jitter steps, with many different
//     values seen,
//   * some handshakes have to wait for the other side, which keeps a clock
//     paused for longer than a bare handshake.
// Counts of each mechanism are printed; one that never happened is a failure.
module tb_gals_system;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int NM     = 4;
  localparam int NL     = 3;
  localparam int TARGET = 200;
  // nominal frequencies in units of 10 kHz, written out independently
  localparam int F10K [NM] = '{4950, 5102, 5000, 4901};
  // transfer requests per 6 cycles of each link's pattern (scenario B)
  localparam int ONES [NL] = '{3, 3, 3};

  int checks = 0;
  int failures = 0;

  logic        rst_n = 1'b1;   // dropped at 1 ps: the reset needs an edge
  logic [NM-1:0] lclk, ls_clk, paused;
  logic [15:0] sent [NL], merged [NL], rcvd [NL], errs [NL];

  gals_system dut (
    .rst_n      (rst_n),
    .mod_lclk   (lclk),
    .mod_ls_clk (ls_clk),
    .mod_paused (paused),
    .link_sent  (sent),
    .link_merged(merged),
    .link_rcvd  (rcvd),
    .link_errs  (errs)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------- observation
  longint last_rise [NM];
  longint min_per [NM], max_per [NM];
  int     n_cycles [NM], n_stretch [NM], n_pause [NM];
  longint jit_min [NM], jit_max [NM];
  int     jit_seen [NM][32];
  bit     running;

  for (genvar m = 0; m < NM; m++) begin : g_obs
    longint nominal;
    assign nominal = longint'(100_000_000 / F10K[m]);
    always @(posedge lclk[m]) if (running) begin
      if (last_rise[m] > 0) begin
        longint p;
        p = $time - last_rise[m];
        n_cycles[m]++;
        if (p < min_per[m]) min_per[m] = p;
        if (p > max_per[m]) max_per[m] = p;
        if (p > nominal + 200) n_stretch[m]++;
      end
      last_rise[m] = $time;
    end
    always @(posedge paused[m]) if (running) n_pause[m]++;
    always @(posedge ls_clk[m]) if (running && last_rise[m] > 0) begin
      longint dj;
      dj = $time - last_rise[m];
      if (dj >= 8000) dj = 0;   // same time step as the ring edge, seen first
      if (dj < jit_min[m]) jit_min[m] = dj;
      if (dj > jit_max[m]) jit_max[m] = dj;
      if (dj % 62 == 0 && dj / 62 < 32) jit_seen[m][dj / 62]++;
    end
  end

  // a handshake that keeps a clock paused longer than a bare handshake: the
  // other side was not ready (receiver not armed, or its clock stood still)
  int n_wait;
  for (genvar m = 0; m < NM; m++) begin : g_wait
    longint t_p;
    always @(posedge paused[m]) t_p = $time;
    always @(negedge paused[m]) if (running && $time - t_p > 2000) n_wait++;
  end

  initial begin : watchdog
    #(400_000_000);      // 400 us of simulated time
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit done;
    int distinct;
    running = 1'b0;
    n_wait = 0;
    for (int m = 0; m < NM; m++) begin
      last_rise[m] = 0; min_per[m] = 64'd1 << 40; max_per[m] = 0;
      n_cycles[m] = 0; n_stretch[m] = 0; n_pause[m] = 0;
      jit_min[m] = 64'd1 << 40; jit_max[m] = 0;
      for (int s = 0; s < 32; s++) jit_seen[m][s] = 0;
    end
    #(1) rst_n = 1'b0;
    #(50_000);
    chk(lclk == '1 && paused == '0, "clocks held high and not paused in reset");
    rst_n = 1'b1;
    running = 1'b1;
    done = 1'b0;
    while (!done && $time < 300_000_000) begin
      #(100_000);
      done = 1'b1;
      for (int l = 0; l < NL; l++) if (rcvd[l] < 16'(TARGET)) done = 1'b0;
    end
    // let traffic in flight drain
    #(200_000);
    running = 1'b0;
    for (int l = 0; l < NL; l++) begin
      chk(rcvd[l] >= 16'(TARGET), $sformatf("link %0d carried %0d words", l, rcvd[l]));
      chk(errs[l] == 0, $sformatf("link %0d sequence errors %0d", l, errs[l]));
      // one word may sit latched in the receiving port and the next be on its
      // way before the receiving island has counted the first
      chk(sent[l] - rcvd[l] <= 16'd2,
          $sformatf("link %0d sent %0d received %0d", l, sent[l], rcvd[l]));
    end
    for (int m = 0; m < NM; m++) begin
      longint nominal;
      nominal = longint'(100_000_000 / F10K[m]);
      $display("module %0d: %0d cycles, period min %0d max %0d (nominal %0d) ps, %0d pauses, %0d stretched, ls_clk delay %0d..%0d ps",
               m + 1, n_cycles[m], min_per[m], max_per[m], nominal, n_pause[m],
               n_stretch[m], jit_min[m], jit_max[m]);
      chk(min_per[m] >= nominal - 20 && min_per[m] <= nominal + 20,
          $sformatf("module %0d unpaused period %0d vs %0d", m + 1, min_per[m], nominal));
      chk(n_pause[m] > 0, $sformatf("module %0d clock paused %0d times", m + 1, n_pause[m]));
      chk(jit_min[m] >= 0 && jit_max[m] <= 31 * 62 + 20,
          $sformatf("module %0d jitter range %0d..%0d", m + 1, jit_min[m], jit_max[m]));
      distinct = 0;
      for (int s = 0; s < 32; s++) if (jit_seen[m][s] > 0) distinct++;
      chk(distinct >= 24, $sformatf("module %0d distinct jitter steps %0d", m + 1, distinct));
    end
    // words per cycle of the sending module: ONES/6 of its cycles
    for (int l = 0; l < NL; l++) begin
      int expect_lo;
      expect_lo = (n_cycles[l] * ONES[l]) / 6 - 20;
      chk(int'(sent[l]) >= expect_lo && int'(sent[l]) <= (n_cycles[l] * ONES[l]) / 6 + 2,
          $sformatf("link %0d sent %0d words in %0d sender cycles", l, sent[l], n_cycles[l]));
    end
    begin
      int total_stretch;
      total_stretch = 0;
      for (int m = 0; m < NM; m++) total_stretch += n_stretch[m];
      $display("mechanisms: stretched clock periods %0d, long pauses (waiting for the other side) %0d",
               total_stretch, n_wait);
      chk(total_stretch > 0, "some clock periods were stretched by a handshake");
      chk(n_wait > 0, "some handshakes waited for the other side");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
