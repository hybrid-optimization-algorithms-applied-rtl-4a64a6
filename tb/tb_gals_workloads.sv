// tb_gals_workloads: runs the system in the evaluated configurations side by
// side - the four topologies (4-module line, 4-module star, 4-module mesh,
// 10-module star), their frequency sets, the three traffic scenarios and the
// three clock modulation settings (none, pseudo-random, triangular). Nine
// system instances, each a different mix, start from the same reset and run
// until every link of every instance has carried MINW words.
// Per instance it checks that every link delivers its words in order (no
// sequence errors, at most two words between sender and receiver counts after the traffic drains), that
// every module's clock is paused by the handshakes, and that the island clock
// follows the chosen modulation: identical to the ring clock without jitter,
// up to 31 steps of 62 ps with pseudo-random jitter, and only the tap delays
// 0, 1, 3, 6, 10, 13, 15, 16 x 150 ps with triangular modulation (at least 7
// of the 8 seen). The triangular modulator's output period is also checked to
// vary by at most +-4 x 150 ps.
module tb_gals_workloads;
  timeunit 1ps;
  timeprecision 1ps;

  import gals_pkg::*;

  localparam int NCFG = 9;
  localparam int MINW = 40;
  localparam topology_e TOPO [NCFG] = '{TOPO_P2P4, TOPO_P2P4, TOPO_STAR4, TOPO_STAR4,
                                        TOPO_MESH4, TOPO_MESH4, TOPO_STAR10, TOPO_STAR10,
                                        TOPO_STAR10};
  localparam int        FSET [NCFG] = '{1, 3, 2, 3, 1, 2, 4, 5, 1};
  localparam scenario_e SCN  [NCFG] = '{SCEN_A, SCEN_C, SCEN_B, SCEN_C, SCEN_C, SCEN_A,
                                        SCEN_B, SCEN_C, SCEN_A};
  localparam int        JIT  [NCFG] = '{0, 2, 1, 0, 1, 2, 1, 0, 2};

  int checks = 0;
  int failures = 0;

  logic rst_n = 1'b1;
  bit   running = 1'b0;
  bit   cfg_done [NCFG];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #(64'd600_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-instance results, filled in by each instance's checker
  int n_pause_tot [NCFG], n_mod_bad [NCFG], n_jit_bad [NCFG], n_jit_vals [NCFG];
  int n_link_bad [NCFG], n_words [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int NM = topo_mods(TOPO[c]);
    localparam int NL = topo_links(TOPO[c]);
    logic [NM-1:0] lclk, ls_clk, paused;
    logic [15:0]   sent [NL], merged [NL], rcvd [NL], errs [NL];

    gals_system #(
      .TOPOLOGY(TOPO[c]),
      .FREQ_SET(FSET[c]),
      .SCENARIO(SCN[c]),
      .JITTER  (JIT[c])
    ) dut (
      .rst_n      (rst_n),
      .mod_lclk   (lclk),
      .mod_ls_clk (ls_clk),
      .mod_paused (paused),
      .link_sent  (sent),
      .link_merged(merged),
      .link_rcvd  (rcvd),
      .link_errs  (errs)
    );

    int     n_pause [NM];
    longint t_ring [NM], t_isl [NM];
    int     bad_jit [NM];
    int     tri_seen [NM][8];
    for (genvar m = 0; m < NM; m++) begin : g_m
      initial begin
        n_pause[m] = 0; bad_jit[m] = 0; t_ring[m] = 0; t_isl[m] = 0;
        for (int k = 0; k < 8; k++) tri_seen[m][k] = 0;
      end
      always @(posedge paused[m]) if (running) n_pause[m]++;
      always @(posedge lclk[m]) t_ring[m] = $time;
      always @(posedge ls_clk[m]) if (running && t_ring[m] > 0) begin
        longint dj, pi;
        dj = $time - t_ring[m];
        if (dj >= 4000) dj = 0;          // ring edge in the same time step
        pi = $time - t_isl[m];
        t_isl[m] = $time;
        case (JIT[c])
          0: if (dj != 0) bad_jit[m]++;
          1: if (dj % 62 != 0 || dj > 31 * 62) bad_jit[m]++;
          default: begin
            bit hit;
            hit = 1'b0;
            for (int k = 0; k < 8; k++)
              if (dj == longint'(150 * ((k == 0) ? 0 : (k == 1) ? 1 : (k == 2) ? 3 :
                                        (k == 3) ? 6 : (k == 4) ? 10 : (k == 5) ? 13 :
                                        (k == 6) ? 15 : 16))) begin
                hit = 1'b1;
                tri_seen[m][k]++;
              end
            if (!hit) bad_jit[m]++;
            // an unpaused period may shrink by at most 4 steps
            if (pi < longint'(2 * half_period_ps(mod_freq_10khz(TOPO[c], FSET[c], m))) - 600 - 20)
              bad_jit[m]++;
          end
        endcase
      end
    end

    initial begin
      cfg_done[c] = 1'b0;
      wait (running);
      forever begin
        bit all;
        #(50_000);
        all = 1'b1;
        for (int l = 0; l < NL; l++) if (rcvd[l] < 16'(MINW)) all = 1'b0;
        if (all) break;
      end
      cfg_done[c] = 1'b1;
      wait (!running);
      n_link_bad[c] = 0;
      n_words[c] = 0;
      for (int l = 0; l < NL; l++) begin
        n_words[c] += int'(rcvd[l]);
        if (errs[l] != 0 || sent[l] - rcvd[l] > 16'd2 || rcvd[l] < 16'(MINW)) begin
          n_link_bad[c]++;
          $display("config %0d link %0d: sent %0d received %0d errors %0d",
                   c, l, sent[l], rcvd[l], errs[l]);
        end
      end
      n_pause_tot[c] = 0;
      n_mod_bad[c] = 0;
      n_jit_bad[c] = 0;
      n_jit_vals[c] = 0;
      for (int m = 0; m < NM; m++) begin
        n_pause_tot[c] += n_pause[m];
        if (n_pause[m] == 0) n_mod_bad[c]++;
        n_jit_bad[c] += bad_jit[m];
        if (JIT[c] == 2) begin
          int v;
          v = 0;
          for (int k = 0; k < 8; k++) if (tri_seen[m][k] > 0) v++;
          if (v < 7) n_jit_bad[c]++;
          n_jit_vals[c] += v;
        end
      end
    end
  end

  initial begin
    bit all;
    #1 rst_n = 1'b0;
    #(50_000) rst_n = 1'b1;
    running = 1'b1;
    do begin
      #(50_000);
      all = 1'b1;
      for (int c = 0; c < NCFG; c++) if (!cfg_done[c]) all = 1'b0;
    end while (!all && $time < 500_000_000);
    #(300_000);          // drain
    running = 1'b0;
    #(1000);
    for (int c = 0; c < NCFG; c++) begin
      string name;
      name = $sformatf("config %0d (topology %0d, set %0d, scenario %0d, jitter %0d)",
                       c, TOPO[c], FSET[c], SCN[c], JIT[c]);
      $display("%s: %0d words, %0d pauses, %0d triangular delays seen",
               name, n_words[c], n_pause_tot[c], n_jit_vals[c]);
      chk(cfg_done[c], {name, ": every link reached the word target"});
      chk(n_link_bad[c] == 0, $sformatf("%s: %0d links lost, reordered or short", name, n_link_bad[c]));
      chk(n_mod_bad[c] == 0, $sformatf("%s: %0d modules never paused", name, n_mod_bad[c]));
      chk(n_jit_bad[c] == 0, $sformatf("%s: %0d island clock edges off the modulation", name, n_jit_bad[c]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
