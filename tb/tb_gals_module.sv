// tb_gals_module: self-checking test of one GALS module (one demand-type
// output link, one poll-type input link, pausable 50 MHz ring clock, jitter
// generator on) with the testbench acting as both neighbours.
//   * Receiving neighbour: answers each request after a random delay, now
//     and then a long one (300 ns), checks that the words arrive as
//     consecutive sequence numbers and that the module's ring clock stands
//     still (held high, paused reported) while it withholds the acknowledge.
//   * Sending neighbour: sends consecutive sequence numbers with random gaps,
//     changes the data bus right after each acknowledge (the port must hold
//     its latched copy), and now and then keeps req high for 300 ns after the
//     acknowledge, which must also hold the clock.
// It also checks the unpaused ring period (20 ns), that the island clock
// lags the ring clock by at most 31 * 62 ps, that every sent word is counted
// without sequence errors, and that the output link carries the number of
// words the pattern 110100 asks for (3 in 6 cycles) within the merge losses.
module tb_gals_module;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int DW = 16, CW = 16;
  localparam int NWORDS = 300;
  localparam int LONG = 300_000;

  int checks = 0;
  int failures = 0;

  logic          rst_n = 1'b1;
  logic [0:0]    out_req, out_ack, in_req, in_ack;
  logic [DW-1:0] out_data [1], in_data [1];
  logic          lclk, ls_clk, paused;
  logic [CW-1:0] out_cnt [1], out_merged [1], in_cnt [1], in_err [1];

  gals_module #(.N_OUT(1), .N_IN(1)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(64'd100_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------- clock observers
  int     n_lclk_edges = 0;
  longint t_last_rise = 0, min_per = 64'd1 << 40, jit_max = 0;
  int     n_per = 0;
  always @(lclk) n_lclk_edges++;
  always @(posedge lclk) begin
    if (t_last_rise > 0) begin
      if ($time - t_last_rise < min_per) min_per = $time - t_last_rise;
      n_per++;
    end
    t_last_rise = $time;
  end
  always @(posedge ls_clk) if (t_last_rise > 0) begin
    longint dj;
    dj = $time - t_last_rise;
    if (dj < 15000 && dj > jit_max) jit_max = dj;
  end

  // a window in which the ring clock must stand still
  int n_hold = 0, bad_hold = 0;
  task automatic hold_window(input longint len);
    int e0;
    #(5000);                 // the pause takes effect within a cycle
    e0 = n_lclk_edges;
    if (!paused) bad_hold++;
    #(len - 5000);
    if (n_lclk_edges != e0 || lclk != 1'b1 || !paused) bad_hold++;
    n_hold++;
  endtask

  // ------------------------------------------------ receiving neighbour
  int rx_words = 0, rx_bad = 0, rx_long = 0;
  initial begin
    out_ack = '0;
    forever begin
      @(posedge out_req[0]);
      if (rst_n) begin
        if ($urandom_range(9, 0) == 0) begin
          hold_window(LONG);
          rx_long++;
        end else begin
          #(int'($urandom_range(30_000, 0)));
        end
        if (out_data[0] != DW'(rx_words)) rx_bad++;
        rx_words++;
        out_ack[0] = 1'b1;
        wait (!out_req[0]);
        #(int'($urandom_range(5_000, 100)));
        out_ack[0] = 1'b0;
      end
    end
  end

  // -------------------------------------------------- sending neighbour
  int tx_words = 0, tx_long = 0;
  bit tx_done = 1'b0;
  initial begin
    in_req = '0;
    in_data[0] = '0;
    @(posedge rst_n);
    #(20_000);
    for (int w = 0; w < NWORDS; w++) begin
      #(int'($urandom_range(60_000, 1_000)));
      in_data[0] = DW'(w);
      #(200);
      in_req[0] = 1'b1;
      wait (in_ack[0]);
      #(200);
      in_data[0] = ~DW'(w);        // bus no longer valid
      if ($urandom_range(9, 0) == 0) begin
        hold_window(LONG);
        tx_long++;
      end else begin
        #(int'($urandom_range(3_000, 100)));
      end
      in_req[0] = 1'b0;
      wait (!in_ack[0]);
      tx_words++;
    end
    tx_done = 1'b1;
  end

  initial begin
    int cyc0;
    #1 rst_n = 1'b0;
    #(30_000);
    chk(lclk == 1'b1 && !paused && out_req == '0 && in_ack == '0,
        "reset: clock held high, links idle");
    rst_n = 1'b1;
    wait (tx_done);
    #(200_000);
    chk(in_err[0] == '0, $sformatf("input sequence errors %0d", in_err[0]));
    chk(int'(in_cnt[0]) == tx_words,
        $sformatf("input counted %0d of %0d words", in_cnt[0], tx_words));
    chk(rx_bad == 0, $sformatf("output words out of sequence %0d", rx_bad));
    chk(int'(out_cnt[0]) - rx_words <= 1 && int'(out_cnt[0]) >= rx_words,
        $sformatf("output sent %0d, received %0d", out_cnt[0], rx_words));
    chk(rx_words + int'(out_merged[0]) <= n_per / 2 + 4 &&
        rx_words + int'(out_merged[0]) >= n_per / 2 - 50,
        $sformatf("%0d words + %0d merged in %0d cycles (pattern asks half)",
                  rx_words, out_merged[0], n_per));
    chk(min_per >= 20000 - 20 && min_per <= 20000 + 20,
        $sformatf("unpaused ring period %0d ps", min_per));
    chk(jit_max > 0 && jit_max <= 31 * 62 + 20, $sformatf("island clock lag up to %0d ps", jit_max));
    chk(rx_long > 0 && tx_long > 0, $sformatf("long holds: output %0d, input %0d", rx_long, tx_long));
    chk(bad_hold == 0, $sformatf("clock held in %0d of %0d hold windows", n_hold - bad_hold, n_hold));
    $display("%0d words in, %0d out (%0d merged), %0d ring periods, %0d hold windows",
             tx_words, rx_words, out_merged[0], n_per, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
