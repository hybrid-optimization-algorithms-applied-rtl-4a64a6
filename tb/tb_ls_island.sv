// tb_ls_island: self-checking test of the traffic-generating island with two
// output and two input ports on a free-running 50 MHz clock.
// The testbench plays the four port controllers. An output controller
// finishes a transfer (ta := pen) a random 0..MAXD[k] falling clock edges
// after it was started; an input controller delivers a word (data, then
// ta := pen) a random number of falling edges after being armed, and now and
// then deliberately delivers a wrong sequence number.
// A cycle-level reference, written from the stated port rules, predicts for
// every rising edge whether each output port starts a transfer, what word it
// sends and when a request is merged; it also predicts the input counts and
// the number of sequence errors. The outputs use the pattern 110100 (an
// immediately answering port, so its transfers follow the pattern exactly)
// and 111111 (a slow port, so requests pend and merge).
module tb_ls_island;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int NO = 2, NI = 2, DW = 16, CW = 16;
  localparam logic [5:0] P0 = 6'b110100;
  localparam logic [5:0] P1 = 6'b111111;
  localparam int MAXD [NO] = '{0, 3};
  localparam int NCYC = 3000;

  int checks = 0;
  int failures = 0;

  logic          clk = 1'b0, rst_n = 1'b1;
  logic [NO-1:0] out_pen, out_ta;
  logic [DW-1:0] out_data [NO];
  logic [CW-1:0] out_cnt [NO], out_merged [NO];
  logic [NI-1:0] in_pen, in_ta;
  logic [DW-1:0] in_data [NI];
  logic [CW-1:0] in_cnt [NI], in_err [NI];

  ls_island #(
    .N_OUT(NO), .N_IN(NI), .DATA_W(DW), .CNT_W(CW),
    .PATTERNS({{(gals_pkg::MAX_PORTS - 2){6'b000000}}, P1, P0})
  ) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  always #10000 clk = ~clk;

  initial begin : watchdog
    #(64'd20000 * (NCYC + 200));
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------- port controller models
  bit run = 1'b0;
  for (genvar k = 0; k < NO; k++) begin : g_oc
    always begin
      int d;
      @(negedge clk);
      if (run && out_pen[k] != out_ta[k]) begin
        d = (MAXD[k] == 0) ? 0 : int'($urandom_range(MAXD[k], 0));
        repeat (d) @(negedge clk);
        out_ta[k] = out_pen[k];
      end
    end
  end

  int in_sent [NI], in_bad [NI];
  for (genvar j = 0; j < NI; j++) begin : g_ic
    always begin
      int d;
      @(negedge clk);
      if (run && in_pen[j] != in_ta[j]) begin
        d = int'($urandom_range(2, 0));
        repeat (d) @(negedge clk);
        if ($urandom_range(19, 0) == 0) begin
          in_data[j] = DW'(in_sent[j] + 16'h5a5);   // wrong sequence number
          in_bad[j]++;
        end else begin
          in_data[j] = DW'(in_sent[j]);
        end
        in_sent[j]++;
        in_ta[j] = in_pen[j];
      end
    end
  end

  // ---------------------------------------------------- reference model
  int  cyc;
  bit  r_pend [NO];
  int  r_cnt [NO], r_mrg [NO], n_pend_served [NO];
  int  bad_start [NO], bad_data [NO];
  logic [NO-1:0] pen_before;
  logic [CW-1:0] out_cnt_before [NO];

  always @(posedge clk) if (run) begin
    logic [5:0] pat;
    bit want, idle, expect_start;
    pen_before = out_pen;
    for (int k = 0; k < NO; k++) out_cnt_before[k] = CW'(r_cnt[k]);
    for (int k = 0; k < NO; k++) begin
      pat  = (k == 0) ? P0 : P1;
      want = pat[5 - (cyc % 6)];
      idle = (out_ta[k] == out_pen[k]);
      expect_start = (want || r_pend[k]) && idle;
      if (expect_start) begin
        if (r_pend[k]) n_pend_served[k]++;
        r_cnt[k]++;
        r_pend[k] = 1'b0;
      end else if (want) begin
        if (r_pend[k]) r_mrg[k]++;
        r_pend[k] = 1'b1;
      end
    end
    cyc++;
    #1;
    for (int k = 0; k < NO; k++) begin
      if ((out_pen[k] != pen_before[k]) != (CW'(r_cnt[k]) != out_cnt_before[k])) bad_start[k]++;
      if (out_cnt[k] != CW'(r_cnt[k])) bad_start[k]++;
      if (out_pen[k] != pen_before[k] && out_data[k] != DW'(r_cnt[k] - 1)) bad_data[k]++;
      if (out_merged[k] != CW'(r_mrg[k])) bad_start[k]++;
    end
  end

  initial begin
    for (int k = 0; k < NO; k++) begin
      r_pend[k] = 0; r_cnt[k] = 0; r_mrg[k] = 0; n_pend_served[k] = 0;
      bad_start[k] = 0; bad_data[k] = 0;
    end
    for (int j = 0; j < NI; j++) begin
      in_sent[j] = 0; in_bad[j] = 0; in_data[j] = '0;
    end
    out_ta = '0;
    in_ta  = '0;
    cyc    = 0;
    #1 rst_n = 1'b0;
    @(negedge clk);
    @(negedge clk);
    chk(out_pen == '0 && in_pen == '0, "ports idle in reset");
    chk(out_cnt[0] == '0 && out_cnt[1] == '0 && in_cnt[0] == '0 && in_err[1] == '0,
        "counters cleared in reset");
    rst_n = 1'b1;
    run   = 1'b1;
    @(posedge clk);  // first edge after reset
    #2;
    chk(in_pen == 2'b11, "inputs armed in the first cycle");
    chk(out_pen == 2'b11, "both patterns start with a request");
    repeat (NCYC) @(posedge clk);
    @(negedge clk);
    run = 1'b0;
    for (int k = 0; k < NO; k++) begin
      chk(bad_start[k] == 0,
          $sformatf("port %0d starts/counts follow the reference (%0d wrong)", k, bad_start[k]));
      chk(bad_data[k] == 0,
          $sformatf("port %0d sends sequence numbers (%0d wrong)", k, bad_data[k]));
    end
    begin
      int ones;
      ones = 0;
      for (int c = 0; c < cyc; c++) ones += int'(P0[5 - (c % 6)]);
      chk(int'(out_cnt[0]) == ones,
          $sformatf("port 0 sent %0d in %0d cycles, pattern asks %0d", out_cnt[0], cyc, ones));
    end
    chk(r_mrg[1] > 0, $sformatf("port 1 merged %0d requests", r_mrg[1]));
    chk(n_pend_served[1] > 0 && int'(out_cnt[1]) < cyc,
        $sformatf("slow port served %0d pending requests", n_pend_served[1]));
    chk(r_mrg[0] == 0 && out_merged[0] == '0, "immediately answering port never merges");
    for (int j = 0; j < NI; j++) begin
      // the last word may still be under way
      chk(int'(in_cnt[j]) == in_sent[j] || int'(in_cnt[j]) == in_sent[j] - 1,
          $sformatf("input %0d counted %0d of %0d", j, in_cnt[j], in_sent[j]));
      chk(in_bad[j] > 0 && int'(in_err[j]) >= in_bad[j] - 1 && int'(in_err[j]) <= in_bad[j],
          $sformatf("input %0d errors %0d, injected %0d", j, in_err[j], in_bad[j]));
    end
    $display("port 0 sent %0d, port 1 sent %0d merged %0d, inputs %0d/%0d words",
             r_cnt[0], r_cnt[1], r_mrg[1], in_cnt[0], in_cnt[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
