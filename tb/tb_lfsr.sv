// tb_lfsr: self-checking test of lfsr.
//
// Instantiates Fibonacci and Galois registers of several lengths and checks
//   * that each one returns to its seed after exactly 2^W - 1 steps and never
//     passes through the all-zero state (maximal length),
//   * for the Fibonacci form, every step against a reference model whose tap
//     lists are written out here independently of the package table,
//   * that en = 0 holds the state.
module tb_lfsr;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;

  always #500 clk = ~clk;

  logic [3:0]  f4;
  logic [4:0]  f5;
  logic [7:0]  f8;
  logic [14:0] f15;
  logic [15:0] f16;
  logic [3:0]  g4;
  logic [7:0]  g8;
  logic [14:0] g15;
  logic [15:0] g16;

  lfsr #(.W(4),  .SEED(32'h1),     .GALOIS(1'b0)) u_f4  (.clk, .rst_n, .en, .q(f4));
  lfsr #(.W(5),  .SEED(32'h3),     .GALOIS(1'b0)) u_f5  (.clk, .rst_n, .en, .q(f5));
  lfsr #(.W(8),  .SEED(32'h5A),    .GALOIS(1'b0)) u_f8  (.clk, .rst_n, .en, .q(f8));
  lfsr #(.W(15), .SEED(32'h1234),  .GALOIS(1'b0)) u_f15 (.clk, .rst_n, .en, .q(f15));
  lfsr #(.W(16), .SEED(32'hACE1),  .GALOIS(1'b0)) u_f16 (.clk, .rst_n, .en, .q(f16));
  lfsr #(.W(4),  .SEED(32'h9),     .GALOIS(1'b1)) u_g4  (.clk, .rst_n, .en, .q(g4));
  lfsr #(.W(8),  .SEED(32'h1),     .GALOIS(1'b1)) u_g8  (.clk, .rst_n, .en, .q(g8));
  lfsr #(.W(15), .SEED(32'h7FFF),  .GALOIS(1'b1)) u_g15 (.clk, .rst_n, .en, .q(g15));
  lfsr #(.W(16), .SEED(32'hACE1),  .GALOIS(1'b1)) u_g16 (.clk, .rst_n, .en, .q(g16));

  // reference Fibonacci step: taps given as register numbers 1..W
  function automatic logic [31:0] fib_ref(input logic [31:0] s, input int w,
                                          input int t0, input int t1,
                                          input int t2, input int t3);
    logic fb;
    fb = s[t0-1] ^ s[t1-1];
    if (t2 > 0) fb ^= s[t2-1];
    if (t3 > 0) fb ^= s[t3-1];
    return ((s << 1) | {31'd0, fb}) & ((32'd1 << w) - 1);
  endfunction

  logic [31:0] r4, r5, r8, r15, r16;
  int per_f4, per_f5, per_f8, per_f15, per_f16, per_g4, per_g8, per_g15, per_g16;
  bit zero_seen;
  int step_err;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #(70_000 * 1000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    per_f4 = 0; per_f5 = 0; per_f8 = 0; per_f15 = 0; per_f16 = 0;
    per_g4 = 0; per_g8 = 0; per_g15 = 0; per_g16 = 0;
    zero_seen = 1'b0;
    step_err = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(f16 == 16'hACE1 && g15 == 15'h7FFF && f5 == 5'd3, "seed loaded by reset");
    // en low holds the state
    repeat (2) @(negedge clk);
    chk(f16 == 16'hACE1 && g4 == 4'h9, "state held while en is low");
    r4 = 32'(f4); r5 = 32'(f5); r8 = 32'(f8); r15 = 32'(f15); r16 = 32'(f16);
    en = 1'b1;
    for (int i = 1; i <= 65535; i++) begin
      @(negedge clk);
      r4  = fib_ref(r4, 4, 4, 3, 0, 0);
      r5  = fib_ref(r5, 5, 5, 3, 0, 0);
      r8  = fib_ref(r8, 8, 8, 6, 5, 4);
      r15 = fib_ref(r15, 15, 15, 14, 0, 0);
      r16 = fib_ref(r16, 16, 16, 14, 13, 11);
      if (r4 != 32'(f4) || r5 != 32'(f5) || r8 != 32'(f8) ||
          r15 != 32'(f15) || r16 != 32'(f16)) step_err++;
      if (f4 == 0 || f5 == 0 || f8 == 0 || f15 == 0 || f16 == 0 ||
          g4 == 0 || g8 == 0 || g15 == 0 || g16 == 0) zero_seen = 1'b1;
      if (per_f4  == 0 && f4  == 4'h1)     per_f4  = i;
      if (per_f5  == 0 && f5  == 5'h3)     per_f5  = i;
      if (per_f8  == 0 && f8  == 8'h5A)    per_f8  = i;
      if (per_f15 == 0 && f15 == 15'h1234) per_f15 = i;
      if (per_f16 == 0 && f16 == 16'hACE1) per_f16 = i;
      if (per_g4  == 0 && g4  == 4'h9)     per_g4  = i;
      if (per_g8  == 0 && g8  == 8'h1)     per_g8  = i;
      if (per_g15 == 0 && g15 == 15'h7FFF) per_g15 = i;
      if (per_g16 == 0 && g16 == 16'hACE1) per_g16 = i;
    end
    chk(step_err == 0, $sformatf("Fibonacci steps match reference (%0d mismatches)", step_err));
    chk(!zero_seen, "all-zero state never reached");
    chk(per_f4  == 15,    $sformatf("Fibonacci  4-bit period %0d", per_f4));
    chk(per_f5  == 31,    $sformatf("Fibonacci  5-bit period %0d", per_f5));
    chk(per_f8  == 255,   $sformatf("Fibonacci  8-bit period %0d", per_f8));
    chk(per_f15 == 32767, $sformatf("Fibonacci 15-bit period %0d", per_f15));
    chk(per_f16 == 65535, $sformatf("Fibonacci 16-bit period %0d", per_f16));
    chk(per_g4  == 15,    $sformatf("Galois  4-bit period %0d", per_g4));
    chk(per_g8  == 255,   $sformatf("Galois  8-bit period %0d", per_g8));
    chk(per_g15 == 32767, $sformatf("Galois 15-bit period %0d", per_g15));
    chk(per_g16 == 65535, $sformatf("Galois 16-bit period %0d", per_g16));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
