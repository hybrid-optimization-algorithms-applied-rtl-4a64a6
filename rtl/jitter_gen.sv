// jitter_gen: behavioural model of a pseudo-random clock jitter generator.
// Behavioural model: the delay elements are simulated transport delays; the
// LFSR that drives the selection is the synthesizable lfsr module.
//
// The input clock runs through a chain of N_TAPS-1 equal delay elements of
// DE_PS each, giving taps 0 (undelayed) .. N_TAPS-1. A multiplexer passes one
// tap to clk_out. The tap number is the low log2(N_TAPS) bits of an LFSR_W-bit
// LFSR. One more delay element after the last tap gives clk_dly, the most
// delayed copy of the clock; the LFSR steps on its falling edge, a moment at
// which every tap is low (high time longer than the total delay), so the
// multiplexer never switches during a pulse and clk_out has no glitches.
//
// Each rising edge of clk_out is thus moved later by sel * DE_PS, a fresh
// pseudo-random amount every cycle, while the high time stays the same; the
// average frequency is unchanged. The maximum added delay is
// (N_TAPS-1) * DE_PS. With en low the selection is frozen; with rst_n low the
// LFSR is reloaded with SEED.
//
// Defaults: a 15-bit LFSR and 32 delay taps, the jitter setting of the GALS
// system model; DE_PS = 62 ps keeps the maximum shift near 10 % of a 50 MHz
// period (own derivation). The structure (delay chain, multiplexer, LFSR
// clocked from an extra-delayed clock) follows the sample jitter generator.
module jitter_gen #(
  parameter int          N_TAPS = 32,
  parameter int          DE_PS  = 62,
  parameter int          LFSR_W = 15,
  parameter logic [31:0] SEED   = 32'h1
) (
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      clk_in,
  output logic                      clk_out,
  output logic                      clk_dly,
  output logic [$clog2(N_TAPS)-1:0] sel
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int SEL_W = $clog2(N_TAPS);

  logic              dl [1:N_TAPS-1];  // dl[i]: clock delayed by i elements
  logic              lfsr_clk;
  logic [LFSR_W-1:0] pn;

  for (genvar i = 1; i < N_TAPS; i++) begin : g_chain
    if (i == 1) begin : g_first
      initial dl[i] = 1'b0;
      always @(clk_in) dl[i] <= #(DE_PS) clk_in;
    end else begin : g_next
      initial dl[i] = 1'b0;
      always @(dl[i-1]) dl[i] <= #(DE_PS) dl[i-1];
    end
  end

  initial clk_dly = 1'b0;
  always @(dl[N_TAPS-1]) clk_dly <= #(DE_PS) dl[N_TAPS-1];

  assign lfsr_clk = ~clk_dly;

  lfsr #(.W(LFSR_W), .SEED(SEED), .GALOIS(1'b0)) u_png (
    .clk  (lfsr_clk),
    .rst_n(rst_n),
    .en   (en),
    .q    (pn)
  );

  assign sel = pn[SEL_W-1:0];

  always_comb clk_out = (sel == '0) ? clk_in : dl[sel];

endmodule
