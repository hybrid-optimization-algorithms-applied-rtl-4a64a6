// lfsr: maximal-length linear feedback shift register, the pseudo-noise source
// of the jitter generator.
//
// Bit numbering follows the usual drawing: state[0] is register 1 (the input
// end), state[W-1] is register W (the output end); the register shifts from 1
// towards W. The feedback polynomial comes from gals_pkg::lfsr_taps(W), the
// standard table of primitive polynomials for 4..19 bits.
//   GALOIS = 0  Fibonacci form: the new bit of register 1 is the XOR of the
//               registers named by the polynomial terms.
//   GALOIS = 1  Galois form: the output bit (register W) re-enters register 1
//               and is XORed into the register after each tap position.
// Both forms run through all 2^W - 1 non-zero states. The all-zero state is
// forbidden, so a zero SEED is rejected at elaboration time.
//
// Interface: one step per rising edge of clk while en is high; rst_n is an
// asynchronous active-low reset that loads SEED. q is the register state.
module lfsr #(
  parameter int          W      = 15,
  parameter logic [31:0] SEED   = 32'h1,
  parameter bit          GALOIS = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [31:0] TAPS = gals_pkg::lfsr_taps(W);
  localparam logic [W-1:0] SEED_W = SEED[W-1:0];

  if (W < gals_pkg::LFSR_MIN_W || W > gals_pkg::LFSR_MAX_W) begin : g_bad_width
    $error("lfsr: W must be between 4 and 19");
  end
  if (SEED_W == '0) begin : g_bad_seed
    $error("lfsr: the all-zero seed is forbidden");
  end

  logic [W-1:0] nxt;

  always_comb begin
    if (!GALOIS) begin
      logic fb;
      fb = 1'b0;
      for (int t = 0; t < W; t++)
        if (TAPS[t]) fb ^= q[t];
      nxt = {q[W-2:0], fb};
    end else begin
      logic o;
      o = q[W-1];
      nxt[0] = o;
      // register t+1 receives register t, toggled when x^(t+1) is a term
      for (int t = 1; t < W; t++)
        nxt[t] = q[t-1] ^ (o & TAPS[t-1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= SEED_W;
    else if (en) q <= nxt;
  end

endmodule
