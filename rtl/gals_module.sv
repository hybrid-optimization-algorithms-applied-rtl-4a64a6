// gals_module: one module of a GALS system - a locally synchronous island
// inside an asynchronous wrapper.
//
// The wrapper holds
//   * one demand-type output port controller (dport_out) per output link,
//   * one poll-type input port controller with data latch (pport_in) per
//     input link,
//   * a pausable local clock generator (local_clock_gen) with one
//     arbitration input per port, so that every port can pause the clock,
//   * optionally a clock modulator between the ring oscillator and the
//     island: JITTER = 1 a pseudo-random jitter generator (jitter_gen),
//     JITTER = 2 a triangular period modulator (tri_jitter_gen).
// The island (ls_island) is clocked by ls_clk: the modulated clock, or the
// ring oscillator clock lclk itself when JITTER = 0.
//
// Link signals: out_req/out_ack/out_data go to the receiving module's
// in_req/in_ack/in_data (four-phase, bundled data, req and ack active high).
//
// Clock: the ring runs at half period HALF_PS (its programmable delay line is
// set to the nearest value that gives it, taking the arbitration delays into
// account) and starts OFFSET_PS after reset is released. Any port pauses it
// by holding its request; paused reports that at least one port holds it.
//
// The composition (island, port controllers, local clock generator with
// per-port arbitration, demand-type outputs and poll-type inputs) follows the
// published wrapper structure; placing the jitter generator after the ring
// oscillator, and the delay and width defaults, are this design's choices.
module gals_module #(
  parameter int          N_OUT     = 1,
  parameter int          N_IN      = 1,
  parameter int          DATA_W    = 16,
  parameter int          CNT_W     = 16,
  parameter logic [gals_pkg::PAT_LEN*gals_pkg::MAX_PORTS-1:0] PATTERNS =
    {gals_pkg::MAX_PORTS{6'b110100}},
  parameter int          HALF_PS   = 10000,   // 50 MHz
  parameter int          OFFSET_PS = 0,
  parameter int          JITTER    = 1,       // 0 none, 1 pseudo-random, 2 triangular
  parameter int          N_TAPS    = 32,
  parameter int          DE_PS     = 62,
  parameter int          LFSR_W    = 15,
  parameter logic [31:0] SEED      = 32'h1,
  parameter int          GD_PS     = 50,
  localparam int OW = (N_OUT > 0) ? N_OUT : 1,
  localparam int IW = (N_IN  > 0) ? N_IN  : 1
) (
  input  logic              rst_n,
  // output links
  output logic [OW-1:0]     out_req,
  input  logic [OW-1:0]     out_ack,
  output logic [DATA_W-1:0] out_data [OW],
  // input links
  input  logic [IW-1:0]     in_req,
  output logic [IW-1:0]     in_ack,
  input  logic [DATA_W-1:0] in_data  [IW],
  // observation
  output logic              lclk,
  output logic              ls_clk,
  output logic              paused,
  output logic [CNT_W-1:0]  out_cnt    [OW],
  output logic [CNT_W-1:0]  out_merged [OW],
  output logic [CNT_W-1:0]  in_cnt     [IW],
  output logic [CNT_W-1:0]  in_err     [IW]
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N_PORTS  = N_OUT + N_IN;
  localparam int NP       = (N_PORTS > 0) ? N_PORTS : 1;
  localparam int CTRL_W   = 12;
  localparam int STEP_PS  = 10;
  localparam int MUTEX_PS = 20;
  localparam int C_PS     = 10;
  localparam int CTRL_RAW = (HALF_PS - MUTEX_PS - C_PS + STEP_PS / 2) / STEP_PS;
  localparam int CTRL     = (CTRL_RAW < 1) ? 1 :
                            (CTRL_RAW > (1 << CTRL_W) - 1) ? (1 << CTRL_W) - 1 : CTRL_RAW;

  logic [NP-1:0]       ri, ai;
  logic [OW-1:0]       o_pen, o_ta;
  logic [IW-1:0]       i_pen, i_ta;
  logic [DATA_W-1:0]   i_q [IW];

  // ------------------------------------------------------- local clock
  local_clock_gen #(
    .N_PORTS  (NP),
    .CTRL_W   (CTRL_W),
    .STEP_PS  (STEP_PS),
    .MUTEX_PS (MUTEX_PS),
    .C_PS     (C_PS),
    .OFFSET_PS(OFFSET_PS)
  ) u_clk (
    .rst_n     (rst_n),
    .delay_ctrl(CTRL_W'(CTRL)),
    .ri        (ri),
    .ai        (ai),
    .lclk      (lclk)
  );

  assign paused = |ai;

  if (JITTER == 1) begin : g_jit
    logic                      jit_dly;
    logic [$clog2(N_TAPS)-1:0] jit_sel;
    jitter_gen #(
      .N_TAPS(N_TAPS),
      .DE_PS (DE_PS),
      .LFSR_W(LFSR_W),
      .SEED  (SEED)
    ) u_jit (
      .rst_n  (rst_n),
      .en     (1'b1),
      .clk_in (lclk),
      .clk_out(ls_clk),
      .clk_dly(jit_dly),
      .sel    (jit_sel)
    );
  end else if (JITTER == 2) begin : g_tri
    logic [15:0] tri_sel;
    tri_jitter_gen u_tri (
      .rst_n  (rst_n),
      .clk_in (lclk),
      .clk_out(ls_clk),
      .sel    (tri_sel)
    );
  end else begin : g_nojit
    assign ls_clk = lclk;
  end

  // ------------------------------------------------------------ island
  ls_island #(
    .N_OUT   (N_OUT),
    .N_IN    (N_IN),
    .DATA_W  (DATA_W),
    .CNT_W   (CNT_W),
    .PATTERNS(PATTERNS)
  ) u_ls (
    .clk       (ls_clk),
    .rst_n     (rst_n),
    .out_pen   (o_pen),
    .out_ta    (o_ta),
    .out_data  (out_data),
    .out_cnt   (out_cnt),
    .out_merged(out_merged),
    .in_pen    (i_pen),
    .in_ta     (i_ta),
    .in_data   (i_q),
    .in_cnt    (in_cnt),
    .in_err    (in_err)
  );

  // ------------------------------------------------------------- ports
  for (genvar k = 0; k < OW; k++) begin : g_out
    if (k < N_OUT) begin : g_port
      dport_out #(.GD_PS(GD_PS)) u_port (
        .rst_n(rst_n),
        .pen  (o_pen[k]),
        .ta   (o_ta[k]),
        .ri   (ri[k]),
        .ai   (ai[k]),
        .req  (out_req[k]),
        .ack  (out_ack[k])
      );
    end else begin : g_none
      assign o_ta[k]    = 1'b0;
      assign out_req[k] = 1'b0;
    end
  end

  for (genvar j = 0; j < IW; j++) begin : g_in
    if (j < N_IN) begin : g_port
      pport_in #(.DATA_W(DATA_W), .GD_PS(GD_PS)) u_port (
        .rst_n  (rst_n),
        .pen    (i_pen[j]),
        .ta     (i_ta[j]),
        .ri     (ri[N_OUT + j]),
        .ai     (ai[N_OUT + j]),
        .req    (in_req[j]),
        .ack    (in_ack[j]),
        .data_in(in_data[j]),
        .data_q (i_q[j])
      );
    end else begin : g_none
      assign i_ta[j]   = 1'b0;
      assign in_ack[j] = 1'b0;
      assign i_q[j]    = '0;
    end
  end

  // a module without any port never pauses its clock
  if (N_PORTS == 0) begin : g_noport
    assign ri = '0;
  end

endmodule
