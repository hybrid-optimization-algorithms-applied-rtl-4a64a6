// gals_system: a complete GALS system model - several GALS modules, each with
// its own pausable (and optionally jittered) local clock, exchanging data over
// four-phase bundled-data links between a demand-type output port and a
// poll-type input port.
//
// TOPOLOGY selects the module count and the links (gals_pkg):
//   TOPO_P2P4    4 modules in a line, 1 -> 2 -> 3 -> 4
//   TOPO_STAR4   modules 1 and 2 send to centre 4, centre 4 sends to 3
//   TOPO_MESH4   a link between every pair, from the lower to the higher number
//   TOPO_STAR10  centre 10 sends to modules 1-4, modules 5-9 send to centre 10
// FREQ_SET selects the set of module clock frequencies (1 plesiochronous,
// 2 medium spread, 3 high spread; 4 and 5 for the 10-module star with a fast
// or a slow centre). SCENARIO selects the transfer patterns of every link
// (A low, B medium, C burst). JITTER gives every module a clock modulator:
// 0 none, 1 pseudo-random jitter, 2 triangular period modulation.
// JIT_DE_PS is the step of the pseudo-random jitter: its 32 taps shift an edge
// by up to 31 steps (1.92 ns, about 10 % of a 50 MHz period, at 62 ps).
// Module m starts its ring oscillator m * OFFSET_STEP_PS after reset so the
// modules do not start in phase.
//
// Ports: rst_n (asynchronous, active low) and, per module, its ring clock, its
// island clock and whether its clock is paused; per link the number of words
// sent, received and received out of sequence, and how many transfer requests
// had to be merged because the link was still busy. Links are numbered as in
// gals_pkg. The module clocks are what an EMI analysis of the system needs:
// every island edge is a burst of supply current.
//
// The topologies, frequency sets and traffic patterns are the published
// ones; the link directions of star and mesh, the centre of the 4-module star
// and the start offsets are this design's choices.
module gals_system #(
  parameter gals_pkg::topology_e TOPOLOGY       = gals_pkg::TOPO_P2P4,
  parameter int                  FREQ_SET       = 1,
  parameter gals_pkg::scenario_e SCENARIO       = gals_pkg::SCEN_B,
  parameter int                  JITTER         = 1,
  parameter int                  JIT_DE_PS      = 62,
  parameter int                  OFFSET_STEP_PS = 5000,
  parameter int                  DATA_W         = 16,
  parameter int                  CNT_W          = 16,
  localparam int NM = gals_pkg::topo_mods(TOPOLOGY),
  localparam int NL = gals_pkg::topo_links(TOPOLOGY)
) (
  input  logic             rst_n,
  output logic [NM-1:0]    mod_lclk,
  output logic [NM-1:0]    mod_ls_clk,
  output logic [NM-1:0]    mod_paused,
  output logic [CNT_W-1:0] link_sent   [NL],
  output logic [CNT_W-1:0] link_merged [NL],
  output logic [CNT_W-1:0] link_rcvd   [NL],
  output logic [CNT_W-1:0] link_errs   [NL]
);
  timeunit 1ps;
  timeprecision 1ps;

  import gals_pkg::*;

  logic [NL-1:0]     req, ack;
  logic [DATA_W-1:0] data [NL];

  for (genvar m = 0; m < NM; m++) begin : g_mod
    localparam int NO   = mod_ports(TOPOLOGY, m, 1'b1);
    localparam int NI   = mod_ports(TOPOLOGY, m, 1'b0);
    localparam int OW   = (NO > 0) ? NO : 1;
    localparam int IW   = (NI > 0) ? NI : 1;
    localparam int HALF = half_period_ps(mod_freq_10khz(TOPOLOGY, FREQ_SET, m));

    logic [OW-1:0]     o_req, o_ack;
    logic [DATA_W-1:0] o_data [OW];
    logic [IW-1:0]     i_req, i_ack;
    logic [DATA_W-1:0] i_data [IW];
    logic [CNT_W-1:0]  o_cnt [OW], o_mrg [OW], i_cnt [IW], i_err [IW];

    gals_module #(
      .N_OUT    (NO),
      .N_IN     (NI),
      .DATA_W   (DATA_W),
      .CNT_W    (CNT_W),
      .PATTERNS (mod_patterns(TOPOLOGY, SCENARIO, m)),
      .HALF_PS  (HALF),
      .OFFSET_PS(m * OFFSET_STEP_PS),
      .JITTER   (JITTER),
      .DE_PS    (JIT_DE_PS),
      .SEED     (32'h1 + 32'(m) * 32'h0F31)
    ) u_mod (
      .rst_n     (rst_n),
      .out_req   (o_req),
      .out_ack   (o_ack),
      .out_data  (o_data),
      .in_req    (i_req),
      .in_ack    (i_ack),
      .in_data   (i_data),
      .lclk      (mod_lclk[m]),
      .ls_clk    (mod_ls_clk[m]),
      .paused    (mod_paused[m]),
      .out_cnt   (o_cnt),
      .out_merged(o_mrg),
      .in_cnt    (i_cnt),
      .in_err    (i_err)
    );

    for (genvar p = 0; p < OW; p++) begin : g_o
      localparam int L = port_link(TOPOLOGY, m, p, 1'b1);
      if (L >= 0) begin : g_link
        assign req[L]         = o_req[p];
        assign data[L]        = o_data[p];
        assign o_ack[p]       = ack[L];
        assign link_sent[L]   = o_cnt[p];
        assign link_merged[L] = o_mrg[p];
      end else begin : g_open
        assign o_ack[p] = 1'b0;
      end
    end

    for (genvar p = 0; p < IW; p++) begin : g_i
      localparam int L = port_link(TOPOLOGY, m, p, 1'b0);
      if (L >= 0) begin : g_link
        assign i_req[p]     = req[L];
        assign i_data[p]    = data[L];
        assign ack[L]       = i_ack[p];
        assign link_rcvd[L] = i_cnt[p];
        assign link_errs[L] = i_err[p];
      end else begin : g_open
        assign i_req[p]  = 1'b0;
        assign i_data[p] = '0;
      end
    end
  end

endmodule
