// ls_island: locally synchronous island of a GALS module model, reduced to the
// traffic it generates and consumes.
//
// Output side: every output port k owns a 6-bit transfer pattern, read one bit
// per clock cycle from the left (bit 5) to the right (bit 0) and then again
// from the left, by a cycle counter common to all ports. A '1' asks for a
// transfer in that cycle. A transfer is started by writing the next sequence
// number to out_data[k] and toggling out_pen[k]; it is finished when the port
// controller's out_ta[k] equals out_pen[k] again. A request that finds the
// port still busy is kept pending and served in the first cycle the port is
// free; requests arriving while one is already pending are merged with it and
// counted in out_merged.
//
// Input side: every input port j is kept armed. In the first cycle after
// reset the island toggles in_pen[j]; whenever in_ta[j] == in_pen[j] a word
// has arrived: it is compared with the next expected sequence number
// (mismatches counted in in_err[j]), counted in in_cnt[j], and the port is
// re-armed at once.
//
// All counters are CNT_W bits and wrap. clk is the module's local (possibly
// paused and jittered) clock; rst_n is an asynchronous active-low reset. The
// pattern walking follows the published traffic model; the pending/merge
// rule, the always-armed input side and the sequence-number payload are this
// design's choices.
module ls_island #(
  parameter int N_OUT  = 1,
  parameter int N_IN   = 1,
  parameter int DATA_W = 16,
  parameter int CNT_W  = 16,
  parameter logic [gals_pkg::PAT_LEN*gals_pkg::MAX_PORTS-1:0] PATTERNS =
    {gals_pkg::MAX_PORTS{6'b110100}},
  // array sizes, at least one element even for a side without ports
  localparam int OW = (N_OUT > 0) ? N_OUT : 1,
  localparam int IW = (N_IN  > 0) ? N_IN  : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // output ports
  output logic [OW-1:0]     out_pen,
  input  logic [OW-1:0]     out_ta,
  output logic [DATA_W-1:0] out_data   [OW],
  output logic [CNT_W-1:0]  out_cnt    [OW],
  output logic [CNT_W-1:0]  out_merged [OW],
  // input ports
  output logic [IW-1:0]     in_pen,
  input  logic [IW-1:0]     in_ta,
  input  logic [DATA_W-1:0] in_data    [IW],
  output logic [CNT_W-1:0]  in_cnt     [IW],
  output logic [CNT_W-1:0]  in_err     [IW]
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int PL = gals_pkg::PAT_LEN;

  logic [$clog2(PL)-1:0] phase;          // position in the 6-cycle pattern

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          phase <= '0;
    else if (phase == $bits(phase)'(PL - 1)) phase <= '0;
    else                                 phase <= phase + 1'b1;
  end

  // ------------------------------------------------------------ outputs
  for (genvar k = 0; k < OW; k++) begin : g_out
    if (k < N_OUT) begin : g_port
      localparam gals_pkg::pattern_t PAT = PATTERNS[PL*k +: PL];
      logic want;
      logic pending;
      logic idle;

      assign want = PAT[PL - 1 - int'(phase)];
      assign idle = (out_ta[k] == out_pen[k]);

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          out_pen[k]    <= 1'b0;
          out_data[k]   <= '0;
          out_cnt[k]    <= '0;
          out_merged[k] <= '0;
          pending       <= 1'b0;
        end else if ((want || pending) && idle) begin
          out_pen[k]  <= ~out_pen[k];
          out_data[k] <= DATA_W'(out_cnt[k]);
          out_cnt[k]  <= out_cnt[k] + 1'b1;
          pending     <= 1'b0;
        end else if (want) begin
          if (pending) out_merged[k] <= out_merged[k] + 1'b1;
          pending <= 1'b1;
        end
      end
    end else begin : g_none
      assign out_pen[k]    = 1'b0;
      assign out_data[k]   = '0;
      assign out_cnt[k]    = '0;
      assign out_merged[k] = '0;
    end
  end

  // ------------------------------------------------------------- inputs
  for (genvar j = 0; j < IW; j++) begin : g_in
    if (j < N_IN) begin : g_port
      logic armed;

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          in_pen[j] <= 1'b0;
          in_cnt[j] <= '0;
          in_err[j] <= '0;
          armed     <= 1'b0;
        end else if (!armed) begin
          in_pen[j] <= ~in_pen[j];
          armed     <= 1'b1;
        end else if (in_ta[j] == in_pen[j]) begin
          if (in_data[j] != DATA_W'(in_cnt[j])) in_err[j] <= in_err[j] + 1'b1;
          in_cnt[j] <= in_cnt[j] + 1'b1;
          in_pen[j] <= ~in_pen[j];
        end
      end
    end else begin : g_none
      assign in_pen[j] = 1'b0;
      assign in_cnt[j] = '0;
      assign in_err[j] = '0;
    end
  end

endmodule
