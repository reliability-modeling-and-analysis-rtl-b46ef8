`timescale 1ps/1ps
// Reliability-enhanced two-phase clockless wave pipeline core.
//
// A combinational core is cut into STAGES stages. No clock is used: the data
// source sends one datawave per request level, so every edge of the request
// signal (rising or falling) starts a new datawave, and several datawaves are
// in flight inside a stage at the same time. Between stages, and at the
// primary input and output, there are STAGES+1 switch boundaries. Boundary b
// has primary polarity FIRST_POL for even b and the opposite for odd b
// (n, p, n, p, ... by default), so a datawave sent on a high level passes the
// n-switches and is latched at the p-switches, and one sent on a low level the
// other way round.
//
// The request travels with its datawave: every stage has a request delay line
// of DS_PS picoseconds (d_s = d_max + alpha of that stage), so the request
// level reaches a boundary just after the slowest bit of its datawave.
//
// Two reliability measures are built in:
//   * Redundant request lines. The request is sent on NREQ lines. At each
//     boundary a req_mask combines them, OR in front of n-switches and AND in
//     front of p-switches, so a glitch on a single line is masked.
//   * Bipolar switches (BIPOLAR = 1). Each boundary whose primary polarity is
//     n becomes an np-switch and each p boundary a pn-switch, giving the
//     arrangement np-pn-np-... (FIRST_POL = SW_N) or pn-np-pn-... (SW_P).
//     The second switch of a pair is steered by an affiliate request whose
//     level is stretched by EXT_PS; it latches the datawave a second time,
//     which keeps early bits of the following datawave out of the next stage. With BIPOLAR = 0 each boundary is a single switch (the
//     original two-phase pipeline), which is kept for comparison.
//
// The stage logic belongs to the embedded core and is not part of this
// module: stage_in[k] is the datawave entering stage k (the output of
// boundary k), and stage_out[k] must return that stage's combinational result.
//
// Interface and timing: data_in must be valid a little before each edge of
// req_in (all NREQ lines carry the same request). req_out is req_in delayed by
// STAGES*DS_PS; data_out holds datawave j from the edge of req_out that
// belongs to datawave j for one request level. The throughput is one datawave
// per request level; correct operation needs the request level length L to
// cover the data skew of a stage plus the margin.
//
// Polarity order, request masking gates and the bipolar arrangement follow the
// published design; the per-stage request delay lines, the derivation of the affiliate
// requests from the masked primary request and all numeric defaults are this
// design's choices. The switches are latches by design.
module cwp_core
  import cwp_pkg::*;
#(
  parameter int unsigned WIDTH     = 36,
  parameter int unsigned STAGES    = 3,
  parameter int unsigned NREQ      = 2,
  parameter bit          BIPOLAR   = 1'b1,
  parameter mask_mode_e  MASK_MODE = MASK_AND_OR,
  parameter sw_pol_e     FIRST_POL = SW_N,
  parameter int unsigned DS_PS     = 170,
  parameter int unsigned EXT_PS    = 62
) (
  input  logic [NREQ-1:0]               req_in,
  input  logic [WIDTH-1:0]              data_in,
  output logic [STAGES-1:0][WIDTH-1:0]  stage_in,
  input  logic [STAGES-1:0][WIDTH-1:0]  stage_out,
  output logic [NREQ-1:0]               req_out,
  output logic [WIDTH-1:0]              data_out
);

  // Request lines as seen at each boundary.
  logic [STAGES:0][NREQ-1:0]  req_at;
  // Datawave arriving at / leaving each boundary.
  logic [STAGES:0][WIDTH-1:0] bnd_d;
  logic [STAGES:0][WIDTH-1:0] bnd_q;
  // Masked primary request and affiliate request at each boundary.
  logic [STAGES:0]            ctrl;
  logic [STAGES:0]            ctrl_aff;

  assign req_at[0] = req_in;
  assign bnd_d[0]  = data_in;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    req_delay_line #(.NREQ(NREQ), .DELAY_PS(DS_PS)) u_req_dly (
      .req_i(req_at[k]),
      .req_o(req_at[k+1])
    );
    assign stage_in[k]  = bnd_q[k];
    assign bnd_d[k+1]   = stage_out[k];
  end

  for (genvar b = 0; b <= STAGES; b++) begin : g_bnd
    localparam sw_pol_e POL = boundary_pol(b, FIRST_POL);

    req_mask #(.NREQ(NREQ), .POL(POL), .MODE(MASK_MODE)) u_mask (
      .req (req_at[b]),
      .ctrl(ctrl[b])
    );

    if (BIPOLAR) begin : g_bipolar
      affiliate_gen #(.EXT_PS(EXT_PS), .FIRST(POL)) u_aff (
        .req(ctrl[b]),
        .aff(ctrl_aff[b])
      );
      bipolar_switch #(.WIDTH(WIDTH), .FIRST(POL)) u_sw (
        .ctrl    (ctrl[b]),
        .ctrl_aff(ctrl_aff[b]),
        .d       (bnd_d[b]),
        .q       (bnd_q[b])
      );
    end else begin : g_single
      assign ctrl_aff[b] = ctrl[b];
      wp_switch #(.WIDTH(WIDTH), .POL(POL)) u_sw (
        .ctrl(ctrl[b]),
        .d   (bnd_d[b]),
        .q   (bnd_q[b])
      );
    end
  end

  assign req_out  = req_at[STAGES];
  assign data_out = bnd_q[STAGES];

endmodule
