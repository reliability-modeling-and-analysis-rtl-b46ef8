`timescale 1ps/1ps
// Bipolar switch: two switches of opposite polarity in series.
//
// FIRST = SW_N gives an np-switch (n-switch, then p-switch); FIRST = SW_P
// gives a pn-switch. The first switch is steered by the primary request level
// exactly like the single switch it replaces. The second, "affiliated" switch
// is steered by the affiliate request, a copy of the primary request whose
// level is stretched by a short time (see affiliate_gen). While the primary
// level opens the first switch, the affiliated switch stays transparent only
// for that short stretch and then closes, so the datawave is latched a second
// time and held for the rest of the level: early bits of the next datawave
// that leak through the first switch can no longer reach the next stage.
// On the other level the first switch holds and the affiliated switch is
// transparent, so the pair behaves like the single switch.
//
// The series pair and the second alignment follow the published design; the
// zero-delay latch model is this design's simplification.
//
// Interface: ctrl is the masked primary request at this boundary, ctrl_aff the
// affiliate request, d/q the datawave in and out. Zero-delay latches, no reset
// (none is given for the switches). The two latches inferred here are the
// circuit itself.
module bipolar_switch
  import cwp_pkg::*;
#(
  parameter int unsigned WIDTH = 36,
  parameter sw_pol_e     FIRST = SW_N
) (
  input  logic             ctrl,
  input  logic             ctrl_aff,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  localparam sw_pol_e SECOND = opposite(FIRST);

  logic [WIDTH-1:0] mid;

  wp_switch #(.WIDTH(WIDTH), .POL(FIRST))  u_primary (.ctrl(ctrl),     .d(d),   .q(mid));
  wp_switch #(.WIDTH(WIDTH), .POL(SECOND)) u_affil   (.ctrl(ctrl_aff), .d(mid), .q(q));

endmodule
