`timescale 1ps/1ps
// Request-line fault masking in front of one switch.
//
// The request signal is carried on NREQ parallel lines (the primary line plus
// NREQ-1 redundant ones). A glitch on one line must not reach the switch in
// the direction that would break a datawave. In front of an n-switch the
// lines are ORed, so a brief low glitch on a high request is covered by the
// other lines; in front of a p-switch they are ANDed, so a brief high glitch
// on a low request is covered. Only a glitch that hits every line at once
// gets through. The opposite glitch direction is not masked (any one line
// can then cause it), which is the known weakness of this scheme.
//
// MODE = MASK_MAJORITY instead takes the majority of the lines, which masks a
// minority glitch in either direction; with an even line count a tie falls
// back to the AND/OR rule of the switch's polarity. The AND/OR rule is the
// default and follows the published masking table; the majority vote is an
// option of this design, read from a suggested "cascade of AND and OR gates".
//
// Interface: req holds the NREQ request lines at this switch, ctrl is the
// level handed to the switch. Purely combinational, zero delay.
module req_mask
  import cwp_pkg::*;
#(
  parameter int unsigned NREQ = 2,
  parameter sw_pol_e     POL  = SW_N,
  parameter mask_mode_e  MODE = MASK_AND_OR
) (
  input  logic [NREQ-1:0] req,
  output logic            ctrl
);

  logic        and_or;
  int unsigned ones;

  always_comb begin
    and_or = (POL == SW_N) ? (|req) : (&req);
    ones   = 0;
    for (int unsigned i = 0; i < NREQ; i++) ones += int'(req[i]);
  end

  always_comb begin
    if (MODE == MASK_MAJORITY && 2 * ones != NREQ)
      ctrl = (2 * ones > NREQ);
    else
      ctrl = and_or;
  end

endmodule
