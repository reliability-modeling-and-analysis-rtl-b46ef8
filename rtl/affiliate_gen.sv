`timescale 1ps/1ps
// Behavioural model (not synthesizable): affiliate request generator.
//
// The affiliate request steers the second switch of a bipolar pair. It is the
// primary request with one of its levels stretched by EXT_PS picoseconds:
//   FIRST = SW_N (np-switch, "affiliate signal N"): the low level is extended,
//     i.e. the rising edge is delayed by EXT_PS and the falling edge is not:
//     aff = req & req_delayed.
//   FIRST = SW_P (pn-switch, "affiliate signal P"): the high level is extended,
//     i.e. the falling edge is delayed by EXT_PS: aff = req | req_delayed.
// The stretch is the window in which a datawave that has just passed the first
// switch may still pass the affiliated one before it closes. The delay element
// is analog in a real circuit; here it is a transport delay, so pulses shorter
// than EXT_PS are delayed, not swallowed.
//
// The shape of the two affiliate signals (a low level stretched by n, a high
// level stretched by p) follows the published design; building them from a
// delayed copy of the request, and the 62 ps default, are this design's own.
//
// Interface: req is the masked primary request at the boundary, aff the
// affiliate request. EXT_PS (the period called n or p) must be shorter than a
// request level and long enough for the datawave to cross the first switch.
module affiliate_gen
  import cwp_pkg::*;
#(
  parameter int unsigned EXT_PS = 62,
  parameter sw_pol_e     FIRST  = SW_N
) (
  input  logic req,
  output logic aff
);

  logic req_dly;

  initial req_dly = 1'b0;

  // Transport delay: every change of req is replayed EXT_PS later.
  always begin
    @(req);
    fork
      begin
        automatic logic v = req;
        #(EXT_PS) req_dly = v;
      end
    join_none
  end

  assign aff = (FIRST == SW_N) ? (req & req_dly) : (req | req_dly);

endmodule
