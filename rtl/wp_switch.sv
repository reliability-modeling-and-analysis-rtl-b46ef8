`timescale 1ps/1ps
// n- or p-type switch of a clockless wave pipeline.
//
// The switch is a plain level-sensitive latch on the datawave. POL = SW_N
// gives an n-switch: transparent while ctrl is high, opaque (holding the last
// value) while ctrl is low. POL = SW_P gives a p-switch: transparent while ctrl
// is low, opaque while it is high. A datawave whose request level makes the
// switch transparent passes without stopping; one whose level makes it opaque
// is held and so realigned to the request edge.
//
// Interface: ctrl is the (already masked) request level at this switch, d the
// datawave arriving from the stage before, q the datawave leaving it.
// Timing: zero-delay; q follows d while transparent and keeps its value from
// the closing edge of ctrl while opaque. There is no reset: the published design
// gives none, and the first request level that opens the switch defines q.
//
// The latch inferred here is the circuit itself, not an accident: the switch
// is by definition a latch. When the whole pipeline is linted, Verilator may
// report "no latches detected" for this block in some instances; the block is
// nevertheless a latch (it holds q while closed), as the switch and
// pipeline testbenches show, and the report is left standing.
module wp_switch
  import cwp_pkg::*;
#(
  parameter int unsigned WIDTH = 36,
  parameter sw_pol_e     POL   = SW_N
) (
  input  logic             ctrl,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic open_q;

  assign open_q = (POL == SW_N) ? ctrl : ~ctrl;

  always_latch begin
    if (open_q) q = d;
  end

endmodule
