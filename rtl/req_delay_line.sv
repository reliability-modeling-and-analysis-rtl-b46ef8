`timescale 1ps/1ps
// Behavioural model (not synthesizable): request signal path of one stage.
//
// In the clockless wave pipeline the request level travels next to its
// datawave through every stage and must arrive at the next switch after the
// slowest data bit: its delay is d_s = d_max + alpha, where d_max is the
// longest data path of the stage and alpha the margin. A real design builds
// this from matched delay elements; here each of the NREQ request lines is a
// transport delay of DELAY_PS picoseconds, so a glitch on one line travels
// down that line unchanged and can be studied at every switch it reaches.
//
// The rule d_s = d_max + alpha follows the published design; the transport
// delay model and the 170 ps default (162 ps slowest stage path + 8 ps) are
// this design's own.
//
// Interface: req_i are the NREQ request lines entering the stage, req_o the
// same lines DELAY_PS later. The outputs start low.
module req_delay_line #(
  parameter int unsigned NREQ     = 2,
  parameter int unsigned DELAY_PS = 170
) (
  input  logic [NREQ-1:0] req_i,
  output logic [NREQ-1:0] req_o
);

  initial req_o = '0;

  always begin
    @(req_i);
    fork
      begin
        automatic logic [NREQ-1:0] v = req_i;
        #(DELAY_PS) req_o = v;
      end
    join_none
  end

endmodule
