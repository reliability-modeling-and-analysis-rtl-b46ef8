`timescale 1ps/1ps
// Behavioural model of one combinational stage of the embedded core, for
// testbenches only. Output bit i is stage_fn(in)[i] with a transport delay of
// bit_delay(i) picoseconds, between DMIN_PS and DMAX_PS. Every change of the
// input is replayed on every output bit after that bit's own delay, so skew,
// early bits of the next datawave and intermediate glitches all appear as they
// would on a real path with that delay spread.
module tb_stage_model
  import cwp_tb_pkg::*;
#(
  parameter int unsigned WIDTH   = 36,
  parameter int unsigned STAGE   = 0,
  parameter int unsigned DMIN_PS = 21,
  parameter int unsigned DMAX_PS = 162
) (
  input  logic [WIDTH-1:0] in,
  output logic [WIDTH-1:0] out
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    localparam int unsigned D = bit_delay(i, WIDTH, DMIN_PS, DMAX_PS);
    logic [63:0] res;
    logic        o;
    initial o = 1'b0;
    always begin
      @(in);
      res = stage_fn(64'(in), STAGE, WIDTH);
      fork
        begin
          automatic logic v = res[i];
          #(D) o = v;
        end
      join_none
    end
    assign out[i] = o;
  end

endmodule
