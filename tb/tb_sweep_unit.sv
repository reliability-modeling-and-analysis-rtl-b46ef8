`timescale 1ps/1ps
// One point of the stage-count sweep, for testbenches only: an enhanced
// (bipolar) and an original (single-switch) pipeline of STAGES stages, each
// with its own stand-in stages of DMIN_PS..DMAX_PS, driven with the same
// N_WAVES random datawaves at request level length L_PS. The request delay
// per stage is DMAX_PS + ALPHA_PS. After the run, done rises and bad_enh /
// bad_orig hold the number of wrong output samples (two per datawave: 1 ps
// after its output level starts and 1 ps before it ends).
module tb_sweep_unit
  import cwp_tb_pkg::*;
#(
  parameter int unsigned STAGES   = 3,
  parameter int unsigned DMIN_PS  = 21,
  parameter int unsigned DMAX_PS  = 162,
  parameter int unsigned ALPHA_PS = 8,
  parameter int unsigned L_PS     = 238,
  parameter int unsigned EXT_PS   = 45,
  parameter int unsigned N_WAVES  = 24,
  parameter int unsigned SEED     = 1
) (
  output logic        done,
  output int unsigned bad_enh,
  output int unsigned bad_orig
);

  localparam int unsigned WIDTH  = 36;
  localparam int unsigned DS     = DMAX_PS + ALPHA_PS;
  localparam int unsigned LAT_PS = STAGES * DS;

  logic [1:0]                   req_in, ro_e, ro_o;
  logic [WIDTH-1:0]             data_in, do_e, do_o;
  logic [STAGES-1:0][WIDTH-1:0] si_e, so_e, si_o, so_o;

  cwp_core #(.STAGES(STAGES), .DS_PS(DS), .EXT_PS(EXT_PS), .BIPOLAR(1'b1)) u_enh (
    .req_in, .data_in, .stage_in(si_e), .stage_out(so_e), .req_out(ro_e), .data_out(do_e)
  );
  cwp_core #(.STAGES(STAGES), .DS_PS(DS), .EXT_PS(EXT_PS), .BIPOLAR(1'b0)) u_orig (
    .req_in, .data_in, .stage_in(si_o), .stage_out(so_o), .req_out(ro_o), .data_out(do_o)
  );

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    tb_stage_model #(.WIDTH(WIDTH), .STAGE(k), .DMIN_PS(DMIN_PS), .DMAX_PS(DMAX_PS)) u_se (
      .in(si_e[k]), .out(so_e[k])
    );
    tb_stage_model #(.WIDTH(WIDTH), .STAGE(k), .DMIN_PS(DMIN_PS), .DMAX_PS(DMAX_PS)) u_so (
      .in(si_o[k]), .out(so_o[k])
    );
  end

  logic [WIDTH-1:0] wave [N_WAVES];
  logic [WIDTH-1:0] expect_q [N_WAVES];

  initial begin
    done     = 1'b0;
    bad_enh  = 0;
    bad_orig = 0;
    req_in   = '0;
    data_in  = '0;
    for (int unsigned j = 0; j < N_WAVES; j++) begin
      logic [63:0] v;
      wave[j] = WIDTH'({$urandom(), $urandom()} ^ (64'(SEED) << 20));
      v = 64'(wave[j]);
      for (int unsigned k = 0; k < STAGES; k++) v = stage_fn(v, k, WIDTH);
      expect_q[j] = v[WIDTH-1:0];
    end
    #1000;
    fork
      begin
        for (int unsigned j = 0; j < N_WAVES; j++) begin
          data_in = wave[j];
          #2;
          req_in = {2{~req_in[0]}};
          #(L_PS - 2);
        end
      end
      begin
        #(LAT_PS + 3);
        for (int unsigned j = 0; j < N_WAVES; j++) begin
          if (do_e !== expect_q[j]) bad_enh++;
          if (do_o !== expect_q[j]) bad_orig++;
          #(L_PS - 2);
          if (do_e !== expect_q[j]) bad_enh++;
          if (do_o !== expect_q[j]) bad_orig++;
          #2;
        end
      end
    join
    done = 1'b1;
  end

endmodule
