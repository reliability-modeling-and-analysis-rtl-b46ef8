`timescale 1ps/1ps
// Stage-count sweep: the c432 benchmark timing cut into 3, 5, 8 and 16
// stages (four rows of the published per-stage-count timing table; every
// point is two full pipelines, so the sweep keeps to four to build quickly).
//
// For each stage count the two-stage partial-path bounds of the original
// c432 timing table (D_max, D_min) are halved to give one stage's path spread
// (dmin..dmax); the request delay is dmax + 8 ps. With skew s = dmax - dmin
// and margin a = 8 ps, the request level is set to L = 1.6 * (s + a) and the
// affiliate stretch to 0.3 * (s + a). That is inside the bipolar pipeline's
// window (L >= s + a + stretch) and below the single-switch pipeline's
// (L >= 2 * (s + a)). So at every stage count the bipolar pipeline must
// deliver every datawave intact and the original one must corrupt some.
module cwp_stage_sweep_tb;

  localparam int unsigned N_ROWS = 4;
  // Stage counts and their two-stage partial-path bounds in ps.
  localparam int unsigned NSTG  [N_ROWS] = '{3, 5, 8, 16};
  localparam real         DMAX2 [N_ROWS] = '{323.6667, 194.2, 121.375, 60.6875};
  localparam real         DMIN2 [N_ROWS] = '{41.5053, 24.9032, 15.5645, 7.7822};
  localparam int unsigned ALPHA = 8;

  logic        done     [N_ROWS];
  int unsigned bad_enh  [N_ROWS];
  int unsigned bad_orig [N_ROWS];

  for (genvar r = 0; r < N_ROWS; r++) begin : g_row
    localparam int unsigned DMAX = int'(DMAX2[r] / 2.0);
    localparam int unsigned DMIN = int'(DMIN2[r] / 2.0);
    localparam int unsigned SA   = DMAX - DMIN + ALPHA;
    localparam int unsigned L    = (SA * 16) / 10;
    localparam int unsigned EXT  = (SA * 3) / 10;
    tb_sweep_unit #(
      .STAGES(NSTG[r]), .DMIN_PS(DMIN), .DMAX_PS(DMAX), .ALPHA_PS(ALPHA),
      .L_PS(L), .EXT_PS(EXT), .SEED(r + 1)
    ) u_unit (
      .done(done[r]), .bad_enh(bad_enh[r]), .bad_orig(bad_orig[r])
    );
  end

  int unsigned checks = 0, failures = 0;

  initial begin
    int unsigned n_done;
    do begin
      #1000;
      n_done = 0;
      foreach (done[r]) if (done[r]) n_done++;
    end while (n_done != N_ROWS);
    foreach (done[r]) begin
      checks += 2;
      if (bad_enh[r] != 0) begin
        failures++;
        $display("FAIL %0d stages: bipolar pipeline corrupted %0d samples", NSTG[r], bad_enh[r]);
      end
      if (bad_orig[r] == 0) begin
        failures++;
        $display("FAIL %0d stages: single-switch pipeline showed no intrawave fault", NSTG[r]);
      end
      $display("%0d stages: bipolar %0d wrong samples, single-switch %0d wrong samples",
               NSTG[r], bad_enh[r], bad_orig[r]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
