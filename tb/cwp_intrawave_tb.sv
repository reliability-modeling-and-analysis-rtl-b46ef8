`timescale 1ps/1ps
// Intrawave-fault test: the original two-phase pipeline (one switch per
// boundary) against the reliability-enhanced one (bipolar switches), in both
// arrangements (np-pn-np and pn-np-pn), all at 36 bits and 3 stages with
// 21..162 ps stage paths and 170 ps request delay.
//
// The same datawaves are sent to both at two request level lengths:
//   * 330 ps, long enough for both: every datawave must come out intact;
//   * 230 ps, too short for a single switch per boundary, whose open switch
//     lets early bits of the next datawave into the next stage (an intrawave
//     fault), but long enough for the bipolar pipeline, whose affiliated
//     switches hold each datawave for its whole level.
// Every output of both enhanced pipelines must be correct in both phases, the
// original must be correct in the first; in the second at least one of its
// outputs must be corrupted, otherwise the test shows nothing and fails.
module cwp_intrawave_tb;
  import cwp_pkg::*;
  import cwp_tb_pkg::*;

  localparam int unsigned WIDTH   = 36;
  localparam int unsigned STAGES  = 3;
  localparam int unsigned NREQ    = 2;
  localparam int unsigned DS_PS   = 170;
  localparam int unsigned LAT_PS  = STAGES * DS_PS;
  localparam int unsigned N_WAVES = 40;

  logic [NREQ-1:0]              req_in;
  logic [WIDTH-1:0]             data_in;
  logic [STAGES-1:0][WIDTH-1:0] si_e, so_e, si_o, so_o, si_r, so_r;
  logic [NREQ-1:0]              ro_e, ro_o, ro_r;
  logic [WIDTH-1:0]             do_e, do_o, do_r;

  cwp_core #(.BIPOLAR(1'b1)) u_enh (
    .req_in, .data_in, .stage_in(si_e), .stage_out(so_e), .req_out(ro_e), .data_out(do_e)
  );
  cwp_core #(.BIPOLAR(1'b1), .FIRST_POL(SW_P)) u_rev (
    .req_in, .data_in, .stage_in(si_r), .stage_out(so_r), .req_out(ro_r), .data_out(do_r)
  );
  cwp_core #(.BIPOLAR(1'b0)) u_orig (
    .req_in, .data_in, .stage_in(si_o), .stage_out(so_o), .req_out(ro_o), .data_out(do_o)
  );

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    tb_stage_model #(.WIDTH(WIDTH), .STAGE(k), .DMIN_PS(21), .DMAX_PS(162)) u_se (
      .in(si_e[k]), .out(so_e[k])
    );
    tb_stage_model #(.WIDTH(WIDTH), .STAGE(k), .DMIN_PS(21), .DMAX_PS(162)) u_sr (
      .in(si_r[k]), .out(so_r[k])
    );
    tb_stage_model #(.WIDTH(WIDTH), .STAGE(k), .DMIN_PS(21), .DMAX_PS(162)) u_so (
      .in(si_o[k]), .out(so_o[k])
    );
  end

  int unsigned checks = 0, failures = 0;
  int unsigned orig_faults [2];
  logic [WIDTH-1:0] wave [N_WAVES];
  logic [WIDTH-1:0] expect_q [N_WAVES];

  function automatic logic [WIDTH-1:0] reference(logic [WIDTH-1:0] x);
    logic [63:0] v = 64'(x);
    for (int unsigned k = 0; k < STAGES; k++) v = stage_fn(v, k, WIDTH);
    return v[WIDTH-1:0];
  endfunction

  // Send N_WAVES datawaves with level length l_ps and check both outputs at
  // the middle of every output level.
  task automatic run_phase(int unsigned phase, int unsigned l_ps);
    for (int unsigned j = 0; j < N_WAVES; j++) begin
      wave[j]     = WIDTH'({$urandom(), $urandom()});
      expect_q[j] = reference(wave[j]);
    end
    fork
      begin
        for (int unsigned j = 0; j < N_WAVES; j++) begin
          data_in = wave[j];
          #2;
          req_in = {NREQ{~req_in[0]}};
          #(l_ps - 2);
        end
      end
      begin
        #(LAT_PS + l_ps / 2);
        for (int unsigned j = 0; j < N_WAVES; j++) begin
          checks++;
          if (do_e !== expect_q[j]) begin
            failures++;
            $display("FAIL enhanced, L=%0d, wave %0d: %h expected %h", l_ps, j, do_e, expect_q[j]);
          end
          checks++;
          if (do_r !== expect_q[j]) begin
            failures++;
            $display("FAIL enhanced pn-np-pn, L=%0d, wave %0d: %h expected %h", l_ps, j, do_r, expect_q[j]);
          end
          if (do_o !== expect_q[j]) orig_faults[phase]++;
          #(l_ps);
        end
      end
    join
    #(LAT_PS + 4 * l_ps);
  endtask

  initial begin
    req_in = '0;
    data_in = '0;
    orig_faults = '{0, 0};
    #1000;
    run_phase(0, 330);
    run_phase(1, 230);
    checks++;
    if (orig_faults[0] != 0) begin
      failures++;
      $display("FAIL original pipeline corrupted %0d datawaves at L=330", orig_faults[0]);
    end
    checks++;
    if (orig_faults[1] == 0) begin
      failures++;
      $display("FAIL original pipeline showed no intrawave fault at L=230");
    end
    $display("original pipeline: corrupted datawaves %0d at L=330, %0d at L=230 (of %0d)",
             orig_faults[0], orig_faults[1], N_WAVES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
