`timescale 1ps/1ps
// Request glitch test: two enhanced pipelines (36 bits, 3 stages, bipolar
// switches, L = 310 ps) get the same datawaves and glitchy request lines.
//   A: the default masking, 2 lines, OR at n-boundaries, AND at p-boundaries;
//   B: 3 lines combined by majority vote.
// Every request level carries a 15 ps glitch against its level (a low glitch
// on a high level, a high glitch on a low level), placed either early in the
// level or late, 60 ps before the next edge. Phases:
//   1. early glitch on one line: both pipelines must stay intact (the gate
//      masks it where it matters, and elsewhere the switch input is settled);
//   2. late glitch on one line: A must show corrupted datawaves (the glitch
//      direction its gate does not mask opens a holding switch while early
//      bits of the next datawave are at its input), B must stay intact;
//   3. late glitch on every line at once: B must show corrupted datawaves,
//      since no vote can mask a glitch that hits all lines.
// Phases 2 and 3 fail the test if the expected corruption does not occur.
module cwp_glitch_tb;
  import cwp_pkg::*;
  import cwp_tb_pkg::*;

  localparam int unsigned WIDTH   = 36;
  localparam int unsigned STAGES  = 3;
  localparam int unsigned L_PS    = 310;
  localparam int unsigned LAT_PS  = STAGES * 170;
  localparam int unsigned N_WAVES = 30;
  localparam int unsigned GW_PS   = 15;

  logic [1:0]                   req_a, ro_a;
  logic [2:0]                   req_b, ro_b;
  logic [WIDTH-1:0]             data_in, do_a, do_b;
  logic [STAGES-1:0][WIDTH-1:0] si_a, so_a, si_b, so_b;

  cwp_core #(.NREQ(2)) u_a (
    .req_in(req_a), .data_in, .stage_in(si_a), .stage_out(so_a), .req_out(ro_a), .data_out(do_a)
  );
  cwp_core #(.NREQ(3), .MASK_MODE(MASK_MAJORITY)) u_b (
    .req_in(req_b), .data_in, .stage_in(si_b), .stage_out(so_b), .req_out(ro_b), .data_out(do_b)
  );

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    tb_stage_model #(.WIDTH(WIDTH), .STAGE(k)) u_sa (.in(si_a[k]), .out(so_a[k]));
    tb_stage_model #(.WIDTH(WIDTH), .STAGE(k)) u_sb (.in(si_b[k]), .out(so_b[k]));
  end

  int unsigned checks = 0, failures = 0;
  logic [WIDTH-1:0] wave [N_WAVES];
  logic [WIDTH-1:0] expect_q [N_WAVES];

  function automatic logic [WIDTH-1:0] reference(logic [WIDTH-1:0] x);
    logic [63:0] v = 64'(x);
    for (int unsigned k = 0; k < STAGES; k++) v = stage_fn(v, k, WIDTH);
    return v[WIDTH-1:0];
  endfunction

  // One phase: glitch at offset g_ps into every level, on line 0 only or on
  // all lines. Returns the number of wrong output samples of A and of B.
  task automatic run(int unsigned g_ps, bit all_lines, output int unsigned bad_a,
                     output int unsigned bad_b);
    bad_a = 0;
    bad_b = 0;
    for (int unsigned j = 0; j < N_WAVES; j++) begin
      wave[j]     = WIDTH'({$urandom(), $urandom()});
      expect_q[j] = reference(wave[j]);
    end
    fork
      begin
        for (int unsigned j = 0; j < N_WAVES; j++) begin
          automatic logic lvl = ~req_a[0];
          data_in = wave[j];
          #2;
          req_a = {2{lvl}};
          req_b = {3{lvl}};
          #(g_ps);
          if (all_lines) begin
            req_a = {2{~lvl}};
            req_b = {3{~lvl}};
          end else begin
            req_a[0] = ~lvl;
            req_b[0] = ~lvl;
          end
          #(GW_PS);
          req_a = {2{lvl}};
          req_b = {3{lvl}};
          #(L_PS - 2 - g_ps - GW_PS);
        end
      end
      begin
        #(LAT_PS + 3);
        for (int unsigned j = 0; j < N_WAVES; j++) begin
          if (do_a !== expect_q[j]) bad_a++;
          if (do_b !== expect_q[j]) bad_b++;
          #(L_PS - 2);
          if (do_a !== expect_q[j]) bad_a++;
          if (do_b !== expect_q[j]) bad_b++;
          #2;
        end
      end
    join
    #(LAT_PS + 1000);
  endtask

  task automatic expect_count(string what, int unsigned n, bit want_some);
    checks++;
    if ((n != 0) != want_some) begin
      failures++;
      $display("FAIL %s: %0d wrong samples", what, n);
    end else $display("%s: %0d wrong samples", what, n);
  endtask

  initial begin
    int unsigned ba, bb;
    req_a   = '0;
    req_b   = '0;
    data_in = '0;
    #1000;
    run(20, 1'b0, ba, bb);
    expect_count("early glitch, one line, AND/OR (A)", ba, 1'b0);
    expect_count("early glitch, one line, majority (B)", bb, 1'b0);
    run(L_PS - 60, 1'b0, ba, bb);
    expect_count("late glitch, one line, AND/OR (A)", ba, 1'b1);
    expect_count("late glitch, one line, majority (B)", bb, 1'b0);
    run(L_PS - 60, 1'b1, ba, bb);
    expect_count("late glitch, all lines, majority (B)", bb, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
