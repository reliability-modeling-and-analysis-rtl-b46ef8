`timescale 1ps/1ps
// Test of the affiliate request generator with its default stretch (62 ps).
// A random request waveform (levels 6..200 ps long, on even picoseconds, so some are shorter than
// the stretch) is recorded edge by edge. The expected affiliate levels are
// read from that record: affiliate N at time t is req(t) AND req(t - 62)
// (low level stretched), affiliate P is req(t) OR req(t - 62) (high level
// stretched). Both are sampled 1 ps after every edge, at every edge plus the
// stretch +/- 1 ps, and in between.
module affiliate_gen_tb;
  import cwp_pkg::*;

  localparam int unsigned EXT   = 62;
  localparam int unsigned N_SEG = 300;

  logic req, aff_n, aff_p;
  int unsigned checks = 0, failures = 0;
  int unsigned edge_t [N_SEG];
  logic        edge_v [N_SEG];
  int unsigned n_edges = 0;

  affiliate_gen #(.FIRST(SW_N)) u_n (.req, .aff(aff_n));
  affiliate_gen #(.FIRST(SW_P)) u_p (.req, .aff(aff_p));

  // Recorded request level at time t (0 before the first edge).
  function automatic logic req_at(int t);
    logic v = 1'b0;
    for (int unsigned k = 0; k < n_edges; k++)
      if (int'(edge_t[k]) <= t) v = edge_v[k];
    return v;
  endfunction

  task automatic check_at();
    int t = int'($time);
    logic en, ep;
    en = req_at(t) & req_at(t - int'(EXT));
    ep = req_at(t) | req_at(t - int'(EXT));
    checks += 2;
    if (aff_n !== en) begin
      failures++;
      $display("FAIL affiliate N at %0t: got %b expected %b", $time, aff_n, en);
    end
    if (aff_p !== ep) begin
      failures++;
      $display("FAIL affiliate P at %0t: got %b expected %b", $time, aff_p, ep);
    end
  endtask

  // Stimulus: random level lengths.
  initial begin
    req = 1'b0;
    #100;
    for (int unsigned k = 0; k < N_SEG; k++) begin
      edge_t[k] = int'($time);
      edge_v[k] = ~req;
      n_edges   = k + 1;
      req       = ~req;
      #(2 * (3 + $urandom_range(97)));
    end
  end

  // Sampling: 1 ps after each edge, around edge + stretch, and at random.
  always begin
    @(req);
    fork
      begin #1; check_at(); end
      begin #(EXT - 1); check_at(); end
      begin #(EXT + 1); check_at(); end
    join_none
  end

  initial begin
    #50;
    repeat (400) begin
      #($urandom_range(60) + 1);
      if ($time % 2 == 0) #1;  // edges are on even ps, samples on odd ones
      check_at();
    end
    #(N_SEG * 210);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
