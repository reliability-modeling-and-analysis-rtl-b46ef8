`timescale 1ps/1ps
// Test of the request delay line with its default delay (170 ps) and two
// lines. Both lines get independent random waveforms, with every edge on an
// even picosecond, including pulses far shorter than the delay (glitches);
// every pulse must appear on the output unchanged 170 ps later. Each line is
// recorded edge by edge and the output is compared with the record at
// (t - 170 ps), 1 ps before and after every replayed edge and at random times.
module req_delay_line_tb;

  localparam int unsigned NREQ  = 2;
  localparam int unsigned DLY   = 170;
  localparam int unsigned N_SEG = 300;

  logic [NREQ-1:0] req_i, req_o;
  int unsigned checks = 0, failures = 0;
  int unsigned edge_t [NREQ][N_SEG];
  logic        edge_v [NREQ][N_SEG];
  int unsigned n_edges [NREQ];

  req_delay_line #(.NREQ(NREQ)) dut (.req_i, .req_o);

  function automatic logic line_at(int unsigned l, int t);
    logic v = 1'b0;
    for (int unsigned k = 0; k < n_edges[l]; k++)
      if (int'(edge_t[l][k]) <= t) v = edge_v[l][k];
    return v;
  endfunction

  task automatic check_at();
    int t = int'($time);
    for (int unsigned l = 0; l < NREQ; l++) begin
      checks++;
      if (req_o[l] !== line_at(l, t - int'(DLY))) begin
        failures++;
        $display("FAIL line %0d at %0t: got %b", l, $time, req_o[l]);
      end
    end
  endtask

  for (genvar l = 0; l < NREQ; l++) begin : g_src
    initial begin
      n_edges[l] = 0;
      req_i[l]   = 1'b0;
      #(100 + 8 * l);
      for (int unsigned k = 0; k < N_SEG; k++) begin
        edge_t[l][k] = int'($time);
        edge_v[l][k] = ~req_i[l];
        n_edges[l]   = k + 1;
        req_i[l]     = ~req_i[l];
        // Mostly request levels, sometimes a 4..20 ps glitch.
        if ($urandom_range(3) == 0) #(2 * (2 + $urandom_range(8)));
        else                        #(2 * (75 + $urandom_range(125)));
      end
    end
  end

  always begin
    @(req_i);
    fork
      begin #(DLY + 1); check_at(); end
      begin #(DLY - 1); check_at(); end
    join_none
  end

  initial begin
    #50;
    repeat (500) begin
      #($urandom_range(100) + 1);
      if ($time % 2 == 0) #1;  // edges are on even ps, samples on odd ones
      check_at();
    end
    #(N_SEG * 420);
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
