`timescale 1ps/1ps
// Request level length sweep of the default pipeline (36 bits, 3 stages,
// bipolar switches, 170 ps request delay, 62 ps affiliate stretch) with stage
// paths of 21..162 ps, over the 100..350 ps range of level lengths studied for
// the reliability curves.
//
// For this timing the working window is worked out by hand:
//   * the affiliated switch must close before early bits of the next datawave
//     reach it: 170 + 62 <= L + 21, so L >= 211 ps;
//   * the next stage must see one datawave through the whole of its window:
//     L >= (162 - 21) + (170 - 162) = 149 ps.
// Level lengths 350, 310, 270, 230 and 212 ps must deliver every datawave
// intact; 100 and 130 ps are below the window and must corrupt some datawaves
// (if they do not, the test fails, since it would then show nothing).
module cwp_level_sweep_tb;
  import cwp_tb_pkg::*;

  localparam int unsigned WIDTH   = 36;
  localparam int unsigned STAGES  = 3;
  localparam int unsigned NREQ    = 2;
  localparam int unsigned LAT_PS  = STAGES * 170;
  localparam int unsigned N_WAVES = 30;
  localparam int unsigned N_GOOD  = 5;
  localparam int unsigned N_BAD   = 2;
  localparam int unsigned L_GOOD [N_GOOD] = '{350, 310, 270, 230, 212};
  localparam int unsigned L_BAD  [N_BAD]  = '{130, 100};

  logic [NREQ-1:0]              req_in;
  logic [WIDTH-1:0]             data_in;
  logic [STAGES-1:0][WIDTH-1:0] stage_in, stage_out;
  logic [NREQ-1:0]              req_out;
  logic [WIDTH-1:0]             data_out;

  cwp_core dut (.req_in, .data_in, .stage_in, .stage_out, .req_out, .data_out);

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    tb_stage_model #(.WIDTH(WIDTH), .STAGE(k), .DMIN_PS(21), .DMAX_PS(162)) u_stage (
      .in(stage_in[k]), .out(stage_out[k])
    );
  end

  int unsigned checks = 0, failures = 0;
  logic [WIDTH-1:0] wave [N_WAVES];
  logic [WIDTH-1:0] expect_q [N_WAVES];

  function automatic logic [WIDTH-1:0] reference(logic [WIDTH-1:0] x);
    logic [63:0] v = 64'(x);
    for (int unsigned k = 0; k < STAGES; k++) v = stage_fn(v, k, WIDTH);
    return v[WIDTH-1:0];
  endfunction

  // Sends N_WAVES datawaves at level length l_ps; returns how many came out
  // wrong (sampled 1 ps after each output level starts and 1 ps before it ends).
  task automatic run(int unsigned l_ps, output int unsigned bad);
    bad = 0;
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
        #(LAT_PS + 3);  // 1 ps after the output edge (the request edge is 2 ps after the data)
        for (int unsigned j = 0; j < N_WAVES; j++) begin
          if (data_out !== expect_q[j]) bad++;
          #(l_ps - 2);
          if (data_out !== expect_q[j]) bad++;
          #2;
        end
      end
    join
    #(LAT_PS + 1000);
  endtask

  initial begin
    int unsigned bad;
    req_in  = '0;
    data_in = '0;
    #1000;
    foreach (L_GOOD[i]) begin
      run(L_GOOD[i], bad);
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL L=%0d ps: %0d wrong samples", L_GOOD[i], bad);
      end else $display("L=%0d ps: all %0d datawaves intact", L_GOOD[i], N_WAVES);
    end
    foreach (L_BAD[i]) begin
      run(L_BAD[i], bad);
      checks++;
      if (bad == 0) begin
        failures++;
        $display("FAIL L=%0d ps below the timing window but no datawave corrupted", L_BAD[i]);
      end else $display("L=%0d ps: %0d wrong samples, as expected below the window", L_BAD[i], bad);
    end
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
