`timescale 1ps/1ps
// End-to-end test of the wave pipeline core at its default size (36 bits,
// 3 stages, 2 request lines, bipolar switches, 170 ps request delay per stage).
//
// The testbench plays the data source: it sends one random datawave per
// request level (level length L_PS = 310 ps), each 2 ps before its request
// edge, on both request lines. Three behavioural stages (path delays 21..162 ps
// per bit) sit between the boundaries. The expected output of datawave j is
// the three stage functions applied in turn, computed here directly.
//
// Checked:
//   * latency: datawave j is at data_out 1 ps after its request edge reaches
//     the output (3 x 170 ps after it entered), and still there 1 ps before
//     the level ends, so one datawave per request level leaves the core;
//   * req_out is req_in delayed by 3 x 170 ps;
//   * glitches on a single request line (a low glitch on a high level or a
//     high glitch on a low level, 15 ps wide, early in the level) leave every
//     datawave intact.
// Mechanisms counted (each must happen at least once): more than one datawave
// inside the core at a time; a glitch masked by the OR of an n-boundary; a
// glitch masked by the AND of a p-boundary; the affiliated switch of a
// bipolar pair holding back early bits of the next datawave.
module cwp_core_tb;
  import cwp_tb_pkg::*;

  localparam int unsigned WIDTH   = 36;
  localparam int unsigned STAGES  = 3;
  localparam int unsigned NREQ    = 2;
  localparam int unsigned DS_PS   = 170;
  localparam int unsigned L_PS    = 310;
  localparam int unsigned T0_PS   = 1000;
  localparam int unsigned N_WAVES = 60;
  localparam int unsigned LAT_PS  = STAGES * DS_PS;

  logic [NREQ-1:0]              req_in;
  logic [WIDTH-1:0]             data_in;
  logic [STAGES-1:0][WIDTH-1:0] stage_in;
  logic [STAGES-1:0][WIDTH-1:0] stage_out;
  logic [NREQ-1:0]              req_out;
  logic [WIDTH-1:0]             data_out;

  cwp_core dut (
    .req_in, .data_in, .stage_in, .stage_out, .req_out, .data_out
  );

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    tb_stage_model #(.WIDTH(WIDTH), .STAGE(k), .DMIN_PS(21), .DMAX_PS(162)) u_stage (
      .in (stage_in[k]),
      .out(stage_out[k])
    );
  end

  int unsigned checks = 0, failures = 0;
  logic [WIDTH-1:0] wave [N_WAVES];
  logic [WIDTH-1:0] expect_q [N_WAVES];
  int unsigned n_multi_wave = 0, n_mask_or = 0, n_mask_and = 0, n_second_align = 0;
  int unsigned n_glitch = 0;

  function automatic logic [WIDTH-1:0] reference(logic [WIDTH-1:0] x);
    logic [63:0] v = 64'(x);
    for (int unsigned k = 0; k < STAGES; k++) v = stage_fn(v, k, WIDTH);
    return v[WIDTH-1:0];
  endfunction

  function automatic bit glitch_wave(int unsigned j);
    return (j % 4 == 3) && (j > 4);
  endfunction

  task automatic check(string what, logic [WIDTH-1:0] got, logic [WIDTH-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  // Source: one datawave per request level, glitches on one line now and then.
  initial begin
    req_in  = '0;
    data_in = '0;
    for (int unsigned j = 0; j < N_WAVES; j++) begin
      wave[j]     = WIDTH'({$urandom(), $urandom()});
      expect_q[j] = reference(wave[j]);
    end
    #(T0_PS - 2);
    for (int unsigned j = 0; j < N_WAVES; j++) begin
      automatic logic lvl = (j % 2 == 0);
      data_in = wave[j];
      #2;
      req_in = {NREQ{lvl}};
      if (glitch_wave(j)) begin
        automatic int unsigned line = (j / 4) % NREQ;
        #20;
        req_in[line] = ~lvl;
        n_glitch++;
        #15;
        req_in[line] = lvl;
        #(L_PS - 2 - 35);
      end else begin
        #(L_PS - 2);
      end
    end
    data_in = '0;
  end

  // Output side: datawave j must be on data_out for its whole level.
  initial begin
    #(T0_PS + LAT_PS + 1);
    for (int unsigned j = 0; j < N_WAVES; j++) begin
      automatic int unsigned launched = (int'($time) - int'(T0_PS)) / int'(L_PS) + 1;
      check($sformatf("wave %0d at level start", j), data_out, expect_q[j]);
      checks++;
      if (req_out !== {NREQ{(j % 2 == 0)}}) begin
        failures++;
        $display("FAIL req_out latency for wave %0d: %b", j, req_out);
      end
      if (launched > j + 1) n_multi_wave++;
      #(L_PS - 2);
      check($sformatf("wave %0d at level end", j), data_out, expect_q[j]);
      #2;
    end
    #(L_PS);
    if (n_multi_wave == 0)   begin failures++; $display("FAIL never two datawaves in flight"); end
    if (n_mask_or == 0)      begin failures++; $display("FAIL no glitch masked at an n-boundary"); end
    if (n_mask_and == 0)     begin failures++; $display("FAIL no glitch masked at a p-boundary"); end
    if (n_second_align == 0) begin failures++; $display("FAIL affiliated switch never held a datawave"); end
    $display("glitches=%0d masked_or=%0d masked_and=%0d multi_wave=%0d second_alignment=%0d",
             n_glitch, n_mask_or, n_mask_and, n_multi_wave, n_second_align);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Glitch masking: whenever the two lines disagree at a boundary, the masked
  // level must still be the clean one on the boundary whose gate covers it.
  for (genvar b = 0; b <= STAGES; b++) begin : g_mon
    always @(dut.req_at[b]) begin
      #1;
      if (dut.req_at[b] == 2'b01 || dut.req_at[b] == 2'b10) begin
        // A one-line low glitch on a high level: OR boundaries (even b) hold high.
        // A one-line high glitch on a low level: AND boundaries (odd b) hold low.
        if (b % 2 == 0 && dut.ctrl[b] === 1'b1) n_mask_or++;
        if (b % 2 == 1 && dut.ctrl[b] === 1'b0) n_mask_and++;
      end
    end
  end

  // Second alignment: the first switch of a pair lets new bits through while
  // the affiliated switch is closed and keeps q unchanged. At boundary 1 (pn)
  // the affiliated switch is an n-switch, closed while its request is low; at
  // boundary 2 (np) it is a p-switch, closed while its request is high.
  always @(dut.g_bnd[1].g_bipolar.u_sw.mid) begin
    if (int'($time) > int'(T0_PS) && dut.ctrl_aff[1] === 1'b0 &&
        dut.g_bnd[1].g_bipolar.u_sw.mid !== dut.g_bnd[1].g_bipolar.u_sw.q)
      n_second_align++;
  end
  always @(dut.g_bnd[2].g_bipolar.u_sw.mid) begin
    if (int'($time) > int'(T0_PS) && dut.ctrl_aff[2] === 1'b1 &&
        dut.g_bnd[2].g_bipolar.u_sw.mid !== dut.g_bnd[2].g_bipolar.u_sw.q)
      n_second_align++;
  end

  initial begin
    #(T0_PS + (N_WAVES + 4) * L_PS + LAT_PS + 5000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
