`timescale 1ps/1ps
// Test of the request masking gates, for 2 and 3 request lines, both switch
// polarities and both modes, over every combination of line levels. The
// expected level is counted here from the lines: AND/OR mode must give the
// OR of the lines for an n-switch and the AND for a p-switch; majority mode
// must give the majority, with a tie resolved like AND/OR. The two rows of
// the masking table (normal line high, glitched line low into the n-switch
// OR; normal low, glitched high into the p-switch AND) are checked by name.
module req_mask_tb;
  import cwp_pkg::*;

  logic [1:0] r2;
  logic [2:0] r3;
  logic c2_n, c2_p, c3_n, c3_p, m3_n, m3_p, m2_n, m2_p;
  int unsigned checks = 0, failures = 0;

  req_mask #(.NREQ(2), .POL(SW_N), .MODE(MASK_AND_OR))   u2n (.req(r2), .ctrl(c2_n));
  req_mask #(.NREQ(2), .POL(SW_P), .MODE(MASK_AND_OR))   u2p (.req(r2), .ctrl(c2_p));
  req_mask #(.NREQ(3), .POL(SW_N), .MODE(MASK_AND_OR))   u3n (.req(r3), .ctrl(c3_n));
  req_mask #(.NREQ(3), .POL(SW_P), .MODE(MASK_AND_OR))   u3p (.req(r3), .ctrl(c3_p));
  req_mask #(.NREQ(3), .POL(SW_N), .MODE(MASK_MAJORITY)) v3n (.req(r3), .ctrl(m3_n));
  req_mask #(.NREQ(3), .POL(SW_P), .MODE(MASK_MAJORITY)) v3p (.req(r3), .ctrl(m3_p));
  req_mask #(.NREQ(2), .POL(SW_N), .MODE(MASK_MAJORITY)) v2n (.req(r2), .ctrl(m2_n));
  req_mask #(.NREQ(2), .POL(SW_P), .MODE(MASK_MAJORITY)) v2p (.req(r2), .ctrl(m2_p));

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (r2=%b r3=%b)", what, got, exp, r2, r3);
    end
  endtask

  initial begin
    for (int unsigned v = 0; v < 8; v++) begin
      int unsigned ones;
      r3 = 3'(v);
      r2 = 2'(v);
      #1;
      ones = 0;
      for (int unsigned i = 0; i < 3; i++) if (v[i]) ones++;
      expect_bit("3 lines, n, AND/OR", c3_n, ones != 0);
      expect_bit("3 lines, p, AND/OR", c3_p, ones == 3);
      expect_bit("3 lines, n, majority", m3_n, ones >= 2);
      expect_bit("3 lines, p, majority", m3_p, ones >= 2);
      ones = 0;
      for (int unsigned i = 0; i < 2; i++) if (v[i]) ones++;
      expect_bit("2 lines, n, AND/OR", c2_n, ones != 0);
      expect_bit("2 lines, p, AND/OR", c2_p, ones == 2);
      expect_bit("2 lines, n, majority tie", m2_n, ones != 0);
      expect_bit("2 lines, p, majority tie", m2_p, ones == 2);
    end
    // Masking table rows: A normal, B glitched.
    r2 = 2'b01;  // A high, B low: n-switch OR stays high
    #1;
    expect_bit("table row 1, n-switch", c2_n, 1'b1);
    r2 = 2'b10;  // A low, B high: p-switch AND stays low
    #1;
    expect_bit("table row 2, p-switch", c2_p, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
