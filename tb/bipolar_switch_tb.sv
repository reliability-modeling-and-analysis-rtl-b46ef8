`timescale 1ps/1ps
// Test of the np- and pn-switch with hand-driven primary and affiliate
// requests. For each pair the "pass" level is the primary level on which its
// first switch is open (high for np, low for pn). Every round:
//   1. pass level starts, affiliate still open (the stretch): new data A goes
//      straight through;
//   2. affiliate closes (second alignment): data B arriving now must not
//      reach the output, which keeps A;
//   3. primary level flips, affiliate opens with it: the first switch closes
//      on B and the output shows B;
//   4. data C arriving on this level must not pass: the output keeps B;
//   5. next pass level: C appears.
module bipolar_switch_tb;
  import cwp_pkg::*;

  localparam int unsigned WIDTH = 36;
  localparam int unsigned EXT   = 20;

  logic             ctrl_np, aff_np, ctrl_pn, aff_pn;
  logic [WIDTH-1:0] d, q_np, q_pn;
  int unsigned      checks = 0, failures = 0;

  bipolar_switch #(.WIDTH(WIDTH), .FIRST(SW_N)) u_np (.ctrl(ctrl_np), .ctrl_aff(aff_np), .d, .q(q_np));
  bipolar_switch #(.WIDTH(WIDTH), .FIRST(SW_P)) u_pn (.ctrl(ctrl_pn), .ctrl_aff(aff_pn), .d, .q(q_pn));

  task automatic expect_both(string what, logic [WIDTH-1:0] exp);
    checks += 2;
    if (q_np !== exp) begin
      failures++;
      $display("FAIL np %s at %0t: got %h expected %h", what, $time, q_np, exp);
    end
    if (q_pn !== exp) begin
      failures++;
      $display("FAIL pn %s at %0t: got %h expected %h", what, $time, q_pn, exp);
    end
  endtask

  // np: pass level high, affiliated p-switch closed while aff is high.
  // pn: pass level low,  affiliated n-switch closed while aff is low.
  task automatic set_pass(logic pass_level, logic aff_closed);
    ctrl_np = pass_level;  aff_np = aff_closed;
    ctrl_pn = ~pass_level; aff_pn = ~aff_closed;
  endtask

  initial begin
    logic [WIDTH-1:0] a, b, c;
    c = '0;
    // Prime both pairs with C.
    d = c;
    set_pass(1'b1, 1'b0);
    #5;
    set_pass(1'b0, 1'b0);
    #5;
    for (int unsigned i = 0; i < 100; i++) begin
      a = WIDTH'({$urandom(), $urandom()});
      b = WIDTH'({$urandom(), $urandom()});
      // 5./1. pass level, affiliate in its stretch
      set_pass(1'b1, 1'b0);
      #1;
      expect_both("previous datawave at pass edge", c);
      d = a;
      #2;
      expect_both("datawave passes during the stretch", a);
      #(EXT);
      // 2. affiliate closes
      set_pass(1'b1, 1'b1);
      #1;
      d = b;
      #2;
      expect_both("second alignment holds", a);
      // 3. other level
      set_pass(1'b0, 1'b0);
      #1;
      expect_both("first switch closes on the next datawave", b);
      // 4. new data on the holding level
      c = WIDTH'({$urandom(), $urandom()});
      d = c;
      #3;
      expect_both("holding level keeps the datawave", b);
    end
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
