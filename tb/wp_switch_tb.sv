`timescale 1ps/1ps
// Test of the n- and p-switch: while its level is open the switch must follow
// the data, while closed it must keep the value present at the closing edge,
// whatever the data does. Both polarities are driven with the same request
// and random data and compared with the rule written out here.
module wp_switch_tb;
  import cwp_pkg::*;

  localparam int unsigned WIDTH = 36;

  logic             ctrl;
  logic [WIDTH-1:0] d, qn, qp;
  logic [WIDTH-1:0] held_n, held_p;
  int unsigned      checks = 0, failures = 0;

  wp_switch #(.WIDTH(WIDTH), .POL(SW_N)) u_n (.ctrl, .d, .q(qn));
  wp_switch #(.WIDTH(WIDTH), .POL(SW_P)) u_p (.ctrl, .d, .q(qp));

  task automatic expect_eq(string what, logic [WIDTH-1:0] got, logic [WIDTH-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial begin
    // Open the p-switch once so that both switches hold a known value.
    ctrl = 1'b0;
    d    = WIDTH'($urandom());
    #5;
    held_p = d;
    ctrl   = 1'b1;
    #5;
    for (int unsigned i = 0; i < 200; i++) begin
      // Several data changes per request level.
      for (int unsigned k = 0; k < 3; k++) begin
        d = WIDTH'({$urandom(), $urandom()});
        #5;
        // n-switch open on high, p-switch open on low.
        expect_eq("n-switch", qn, ctrl ? d : held_n);
        expect_eq("p-switch", qp, ctrl ? held_p : d);
      end
      // Closing edges: remember what each switch must hold.
      if (ctrl) held_n = d; else held_p = d;
      ctrl = ~ctrl;
      #5;
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
