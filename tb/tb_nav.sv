// tb_nav: NAV is raised only by a larger duration from a frame not addressed
// to this station, counts down per tick, and is cleared by nav_reset.
module tb_nav;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tick, upd, for_me, nav_reset, nav_zero;
  logic [15:0] dur, nav_val;

  nav dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic update(input int d, input bit me);
    @(negedge clk) begin upd = 1; dur = 16'(d); for_me = me; end
    @(negedge clk) upd = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    tick = 0; upd = 0; for_me = 0; nav_reset = 0; dur = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(nav_zero, "zero after reset");
    update(100, 1); check(nav_zero, "frame for this station does not set NAV");
    update(100, 0); check(nav_val == 100 && !nav_zero, "NAV set to 100");
    update(50, 0);  check(nav_val == 100, "smaller duration ignored");
    update(150, 0); check(nav_val == 150, "larger duration taken");
    repeat (20) begin @(negedge clk) tick = 1; @(negedge clk) tick = 0; end
    check(nav_val == 130, $sformatf("counted down to %0d", nav_val));
    @(negedge clk) nav_reset = 1; @(negedge clk) nav_reset = 0;
    check(nav_zero, "nav_reset clears");
    update(3, 0);
    repeat (5) begin @(negedge clk) tick = 1; @(negedge clk) tick = 0; end
    check(nav_zero, "stops at zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
