// tb_mac_timer: inter-frame spaces and slot strobe with a time-base tick every
// third clock. SIFS, PIFS and DIFS must complete exactly 10, 30 and 50 ticks
// after their start pulse, restart cleanly, and clear on reset; the slot strobe
// must come every 20 ticks while slottime is high and never while it is low.
module tb_mac_timer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tick, reset, slottime, sifs, pifs, difs, a_sifs, a_pifs, a_difs, a_slot;
  int tick_cnt = 0;

  mac_timer dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // tick on every third clock
  int ph = 0;
  always @(posedge clk) begin
    ph <= (ph == 2) ? 0 : ph + 1;
    if (tick) tick_cnt <= tick_cnt + 1;
  end
  assign tick = (ph == 2);

  // returns the number of ticks from the start pulse until the flag rises
  task automatic measure(input int which, output int ticks);
    int t0;
    @(negedge clk);
    case (which) 0: sifs = 1; 1: pifs = 1; default: difs = 1; endcase
    @(negedge clk); t0 = tick_cnt; sifs = 0; pifs = 0; difs = 0;
    ticks = -1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if ((which == 0 && a_sifs) || (which == 1 && a_pifs) || (which == 2 && a_difs)) begin
        ticks = tick_cnt - t0; break;
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n, slots, last, gap;
    reset = 0; slottime = 0; sifs = 0; pifs = 0; difs = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(!a_sifs && !a_pifs && !a_difs, "flags low after reset");
    measure(0, n); check(n == 10, $sformatf("SIFS took %0d ticks", n));
    measure(1, n); check(n == 30, $sformatf("PIFS took %0d ticks", n));
    measure(2, n); check(n == 50, $sformatf("DIFS took %0d ticks", n));
    check(a_sifs && a_pifs && a_difs, "flags stay high until restarted");
    measure(0, n); check(n == 10, "SIFS restart");
    @(negedge clk); reset = 1; @(negedge clk); reset = 0;
    check(!a_sifs && !a_pifs && !a_difs, "reset clears the flags");
    // slot strobe
    slots = 0; last = -1; gap = 0;
    slottime = 1;
    for (int i = 0; i < 3 * 20 * 5 + 3; i++) begin
      @(negedge clk);
      if (a_slot) begin
        if (last >= 0) begin gap = tick_cnt - last; check(gap == 20, $sformatf("slot gap %0d ticks", gap)); end
        last = tick_cnt; slots++;
      end
    end
    check(slots == 5, $sformatf("%0d slot strobes in 100 ticks", slots));
    slottime = 0; slots = 0;
    repeat (200) begin @(negedge clk); if (a_slot) slots++; end
    check(slots == 0, "no slot strobe while slottime is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
