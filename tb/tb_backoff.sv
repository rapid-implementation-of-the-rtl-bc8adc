// tb_backoff: backoff count INT(CW*Random()) with Random()=backoff_val/256,
// countdown on idle slots, freeze while busy, resume after a freeze, CW
// doubling on retries up to 256, and backreset returning CW to 8.
module tb_backoff;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] backoff_val;
  logic backoff_req, backreset, slot, busy, f_backoff;
  logic [8:0] cw, count;

  backoff dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic pulse_req(); @(negedge clk) backoff_req = 1; @(negedge clk) backoff_req = 0; endtask
  task automatic slots(input int n); repeat (n) begin @(negedge clk) slot = 1; @(negedge clk) slot = 0; end endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int expc, cwm;
    backoff_val = 0; backoff_req = 0; backreset = 0; slot = 0; busy = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(cw == 8 && !f_backoff, "CW starts at 8, no backoff pending");
    backoff_val = 8'd200;                       // 200/256 * 8 = 6.25 -> 6
    pulse_req();
    check(count == 6 && !f_backoff, $sformatf("first count %0d", count));
    slots(2); check(count == 4, "two idle slots");
    busy = 1; slots(3); check(count == 4, "frozen while busy");
    busy = 0;
    backoff_val = 8'd255; pulse_req();
    check(count == 4 && cw == 8, "request with residue resumes it");
    slots(4); check(count == 0 && f_backoff, "reaches zero, f_backoff");
    // retries: CW doubles 16, 32, ..., 256, 256
    cwm = 8;
    for (int r = 0; r < 7; r++) begin
      cwm = (cwm * 2 > 256) ? 256 : cwm * 2;
      backoff_val = 8'($urandom);
      pulse_req();
      expc = (backoff_val * cwm) / 256;
      check(cw == 9'(cwm), $sformatf("retry %0d CW=%0d", r, cw));
      check(count == 9'(expc), $sformatf("retry %0d count=%0d exp %0d", r, count, expc));
      slots(expc);
      check(f_backoff, "retry backoff done");
    end
    @(negedge clk) backreset = 1; @(negedge clk) backreset = 0;
    check(cw == 8 && count == 0 && !f_backoff, "backreset");
    backoff_val = 0; pulse_req();
    check(f_backoff, "zero draw finishes at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
