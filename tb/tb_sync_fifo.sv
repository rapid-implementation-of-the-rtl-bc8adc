// tb_sync_fifo: random pushes and pops on a 5-deep FIFO (not a power of two)
// compared with a queue model: data order, empty, full, count, ignored write
// when full and ignored read when empty, and the synchronous clear.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clr, wr_en, rd_en, empty, full;
  logic [7:0] wdata, rdata;
  logic [2:0] count;
  logic [7:0] model[$];
  int n_full = 0, n_empty = 0;

  sync_fifo #(.WIDTH(8), .DEPTH(5)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clr = 0; wr_en = 0; rd_en = 0; wdata = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int bias;
      bias = (t / 200) % 2;
      wr_en = ($urandom_range(0, 9) < (bias ? 7 : 3));
      rd_en = ($urandom_range(0, 9) < (bias ? 3 : 7));
      wdata = 8'($urandom);
      #1;
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == 5), "full flag");
      check(count == 3'(model.size()), "count");
      if (model.size() > 0) check(rdata == model[0], "head data");
      if (full) n_full++;
      if (empty) n_empty++;
      begin
        bit acc_w, acc_r;
        acc_w = wr_en && model.size() < 5;
        acc_r = rd_en && model.size() > 0;
        @(posedge clk);
        if (acc_r) void'(model.pop_front());
        if (acc_w) model.push_back(wdata);
      end
      #1;
    end
    check(n_full > 10 && n_empty > 10, $sformatf("full (%0d) and empty (%0d) both reached", n_full, n_empty));
    clr = 1; @(posedge clk); #1 clr = 0; model.delete();
    check(empty && count == 0, "clear empties the FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
