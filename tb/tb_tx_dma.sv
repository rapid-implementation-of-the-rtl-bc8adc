// tb_tx_dma: the transmit core copies queued blocks from a behavioural SRAM
// (one-cycle read latency) into a behavioural MSDU FIFO that is sometimes
// full, then releases each block. Checks data, order, the release pointer,
// fifo_emp during the copy and that nothing starts while the MAC is not ready.
module tb_tx_dma;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic mac_ready, rdy_empty, rdy_pop, free_push, gendata, msdu_full, fifo_emp, busy;
  logic [7:0] rdy_ptr, c_rdata, free_ptr, data_out;
  logic [11:0] rdy_len;
  logic [17:0] c_addr;
  logic [7:0] mem [int];
  logic [7:0] got[$];
  int rel[$];
  int q_ptr[$], q_len[$];
  int n_full = 0;

  tx_dma dut (.*);

  assign rdy_empty = (q_ptr.size() == 0);
  assign rdy_ptr = rdy_empty ? 8'd0 : 8'(q_ptr[0]);
  assign rdy_len = rdy_empty ? 12'd0 : 12'(q_len[0]);
  always @(posedge clk) begin
    c_rdata <= mem.exists(int'(c_addr)) ? mem[int'(c_addr)] : 8'hEE;
    if (rdy_pop) begin void'(q_ptr.pop_front()); void'(q_len.pop_front()); end
    if (gendata) got.push_back(data_out);
    if (free_push) rel.push_back(int'(free_ptr));
    msdu_full <= ($urandom_range(0, 3) == 0);
    if (msdu_full && busy) n_full++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int blocks[3] = '{7, 2, 50};
    int lens[3] = '{20, 1, 64};
    mac_ready = 0;
    for (int b = 0; b < 3; b++)
      for (int i = 0; i < lens[b]; i++) mem[blocks[b] * 2312 + i] = 8'(b * 50 + i);
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int b = 0; b < 3; b++) begin q_ptr.push_back(blocks[b]); q_len.push_back(lens[b]); end
    repeat (10) @(negedge clk);
    check(!busy && got.size() == 0, "waits while the MAC is not ready");
    for (int b = 0; b < 3; b++) begin
      got.delete();
      @(negedge clk) mac_ready = 1; @(negedge clk) mac_ready = 0;
      check(busy && !fifo_emp, "copy started, fifo_emp low");
      while (busy) @(negedge clk);
      check(fifo_emp, "fifo_emp high after the copy");
      check(got.size() == lens[b], $sformatf("block %0d: %0d bytes", b, got.size()));
      foreach (got[i]) if (got[i] != 8'(b * 50 + i)) begin check(0, "data"); break; end
      check(rel.size() == b + 1 && rel[b] == blocks[b], "block released after the copy");
    end
    check(n_full > 0, "full MSDU FIFO seen during a copy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
