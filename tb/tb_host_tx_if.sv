// tb_host_tx_if: the host procedure on the buffer interface: initialise
// TX_FIFO_FREE with 0..112, pop free blocks in order 0,1,..., write block data
// at block*2312, queue {block, length} in TX_FIFO_READY; then the core side
// pops the ready entries, reads the data back through its port and releases
// the blocks, which must reappear at the tail of TX_FIFO_FREE. Also checks the
// status register and host read-back of the SRAM.
module tb_host_tx_if;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [18:0] h_addr;
  logic [7:0] h_wdata, h_rdata, rdy_ptr, c_rdata, free_ptr;
  logic h_we, h_re, rdy_empty, rdy_pop, free_push;
  logic [11:0] rdy_len;
  logic [17:0] c_addr;

  host_tx_if dut (.*);

  localparam logic [18:0] R_FREE = 19'h40000, R_PTR = 19'h40001, R_LL = 19'h40002,
                          R_LH = 19'h40003, R_STAT = 19'h40004;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic wr(input logic [18:0] a, input logic [7:0] d);
    @(negedge clk) begin h_addr = a; h_wdata = d; h_we = 1; end
    @(negedge clk) h_we = 0;
  endtask
  task automatic rd(input logic [18:0] a, output logic [7:0] d);
    @(negedge clk) begin h_addr = a; h_re = 1; end
    @(negedge clk) begin h_re = 0; d = h_rdata; end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] d, blk;
    int len;
    h_addr = 0; h_wdata = 0; h_we = 0; h_re = 0; rdy_pop = 0; c_addr = 0; free_push = 0; free_ptr = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    rd(R_STAT, d); check(d[0] && d[2], "both queues empty after reset");
    for (int i = 0; i < 113; i++) wr(R_FREE, 8'(i));
    rd(R_STAT, d); check(!d[0], "free queue filled");
    // host sends three frames
    for (int f = 0; f < 3; f++) begin
      rd(R_FREE, blk); check(blk == 8'(f), $sformatf("free block %0d read in order", blk));
      len = 5 + 7 * f;
      for (int i = 0; i < len; i++) wr(19'(blk * 2312 + i), 8'(f * 40 + i));
      wr(R_PTR, blk); wr(R_LL, 8'(len)); wr(R_LH, 8'(len >> 8));
    end
    // block 112 is the last one that fits: write and read back its last byte
    wr(19'(112 * 2312 + 2311), 8'hA5); rd(19'(112 * 2312 + 2311), d);
    check(d == 8'hA5, "last byte of the last block");
    // core side
    for (int f = 0; f < 3; f++) begin
      #1 check(!rdy_empty, "ready entry present");
      check(rdy_ptr == 8'(f) && rdy_len == 12'(5 + 7 * f), $sformatf("ready entry %0d: %0d/%0d", f, rdy_ptr, rdy_len));
      blk = rdy_ptr; len = rdy_len;
      @(negedge clk) rdy_pop = 1; @(negedge clk) rdy_pop = 0;
      for (int i = 0; i < len; i++) begin
        c_addr = 18'(blk * 2312 + i); @(negedge clk);
        check(c_rdata == 8'(f * 40 + i), "core reads the block data");
      end
      @(negedge clk) begin free_push = 1; free_ptr = blk; end
      @(negedge clk) free_push = 0;
    end
    #1 check(rdy_empty, "ready queue drained");
    // released blocks come back after 3..112
    for (int i = 3; i < 113; i++) begin rd(R_FREE, d); if (i == 3 || i == 112) check(d == 8'(i), "free order"); end
    for (int i = 0; i < 3; i++) begin rd(R_FREE, d); check(d == 8'(i), $sformatf("released block %0d reused", i)); end
    rd(R_STAT, d); check(d[0], "free queue empty again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
