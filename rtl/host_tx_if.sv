// host_tx_if: host-bus side of the transmit path: the network buffer SRAM and
// the two pointer queues TX_FIFO_FREE and TX_FIFO_READY.
//
// The SRAM (2^SRAM_AW bytes, 256 KiB) is cut into fixed blocks of BLOCK_BYTES
// (2312, the largest MPDU); block i starts at byte i*BLOCK_BYTES. TX_FIFO_FREE
// holds the numbers of free blocks, TX_FIFO_READY the {block, length} entries
// of blocks waiting for transmission. The host:
//   1. writes the block numbers into TX_FIFO_FREE once after reset,
//   2. pops a free block number, 3. writes its data into that block,
//   4. pushes {block, length} into TX_FIFO_READY.
// The transmit core pops TX_FIFO_READY, reads the block through its own read
// port and pushes the block number back into TX_FIFO_FREE.
// Host port (single cycle, read data registered, valid the cycle after h_re):
//   h_addr[18]=0   SRAM byte h_addr[17:0] (read/write)
//   h_addr[18]=1, h_addr[2:0]:
//     0 FREE      read pops TX_FIFO_FREE, write pushes a block number
//     1 RDY_PTR   write: block number of the next ready entry
//     2 RDY_LEN_L write: length bits 7:0
//     3 RDY_LEN_H write: length bits 11:8, pushes the entry
//     4 STATUS    read: {ready_full, ready_empty, free_full, free_empty}
// Memory, block size and queue depth (256) follow the document. It fits only
// 113 blocks of 2312 bytes into 256 KiB, so NUM_BLOCKS=113. The register map is
// this design's own; the bus is a generic synchronous one, not the ISA timing.
module host_tx_if #(
  parameter int unsigned SRAM_AW     = 18,
  parameter int unsigned BLOCK_BYTES = 2312,
  parameter int unsigned NUM_BLOCKS  = 113,
  parameter int unsigned PTR_DEPTH   = 256,
  parameter int unsigned LEN_W       = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  // host bus
  input  logic [SRAM_AW:0]   h_addr,
  input  logic [7:0]         h_wdata,
  input  logic               h_we,
  input  logic               h_re,
  output logic [7:0]         h_rdata,
  // transmit core side
  output logic               rdy_empty,
  output logic [7:0]         rdy_ptr,
  output logic [LEN_W-1:0]   rdy_len,
  input  logic               rdy_pop,
  input  logic [SRAM_AW-1:0] c_addr,
  output logic [7:0]         c_rdata,
  input  logic               free_push,
  input  logic [7:0]         free_ptr
);

  localparam int unsigned PCW = $clog2(PTR_DEPTH + 1);

  logic [7:0] sram [2**SRAM_AW];
  logic is_reg;
  logic [2:0] reg_a;
  logic free_empty, free_full, rdy_full;
  logic free_wr, free_rd;
  logic [7:0] free_wdata, free_rdata;
  logic [7:0] ptr_q;
  logic [7:0] len_l_q;
  logic rdy_wr;
  logic [PCW-1:0] free_cnt, rdy_cnt;

  assign is_reg = h_addr[SRAM_AW];
  assign reg_a  = h_addr[2:0];

  assign free_wr    = free_push || (h_we && is_reg && reg_a == 3'd0);
  assign free_wdata = free_push ? free_ptr : h_wdata;
  assign free_rd    = h_re && is_reg && reg_a == 3'd0;
  assign rdy_wr     = h_we && is_reg && reg_a == 3'd3;

  sync_fifo #(.WIDTH(8), .DEPTH(PTR_DEPTH)) u_tx_fifo_free (
    .clk, .rst_n, .clr(1'b0), .wr_en(free_wr), .wdata(free_wdata), .rd_en(free_rd),
    .rdata(free_rdata), .empty(free_empty), .full(free_full), .count(free_cnt));

  sync_fifo #(.WIDTH(8 + LEN_W), .DEPTH(PTR_DEPTH)) u_tx_fifo_ready (
    .clk, .rst_n, .clr(1'b0), .wr_en(rdy_wr), .wdata({ptr_q, h_wdata[LEN_W-9:0], len_l_q}),
    .rd_en(rdy_pop), .rdata({rdy_ptr, rdy_len}), .empty(rdy_empty), .full(rdy_full),
    .count(rdy_cnt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q <= '0; len_l_q <= '0;
    end else if (h_we && is_reg) begin
      if (reg_a == 3'd1) ptr_q   <= h_wdata;
      if (reg_a == 3'd2) len_l_q <= h_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (h_we && !is_reg) sram[h_addr[SRAM_AW-1:0]] <= h_wdata;
    c_rdata <= sram[c_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) h_rdata <= '0;
    else if (h_re) begin
      if (!is_reg)            h_rdata <= sram[h_addr[SRAM_AW-1:0]];
      else if (reg_a == 3'd0) h_rdata <= free_rdata;
      else if (reg_a == 3'd4) h_rdata <= {4'b0, rdy_full, rdy_empty, free_full, free_empty};
      else                    h_rdata <= '0;
    end
  end

  // The host pushes block numbers only while the core is not releasing one.
  a_free_port: assert property (@(posedge clk) disable iff (!rst_n)
    !(free_push && h_we && is_reg && reg_a == 3'd0));

  // NUM_BLOCKS blocks must fit into the SRAM.
  if (NUM_BLOCKS * BLOCK_BYTES > 2**SRAM_AW) begin : g_size_check
    $error("host_tx_if: NUM_BLOCKS*BLOCK_BYTES exceeds the SRAM");
  end

endmodule
