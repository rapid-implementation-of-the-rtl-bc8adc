// tx_dma: transmit core of the core control unit (DMA1).
//
// When the MAC transmitter is idle (`mac_ready`) and TX_FIFO_READY holds an
// entry, it pops {block, length}, reads `length` bytes from SRAM block
// `block` (byte address block*BLOCK_BYTES + n, one-cycle read latency) and writes
// them into the transmitter's MSDU FIFO (`gendata`/`data_out`), pausing while
// that FIFO is full. Then it pushes the block number back into TX_FIFO_FREE to
// release the block, and returns to idle. `fifo_emp` is high while no block
// is being moved, which tells the fragment unit that the MSDU is complete.
// One byte is moved every two clocks. The steps follow the document's transmit
// core procedure (release after the copy, as its text says); the handshake
// signals are this design's. `data_out` is the SRAM read data itself; the
// block decides the address and when `gendata` writes it.
module tx_dma #(
  parameter int unsigned SRAM_AW     = 18,
  parameter int unsigned BLOCK_BYTES = 2312,
  parameter int unsigned LEN_W       = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               mac_ready,
  input  logic               rdy_empty,
  input  logic [7:0]         rdy_ptr,
  input  logic [LEN_W-1:0]   rdy_len,
  output logic               rdy_pop,
  output logic [SRAM_AW-1:0] c_addr,
  input  logic [7:0]         c_rdata,
  output logic               free_push,
  output logic [7:0]         free_ptr,
  output logic               gendata,
  output logic [7:0]         data_out,
  input  logic               msdu_full,
  output logic               fifo_emp,
  output logic               busy
);

  typedef enum logic [1:0] { D_IDLE, D_RD, D_WR, D_REL } dstate_t;
  dstate_t st;
  logic [SRAM_AW-1:0] base;
  logic [LEN_W-1:0] n, len;

  assign rdy_pop   = (st == D_IDLE) && mac_ready && !rdy_empty;
  assign c_addr    = base + SRAM_AW'(n);
  assign gendata   = (st == D_WR) && !msdu_full;
  assign data_out  = c_rdata;
  assign free_push = (st == D_REL);
  assign fifo_emp  = (st == D_IDLE);
  assign busy      = (st != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; base <= '0; n <= '0; len <= '0; free_ptr <= '0;
    end else begin
      unique case (st)
        D_IDLE: if (rdy_pop) begin
          base <= SRAM_AW'(rdy_ptr) * SRAM_AW'(BLOCK_BYTES);
          len <= rdy_len; n <= '0; free_ptr <= rdy_ptr;
          st <= (rdy_len == '0) ? D_REL : D_RD;
        end
        D_RD: st <= D_WR;
        D_WR: if (gendata) begin
          n <= n + 1'b1;
          st <= (n == len - 1'b1) ? D_REL : D_RD;
        end
        D_REL: st <= D_IDLE;
        default: st <= D_IDLE;
      endcase
    end
  end

endmodule
