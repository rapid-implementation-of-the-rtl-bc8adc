// eth_to_wlan: packet filter from the distribution system to the wireless side
// (access point case "from the DS to a BSS").
//
// Takes a Fast Ethernet MAC frame as a byte stream (`eth_start` pulse, then
// bytes on eth_data/eth_valid in the order DA, SA, LENGTH high/low, body, FCS).
// The header is split off and the body is stored in a frame buffer while the
// CRC-32 FCS is checked. The frame is forwarded only when its DA is not the
// access point itself (MY_ADDR), DA is in the table of associated wireless
// stations, and the FCS is correct; otherwise it is dropped. A forwarded body is
// handed to the wireless transmitter the same way the host's transmit core
// does it: with `mac_ready` it is copied into the MSDU FIFO (gendata/data_out),
// together with the 802.11 header fields `wl_da`/`wl_sa`, and `fifo_emp` rises
// when the copy is complete. The transmitter then adds the 802.11 header and the
// new CRC-16.
// The association table (TABLE_SIZE entries, written with tbl_we/tbl_idx/
// tbl_addr) and the forwarding rule follow the document; sizes are assumed.
module eth_to_wlan
  import mac_pkg::*;
#(
  parameter logic [7:0] MY_ADDR = 8'd30,
  parameter int unsigned TABLE_SIZE = 8,
  parameter int unsigned BUF_DEPTH = 2048,
  localparam int unsigned TIW = (TABLE_SIZE > 1) ? $clog2(TABLE_SIZE) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tbl_we,
  input  logic [TIW-1:0] tbl_idx,
  input  logic [7:0]     tbl_addr,
  input  logic           eth_start,
  input  logic           eth_valid,
  input  logic [7:0]     eth_data,
  input  logic           mac_ready,
  input  logic           msdu_full,
  output logic           gendata,
  output logic [7:0]     data_out,
  output logic           fifo_emp,
  output logic [7:0]     wl_da,
  output logic [7:0]     wl_sa,
  output logic           fwd_ok,
  output logic           fwd_drop,
  output logic           busy
);

  typedef enum logic [2:0] { E_IDLE, E_HDR, E_BODY, E_FCS, E_CHECK, E_WAIT, E_COPY } estate_t;
  estate_t st;
  logic [7:0] tbl [TABLE_SIZE];
  logic [TABLE_SIZE-1:0] tbl_valid;
  logic [1:0] hidx, fidx;
  logic [15:0] blen, left;
  logic [31:0] crc;
  logic hit;
  logic buf_wr, buf_rd, buf_empty, buf_full, buf_clr;
  logic [$clog2(BUF_DEPTH + 1)-1:0] buf_cnt;

  crc_gen #(.WIDTH(32), .POLY(CRC32_POLY), .INIT(CRC32_INIT)) u_fcs (
    .clk, .rst_n, .preset(eth_start), .en(eth_valid && st inside {E_HDR, E_BODY, E_FCS}),
    .din(eth_data), .crc);

  sync_fifo #(.WIDTH(8), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .clr(buf_clr), .wr_en(buf_wr), .wdata(eth_data), .rd_en(buf_rd),
    .rdata(data_out), .empty(buf_empty), .full(buf_full), .count(buf_cnt));

  always_comb begin
    hit = 1'b0;
    for (int i = 0; i < TABLE_SIZE; i++)
      if (tbl_valid[i] && tbl[i] == wl_da) hit = 1'b1;
  end

  assign busy     = (st != E_IDLE);
  assign buf_wr   = (st == E_BODY) && eth_valid;
  assign gendata  = (st == E_COPY) && !buf_empty && !msdu_full;
  assign buf_rd   = gendata;
  assign fifo_emp = (st != E_COPY);
  assign buf_clr  = fwd_drop || (eth_start && st inside {E_IDLE, E_HDR, E_BODY, E_FCS});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tbl_valid <= '0;
      for (int i = 0; i < TABLE_SIZE; i++) tbl[i] <= '0;
    end else if (tbl_we) begin
      tbl[tbl_idx] <= tbl_addr; tbl_valid[tbl_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= E_IDLE; hidx <= '0; fidx <= '0; blen <= '0; left <= '0;
      wl_da <= '0; wl_sa <= '0; fwd_ok <= 1'b0; fwd_drop <= 1'b0;
    end else begin
      fwd_ok <= 1'b0; fwd_drop <= 1'b0;
      if (eth_start && st inside {E_IDLE, E_HDR, E_BODY, E_FCS}) begin
        st <= E_HDR; hidx <= '0;
      end else begin
        unique case (st)
          E_HDR: if (eth_valid) begin
            unique case (hidx)
              2'd0: wl_da <= eth_data;
              2'd1: wl_sa <= eth_data;
              2'd2: blen[15:8] <= eth_data;
              default: blen[7:0] <= eth_data;
            endcase
            hidx <= hidx + 1'b1;
            if (hidx == 2'd3) begin
              left <= {blen[15:8], eth_data}; fidx <= '0;
              st <= ({blen[15:8], eth_data} == '0) ? E_FCS : E_BODY;
            end
          end
          E_BODY: if (eth_valid) begin
            left <= left - 1'b1;
            if (left == 16'd1) st <= E_FCS;
          end
          E_FCS: if (eth_valid) begin
            fidx <= fidx + 1'b1;
            if (fidx == 2'd3) st <= E_CHECK;
          end
          E_CHECK: begin
            if (crc == '0 && wl_da != MY_ADDR && hit && !buf_full) st <= E_WAIT;
            else begin fwd_drop <= 1'b1; st <= E_IDLE; end
          end
          E_WAIT: if (mac_ready) st <= E_COPY;
          E_COPY: if (buf_empty) begin fwd_ok <= 1'b1; st <= E_IDLE; end
          default: st <= E_IDLE;
        endcase
      end
    end
  end

endmodule
