// wlan_to_eth: packet filter from the wireless side to the distribution system
// (access point case "from a BSS to the DS").
//
// When the receiver has queued a ToDS data frame (`start` pulse with its header
// `hdr`), the frame body waits in the receive MPDU FIFO. This block pops it and
// writes a Fast Ethernet MAC frame, one byte per cycle while `eth_ready` is high,
// into the DS data buffer:
//   DA (wireless DA), SA (wireless SA), LENGTH high, LENGTH low (body bytes),
//   the body, FCS = CRC-32 over all preceding bytes, high byte first.
// `eth_last` marks the last FCS byte, `busy` is high for the whole conversion.
// The four conversion steps (split header and body, convert the header, append
// a new FCS, hand to the DS buffer) follow the document. Preamble and SFD belong
// to the DS transmit logic. Addresses are the design's 8-bit addresses, and the
// FCS uses the MSB-first CRC-32 register of this design, not the bit-reflected
// 802.3 convention.
module wlan_to_eth
  import mac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  mac_hdr_t   hdr,
  input  logic [7:0] fifo_data,
  input  logic       fifo_empty,
  output logic       fifo_rd,
  output logic [7:0] eth_data,
  output logic       eth_valid,
  output logic       eth_last,
  input  logic       eth_ready,
  output logic       busy
);

  typedef enum logic [2:0] { W_IDLE, W_DA, W_SA, W_LH, W_LL, W_BODY, W_FCS } wstate_t;
  wstate_t st;
  logic [7:0] da, sa;
  logic [15:0] blen, left;
  logic [1:0] fidx;
  logic [31:0] crc;
  logic crc_en;

  crc_gen #(.WIDTH(32), .POLY(CRC32_POLY), .INIT(CRC32_INIT)) u_fcs (
    .clk, .rst_n, .preset(st == W_IDLE), .en(crc_en), .din(eth_data), .crc);

  assign busy = (st != W_IDLE);

  always_comb begin
    eth_data = '0; eth_valid = 1'b0; eth_last = 1'b0; fifo_rd = 1'b0;
    unique case (st)
      W_DA:   begin eth_data = da;         eth_valid = 1'b1; end
      W_SA:   begin eth_data = sa;         eth_valid = 1'b1; end
      W_LH:   begin eth_data = blen[15:8]; eth_valid = 1'b1; end
      W_LL:   begin eth_data = blen[7:0];  eth_valid = 1'b1; end
      W_BODY: begin eth_data = fifo_data;  eth_valid = !fifo_empty; fifo_rd = eth_ready && !fifo_empty; end
      W_FCS:  begin
        eth_data = crc[8*(3-int'(fidx)) +: 8]; eth_valid = 1'b1; eth_last = (fidx == 2'd3);
      end
      default: ;
    endcase
  end
  assign crc_en = eth_valid && eth_ready && (st != W_FCS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= W_IDLE; da <= '0; sa <= '0; blen <= '0; left <= '0; fidx <= '0;
    end else begin
      unique case (st)
        W_IDLE: if (start) begin
          da <= hdr.da; sa <= hdr.sa;
          blen <= 16'(hdr.len) - 16'(HDR_BYTES); left <= 16'(hdr.len) - 16'(HDR_BYTES);
          st <= W_DA;
        end
        W_DA: if (eth_ready) st <= W_SA;
        W_SA: if (eth_ready) st <= W_LH;
        W_LH: if (eth_ready) st <= W_LL;
        W_LL: if (eth_ready) begin st <= (left == '0) ? W_FCS : W_BODY; fidx <= '0; end
        W_BODY: if (fifo_rd) begin
          left <= left - 1'b1;
          if (left == 16'd1) st <= W_FCS;
        end
        W_FCS: if (eth_ready) begin
          fidx <= fidx + 1'b1;
          if (fidx == 2'd3) st <= W_IDLE;
        end
        default: st <= W_IDLE;
      endcase
    end
  end

endmodule
