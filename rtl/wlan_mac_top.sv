// wlan_mac_top: 802.11 MAC and interface circuits of a wireless LAN card that
// can also act as an access point bridging to a Fast Ethernet distribution
// system (DS).
//
// Transmit: the host writes MSDUs into fixed 2312-byte blocks of the network
// buffer SRAM and queues them through TX_FIFO_FREE / TX_FIFO_READY
// (host_tx_if). The transmit core (tx_dma) copies each queued block into the MAC
// transmitter's MSDU FIFO and releases the block. The transmitter unit
// (tx_unit) fragments the MSDU, adds header and CRC-16, contends for the medium
// (DIFS, backoff, NAV), does the RTS/CTS handshake and hands the MPDU bytes to
// the PLCP transmitter (mpdu_out/mpdu_o while mpdu_valid).
// Receive: PLCP receive bytes (rx_ind, rx_valid, rxdata) enter the receiver
// unit (rx_unit), which checks CRC and address, answers with gen_cts/gen_ack,
// reports CTS to the transmitter and queues the body in its MPDU FIFO.
// DS bridging: a received ToDS frame is converted into an Ethernet frame
// (wlan_to_eth) and sent as 4B/5B code groups on ds_tx_sym (ds_enc4b5b, one
// group per clock, Idle between frames); an Ethernet frame arriving on eth_rx_* for an
// associated station is converted back and sent over the air (eth_to_wlan),
// sharing the transmitter with the host path (the DS path has priority).
// The NAV is set and reset by the core (nav_set/nav_dur/nav_reset), for
// instance at the start and end of a contention-free period.
// Not included: RF front end, PLCP state machines, the core microprocessor and
// the rest of the Fast Ethernet convergence sublayer (decoder, serialiser,
// preamble); their signals are ports. `tick` is the
// time base of all inter-frame spaces, slots and the NAV.
module wlan_mac_top
  import mac_pkg::*;
#(
  parameter logic [7:0] MY_ADDR = 8'd30,
  parameter int unsigned FRAG_THRESH = 250,
  parameter int unsigned SRAM_AW = 18,
  parameter int unsigned BLOCK_BYTES = 2312,
  parameter int unsigned NUM_BLOCKS = 113,
  parameter int unsigned SIFS_T = T_SIFS,
  parameter int unsigned PIFS_T = T_PIFS,
  parameter int unsigned DIFS_T = T_DIFS,
  parameter int unsigned SLOT_T = T_SLOT,
  parameter int unsigned TABLE_SIZE = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  // host bus
  input  logic [SRAM_AW:0]  h_addr,
  input  logic [7:0]        h_wdata,
  input  logic              h_we,
  input  logic              h_re,
  output logic [7:0]        h_rdata,
  // header fields for host frames (core registers)
  input  logic [7:0]        tx_da,
  input  logic [7:0]        tx_sa,
  input  logic              tx_tods,
  // PHY / PLCP transmit side
  input  logic              f_mbusy,
  input  logic [7:0]        backoff_val,
  output logic              txrts_req,
  output logic              txmpdu_req,
  output logic              mpdu_valid,
  input  logic              mpdu_o,
  output logic [7:0]        mpdu_out,
  output logic              tx_ok,
  output logic              tx_drop,
  output logic [8:0]        cw,
  // PHY / PLCP receive side
  input  logic              f_awake,
  input  logic              f_dtim,
  input  logic              rx_ind,
  input  logic              rx_valid,
  input  logic [7:0]        rxdata,
  input  logic              rx_rreq,
  output logic [7:0]        rx_fifo_out,
  output logic              rx_emp,
  output logic              gen_cts,
  output logic              gen_ack,
  output logic              enqueue_rxq,
  output logic              enqueue_todsq,
  output logic              crc_err,
  output logic              frame_ok,
  // NAV control by the core
  input  logic              nav_set,
  input  logic [15:0]       nav_dur,
  input  logic              nav_reset,
  output logic              nav_zero,
  // DS side: Ethernet frames to and from the convergence sublayer
  output logic [4:0]        ds_tx_sym,
  output logic              ds_tx_frame,
  input  logic              eth_rx_start,
  input  logic              eth_rx_valid,
  input  logic [7:0]        eth_rx_data,
  input  logic              tbl_we,
  input  logic [$clog2(TABLE_SIZE)-1:0] tbl_idx,
  input  logic [7:0]        tbl_addr,
  output logic              fwd_ok,
  output logic              fwd_drop
);

  // host interface <-> transmit core
  logic rdy_empty, rdy_pop, free_push;
  logic [7:0] rdy_ptr, free_ptr, c_rdata;
  logic [11:0] rdy_len;
  logic [SRAM_AW-1:0] c_addr;
  // MSDU sources
  logic dma_gendata, dma_fifo_emp, dma_busy;
  logic [7:0] dma_data;
  logic e2w_gendata, e2w_fifo_emp, e2w_busy;
  logic [7:0] e2w_data, e2w_da, e2w_sa;
  logic src_ds;
  logic tx_idle, msdufifo_ful;
  logic [3:0] txsm_state;
  // receiver
  logic cts_ind, ack_ind, assemble, rx_full, for_me, a_pifs, a_difs, a_slot;
  logic [1:0] rxsm_state;
  mac_hdr_t rx_hdr;
  logic rx_rd, w2e_rd, w2e_busy;
  // Ethernet frame bytes between the converter and the line encoder
  logic [7:0] eth_tx_data;
  logic eth_tx_valid, eth_tx_last, eth_tx_ready;
  logic [15:0] nav_val;

  host_tx_if #(.SRAM_AW(SRAM_AW), .BLOCK_BYTES(BLOCK_BYTES), .NUM_BLOCKS(NUM_BLOCKS)) u_host_if (
    .clk, .rst_n, .h_addr, .h_wdata, .h_we, .h_re, .h_rdata,
    .rdy_empty, .rdy_ptr, .rdy_len, .rdy_pop, .c_addr, .c_rdata, .free_push, .free_ptr);

  tx_dma #(.SRAM_AW(SRAM_AW), .BLOCK_BYTES(BLOCK_BYTES)) u_tx_dma (
    .clk, .rst_n, .mac_ready(tx_idle && !e2w_busy), .rdy_empty, .rdy_ptr, .rdy_len, .rdy_pop,
    .c_addr, .c_rdata, .free_push, .free_ptr, .gendata(dma_gendata), .data_out(dma_data),
    .msdu_full(msdufifo_ful), .fifo_emp(dma_fifo_emp), .busy(dma_busy));

  eth_to_wlan #(.MY_ADDR(MY_ADDR), .TABLE_SIZE(TABLE_SIZE)) u_eth_to_wlan (
    .clk, .rst_n, .tbl_we, .tbl_idx, .tbl_addr, .eth_start(eth_rx_start),
    .eth_valid(eth_rx_valid), .eth_data(eth_rx_data), .mac_ready(tx_idle && !dma_busy),
    .msdu_full(msdufifo_ful), .gendata(e2w_gendata), .data_out(e2w_data),
    .fifo_emp(e2w_fifo_emp), .wl_da(e2w_da), .wl_sa(e2w_sa), .fwd_ok, .fwd_drop,
    .busy(e2w_busy));

  // remember which path filled the MSDU FIFO, for the header fields
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           src_ds <= 1'b0;
    else if (e2w_gendata) src_ds <= 1'b1;
    else if (dma_gendata) src_ds <= 1'b0;
  end

  tx_unit #(.FRAG_THRESH(FRAG_THRESH), .SIFS_T(SIFS_T), .DIFS_T(DIFS_T), .SLOT_T(SLOT_T)) u_tx (
    .clk, .rst_n, .tick, .te(1'b1), .gendata(dma_gendata || e2w_gendata),
    .data_in(e2w_gendata ? e2w_data : dma_data), .fifo_emp(dma_fifo_emp && e2w_fifo_emp),
    .tods(src_ds ? 1'b0 : tx_tods), .da(src_ds ? e2w_da : tx_da), .sa(src_ds ? e2w_sa : tx_sa),
    .f_mbusy, .nav_zero, .cts_ind, .backoff_val, .mpdu_o, .mpdu_out, .txmpdu_req, .mpdu_valid, .txrts_req,
    .tx_ok, .tx_drop, .msdufifo_ful, .idle(tx_idle), .txsm_state, .cw);

  rx_unit #(.MY_ADDR(MY_ADDR), .SIFS_T(SIFS_T), .PIFS_T(PIFS_T), .DIFS_T(DIFS_T), .SLOT_T(SLOT_T)) u_rx (
    .clk, .rst_n, .tick, .f_awake, .f_dtim, .rx_ind, .rx_valid, .rxdata, .rreq(rx_rd),
    .slottime(1'b0), .pifs(1'b0), .difs(1'b0), .fifo_out(rx_fifo_out), .emp(rx_emp),
    .full(rx_full), .gen_cts, .gen_ack, .assemble, .enqueue_rxq, .enqueue_todsq, .cts_ind,
    .ack_ind, .crc_err, .frame_ok, .for_me, .hdr(rx_hdr), .a_pifs, .a_difs, .a_slot,
    .rxsm_state);

  wlan_to_eth u_wlan_to_eth (
    .clk, .rst_n, .start(enqueue_todsq), .hdr(rx_hdr), .fifo_data(rx_fifo_out),
    .fifo_empty(rx_emp), .fifo_rd(w2e_rd), .eth_data(eth_tx_data), .eth_valid(eth_tx_valid),
    .eth_last(eth_tx_last), .eth_ready(eth_tx_ready), .busy(w2e_busy));

  ds_enc4b5b u_ds_enc (
    .clk, .rst_n, .in_data(eth_tx_data), .in_valid(eth_tx_valid), .in_last(eth_tx_last),
    .in_ready(eth_tx_ready), .sym(ds_tx_sym), .in_frame(ds_tx_frame));

  assign rx_rd = w2e_busy ? w2e_rd : rx_rreq;

  nav u_nav (
    .clk, .rst_n, .tick, .upd(nav_set), .dur(nav_dur), .for_me(1'b0), .nav_reset,
    .nav_val, .nav_zero);

endmodule
