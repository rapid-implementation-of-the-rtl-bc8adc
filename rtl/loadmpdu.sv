// loadmpdu: receive front end of the MAC receiver unit.
//
// Combines decapsulation, CRC check, MAC header analysis and the 2000-byte
// receive MPDU FIFO. Bytes arrive on rxdata/rx_valid after an rx_ind pulse.
// The payload goes into the FIFO, from which the host side pops bytes with
// `rreq` (first-word-fall-through on `fifo_out`). Header fields, the address
// check and the CRC result are passed on to the receive state machine.
// `discard` empties the FIFO when the state machine drops a frame; this assumes
// the FIFO is read out frame by frame, which is this design's simplification.
module loadmpdu
  import mac_pkg::*;
#(
  parameter logic [7:0] MY_ADDR = 8'd30,
  parameter int unsigned FIFO_DEPTH = 2000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_ind,
  input  logic        rx_valid,
  input  logic [7:0]  rxdata,
  input  logic        rreq,
  input  logic        discard,
  output logic [7:0]  fifo_out,
  output logic        emp,
  output logic        full,
  output logic [15:0] crc_out,
  output logic        crcerr,
  output logic        crc_valid,
  output mac_hdr_t    hdr,
  output logic        hdr_done,
  output logic        macadd_err,
  output logic        for_me,
  output logic        cr_tods,
  output logic        cr_fraglast,
  output logic        rx_busy
);

  logic crc_preset, crc_ena, rxfifo_w, rx_done;
  logic [7:0] rxpayload;
  logic [$clog2(FIFO_DEPTH + 1)-1:0] fifo_count;

  decapsulation u_decap (
    .clk, .rst_n, .rx_indicate(rx_ind), .rx_valid, .rxdata, .mpdu_length(hdr.len),
    .crc_preset, .crc_ena, .rxfifo_w, .rxpayload, .rx_done, .busy(rx_busy));

  crccheck u_crccheck (
    .clk, .rst_n, .preset(crc_preset), .ena(crc_ena), .data_in(rxdata), .done(rx_done),
    .crc_out, .crcerr, .crc_valid);

  macheader #(.MY_ADDR(MY_ADDR)) u_macheader (
    .clk, .rst_n, .rx_indicate(rx_ind), .rx_valid, .rxdata, .hdr, .hdr_done,
    .macadd_err, .for_me, .cr_tods, .cr_fraglast);

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_mpdufifo (
    .clk, .rst_n, .clr(discard), .wr_en(rxfifo_w), .wdata(rxpayload), .rd_en(rreq),
    .rdata(fifo_out), .empty(emp), .full, .count(fifo_count));

endmodule
