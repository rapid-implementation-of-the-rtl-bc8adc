// rx_unit: MAC receiver unit: loadmpdu front end, receive state machine and
// its own timer.
//
// The PHY side presents a frame as an `rx_ind` pulse followed by bytes on
// rxdata/rx_valid. The receive state machine answers an RTS with gen_cts and a
// data frame with gen_ack (both SIFS after the frame), hands complete frames to
// the receive queue or, when ToDS is set, to the distribution-system queue, and
// reports CTS and ACK frames to the transmitter. The payload is read from
// `fifo_out` with `rreq`. `frame_ok` pulses for every frame whose CRC is
// correct (the NAV update point). The timer's PIFS/DIFS/slot outputs are
// brought out as in the receiver's block diagram.
module rx_unit
  import mac_pkg::*;
#(
  parameter logic [7:0] MY_ADDR = 8'd30,
  parameter int unsigned FIFO_DEPTH = 2000,
  parameter int unsigned SIFS_T = T_SIFS,
  parameter int unsigned PIFS_T = T_PIFS,
  parameter int unsigned DIFS_T = T_DIFS,
  parameter int unsigned SLOT_T = T_SLOT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  logic        f_awake,
  input  logic        f_dtim,
  input  logic        rx_ind,
  input  logic        rx_valid,
  input  logic [7:0]  rxdata,
  input  logic        rreq,
  input  logic        slottime,
  input  logic        pifs,
  input  logic        difs,
  output logic [7:0]  fifo_out,
  output logic        emp,
  output logic        full,
  output logic        gen_cts,
  output logic        gen_ack,
  output logic        assemble,
  output logic        enqueue_rxq,
  output logic        enqueue_todsq,
  output logic        cts_ind,
  output logic        ack_ind,
  output logic        crc_err,
  output logic        frame_ok,
  output logic        for_me,
  output mac_hdr_t    hdr,
  output logic        a_pifs,
  output logic        a_difs,
  output logic        a_slot,
  output logic [1:0]  rxsm_state
);

  logic [15:0] crc_out;
  logic crc_valid, crc_valid_d, hdr_done, macadd_err, cr_tods, cr_fraglast, rx_busy;
  logic timer_reset, sifs, a_sifs, discard;

  loadmpdu #(.MY_ADDR(MY_ADDR), .FIFO_DEPTH(FIFO_DEPTH)) u_loadmpdu (
    .clk, .rst_n, .rx_ind, .rx_valid, .rxdata, .rreq, .discard, .fifo_out, .emp, .full,
    .crc_out, .crcerr(crc_err), .crc_valid, .hdr, .hdr_done, .macadd_err, .for_me,
    .cr_tods, .cr_fraglast, .rx_busy);

  rxsm u_rxsm (
    .clk, .rst_n, .f_awake, .f_dtim, .rx_indicate(rx_ind), .cr_type(hdr.fc), .a_sifs,
    .crcerr(crc_err), .crc_valid, .macadd_err, .cr_fraglast, .cr_tods,
    .gen_cts, .gen_ack, .assemble, .enqueue_rxq, .enqueue_todsq, .timer_reset, .sifs,
    .cts_ind, .ack_ind, .discard, .state_o(rxsm_state));

  mac_timer #(.SIFS_T(SIFS_T), .PIFS_T(PIFS_T), .DIFS_T(DIFS_T), .SLOT_T(SLOT_T)) u_timer (
    .clk, .rst_n, .tick, .reset(timer_reset), .slottime, .sifs, .pifs, .difs,
    .a_sifs, .a_pifs, .a_difs, .a_slot);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) crc_valid_d <= 1'b0;
    else        crc_valid_d <= crc_valid;
  end
  assign frame_ok = crc_valid && !crc_valid_d && !crc_err;

endmodule
