// rxsm: receive state machine of the MAC receiver unit.
//
// States follow the receive-control flow chart:
//   INACTIVE   power save; wake on F_Awake or F_DTIM (TxST cleared) -> IDLE.
//   IDLE       back to INACTIVE when neither F_Awake nor F_DTIM is set and
//              TxST is clear; on RxIndicate set TxST, reset the timer -> CRC_CHECK.
//   CRC_CHECK  wait for the end of the frame. No CRC error -> PROCESS_RX.
//              CRC error: start SIFS, then -> IDLE (frame discarded).
//   PROCESS_RX start SIFS once (count1). A frame with an address error is
//              discarded -> IDLE. A received CTS or ACK is passed to the transmit
//              state machine (cts_ind / ack_ind) -> IDLE. Once SIFS has run out
//              (each action is taken on the second pass, the `count` toggle):
//                RTS                 -> gen_cts
//                data, more fragments-> assemble, gen_ack
//                data, last, ToDS=0  -> assemble, enqueue_rxq, gen_ack
//                data, last, ToDS=1  -> assemble, enqueue_todsq, gen_ack
// Outputs are one-cycle pulses. The flow chart is the document's. This design
// checks the address before the frame type (the chart tests it last), answers
// the last data fragment with an ACK (the chart prints a CTS there) and treats
// the ToDS branch as the last-fragment case. CTS/ACK handling is added.
module rxsm
  import mac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       f_awake,
  input  logic       f_dtim,
  input  logic       rx_indicate,
  input  logic [7:0] cr_type,
  input  logic       a_sifs,
  input  logic       crcerr,
  input  logic       crc_valid,
  input  logic       macadd_err,
  input  logic       cr_fraglast,
  input  logic       cr_tods,
  output logic       gen_cts,
  output logic       gen_ack,
  output logic       assemble,
  output logic       enqueue_rxq,
  output logic       enqueue_todsq,
  output logic       timer_reset,
  output logic       sifs,
  output logic       cts_ind,
  output logic       ack_ind,
  output logic       discard,
  output logic [1:0] state_o
);

  typedef enum logic [1:0] { R_INACTIVE, R_IDLE, R_CRC_CHECK, R_PROCESS_RX } rstate_t;
  rstate_t state, nxt;
  logic txst, txst_set, txst_clr;
  logic count1, count;
  logic count1_set, count_tgl, count_clr;
  logic err_sifs, err_sifs_set;

  assign state_o = state;

  always_comb begin
    nxt = state;
    {gen_cts, gen_ack, assemble, enqueue_rxq, enqueue_todsq, timer_reset, sifs,
     cts_ind, ack_ind, discard} = '0;
    txst_set = 1'b0; txst_clr = 1'b0;
    count1_set = 1'b0; count_tgl = 1'b0; count_clr = 1'b0; err_sifs_set = 1'b0;
    unique case (state)
      R_INACTIVE: if (f_awake || f_dtim) begin txst_clr = 1'b1; nxt = R_IDLE; end
      R_IDLE: begin
        if (!f_awake && !f_dtim && !txst) nxt = R_INACTIVE;
        else if (rx_indicate) begin
          txst_set = 1'b1; timer_reset = 1'b1; count_clr = 1'b1; nxt = R_CRC_CHECK;
        end
      end
      R_CRC_CHECK: begin
        if (crc_valid && !crcerr) nxt = R_PROCESS_RX;
        else if (crc_valid && crcerr) begin
          if (!err_sifs) begin sifs = 1'b1; err_sifs_set = 1'b1; end
          else if (a_sifs) begin discard = 1'b1; nxt = R_IDLE; end
        end
      end
      R_PROCESS_RX: begin
        if (!count1) begin sifs = 1'b1; count1_set = 1'b1; end
        else if (macadd_err) begin discard = 1'b1; nxt = R_IDLE; end
        else if (cr_type == FC_CTS) begin cts_ind = 1'b1; nxt = R_IDLE; end
        else if (cr_type == FC_ACK) begin ack_ind = 1'b1; nxt = R_IDLE; end
        else if (a_sifs) begin
          if (!count) count_tgl = 1'b1;
          else begin
            count_tgl = 1'b1;
            nxt = R_IDLE;
            if (cr_type == FC_RTS) gen_cts = 1'b1;
            else if (cr_type == FC_DATA) begin
              assemble = 1'b1; gen_ack = 1'b1;
              if (cr_fraglast && !cr_tods) enqueue_rxq = 1'b1;
              if (cr_fraglast && cr_tods)  enqueue_todsq = 1'b1;
            end else discard = 1'b1;
          end
        end
      end
      default: nxt = R_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_INACTIVE; txst <= 1'b0; count1 <= 1'b0; count <= 1'b0; err_sifs <= 1'b0;
    end else begin
      state <= nxt;
      if (txst_set) txst <= 1'b1; else if (txst_clr) txst <= 1'b0;
      if (count_clr) begin count1 <= 1'b0; count <= 1'b0; err_sifs <= 1'b0; end
      else begin
        if (count1_set) count1 <= 1'b1;
        if (count_tgl) count <= !count;
        if (err_sifs_set) err_sifs <= 1'b1;
      end
    end
  end

  // At most one response is generated per frame.
  a_one_response: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({gen_cts, gen_ack}));

endmodule
