// txsm: transmit state machine of the MAC transmitter unit.
//
// States and transitions follow the transmit-control flow chart:
//   IDLE      frame queued (f_txq) and medium idle: ask the fragment unit for
//             an MPDU (frag_req) and start DIFS -> DELAY_DIFS.
//             Backoff finished, medium idle and NAV zero: send RTS (txrts_req),
//             start SIFS, count the RTS attempt -> WAIT_CTS.
//   DELAY_DIFS DIFS over and medium idle: start/resume backoff -> BACKOFF;
//             medium busy -> IDLE.
//   BACKOFF   backoff done and medium idle -> IDLE (which then sends the RTS);
//             medium busy -> IDLE (the backoff counter freezes meanwhile).
//   WAIT_CTS  SIFS over without CTS: retry through BACKOFF while the RTS count
//             is within RTS_RETRY_MAX, else give up (backreset, tx_drop) -> IDLE.
//             CTS before SIFS ran out -> TX_MPDU.
//   TX_MPDU   MPDU bytes left: txmpdu_req. MPDU FIFO empty and MSDU data left:
//             ask for the next fragment, start SIFS -> WAIT_ACK. Both empty:
//             backreset, tx_ok -> IDLE.
//   WAIT_ACK  SIFS over -> TX_MPDU.
// Request outputs are one-cycle pulses decoded from state and inputs, except
// txmpdu_req which stays high while the MPDU is being handed to the PHY.
// The flow chart is the document's; tx_ok/tx_drop and the retry limit value
// (7) are this design's additions.
module txsm #(
  parameter int unsigned RTS_RETRY_MAX = 7
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       f_txq,
  input  logic       f_mbusy,
  input  logic       f_backoff,
  input  logic       nav_zero,
  input  logic       a_difs,
  input  logic       a_sifs,
  input  logic       cts_ind,
  input  logic       mpdufifo_emp,
  input  logic       msdufifo_emp,
  output logic       backoff_req,
  output logic       frag_req,
  output logic       difs_req,
  output logic       txrts_req,
  output logic       sifs_req,
  output logic       backreset,
  output logic       txmpdu_req,
  output logic       tx_ok,
  output logic       tx_drop,
  output logic [3:0] state_o,
  output logic [7:0] rts_retry_cnt,
  output logic [7:0] mpdu_retry_cnt
);

  typedef enum logic [3:0] {
    S_IDLE, S_DELAY_DIFS, S_BACKOFF, S_WAIT_CTS, S_TX_MPDU, S_WAIT_ACK
  } state_t;

  state_t state, nxt;
  logic rts_inc, rts_clr, mpdu_inc;

  assign state_o = state;

  always_comb begin
    nxt = state;
    backoff_req = 1'b0; frag_req = 1'b0; difs_req = 1'b0; txrts_req = 1'b0;
    sifs_req = 1'b0; backreset = 1'b0; txmpdu_req = 1'b0; tx_ok = 1'b0; tx_drop = 1'b0;
    rts_inc = 1'b0; rts_clr = 1'b0; mpdu_inc = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (f_txq && !f_mbusy) begin
          frag_req = 1'b1; difs_req = 1'b1; nxt = S_DELAY_DIFS;
        end else if (f_backoff && !f_mbusy && nav_zero) begin
          txrts_req = 1'b1; sifs_req = 1'b1; rts_inc = 1'b1; nxt = S_WAIT_CTS;
        end
      end
      S_DELAY_DIFS: begin
        if (a_difs && !f_mbusy) begin
          backoff_req = 1'b1; nxt = S_BACKOFF;
        end else if (f_mbusy) nxt = S_IDLE;
      end
      S_BACKOFF: begin
        if (f_backoff && !f_mbusy) nxt = S_IDLE;
        else if (f_mbusy)          nxt = S_IDLE;
      end
      S_WAIT_CTS: begin
        if (a_sifs && rts_retry_cnt <= 8'(RTS_RETRY_MAX)) begin
          backoff_req = 1'b1; nxt = S_BACKOFF;
        end else if (a_sifs) begin
          backreset = 1'b1; rts_clr = 1'b1; tx_drop = 1'b1; nxt = S_IDLE;
        end else if (cts_ind) begin
          rts_clr = 1'b1; nxt = S_TX_MPDU;
        end
      end
      S_TX_MPDU: begin
        if (mpdufifo_emp && !msdufifo_emp) begin
          sifs_req = 1'b1; frag_req = 1'b1; mpdu_inc = 1'b1; nxt = S_WAIT_ACK;
        end else if (mpdufifo_emp && msdufifo_emp) begin
          backreset = 1'b1; tx_ok = 1'b1; nxt = S_IDLE;
        end else begin
          txmpdu_req = 1'b1;
        end
      end
      S_WAIT_ACK: begin
        if (a_sifs) nxt = S_TX_MPDU;
      end
      default: nxt = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; rts_retry_cnt <= '0; mpdu_retry_cnt <= '0;
    end else begin
      state <= nxt;
      if (rts_clr)      rts_retry_cnt <= '0;
      else if (rts_inc) rts_retry_cnt <= rts_retry_cnt + 1'b1;
      if (tx_ok)         mpdu_retry_cnt <= '0;
      else if (mpdu_inc) mpdu_retry_cnt <= mpdu_retry_cnt + 1'b1;
    end
  end

  // A request for an MPDU is never made while the medium is busy.
  a_no_frag_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && frag_req) |-> !f_mbusy);

endmodule
