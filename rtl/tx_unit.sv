// tx_unit: MAC transmitter unit, the four blocks of the transmitter's first
// hierarchy level wired together: fragment unit, transmit state machine,
// timer and backoff.
//
// The MSDU enters through data_in/gendata; the transmit state machine asks the
// fragment unit for MPDUs, times DIFS and SIFS with the timer, runs the backoff
// with random values from `backoff_val`, sends an RTS (txrts_req pulse) and on
// `cts_ind` hands the MPDU to the PHY: while `txmpdu_req` is high the PHY pops
// one byte per `mpdu_o` from `mpdu_out` whenever `mpdu_valid` is high. `tx_ok` pulses when the whole MSDU is
// sent, `tx_drop` when it is abandoned after too many RTS attempts (the MSDU
// and MPDU FIFOs are then flushed). The timer's slot strobe runs only while the
// state machine is in its backoff state. `idle` tells the host side that a new
// MSDU may be loaded. The PCF delay PIFS is not used by this state machine.
// The frame-pending flag given to the state machine (f_txq) is this design's
// reading of the flow chart: a frame waits (new MSDU or unsent MPDU) and its
// backoff has not yet finished.
module tx_unit
  import mac_pkg::*;
#(
  parameter int unsigned MSDU_DEPTH  = 4096,
  parameter int unsigned MPDU_DEPTH  = 2000,
  parameter int unsigned FRAG_THRESH = 250,
  parameter int unsigned SIFS_T = T_SIFS,
  parameter int unsigned DIFS_T = T_DIFS,
  parameter int unsigned SLOT_T = T_SLOT,
  parameter int unsigned RTS_RETRY_MAX = 7
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       te,
  input  logic       gendata,
  input  logic [7:0] data_in,
  input  logic       fifo_emp,
  input  logic       tods,
  input  logic [7:0] da,
  input  logic [7:0] sa,
  input  logic       f_mbusy,
  input  logic       nav_zero,
  input  logic       cts_ind,
  input  logic [7:0] backoff_val,
  input  logic       mpdu_o,
  output logic [7:0] mpdu_out,
  output logic       txmpdu_req,
  output logic       mpdu_valid,
  output logic       txrts_req,
  output logic       tx_ok,
  output logic       tx_drop,
  output logic       msdufifo_ful,
  output logic       idle,
  output logic [3:0] txsm_state,
  output logic [8:0] cw
);

  logic mpdu_rdy, frag_txq;
  logic f_txq, msdufifo_emp, mpdufifo_emp, mpdufifo_ful, frag_busy;
  logic backoff_req, frag_req, difs_req, sifs_req, backreset;
  logic a_sifs, a_pifs, a_difs, a_slot, f_backoff;
  logic [7:0] rts_cnt, mpdu_cnt;
  logic [8:0] bo_count;

  fragment #(.MSDU_DEPTH(MSDU_DEPTH), .MPDU_DEPTH(MPDU_DEPTH), .FRAG_THRESH(FRAG_THRESH)) u_fragment (
    .clk, .rst_n, .te, .gendata, .data_in, .fifo_emp, .frag_req, .flush(tx_drop),
    .tods, .da, .sa, .mpdu_o, .mpdu_out, .f_txq(frag_txq), .msdufifo_emp, .msdufifo_ful,
    .mpdufifo_emp, .mpdufifo_ful, .mpdu_rdy, .busy(frag_busy));

  txsm #(.RTS_RETRY_MAX(RTS_RETRY_MAX)) u_txsm (
    .clk, .rst_n, .f_txq, .f_mbusy, .f_backoff, .nav_zero, .a_difs, .a_sifs, .cts_ind,
    .mpdufifo_emp, .msdufifo_emp, .backoff_req, .frag_req, .difs_req, .txrts_req,
    .sifs_req, .backreset, .txmpdu_req, .tx_ok, .tx_drop, .state_o(txsm_state),
    .rts_retry_cnt(rts_cnt), .mpdu_retry_cnt(mpdu_cnt));

  mac_timer #(.SIFS_T(SIFS_T), .DIFS_T(DIFS_T), .SLOT_T(SLOT_T)) u_timer (
    .clk, .rst_n, .tick, .reset(1'b0), .slottime(txsm_state == 4'd2),
    .sifs(sifs_req), .pifs(1'b0), .difs(difs_req),
    .a_sifs, .a_pifs, .a_difs, .a_slot);

  backoff u_backoff (
    .clk, .rst_n, .backoff_val, .backoff_req, .backreset, .slot(a_slot), .busy(f_mbusy),
    .f_backoff, .cw, .count(bo_count));

  // A frame is waiting for the medium while a new MSDU is ready or a built MPDU
  // is still in the MPDU FIFO, and its backoff has not yet run out. This lets
  // the state machine defer again after the medium turned busy in the backoff.
  assign f_txq = (frag_txq || !mpdufifo_emp) && !f_backoff;
  assign mpdu_valid = txmpdu_req && mpdu_rdy;
  assign idle = (txsm_state == 4'd0) && msdufifo_emp && mpdufifo_emp && !f_txq;

endmodule
