// fragment: fragment unit of the MAC transmitter.
//
// The upper layer writes the MSDU byte by byte into the MSDU FIFO (`data_in`
// with `gendata` while `te` is high) and signals the end of the MSDU by raising
// `fifo_emp` (its own source FIFO is empty). On `fragment` the MPDU builder
// turns the next piece of the MSDU into an MPDU (header, body, CRC-16) in the
// MPDU FIFO, from which the PHY side pops bytes with `mpdu_o`.
// Status outputs for the transmit state machine:
//   f_txq         a complete MSDU waits and no MPDU is built or pending
//   msdufifo_emp  no MSDU bytes left to fragment
//   mpdufifo_emp  MPDU FIFO empty and no MPDU being built, so an MPDU that is
//                 still being written is never mistaken for a finished one
//   mpdu_rdy      a byte is waiting on mpdu_out
// `flush` drops the MSDU and the MPDU (after a transmission is abandoned).
// A request is ignored while an MPDU is still waiting in the MPDU FIFO.
// The structure (MSDUFIFO, PrepareHeader with LoadCRC/LoadMPDU_ind, MPDUFIFO)
// and the pin set follow the document. FIFO depths: 4096 for the MSDU FIFO
// (its 12-bit count), 2000 for the MPDU FIFO (the receive MPDU FIFO's size);
// the definition of the status flags and `flush` are this design's.
module fragment
  import mac_pkg::*;
#(
  parameter int unsigned MSDU_DEPTH  = 4096,
  parameter int unsigned MPDU_DEPTH  = 2000,
  parameter int unsigned FRAG_THRESH = 250,
  localparam int unsigned MSDU_CW = $clog2(MSDU_DEPTH + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       te,
  input  logic       gendata,
  input  logic [7:0] data_in,
  input  logic       fifo_emp,
  input  logic       frag_req,
  input  logic       flush,
  input  logic       tods,
  input  logic [7:0] da,
  input  logic [7:0] sa,
  input  logic       mpdu_o,
  output logic [7:0] mpdu_out,
  output logic       f_txq,
  output logic       msdufifo_emp,
  output logic       msdufifo_ful,
  output logic       mpdufifo_emp,
  output logic       mpdufifo_ful,
  output logic       mpdu_rdy,
  output logic       busy
);

  logic [7:0] msdu_data, mpdu_wdata;
  logic msdu_empty, msdu_rd, mpdu_wr, mpdu_empty;
  logic [MSDU_CW-1:0] msdu_count;
  logic [$clog2(MPDU_DEPTH + 1)-1:0] mpdu_count;
  logic [1:0] frag_no;
  logic [3:0] seq_no;

  sync_fifo #(.WIDTH(8), .DEPTH(MSDU_DEPTH)) u_msdufifo (
    .clk, .rst_n, .clr(flush), .wr_en(te && gendata), .wdata(data_in),
    .rd_en(msdu_rd), .rdata(msdu_data), .empty(msdu_empty), .full(msdufifo_ful),
    .count(msdu_count));

  prepare_header #(.FRAG_THRESH(FRAG_THRESH), .CNT_W(MSDU_CW)) u_prep (
    .clk, .rst_n, .fragment(frag_req && mpdu_empty), .msdu_complete(fifo_emp), .tods, .da, .sa,
    .msdu_data, .msdu_empty, .msdu_count, .msdu_rd,
    .mpdu_wdata, .mpdu_wr, .mpdu_full(mpdufifo_ful), .busy, .frag_no, .seq_no);

  sync_fifo #(.WIDTH(8), .DEPTH(MPDU_DEPTH)) u_mpdufifo (
    .clk, .rst_n, .clr(flush), .wr_en(mpdu_wr), .wdata(mpdu_wdata),
    .rd_en(mpdu_o), .rdata(mpdu_out), .empty(mpdu_empty), .full(mpdufifo_ful),
    .count(mpdu_count));

  assign msdufifo_emp = msdu_empty;
  assign mpdufifo_emp = mpdu_empty && !busy;
  assign mpdu_rdy     = !mpdu_empty;
  assign f_txq = !msdu_empty && fifo_emp && !busy && mpdu_empty && (frag_no == '0);

endmodule
