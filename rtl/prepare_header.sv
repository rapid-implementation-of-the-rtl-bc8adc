// prepare_header: MPDU builder of the fragment unit (PrepareHeader, LoadCRC
// and LoadMPDU_ind of the fragment block).
//
// On `fragment` while a complete MSDU waits in the MSDU FIFO it takes
// min(remaining, FRAG_THRESH) bytes as the body of the next fragment and writes,
// one byte per clock into the MPDU FIFO (waiting whenever it is full):
//   FC=data, DA, SA, LEN=5+body, SEQ={ToDS, MoreFrag, frag#[1:0], seq#[3:0]},
//   the body bytes popped from the MSDU FIFO, then CRC-16 high and low byte.
// The CRC-16 covers header and body and is computed on the fly, so fields that
// are only known just before transmission are covered too. The fragment number
// counts up within an MSDU; the sequence number counts MSDUs. `busy` is high
// from the request until the last CRC byte is written.
// Header bytes, the CRC and the fragment-on-threshold rule follow the document;
// the SEQ byte layout and FRAG_THRESH=250 (the largest body an 8-bit length byte
// allows; the document's MPDU limit is 2312 bytes) are this design's choices.
module prepare_header
  import mac_pkg::*;
#(
  parameter int unsigned FRAG_THRESH = 250,
  parameter int unsigned CNT_W = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fragment,
  input  logic             msdu_complete,
  input  logic             tods,
  input  logic [7:0]       da,
  input  logic [7:0]       sa,
  input  logic [7:0]       msdu_data,
  input  logic             msdu_empty,
  input  logic [CNT_W-1:0] msdu_count,
  output logic             msdu_rd,
  output logic [7:0]       mpdu_wdata,
  output logic             mpdu_wr,
  input  logic             mpdu_full,
  output logic             busy,
  output logic [1:0]       frag_no,
  output logic [3:0]       seq_no
);

  typedef enum logic [2:0] { P_IDLE, P_HDR, P_BODY, P_CRC_H, P_CRC_L } pstate_t;
  pstate_t st;
  logic [2:0] idx;
  logic [7:0] body_left, body_len;
  logic more;
  logic crc_preset, crc_en;
  logic [15:0] crc;

  crc_gen #(.WIDTH(16), .POLY(CRC16_POLY), .INIT(CRC16_INIT)) u_crc (
    .clk, .rst_n, .preset(crc_preset), .en(crc_en), .din(mpdu_wdata), .crc);

  assign busy = (st != P_IDLE);

  always_comb begin
    mpdu_wdata = '0; mpdu_wr = 1'b0; msdu_rd = 1'b0; crc_en = 1'b0;
    crc_preset = (st == P_IDLE);
    unique case (st)
      P_HDR: begin
        unique case (idx)
          3'd0: mpdu_wdata = FC_DATA;
          3'd1: mpdu_wdata = da;
          3'd2: mpdu_wdata = sa;
          3'd3: mpdu_wdata = 8'(HDR_BYTES) + body_len;
          default: mpdu_wdata = {tods, more, frag_no, seq_no};
        endcase
        mpdu_wr = !mpdu_full; crc_en = !mpdu_full;
      end
      P_BODY: begin
        mpdu_wdata = msdu_data;
        mpdu_wr = !mpdu_full && !msdu_empty;
        msdu_rd = mpdu_wr; crc_en = mpdu_wr;
      end
      P_CRC_H: begin mpdu_wdata = crc[15:8]; mpdu_wr = !mpdu_full; end
      P_CRC_L: begin mpdu_wdata = crc[7:0];  mpdu_wr = !mpdu_full; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE; idx <= '0; body_left <= '0; body_len <= '0; more <= 1'b0;
      frag_no <= '0; seq_no <= '0;
    end else begin
      unique case (st)
        P_IDLE: if (fragment && msdu_complete && !msdu_empty) begin
          if (msdu_count > CNT_W'(FRAG_THRESH)) begin
            body_len <= 8'(FRAG_THRESH); body_left <= 8'(FRAG_THRESH); more <= 1'b1;
          end else begin
            body_len <= 8'(msdu_count); body_left <= 8'(msdu_count); more <= 1'b0;
          end
          idx <= '0; st <= P_HDR;
        end
        P_HDR: if (mpdu_wr) begin
          idx <= idx + 1'b1;
          if (idx == 3'(HDR_BYTES - 1)) st <= (body_left == '0) ? P_CRC_H : P_BODY;
        end
        P_BODY: if (mpdu_wr) begin
          body_left <= body_left - 1'b1;
          if (body_left == 8'd1) st <= P_CRC_H;
        end
        P_CRC_H: if (mpdu_wr) st <= P_CRC_L;
        P_CRC_L: if (mpdu_wr) begin
          st <= P_IDLE;
          if (more) frag_no <= frag_no + 1'b1;
          else begin frag_no <= '0; seq_no <= seq_no + 1'b1; end
        end
        default: st <= P_IDLE;
      endcase
    end
  end

endmodule
