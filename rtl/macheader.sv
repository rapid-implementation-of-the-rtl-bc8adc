// macheader: MAC header analysis of a received MPDU.
//
// Watches the received byte stream (`rx_valid`/`rxdata`, a frame starting after
// the one-cycle `rx_indicate` pulse) and latches the five header bytes:
// frame control, destination and source address, MPDU length and the sequence
// byte with its ToDS and MoreFrag bits. `hdr_done` rises once the header is
// complete and stays high to the end of the frame. `macadd_err` is raised when
// the destination is neither this station (MY_ADDR) nor relayed through it
// (ToDS set): such a frame must be dropped. `for_me` marks frames for MY_ADDR.
// Field set and the address rule follow the document; MY_ADDR is a parameter
// of this design.
module macheader
  import mac_pkg::*;
#(
  parameter logic [7:0] MY_ADDR = 8'd30
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_indicate,
  input  logic       rx_valid,
  input  logic [7:0] rxdata,
  output mac_hdr_t   hdr,
  output logic       hdr_done,
  output logic       macadd_err,
  output logic       for_me,
  output logic       cr_tods,
  output logic       cr_fraglast
);

  logic [2:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; hdr <= '0; hdr_done <= 1'b0;
    end else if (rx_indicate) begin
      idx <= '0; hdr_done <= 1'b0;
    end else if (rx_valid && !hdr_done) begin
      unique case (idx)
        3'd0: hdr.fc  <= rxdata;
        3'd1: hdr.da  <= rxdata;
        3'd2: hdr.sa  <= rxdata;
        3'd3: hdr.len <= rxdata;
        default: hdr.seq <= rxdata;
      endcase
      idx <= idx + 1'b1;
      if (idx == 3'(HDR_BYTES - 1)) hdr_done <= 1'b1;
    end
  end

  assign for_me      = (hdr.da == MY_ADDR);
  assign cr_tods     = hdr.seq[SEQ_TODS_BIT];
  assign cr_fraglast = !hdr.seq[SEQ_MOREFRAG_BIT];
  assign macadd_err  = hdr_done && !for_me && !cr_tods;

endmodule
