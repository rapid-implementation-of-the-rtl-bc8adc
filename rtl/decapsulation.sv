// decapsulation: splits a received MPDU into header, payload and CRC.
//
// After the one-cycle `rx_indicate` pulse it counts the bytes that arrive with
// `rx_valid`. The first five are the header, the next (mpdu_length - 5) are the
// payload, written to the receive FIFO (`rxfifo_w`, `rxpayload`), and the last
// two are the CRC. `crc_preset` starts the CRC checker, `crc_ena` feeds it every
// byte of the frame including the CRC bytes. `rx_done` pulses with the last CRC
// byte; `busy` is high in between. Bytes after the frame are ignored.
// The split into header, payload and CRC follows the document; the byte strobe
// and the length-driven end of frame are this design's. `rxpayload` is the
// received byte itself; the block's work is in when the strobes fire.
module decapsulation
  import mac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_indicate,
  input  logic       rx_valid,
  input  logic [7:0] rxdata,
  input  logic [7:0] mpdu_length,
  output logic       crc_preset,
  output logic       crc_ena,
  output logic       rxfifo_w,
  output logic [7:0] rxpayload,
  output logic       rx_done,
  output logic       busy
);

  logic [8:0] cnt;        // bytes received so far
  logic [8:0] total;      // length + 2 CRC bytes

  assign total      = {1'b0, mpdu_length} + 9'd2;
  assign crc_preset = rx_indicate;
  assign crc_ena    = busy && rx_valid;
  assign rxpayload  = rxdata;
  assign rxfifo_w   = crc_ena && cnt >= 9'(HDR_BYTES) && cnt < {1'b0, mpdu_length};
  assign rx_done    = crc_ena && cnt >= 9'(HDR_BYTES) && (cnt == total - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; busy <= 1'b0;
    end else if (rx_indicate) begin
      cnt <= '0; busy <= 1'b1;
    end else if (crc_ena) begin
      cnt <= cnt + 1'b1;
      if (rx_done) busy <= 1'b0;
    end
  end

endmodule
