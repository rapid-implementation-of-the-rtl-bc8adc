// crccheck: CRC-16 check of a received MPDU.
//
// `preset` starts a frame, `ena`/`data_in` feed every byte including the two
// received CRC bytes. A correct frame leaves the CRC register at zero. One
// cycle after `done` (the last byte) `crc_valid` rises and `crcerr` shows the
// result; both stay until the next `preset`. `crc_out` is the running register.
// The CRC-16 is the one the transmitter appends; the zero-remainder check is
// this design's way of comparing.
module crccheck
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        preset,
  input  logic        ena,
  input  logic [7:0]  data_in,
  input  logic        done,
  output logic [15:0] crc_out,
  output logic        crcerr,
  output logic        crc_valid
);

  logic done_d;

  crc_gen #(.WIDTH(16), .POLY(CRC16_POLY), .INIT(CRC16_INIT)) u_crc (
    .clk, .rst_n, .preset, .en(ena), .din(data_in), .crc(crc_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_d <= 1'b0; crcerr <= 1'b0; crc_valid <= 1'b0;
    end else begin
      done_d <= done && !preset;
      if (preset) begin
        crcerr <= 1'b0; crc_valid <= 1'b0;
      end else if (done_d) begin
        crcerr <= (crc_out != '0); crc_valid <= 1'b1;
      end
    end
  end

endmodule
