// crc_gen: byte-serial CRC register (MSB-first, non-reflected).
//
// One data byte is folded into the register per clock while `en` is high;
// `preset` loads INIT (and wins over `en`). `crc` is the register value after
// the last byte, available the cycle after the byte was accepted. Feeding the
// CRC bytes themselves (high byte first) after the data leaves the register at
// zero, which is how the receiver checks a frame.
// Used with WIDTH=16 / POLY=0x1021 / INIT=0xFFFF as the MPDU CRC-16 and with
// WIDTH=32 / POLY=0x04C11DB7 as the Ethernet FCS engine. The CRC-16 choice is
// fixed by the transmit waveform the design follows; the byte-serial structure
// is this design's own.
module crc_gen #(
  parameter int unsigned WIDTH = 16,
  parameter logic [WIDTH-1:0] POLY = WIDTH'(16'h1021),
  parameter logic [WIDTH-1:0] INIT = '1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             preset,
  input  logic             en,
  input  logic [7:0]       din,
  output logic [WIDTH-1:0] crc
);

  function automatic logic [WIDTH-1:0] step(input logic [WIDTH-1:0] c, input logic [7:0] d);
    logic [WIDTH-1:0] r;
    r = c ^ (WIDTH'(d) << (WIDTH-8));
    for (int i = 0; i < 8; i++)
      r = r[WIDTH-1] ? ((r << 1) ^ POLY) : (r << 1);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      crc <= INIT;
    else if (preset) crc <= INIT;
    else if (en)     crc <= step(crc, din);
  end

endmodule
