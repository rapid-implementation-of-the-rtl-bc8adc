// mac_pkg: constants and types shared by the 802.11 MAC transmitter, receiver,
// host interface and DS packet filter.
//
// MPDU format used throughout: a five-byte MAC header followed by the frame
// body and a CRC-16 sent high byte first:
//   byte 0  FC   frame control: protocol version(2) type(2) subtype(4), MSB first
//   byte 1  DA   destination address (8 bits)
//   byte 2  SA   source address (8 bits)
//   byte 3  LEN  MPDU length in bytes, header + body, CRC excluded
//   byte 4  SEQ  {ToDS, MoreFrag, fragment number[1:0], sequence number[3:0]}
// The byte order FC, DA, SA, LEN, SEQ and the CRC-16 (polynomial 0x1021, preset
// 0xFFFF, no final inversion) reproduce the transmit and receive waveforms the
// design was checked against. Carrying ToDS and MoreFrag in the SEQ byte is this
// design's own choice: the five-byte header has no room for a flags byte.
package mac_pkg;

  // Frame control byte values (version 00, type, subtype written MSB first)
  localparam logic [7:0] FC_DATA = 8'b0010_0000;
  localparam logic [7:0] FC_RTS  = 8'b0001_1011;
  localparam logic [7:0] FC_CTS  = 8'b0001_1100;
  localparam logic [7:0] FC_ACK  = 8'b0001_1101;

  localparam int unsigned HDR_BYTES = 5;
  localparam int unsigned SEQ_TODS_BIT     = 7;
  localparam int unsigned SEQ_MOREFRAG_BIT = 6;

  // CRC-16 of the MPDU
  localparam logic [15:0] CRC16_POLY = 16'h1021;
  localparam logic [15:0] CRC16_INIT = 16'hFFFF;
  // CRC-32 of the Ethernet frame (FCS)
  localparam logic [31:0] CRC32_POLY = 32'h04C1_1DB7;
  localparam logic [31:0] CRC32_INIT = 32'hFFFF_FFFF;

  // Inter-frame spaces and slot time in timer units
  localparam int unsigned T_SIFS = 10;
  localparam int unsigned T_PIFS = 30;
  localparam int unsigned T_DIFS = 50;
  localparam int unsigned T_SLOT = 20;

  // Contention window limits
  localparam int unsigned CW_MIN = 8;
  localparam int unsigned CW_MAX = 256;

  typedef struct packed {
    logic [7:0] fc;
    logic [7:0] da;
    logic [7:0] sa;
    logic [7:0] len;
    logic [7:0] seq;
  } mac_hdr_t;

  // 4B/5B code groups of 100BASE-X: Idle, start delimiter J K, end delimiter T R
  localparam logic [4:0] SYM_I = 5'b11111;
  localparam logic [4:0] SYM_J = 5'b11000;
  localparam logic [4:0] SYM_K = 5'b10001;
  localparam logic [4:0] SYM_T = 5'b01101;
  localparam logic [4:0] SYM_R = 5'b00111;

  function automatic logic [4:0] enc4b5b(input logic [3:0] d);
    unique case (d)
      4'h0: return 5'b11110;  4'h1: return 5'b01001;
      4'h2: return 5'b10100;  4'h3: return 5'b10101;
      4'h4: return 5'b01010;  4'h5: return 5'b01011;
      4'h6: return 5'b01110;  4'h7: return 5'b01111;
      4'h8: return 5'b10010;  4'h9: return 5'b10011;
      4'hA: return 5'b10110;  4'hB: return 5'b10111;
      4'hC: return 5'b11010;  4'hD: return 5'b11011;
      4'hE: return 5'b11100;  default: return 5'b11101;
    endcase
  endfunction

endpackage
