// mac_timer: inter-frame-space and slot timer of the transmitter and receiver.
//
// A one-cycle pulse on `sifs`, `pifs` or `difs` (re)starts that delay; the
// matching `a_sifs`, `a_pifs` or `a_difs` goes high once the delay has run out
// and stays high until the delay is started again or `reset` is pulsed. While
// `slottime` is high, `a_slot` pulses for one cycle every SLOT time units.
// Time is counted in units of `tick`, a one-cycle time-base strobe (tie it high
// to count clock cycles). SIFS 10, PIFS 30, DIFS 50 and slot 20 units are the
// document's figures; the time-base strobe is this design's own choice.
module mac_timer
  import mac_pkg::*;
#(
  parameter int unsigned SIFS_T = T_SIFS,
  parameter int unsigned PIFS_T = T_PIFS,
  parameter int unsigned DIFS_T = T_DIFS,
  parameter int unsigned SLOT_T = T_SLOT,
  localparam int unsigned W = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic reset,
  input  logic slottime,
  input  logic sifs,
  input  logic pifs,
  input  logic difs,
  output logic a_sifs,
  output logic a_pifs,
  output logic a_difs,
  output logic a_slot
);

  logic [W-1:0] c_sifs, c_pifs, c_difs, c_slot;
  logic r_sifs, r_pifs, r_difs;   // delay running

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_sifs <= '0; c_pifs <= '0; c_difs <= '0; c_slot <= '0;
      r_sifs <= 1'b0; r_pifs <= 1'b0; r_difs <= 1'b0;
      a_sifs <= 1'b0; a_pifs <= 1'b0; a_difs <= 1'b0; a_slot <= 1'b0;
    end else begin
      a_slot <= 1'b0;
      if (reset) begin
        r_sifs <= 1'b0; r_pifs <= 1'b0; r_difs <= 1'b0;
        a_sifs <= 1'b0; a_pifs <= 1'b0; a_difs <= 1'b0;
        c_slot <= '0;
      end else begin
        // SIFS
        if (sifs) begin
          c_sifs <= W'(SIFS_T); r_sifs <= 1'b1; a_sifs <= 1'b0;
        end else if (r_sifs && tick) begin
          if (c_sifs <= 1) begin r_sifs <= 1'b0; a_sifs <= 1'b1; end
          c_sifs <= c_sifs - 1'b1;
        end
        // PIFS
        if (pifs) begin
          c_pifs <= W'(PIFS_T); r_pifs <= 1'b1; a_pifs <= 1'b0;
        end else if (r_pifs && tick) begin
          if (c_pifs <= 1) begin r_pifs <= 1'b0; a_pifs <= 1'b1; end
          c_pifs <= c_pifs - 1'b1;
        end
        // DIFS
        if (difs) begin
          c_difs <= W'(DIFS_T); r_difs <= 1'b1; a_difs <= 1'b0;
        end else if (r_difs && tick) begin
          if (c_difs <= 1) begin r_difs <= 1'b0; a_difs <= 1'b1; end
          c_difs <= c_difs - 1'b1;
        end
        // periodic slot strobe
        if (!slottime) c_slot <= '0;
        else if (tick) begin
          if (c_slot >= W'(SLOT_T - 1)) begin c_slot <= '0; a_slot <= 1'b1; end
          else c_slot <= c_slot + 1'b1;
        end
      end
    end
  end

endmodule
