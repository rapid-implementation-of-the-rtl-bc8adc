// nav: network allocation vector (virtual carrier sense).
//
// `upd` with `dur` raises the NAV to `dur` time units, but only when `dur` is
// larger than what is left and the frame is not addressed to this station
// (`for_me` low). `nav_reset` clears it at once (for instance the coordinator's
// end-of-contention-free-period broadcast). The NAV counts down on every `tick`.
// `nav_zero` is the "NAV = 0" condition the transmit state machine tests.
// Update rule and reset follow the document; the 16-bit width is assumed.
module nav #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic         upd,
  input  logic [W-1:0] dur,
  input  logic         for_me,
  input  logic         nav_reset,
  output logic [W-1:0] nav_val,
  output logic         nav_zero
);

  assign nav_zero = (nav_val == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            nav_val <= '0;
    else if (nav_reset)                    nav_val <= '0;
    else if (upd && !for_me && dur > nav_val) nav_val <= dur;
    else if (tick && nav_val != '0)        nav_val <= nav_val - 1'b1;
  end

endmodule
