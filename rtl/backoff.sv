// backoff: CSMA/CA backoff counter with a binary-exponential contention window.
//
// On `backoff_req` with no backoff pending the counter is loaded with
// INT(CW * Random()) slots, where Random() is the 8-bit fraction `backoff_val`/256
// supplied from outside (the BACKOFF[7..0] input), i.e. (backoff_val*CW)>>8.
// A request while a frozen count is left resumes that count. A request after
// the previous backoff already reached zero is a retry: CW doubles (up to
// CW_MAX) before the new count is drawn. The count drops by one on every
// `slot` strobe while the medium is idle and freezes while `busy` is high.
// `f_backoff` is high while a loaded backoff has reached zero. `backreset`
// (successful access or give-up) returns CW to CW_MIN and clears the counter.
// CW limits 8 and 256, the formula and the freeze on a busy medium follow the
// document; the retry rule and the external random source are this design's.
module backoff
  import mac_pkg::*;
#(
  parameter int unsigned CWMIN = CW_MIN,
  parameter int unsigned CWMAX = CW_MAX
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] backoff_val,
  input  logic       backoff_req,
  input  logic       backreset,
  input  logic       slot,
  input  logic       busy,
  output logic       f_backoff,
  output logic [8:0] cw,
  output logic [8:0] count
);

  logic active;
  logic [16:0] prod;

  always_comb begin
    logic [8:0] cw_use;
    cw_use = (active && count == '0) ? ((cw >= 9'(CWMAX / 2)) ? 9'(CWMAX) : {cw[7:0], 1'b0}) : cw;
    prod = 17'(backoff_val) * 17'(cw_use);
  end

  assign f_backoff = active && (count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cw <= 9'(CWMIN); count <= '0; active <= 1'b0;
    end else if (backreset) begin
      cw <= 9'(CWMIN); count <= '0; active <= 1'b0;
    end else if (backoff_req && !(active && count != '0)) begin
      if (active) cw <= (cw >= 9'(CWMAX / 2)) ? 9'(CWMAX) : {cw[7:0], 1'b0};
      count  <= prod[16:8];
      active <= 1'b1;
    end else if (slot && !busy && count != '0) begin
      count <= count - 1'b1;
    end
  end

endmodule
