// ds_enc4b5b: 4B/5B line encoder of the Fast Ethernet convergence sublayer
// (transmit side), placed after the wireless-to-Ethernet converter.
//
// The line carries one 5-bit code group per clock. Between frames it sends
// Idle (11111). A frame arrives as bytes (`in_data`/`in_valid`, `in_last` on
// the final FCS byte) and goes out as J, K (start delimiter), then each byte as
// two code groups, low nibble first, then T, R (end delimiter). A byte is taken
// (`in_ready`) in the clock its high nibble is chosen, so the encoder consumes
// one byte every two clocks; `in_last` is remembered with it. The source must
// present the next byte within two clocks (checked by an assertion).
// Timing: the J group goes out the clock after `in_valid` rises while idle;
// `sym` is registered.
// From the document: 4B/5B coding with J/K marking the frame start and T/R the
// frame stop. The code table and the symbol values are those of 100BASE-X; the
// byte interface, the nibble order and leaving the preamble out are this
// design's choices.
module ds_enc4b5b
  import mac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_data,
  input  logic       in_valid,
  input  logic       in_last,
  output logic       in_ready,
  output logic [4:0] sym,
  output logic       in_frame
);

  typedef enum logic [2:0] { C_IDLE, C_J, C_K, C_LO, C_HI, C_T, C_R } cstate_t;
  cstate_t st, nst;
  logic [4:0] nsym;
  logic last_q;

  always_comb begin
    nst = st; in_ready = 1'b0; nsym = SYM_I;
    unique case (st)
      C_IDLE: if (in_valid) begin nst = C_J; nsym = SYM_J; end
      C_J:    begin nst = C_K; nsym = SYM_K; end
      C_K:    begin nst = C_LO; nsym = enc4b5b(in_data[3:0]); end
      C_LO:   begin nst = C_HI; nsym = enc4b5b(in_data[7:4]); in_ready = 1'b1; end
      C_HI:   begin
        if (last_q) begin nst = C_T; nsym = SYM_T; end
        else         begin nst = C_LO; nsym = enc4b5b(in_data[3:0]); end
      end
      C_T:    begin nst = C_R; nsym = SYM_R; end
      default: nst = C_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin st <= C_IDLE; sym <= SYM_I; last_q <= 1'b0; end
    else begin
      st <= nst; sym <= nsym;
      if (in_ready) last_q <= in_last;
    end
  end

  assign in_frame = (st != C_IDLE);

  // Inside a frame the source must keep a byte ready.
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n)
    (st inside {C_K, C_LO} || (st == C_HI && !last_q)) |-> in_valid);

endmodule
