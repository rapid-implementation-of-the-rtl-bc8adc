// tb_txsm: walks the transmit state machine through the transmit-control flow
// chart with hand-driven inputs: request with busy medium, DIFS, backoff,
// busy medium during backoff, RTS, CTS, MPDU hand-over, next fragment via
// WAIT_ACK, completion; then CTS timeouts until the retry limit drops the frame.
module tb_txsm;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic f_txq, f_mbusy, f_backoff, nav_zero, a_difs, a_sifs, cts_ind, mpdufifo_emp, msdufifo_emp;
  logic backoff_req, frag_req, difs_req, txrts_req, sifs_req, backreset, txmpdu_req, tx_ok, tx_drop;
  logic [3:0] state_o;
  logic [7:0] rts_retry_cnt, mpdu_retry_cnt;
  int n_rts = 0, n_boreq = 0, n_drop = 0;

  txsm #(.RTS_RETRY_MAX(2)) dut (.*);

  localparam int IDLE = 0, DIFS = 1, BO = 2, WCTS = 3, TXM = 4, WACK = 5;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %0d)", msg, state_o); end
  endtask

  always @(posedge clk) begin
    if (txrts_req) n_rts++;
    if (backoff_req) n_boreq++;
    if (tx_drop) n_drop++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    {f_txq, f_mbusy, f_backoff, a_difs, a_sifs, cts_ind} = '0;
    nav_zero = 1; mpdufifo_emp = 1; msdufifo_emp = 1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(state_o == IDLE, "starts idle");
    // frame queued but medium busy: stay
    @(negedge clk) begin f_txq = 1; f_mbusy = 1; end
    #1 check(!frag_req && !difs_req, "no request on busy medium");
    @(negedge clk) f_mbusy = 0;
    #1 check(frag_req && difs_req, "frag_req and difs_req on idle medium");
    @(negedge clk) begin f_txq = 0; msdufifo_emp = 0; mpdufifo_emp = 0; end
    check(state_o == DIFS, "DELAY_DIFS");
    // busy during DIFS -> back to idle
    f_mbusy = 1; @(negedge clk); check(state_o == IDLE, "busy during DIFS returns to idle");
    f_mbusy = 0; f_txq = 1; @(negedge clk); f_txq = 0; check(state_o == DIFS, "DIFS again");
    repeat (3) @(negedge clk); check(state_o == DIFS, "waits for a_difs");
    a_difs = 1; #1 check(backoff_req, "backoff_req at end of DIFS");
    @(negedge clk) a_difs = 0; check(state_o == BO, "BACKOFF");
    f_mbusy = 1; @(negedge clk); check(state_o == IDLE, "busy during backoff -> idle");
    #1 check(!txrts_req, "no RTS while busy");
    f_mbusy = 0; f_backoff = 1; nav_zero = 0; @(negedge clk);
    check(state_o == IDLE, "NAV set holds off the RTS");
    nav_zero = 1; #1 check(txrts_req && sifs_req, "RTS with SIFS when backoff done and NAV zero");
    @(negedge clk) f_backoff = 0; check(state_o == WCTS && rts_retry_cnt == 1, "WAIT_CTS, one attempt");
    cts_ind = 1; @(negedge clk) cts_ind = 0;
    check(state_o == TXM && rts_retry_cnt == 0, "CTS -> TX_MPDU");
    #1 check(txmpdu_req, "txmpdu_req while MPDU bytes are left");
    repeat (4) @(negedge clk);
    mpdufifo_emp = 1; #1 check(frag_req && sifs_req && !txmpdu_req, "next fragment requested");
    @(negedge clk) check(state_o == WACK && mpdu_retry_cnt == 1, "WAIT_ACK");
    mpdufifo_emp = 0; repeat (2) @(negedge clk); check(state_o == WACK, "waits for SIFS");
    a_sifs = 1; @(negedge clk) a_sifs = 0; check(state_o == TXM, "back to TX_MPDU");
    mpdufifo_emp = 1; msdufifo_emp = 1; #1 check(tx_ok && backreset, "both FIFOs empty: done");
    @(negedge clk) check(state_o == IDLE, "idle after done");
    // CTS timeout path: retry limit 2
    msdufifo_emp = 0; mpdufifo_emp = 0; f_backoff = 1;
    for (int r = 1; r <= 3; r++) begin
      @(negedge clk) check(state_o == WCTS && rts_retry_cnt == 8'(r), $sformatf("RTS attempt %0d", r));
      f_backoff = 0; a_sifs = 1; #1;
      if (r <= 2) check(backoff_req, "CTS timeout -> new backoff");
      else check(tx_drop && backreset, "retry limit reached -> drop");
      @(negedge clk) a_sifs = 0;
      if (r <= 2) begin check(state_o == BO, "BACKOFF after timeout"); f_backoff = 1; @(negedge clk); end
    end
    check(state_o == IDLE && rts_retry_cnt == 0, "idle, retry count cleared");
    check(n_rts == 4 && n_drop == 1, $sformatf("RTS count %0d drops %0d", n_rts, n_drop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
