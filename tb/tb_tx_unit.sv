// tb_tx_unit: the transmitter unit end to end with a behavioural PHY.
// 1) The MSDU 10..17 (DA=30, SA=10) must go out after DIFS (50 ticks) and a
//    backoff of INT(8*128/256)=4 slots (80 ticks) as RTS, then, after the CTS,
//    as the MPDU of the reference transmit waveform.
// 2) A 300-byte MSDU must go out as two fragments (250 + 50 bytes) in one
//    access, the second after a SIFS.
// 3) With no CTS ever answering, the RTS is retried RTS_RETRY_MAX times and
//    the frame dropped; CW doubles with each retry.
// The medium is made busy once during the backoff; the backoff must freeze.
module tb_tx_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tick, te, gendata, fifo_emp, tods, f_mbusy, nav_zero, cts_ind, mpdu_o;
  logic [7:0] data_in, da, sa, backoff_val, mpdu_out;
  logic txmpdu_req, mpdu_valid, txrts_req, tx_ok, tx_drop, msdufifo_ful, idle;
  logic [3:0] txsm_state;
  logic [8:0] cw;
  logic [7:0] got[$];
  bit answer_cts;
  int n_rts = 0, n_ok = 0, n_drop = 0, cyc = 0, t_rts = -1, n_frames = 0;
  int max_cw = 0;

  tx_unit dut (.*);

  assign tick = 1'b1;
  assign mpdu_o = mpdu_valid;
  always @(posedge clk) begin
    cyc++;
    if (mpdu_valid) got.push_back(mpdu_out);
    if (txrts_req) begin n_rts++; if (t_rts < 0) t_rts = cyc; end
    if (tx_ok) n_ok++;
    if (tx_drop) n_drop++;
    if (rst_n && cw > max_cw) max_cw = cw;
  end
  // CTS three clocks after an RTS when answer_cts is set
  initial begin
    cts_ind = 0;
    forever begin
      @(posedge clk);
      if (txrts_req && answer_cts) begin
        repeat (3) @(posedge clk);
        #1 cts_ind = 1; @(posedge clk); #1 cts_ind = 0;
      end
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [15:0] crc16(input logic [7:0] m[$]);
    logic [15:0] r;
    logic fb;
    r = 16'hFFFF;
    foreach (m[i]) for (int b = 7; b >= 0; b--) begin
      fb = r[15] ^ m[i][b]; r = {r[14:0], 1'b0}; if (fb) r ^= 16'h1021;
    end
    return r;
  endfunction

  task automatic load_msdu(input logic [7:0] m[$]);
    fifo_emp = 0;
    foreach (m[i]) begin @(negedge clk) begin gendata = 1; data_in = m[i]; end end
    @(negedge clk) begin gendata = 0; fifo_emp = 1; end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] fig[15] = '{32,30,10,13,0,10,11,12,13,14,15,16,17,215,102};
    logic [7:0] m[$], exp[$];
    int t0;
    te = 1; gendata = 0; fifo_emp = 1; tods = 0; f_mbusy = 0; nav_zero = 1;
    data_in = 0; da = 8'd30; sa = 8'd10; backoff_val = 8'd128; answer_cts = 1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(idle, "idle after reset");
    // 1) reference frame
    m = '{8'd10, 8'd11, 8'd12, 8'd13, 8'd14, 8'd15, 8'd16, 8'd17};
    load_msdu(m);
    t0 = cyc;
    // make the medium busy for a while in the middle of the backoff
    wait (txsm_state == 4'd2);
    repeat (30) @(negedge clk);
    f_mbusy = 1; repeat (25) @(negedge clk); f_mbusy = 0;
    wait (n_ok == 1);
    check(got.size() == 15, $sformatf("reference MPDU length %0d", got.size()));
    foreach (fig[i]) if (i < got.size()) check(got[i] == fig[i], $sformatf("byte %0d = %0d exp %0d", i, got[i], fig[i]));
    check(n_rts == 1, "one RTS");
    // DIFS 50 + 4 slots * 20, plus the 25 busy cycles, plus a second DIFS after
    // the busy medium (the state machine returns to IDLE and defers again)
    $display("RTS %0d cycles after the MSDU was queued", t_rts - t0);
    check(t_rts - t0 >= 50 + 80 + 25 && t_rts - t0 <= 50 + 80 + 25 + 50 + 20 + 10,
          $sformatf("access delay %0d cycles", t_rts - t0));
    // 2) two fragments
    got.delete(); n_rts = 0;
    m.delete(); for (int i = 0; i < 300; i++) m.push_back(8'($urandom));
    @(negedge clk); wait (idle);
    load_msdu(m);
    wait (n_ok == 2);
    exp.delete();
    for (int f = 0; f < 2; f++) begin
      logic [7:0] e[$];
      logic [15:0] c;
      int bl;
      bl = f ? 50 : 250;
      e = '{8'd32, 8'd30, 8'd10, 8'(5 + bl), {1'b0, f == 0, 2'(f), 4'd1}};
      for (int i = 0; i < bl; i++) e.push_back(m[250 * f + i]);
      c = crc16(e); e.push_back(c[15:8]); e.push_back(c[7:0]);
      exp = {exp, e};
    end
    check(got == exp, $sformatf("two fragments, %0d bytes received, %0d expected", got.size(), exp.size()));
    check(n_rts == 1, "both fragments in one access");
    // 3) no CTS: retries, then drop
    answer_cts = 0; n_rts = 0; got.delete();
    @(negedge clk); wait (idle);
    load_msdu('{8'd1, 8'd2, 8'd3});
    wait (n_drop == 1);
    check(n_rts == 8, $sformatf("%0d RTS attempts before the drop", n_rts));
    check(got.size() == 0, "nothing sent without CTS");
    check(max_cw == 256, $sformatf("CW grew to %0d", max_cw));
    repeat (5) @(negedge clk);
    check(idle && cw == 8, "idle with CW back at 8 after the drop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
