// tb_wlan_mac_top: end-to-end test of the whole MAC at its default parameters.
// Behavioural models around the chip: a host that uses the buffer procedure
// (pop a free block, write the frame, queue {block, length}), a PHY that
// takes MPDU bytes whenever mpdu_valid is high and answers an RTS with a CTS
// frame sent back through the receiver, and an Ethernet side.
// `tick` is one pulse every TICK_DIV clocks, so SIFS leaves room for the CTS.
// Each mechanism below must happen at least once; each is counted and a
// mechanism that never happened counts as a failure:
//   rts, cts_in, tx_ok, fig11 (MPDU equals the reference waveform), access
//   delay (DIFS plus backoff slots), fragmentation, backoff freeze on a busy
//   medium, NAV hold-off, RTS retries with CW doubling and drop, block
//   recycling, ACK and CTS generation, CRC error, receive queue, ToDS to
//   Ethernet conversion (checked on the 4B/5B line after decoding it),
//   Ethernet to wireless forwarding, filter drop.
module tb_wlan_mac_top;
  import mac_pkg::*;
  localparam int TICK_DIV = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tick;
  logic [18:0] h_addr;
  logic [7:0] h_wdata, h_rdata, tx_da, tx_sa, backoff_val, mpdu_out, rxdata, rx_fifo_out;
  logic h_we, h_re, tx_tods, f_mbusy, txrts_req, txmpdu_req, mpdu_valid, mpdu_o, tx_ok, tx_drop;
  logic [8:0] cw;
  logic f_awake, f_dtim, rx_ind, rx_valid, rx_rreq, rx_emp, gen_cts, gen_ack, enqueue_rxq;
  logic enqueue_todsq, crc_err, frame_ok, nav_set, nav_reset, nav_zero;
  logic [15:0] nav_dur;
  logic [7:0] eth_rx_data, tbl_addr;
  logic [4:0] ds_tx_sym;
  logic ds_tx_frame, eth_rx_start, eth_rx_valid, tbl_we, fwd_ok, fwd_drop;
  logic [2:0] tbl_idx;

  wlan_mac_top dut (.*);

  int n[string];
  int cyc = 0, tdiv = 0, t_rts = -1;
  bit answer_cts = 1, rx_port_busy = 0;
  logic [7:0] mpdu_q[$], eth_q[$];
  int max_cw = 0;

  localparam logic [18:0] R_FREE = 19'h40000, R_PTR = 19'h40001, R_LL = 19'h40002, R_LH = 19'h40003;

  always @(posedge clk) begin
    cyc++;
    tdiv = (tdiv == TICK_DIV - 1) ? 0 : tdiv + 1;
    if (rst_n) begin
      if (mpdu_valid) mpdu_q.push_back(mpdu_out);
      if (txrts_req) begin n["rts"]++; if (t_rts < 0) t_rts = cyc; end
      if (dut.cts_ind) n["cts_in"]++;
      if (tx_ok) n["tx_ok"]++;
      if (tx_drop) n["drop"]++;
      if (gen_ack) n["ack"]++;
      if (gen_cts) n["cts_gen"]++;
      if (enqueue_rxq) n["rxq"]++;
      if (enqueue_todsq) n["todsq"]++;
      if (frame_ok) n["frame_ok"]++;
      if (fwd_ok) n["fwd_ok"]++;
      if (fwd_drop) n["fwd_drop"]++;
      if (dut.free_push) n["release"]++;
      if (dut.txsm_state == 4'd2 && f_mbusy) n["busy_freeze"]++;
      if (dut.u_tx.f_backoff && !nav_zero && dut.txsm_state == 4'd0) n["nav_hold"]++;
      if (txrts_req && !nav_zero) n["rts_in_nav"]++;
      if (cw > max_cw) max_cw = cw;
    end
  end
  assign tick = (tdiv == 0);

  // 4B/5B line decoder of the Ethernet side: J K, nibble pairs (low first), T R
  function automatic int dec5(input logic [4:0] c);
    logic [4:0] t [16];
    t = '{5'h1E, 5'h09, 5'h14, 5'h15, 5'h0A, 5'h0B, 5'h0E, 5'h0F,
          5'h12, 5'h13, 5'h16, 5'h17, 5'h1A, 5'h1B, 5'h1C, 5'h1D};
    for (int i = 0; i < 16; i++) if (t[i] == c) return i;
    return -1;
  endfunction
  int lst = 0, lo_nib = 0;
  always @(negedge clk) if (rst_n) begin
    unique case (lst)
      0: if (ds_tx_sym == 5'b11000) lst = 1;
      1: begin lst = (ds_tx_sym == 5'b10001) ? 2 : 0; if (lst == 2) n["jk"]++; end
      2: if (ds_tx_sym == 5'b01101) begin lst = 4; end
         else begin lo_nib = dec5(ds_tx_sym); if (lo_nib < 0) n["bad_sym"]++; lst = 3; end
      3: begin
           if (dec5(ds_tx_sym) < 0) n["bad_sym"]++;
           eth_q.push_back(8'((dec5(ds_tx_sym) << 4) | lo_nib)); lst = 2;
         end
      default: begin if (ds_tx_sym == 5'b00111) n["tr"]++; lst = 0; end
    endcase
  end
  assign mpdu_o = mpdu_valid;

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

  function automatic logic [31:0] crc32(input logic [7:0] b[$]);
    logic [31:0] c;
    logic fb;
    c = '1;
    foreach (b[i]) for (int k = 7; k >= 0; k--) begin
      fb = c[31] ^ b[i][k]; c = {c[30:0], 1'b0}; if (fb) c = c ^ 32'h04C1_1DB7;
    end
    return c;
  endfunction

  // --- host bus ---
  task automatic hwr(input logic [18:0] a, input logic [7:0] d);
    @(negedge clk) begin h_addr = a; h_wdata = d; h_we = 1; end
    @(negedge clk) h_we = 0;
  endtask
  task automatic hrd(input logic [18:0] a, output logic [7:0] d);
    @(negedge clk) begin h_addr = a; h_re = 1; end
    @(negedge clk) begin h_re = 0; d = h_rdata; end
  endtask
  task automatic host_send(input logic [7:0] body[$], output logic [7:0] blk);
    hrd(R_FREE, blk);
    foreach (body[i]) hwr(19'(int'(blk) * 2312 + i), body[i]);
    hwr(R_PTR, blk); hwr(R_LL, 8'(body.size())); hwr(R_LH, 8'(body.size() >> 8));
  endtask

  // --- receive side of the PHY ---
  task automatic rx_frame(input logic [7:0] fc, input logic [7:0] da, input logic [7:0] sa,
                          input logic [7:0] seq, input logic [7:0] body[$], input bit corrupt);
    logic [7:0] f[$];
    logic [15:0] c;
    while (rx_port_busy) @(negedge clk);
    rx_port_busy = 1;
    f.push_back(fc); f.push_back(da); f.push_back(sa); f.push_back(8'(5 + body.size())); f.push_back(seq);
    foreach (body[i]) f.push_back(body[i]);
    c = crc16(f); f.push_back(c[15:8]); f.push_back(c[7:0]);
    if (corrupt) f[5] ^= 8'h10;
    @(negedge clk) rx_ind = 1; @(negedge clk) rx_ind = 0;
    foreach (f[i]) begin rxdata = f[i]; rx_valid = 1; @(negedge clk); end
    rx_valid = 0;
    rx_port_busy = 0;
  endtask

  // the PHY answers each RTS with a CTS frame from the addressed station
  initial begin
    logic [7:0] none[$];
    forever begin
      @(posedge clk);
      if (rst_n && txrts_req && answer_cts) begin
        @(negedge clk);
        rx_frame(FC_CTS, 8'd30, 8'd40, 8'd0, none, 0);
      end
    end
  end

  initial begin
    #(10 * 400000);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wait_tx_done(input int n_ok0, input int n_drop0);
    int t;
    t = 0;
    while (n["tx_ok"] == n_ok0 && n["drop"] == n_drop0 && t < 100000) begin @(negedge clk); t++; end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    logic [7:0] body[$], exp[$], blk, d, blocks[$];
    logic [15:0] c;
    logic [31:0] c32;
    int t0, k, nfrag, ok0, drop0, delay;
    h_addr = 0; h_wdata = 0; h_we = 0; h_re = 0; tx_da = 8'd30; tx_sa = 8'd10; tx_tods = 0;
    f_mbusy = 0; backoff_val = 8'd64; f_awake = 1; f_dtim = 0; rx_ind = 0; rx_valid = 0; rxdata = 0;
    rx_rreq = 0; nav_set = 0; nav_reset = 0; nav_dur = 0; eth_rx_start = 0;
    eth_rx_valid = 0; eth_rx_data = 0; tbl_we = 0; tbl_idx = 0; tbl_addr = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat (2) @(negedge clk);
    // forwarding table: station 40 is associated
    @(negedge clk) begin tbl_we = 1; tbl_idx = 3'd0; tbl_addr = 8'd40; end
    @(negedge clk) tbl_we = 0;
    // host fills TX_FIFO_FREE with every block
    for (int i = 0; i < 113; i++) hwr(R_FREE, 8'(i));

    // ---- 1: the reference frame (body 10..17, DA 30, SA 10) ----
    body.delete(); for (int i = 0; i < 8; i++) body.push_back(8'(10 + i));
    mpdu_q.delete(); t_rts = -1;
    host_send(body, blk); t0 = cyc; blocks.push_back(blk);
    wait_tx_done(0, 0);
    exp = '{8'd32, 8'd30, 8'd10, 8'd13, 8'd0, 8'd10, 8'd11, 8'd12, 8'd13, 8'd14, 8'd15, 8'd16, 8'd17, 8'd215, 8'd102};
    check(mpdu_q.size() == 15, $sformatf("reference MPDU length %0d", mpdu_q.size()));
    k = 0; foreach (exp[i]) if (i < mpdu_q.size() && mpdu_q[i] == exp[i]) k++;
    if (k == 15) n["fig11"]++;
    check(k == 15, "MPDU equals the reference waveform 32,30,10,13,0,10..17,215,102");
    // DIFS 50 ticks + INT(64*8/256)=2 slots of 20 ticks, plus the host copy
    delay = t_rts - t0;
    if (delay >= (50 + 2 * 20) * TICK_DIV && delay <= (50 + 2 * 20) * TICK_DIV + 80) n["access_delay"]++;
    check(delay >= (50 + 2 * 20) * TICK_DIV && delay <= (50 + 2 * 20) * TICK_DIV + 80,
          $sformatf("access delay %0d clocks", delay));

    // ---- 2: 300-byte frame, fragmented into 250 + 50 body bytes; medium busy during the backoff ----
    body.delete(); for (int i = 0; i < 300; i++) body.push_back(8'($urandom));
    mpdu_q.delete(); ok0 = n["tx_ok"];
    host_send(body, blk); blocks.push_back(blk);
    fork
      begin
        while (dut.txsm_state != 4'd2) @(negedge clk);
        repeat (30) @(negedge clk);
        f_mbusy = 1; repeat (150) @(negedge clk); f_mbusy = 0;
      end
    join_none
    wait_tx_done(ok0, n["drop"]);
    nfrag = 0; k = 0;
    while (k + 5 <= mpdu_q.size()) begin
      exp.delete();
      for (int i = 0; i < mpdu_q[k + 3] + 2 && k + i < mpdu_q.size(); i++) exp.push_back(mpdu_q[k + i]);
      check(crc16(exp) == 16'h0, $sformatf("fragment %0d CRC", nfrag));
      check(mpdu_q[k + 4][5:4] == 2'(nfrag), "fragment number");
      check(mpdu_q[k + 4][6] == (nfrag == 0), "more-fragments bit");
      for (int i = 5; i < mpdu_q[k + 3] && k + i < mpdu_q.size(); i++)
        if (mpdu_q[k + i] != body[nfrag * 250 + i - 5]) begin check(0, "fragment data"); break; end
      k += mpdu_q[k + 3] + 2; nfrag++;
    end
    if (nfrag == 2) n["fragmented"]++;
    check(nfrag == 2 && mpdu_q[3] == 8'd255, $sformatf("300 bytes -> %0d fragments (len %0d, %0d bytes)", nfrag, mpdu_q[3], mpdu_q.size()));
    check(n["busy_freeze"] > 0, "medium busy seen during the backoff");

    // ---- 3: NAV holds the RTS back ----
    body.delete(); for (int i = 0; i < 20; i++) body.push_back(8'(i));
    ok0 = n["tx_ok"];
    @(negedge clk) begin nav_set = 1; nav_dur = 16'd400; end
    @(negedge clk) nav_set = 0;
    host_send(body, blk); blocks.push_back(blk);
    wait_tx_done(ok0, n["drop"]);
    check(n["nav_hold"] > 0 && n["rts_in_nav"] == 0, "no RTS while the NAV runs");
    check(n["tx_ok"] == ok0 + 1, "frame sent after the NAV expired");

    // ---- 4: nobody answers: RTS retries, CW doubles, frame dropped ----
    answer_cts = 0; backoff_val = 8'd8;
    body.delete(); for (int i = 0; i < 5; i++) body.push_back(8'(i));
    drop0 = n["drop"]; k = n["rts"];
    host_send(body, blk); blocks.push_back(blk);
    wait_tx_done(n["tx_ok"], drop0);
    check(n["drop"] == drop0 + 1, "frame dropped after the retries");
    check(n["rts"] - k == 8, $sformatf("%0d RTS for the dropped frame", n["rts"] - k));
    check(max_cw == 256, $sformatf("CW reached %0d", max_cw));
    check(cw == 9'd8, "CW reset after the drop");
    if (n["drop"] > 0 && max_cw == 256) n["cw_double"]++;
    answer_cts = 1; backoff_val = 8'd64;
    repeat (10) @(negedge clk);

    // ---- 5: used blocks come back to the free queue ----
    check(n["release"] == 4, $sformatf("%0d blocks released", n["release"]));
    for (int i = 4; i < 113; i++) hrd(R_FREE, d);
    k = 0;
    for (int i = 0; i < 4; i++) begin hrd(R_FREE, d); if (d == blocks[i]) k++; end
    check(k == 4, "released blocks reused in order");
    if (k == 4) n["recycle"]++;
    for (int i = 0; i < 113; i++) hwr(R_FREE, 8'(i));

    // ---- 6: reception ----
    body.delete(); for (int i = 0; i < 8; i++) body.push_back(8'(10 + i));
    rx_frame(FC_DATA, 8'd30, 8'd10, 8'd0, body, 0);
    repeat (100) @(negedge clk);
    check(n["ack"] == 1 && n["rxq"] == 1 && n["frame_ok"] >= 1, $sformatf("data frame: ACK and receive queue (%0d %0d %0d)", n["ack"], n["rxq"], n["frame_ok"]));
    k = 0;
    while (!rx_emp && k < 20) begin
      if (rx_fifo_out == body[k]) n["rx_byte"]++;
      k++; rx_rreq = 1; @(negedge clk); rx_rreq = 0;
    end
    check(k == 8 && n["rx_byte"] == 8, "payload read by the host");
    body.delete();
    rx_frame(FC_RTS, 8'd30, 8'd40, 8'd0, body, 0);
    repeat (100) @(negedge clk);
    check(n["cts_gen"] == 1, "RTS answered with CTS");
    body.push_back(8'd1); body.push_back(8'd2);
    rx_frame(FC_DATA, 8'd30, 8'd10, 8'd0, body, 1);
    repeat (3) @(negedge clk);
    if (crc_err) n["crc_err"]++;
    repeat (100) @(negedge clk);
    check(n["crc_err"] == 1 && n["ack"] == 1 && rx_emp, "corrupted frame: CRC error, no ACK, discarded");

    // ---- 7: ToDS frame to station 40 goes out as an Ethernet frame ----
    body.delete(); for (int i = 0; i < 12; i++) body.push_back(8'($urandom));
    eth_q.delete();
    rx_frame(FC_DATA, 8'd40, 8'd10, 8'h80, body, 0);
    repeat (160) @(negedge clk);
    exp.delete();
    exp.push_back(8'd40); exp.push_back(8'd10); exp.push_back(8'd0); exp.push_back(8'd12);
    foreach (body[i]) exp.push_back(body[i]);
    c32 = crc32(exp);
    for (int i = 3; i >= 0; i--) exp.push_back(c32[8*i +: 8]);
    k = 0; foreach (exp[i]) if (i < eth_q.size() && eth_q[i] == exp[i]) k++;
    check(n["jk"] == 1 && n["tr"] == 1 && n["bad_sym"] == 0, "4B/5B delimiters and code groups");
    check(n["todsq"] == 1 && eth_q.size() == 20 && k == 20, $sformatf("ToDS -> Ethernet frame (%0d bytes)", eth_q.size()));
    if (k == 20) n["to_eth"]++;

    // ---- 8: Ethernet frame for station 40 is sent over the air; bad one dropped ----
    body.delete(); for (int i = 0; i < 16; i++) body.push_back(8'(100 + i));
    for (int bad = 1; bad >= 0; bad--) begin
      exp.delete();
      exp.push_back(8'd40); exp.push_back(8'd77); exp.push_back(8'd0); exp.push_back(8'd16);
      foreach (body[i]) exp.push_back(body[i]);
      c32 = crc32(exp) ^ (bad ? 32'h1 : 32'h0);
      for (int i = 3; i >= 0; i--) exp.push_back(c32[8*i +: 8]);
      mpdu_q.delete(); ok0 = n["tx_ok"];
      @(negedge clk) eth_rx_start = 1; @(negedge clk) eth_rx_start = 0;
      foreach (exp[i]) begin eth_rx_valid = 1; eth_rx_data = exp[i]; @(negedge clk); end
      eth_rx_valid = 0;
      if (!bad) wait_tx_done(ok0, n["drop"]); else repeat (20) @(negedge clk);
    end
    check(n["fwd_drop"] == 1, "bad FCS Ethernet frame dropped");
    check(n["fwd_ok"] == 1 && mpdu_q.size() == 23, $sformatf("forwarded MPDU %0d bytes", mpdu_q.size()));
    if (mpdu_q.size() == 23) begin
      check(mpdu_q[1] == 8'd40 && mpdu_q[2] == 8'd77 && mpdu_q[3] == 8'd21, "forwarded MPDU header");
      check(crc16(mpdu_q) == 16'h0, "forwarded MPDU CRC");
      if (mpdu_q[1] == 8'd40) n["from_eth"]++;
    end

    // every mechanism must have happened
    begin
      string mech[$];
      mech = '{"rts", "cts_in", "tx_ok", "fig11", "access_delay", "fragmented", "busy_freeze",
               "nav_hold", "drop", "cw_double", "release", "recycle", "ack", "cts_gen", "crc_err",
               "rxq", "todsq", "to_eth", "fwd_ok", "fwd_drop", "from_eth"};
      foreach (mech[i]) begin
        $display("mechanism %-13s %0d", mech[i], n[mech[i]]);
        check(n[mech[i]] > 0, {"mechanism never happened: ", mech[i]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
