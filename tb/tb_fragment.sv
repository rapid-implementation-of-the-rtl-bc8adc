// tb_fragment: the fragment unit must turn the 8-byte MSDU 10..17 for
// DA=30, SA=10 into exactly the MPDU of the reference transmit waveform:
// 32,30,10,13,0,10,11,12,13,14,15,16,17,215,102. A 10-byte MSDU with a
// fragment threshold of 4 must become three MPDUs (bodies 4,4,2) with MoreFrag
// set on the first two, fragment numbers 0,1,2, ToDS as requested and a
// correct CRC-16 (compared with a bit-serial model). Also checks f_txq, the
// FIFO status flags (f_txq only once the copy is complete) and that a slow reader back-pressures the builder.
module tb_fragment;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic te, gendata, fifo_emp, frag_req, flush, tods, mpdu_o;
  logic [7:0] data_in, da, sa, mpdu_out;
  logic f_txq, msdufifo_emp, msdufifo_ful, mpdufifo_emp, mpdufifo_ful, mpdu_rdy, busy;

  fragment #(.MSDU_DEPTH(64), .MPDU_DEPTH(6), .FRAG_THRESH(4)) dut (.*);

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
    @(negedge clk) begin
      check(!f_txq, "f_txq low while the MSDU is still being copied");
      gendata = 0; fifo_emp = 1;
    end
  endtask

  // request one MPDU and read it out, reading only every `gap`-th cycle
  task automatic get_mpdu(input int gap, output logic [7:0] got[$]);
    got.delete();
    @(negedge clk) frag_req = 1; @(negedge clk) frag_req = 0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      if (mpdufifo_emp) break;
      mpdu_o = 0;
      if ((c % gap) == 0 && !dut.mpdu_empty) begin mpdu_o = 1; got.push_back(mpdu_out); end
      @(posedge clk); #1 mpdu_o = 0;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] got[$], body[$], exp[$], m[$];
    logic [7:0] ref_fig[15] = '{32,30,10,13,0,10,11,12,13,14,15,16,17,215,102};
    bit saw_full;
    te = 1; gendata = 0; fifo_emp = 1; frag_req = 0; flush = 0; tods = 0; mpdu_o = 0;
    data_in = 0; da = 8'd30; sa = 8'd10;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(!f_txq && msdufifo_emp && mpdufifo_emp, "empty after reset");
    m = '{8'd10, 8'd11, 8'd12, 8'd13, 8'd14, 8'd15, 8'd16, 8'd17, 8'd18, 8'd19};
    tods = 1;
    load_msdu(m);
    #1 check(f_txq, "f_txq once the MSDU is complete");
    for (int f = 0; f < 3; f++) begin
      int bl;
      bl = (f < 2) ? 4 : 2;
      saw_full = 0;
      fork
        begin get_mpdu(f == 0 ? 3 : 1, got); end
        begin repeat (30) begin @(posedge clk); if (mpdufifo_ful) saw_full = 1; end end
      join
      exp = '{8'd32, 8'd30, 8'd10, 8'(5 + bl), {1'b1, (f < 2) ? 1'b1 : 1'b0, 2'(f), 4'd0}};
      for (int i = 0; i < bl; i++) exp.push_back(m[4 * f + i]);
      begin logic [15:0] c; c = crc16(exp); exp.push_back(c[15:8]); exp.push_back(c[7:0]); end
      check(got.size() == exp.size(), $sformatf("fragment %0d length %0d exp %0d", f, got.size(), exp.size()));
      foreach (exp[i]) if (i < got.size()) check(got[i] == exp[i], $sformatf("fragment %0d byte %0d: %0d exp %0d", f, i, got[i], exp[i]));
      if (f == 0) check(saw_full, "slow reader fills the MPDU FIFO (back-pressure)");
      check(!f_txq, "f_txq low while the MSDU is being fragmented");
    end
    check(msdufifo_emp && mpdufifo_emp, "all consumed");
    // flush drops a queued MSDU
    load_msdu(m);
    @(negedge clk) flush = 1; @(negedge clk) flush = 0;
    check(msdufifo_emp && !f_txq, "flush empties the MSDU FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
