// tb_prepare_header: the MPDU builder with a behavioural MSDU queue and an
// always-ready MPDU sink. The 8-byte MSDU 10..17 for DA=30, SA=10 must give the
// byte sequence of the reference transmit waveform,
// 32,30,10,13,0,10,11,12,13,14,15,16,17,215,102, one byte per clock; a long
// MSDU must be cut at FRAG_THRESH (250) with MoreFrag and fragment numbers,
// and the sequence number must advance per MSDU.
module tb_prepare_header;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic fragment, msdu_complete, tods, msdu_empty, msdu_rd, mpdu_wr, mpdu_full, busy;
  logic [7:0] da, sa, msdu_data, mpdu_wdata;
  logic [12:0] msdu_count;
  logic [1:0] frag_no;
  logic [3:0] seq_no;
  logic [7:0] q[$], got[$];

  prepare_header dut (.*);

  assign msdu_empty = (q.size() == 0);
  assign msdu_count = 13'(q.size());
  assign msdu_data  = msdu_empty ? 8'h00 : q[0];
  always @(posedge clk) begin
    if (msdu_rd) void'(q.pop_front());
    if (mpdu_wr) got.push_back(mpdu_wdata);
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

  task automatic build(output int cycles);
    got.delete();
    @(negedge clk) fragment = 1; @(negedge clk) fragment = 0;
    cycles = 1;
    while (busy) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] fig[15] = '{32,30,10,13,0,10,11,12,13,14,15,16,17,215,102};
    int cyc;
    fragment = 0; msdu_complete = 1; tods = 0; mpdu_full = 0; da = 8'd30; sa = 8'd10;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 10; i <= 17; i++) q.push_back(8'(i));
    build(cyc);
    check(got.size() == 15, $sformatf("figure frame length %0d", got.size()));
    foreach (fig[i]) if (i < got.size()) check(got[i] == fig[i], $sformatf("byte %0d = %0d, exp %0d", i, got[i], fig[i]));
    check(cyc == 16, $sformatf("request cycle plus one byte per clock (%0d cycles)", cyc));
    check(seq_no == 1 && frag_no == 0, "sequence number advanced");
    // 600-byte MSDU: fragments of 250, 250, 100
    for (int i = 0; i < 600; i++) q.push_back(8'($urandom));
    begin
      logic [7:0] src[$];
      src = q;
      for (int f = 0; f < 3; f++) begin
        logic [7:0] exp[$];
        logic [15:0] c;
        int bl;
        bl = (f < 2) ? 250 : 100;
        build(cyc);
        exp = '{8'd32, 8'd30, 8'd10, 8'(5 + bl), {1'b0, f < 2, 2'(f), 4'd1}};
        for (int i = 0; i < bl; i++) exp.push_back(src[250 * f + i]);
        c = crc16(exp); exp.push_back(c[15:8]); exp.push_back(c[7:0]);
        check(got == exp, $sformatf("fragment %0d of the 600-byte MSDU", f));
      end
    end
    check(seq_no == 2 && frag_no == 0, "fragment number back to 0, sequence 2");
    // MPDU sink not ready stalls the builder
    q.push_back(8'd1);
    got.delete();
    @(negedge clk) begin mpdu_full = 1; fragment = 1; end
    @(negedge clk) fragment = 0;
    repeat (5) @(negedge clk);
    check(busy && got.size() == 0, "stalled while the MPDU FIFO is full");
    mpdu_full = 0;
    while (busy) @(negedge clk);
    check(got.size() == 8, $sformatf("stalled frame completes (%0d bytes)", got.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
