// tb_eth_to_wlan: the packet filter. Ethernet frames arrive byte by byte; a
// frame is forwarded into a behavioural MSDU FIFO (with random full) only if
// its FCS is good, it is not addressed to this station and its DA is in the
// forwarding table. Checks the forwarded body, wl_da/wl_sa, the fwd_ok and
// fwd_drop pulses and that nothing is copied before mac_ready.
module tb_eth_to_wlan;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tbl_we, eth_start, eth_valid, mac_ready, msdu_full, gendata, fifo_emp, fwd_ok, fwd_drop, busy;
  logic [2:0] tbl_idx;
  logic [7:0] tbl_addr, eth_data, data_out, wl_da, wl_sa;
  logic [7:0] got[$];
  int n_ok = 0, n_drop = 0;

  eth_to_wlan dut (.*);

  always @(posedge clk) begin
    if (gendata && rst_n) got.push_back(data_out);
    if (fwd_ok && rst_n) n_ok++;
    if (fwd_drop && rst_n) n_drop++;
    msdu_full <= ($urandom_range(0, 4) == 0);
  end

  function automatic logic [31:0] crc32(input logic [7:0] b[$]);
    logic [31:0] c;
    logic fb;
    c = '1;
    foreach (b[i])
      for (int k = 7; k >= 0; k--) begin
        fb = c[31] ^ b[i][k];
        c = {c[30:0], 1'b0};
        if (fb) c = c ^ 32'h04C1_1DB7;
      end
    return c;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input logic [7:0] da, input int blen, input bit bad_fcs, output logic [7:0] body[$]);
    logic [7:0] f[$];
    logic [31:0] c;
    body.delete();
    f.push_back(da); f.push_back(8'd77); f.push_back(8'(blen >> 8)); f.push_back(8'(blen));
    for (int i = 0; i < blen; i++) begin body.push_back(8'($urandom)); f.push_back(body[i]); end
    c = crc32(f);
    if (bad_fcs) c = c ^ 32'h100;
    for (int k = 3; k >= 0; k--) f.push_back(c[8*k +: 8]);
    @(negedge clk) eth_start = 1; @(negedge clk) eth_start = 0;
    foreach (f[i]) begin
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      eth_valid = 1; eth_data = f[i]; @(negedge clk); eth_valid = 0;
    end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] body[$];
    tbl_we = 0; tbl_idx = 0; tbl_addr = 0; eth_start = 0; eth_valid = 0; eth_data = 0; mac_ready = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    @(negedge clk) begin tbl_we = 1; tbl_idx = 3'd0; tbl_addr = 8'd40; end
    @(negedge clk) begin tbl_idx = 3'd5; tbl_addr = 8'd41; end
    @(negedge clk) tbl_we = 0;
    // 1: good frame to a station in the table
    got.delete();
    send(8'd40, 30, 0, body);
    check(n_drop == 0 && busy && fifo_emp, $sformatf("good frame held until the MAC is ready (drop=%0d busy=%0d st=%0d crc=%h)", n_drop, busy, dut.st, dut.u_fcs.crc));
    check(wl_da == 8'd40 && wl_sa == 8'd77, "wireless addresses captured");
    repeat (5) @(negedge clk);
    check(got.size() == 0, "nothing copied before mac_ready");
    @(negedge clk) mac_ready = 1; @(negedge clk) mac_ready = 0;
    check(!fifo_emp, "fifo_emp low during the copy");
    while (busy) @(negedge clk);
    @(negedge clk);
    check(n_ok == 1, "fwd_ok pulse");
    check(got.size() == body.size(), $sformatf("forwarded %0d bytes", got.size()));
    foreach (body[i]) if (i < got.size() && got[i] != body[i]) begin check(0, "forwarded data"); break; end
    // 2: bad FCS
    send(8'd41, 12, 1, body);
    check(n_drop == 1 && !busy, "bad FCS dropped");
    // 3: DA not in the table
    send(8'd99, 12, 0, body);
    check(n_drop == 2 && !busy, "unknown DA dropped");
    // 4: DA is this station
    send(8'd30, 12, 0, body);
    check(n_drop == 3 && !busy, "frame for this station not forwarded");
    // 5: second table entry, empty body edge
    got.delete();
    send(8'd41, 1, 0, body);
    @(negedge clk) mac_ready = 1; @(negedge clk) mac_ready = 0;
    while (busy) @(negedge clk);
    @(negedge clk);
    check(n_ok == 2 && got.size() == 1 && got[0] == body[0], "one-byte frame forwarded");
    check(n_drop == 3, "no extra drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
