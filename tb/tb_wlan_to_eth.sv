// tb_wlan_to_eth: converts a received ToDS frame (header + body held in a
// behavioural receive FIFO) into an Ethernet frame DA, SA, length, body, FCS.
// The sink applies random back-pressure. Checks every byte against a model,
// including a CRC-32 FCS that must leave a zero remainder over the whole frame.
module tb_wlan_to_eth;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, fifo_empty, fifo_rd, eth_valid, eth_last, eth_ready, busy;
  mac_hdr_t hdr;
  logic [7:0] fifo_data, eth_data;
  logic [7:0] src[$], got[$];
  int n_last = 0, n_stall = 0;

  wlan_to_eth dut (.*);

  assign fifo_empty = (src.size() == 0);
  assign fifo_data = fifo_empty ? 8'h00 : src[0];
  always @(posedge clk) begin
    if (fifo_rd) void'(src.pop_front());
    if (eth_valid && eth_ready && rst_n) begin got.push_back(eth_data); if (eth_last) n_last++; end
    if (eth_valid && !eth_ready) n_stall++;
    eth_ready <= ($urandom_range(0, 3) != 0);
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

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] exp[$], body[$];
    logic [31:0] c;
    int blens[3] = '{8, 0, 40};
    start = 0; hdr = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      body.delete(); exp.delete(); got.delete();
      for (int i = 0; i < blens[f]; i++) body.push_back(8'($urandom));
      foreach (body[i]) src.push_back(body[i]);
      hdr.fc = FC_DATA; hdr.da = 8'd40 + 8'(f); hdr.sa = 8'd10; hdr.len = 8'(5 + blens[f]);
      hdr.seq = 8'h80;
      exp.push_back(hdr.da); exp.push_back(hdr.sa);
      exp.push_back(8'(blens[f] >> 8)); exp.push_back(8'(blens[f]));
      foreach (body[i]) exp.push_back(body[i]);
      c = crc32(exp);
      for (int k = 3; k >= 0; k--) exp.push_back(c[8*k +: 8]);
      @(negedge clk) start = 1; @(negedge clk) start = 0;
      while (busy) @(negedge clk);
      @(negedge clk);
      check(got.size() == exp.size(), $sformatf("frame %0d: %0d bytes (exp %0d)", f, got.size(), exp.size()));
      foreach (exp[i]) if (i < got.size() && got[i] != exp[i]) begin check(0, $sformatf("byte %0d", i)); break; end
      check(crc32(got) == 32'h0, "FCS gives zero remainder");
      check(n_last == f + 1, "eth_last on the last FCS byte");
      check(fifo_empty, "all body bytes consumed");
    end
    check(n_stall > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
