// tb_decapsulation: for a frame of LEN bytes plus two CRC bytes the payload
// strobe must cover exactly bytes 5..LEN-1, the CRC enable all LEN+2 bytes and
// rx_done the last one; bytes after the frame are ignored.
module tb_decapsulation;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rx_indicate, rx_valid, crc_preset, crc_ena, rxfifo_w, rx_done, busy;
  logic [7:0] rxdata, mpdu_length, rxpayload;
  logic [7:0] pay[$];
  int n_ena, n_done;

  decapsulation dut (.*);

  always @(posedge clk) begin
    if (rxfifo_w) pay.push_back(rxpayload);
    if (crc_ena) n_ena++;
    if (rx_done) n_done++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input int len, input int extra);
    @(negedge clk) rx_indicate = 1; @(negedge clk) rx_indicate = 0;
    for (int i = 0; i < len + 2 + extra; i++) begin
      rxdata = 8'(100 + i); rx_valid = 1;
      if (i == 4) mpdu_length = 8'(len);   // the header analysis supplies LEN by then
      @(negedge clk);
      rx_valid = 0; if (i % 3 == 0) @(negedge clk);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rx_indicate = 0; rx_valid = 0; rxdata = 0; mpdu_length = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      int len;
      len = (k == 0) ? 13 : (k == 1) ? 5 : 40;
      pay.delete(); n_ena = 0; n_done = 0;
      send(len, 3);
      check(pay.size() == len - 5, $sformatf("len %0d: %0d payload bytes", len, pay.size()));
      foreach (pay[i]) check(pay[i] == 8'(105 + i), "payload byte value");
      check(n_ena == len + 2, $sformatf("len %0d: CRC enabled for %0d bytes", len, n_ena));
      check(n_done == 1 && !busy, "one rx_done, then idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
