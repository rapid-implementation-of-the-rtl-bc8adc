// tb_loadmpdu: the receive front end on the reference frame
// 32,30,10,13,0,10..17,215,102 (payload 10..17 must reach the FIFO, CRC must
// pass, header fields must be decoded), on the same frame with a corrupted
// byte (crcerr), and on random frames built by a reference model.
module tb_loadmpdu;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rx_ind, rx_valid, rreq, discard, emp, full, crcerr, crc_valid, hdr_done;
  logic macadd_err, for_me, cr_tods, cr_fraglast, rx_busy;
  logic [7:0] rxdata, fifo_out;
  logic [15:0] crc_out;
  mac_hdr_t hdr;

  loadmpdu dut (.*);

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

  task automatic send(input logic [7:0] b[$]);
    @(negedge clk) rx_ind = 1; @(negedge clk) rx_ind = 0;
    foreach (b[i]) begin rxdata = b[i]; rx_valid = 1; @(negedge clk); end
    rx_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic drain(output logic [7:0] got[$]);
    got.delete();
    while (!emp) begin got.push_back(fifo_out); rreq = 1; @(negedge clk); rreq = 0; end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] got[$], f[$], body[$];
    rx_ind = 0; rx_valid = 0; rxdata = 0; rreq = 0; discard = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    send('{8'd32,8'd30,8'd10,8'd13,8'd0,8'd10,8'd11,8'd12,8'd13,8'd14,8'd15,8'd16,8'd17,8'd215,8'd102});
    check(crc_valid && !crcerr, "reference frame CRC correct");
    check(hdr.fc == FC_DATA && hdr.da == 30 && hdr.sa == 10 && hdr.len == 13, "header decoded");
    check(for_me && !macadd_err, "frame for this station");
    drain(got);
    check(got.size() == 8, "payload length in the FIFO");
    foreach (got[i]) check(got[i] == 8'(10 + i), "payload byte in the FIFO");
    send('{8'd32,8'd30,8'd10,8'd13,8'd0,8'd10,8'd11,8'd12,8'd99,8'd14,8'd15,8'd16,8'd17,8'd215,8'd102});
    check(crc_valid && crcerr, "corrupted frame: crcerr");
    @(negedge clk) discard = 1; @(negedge clk) discard = 0;
    check(emp, "discard empties the FIFO");
    for (int t = 0; t < 10; t++) begin
      logic [15:0] c;
      int n;
      n = $urandom_range(0, 60);
      body.delete(); for (int i = 0; i < n; i++) body.push_back(8'($urandom));
      f.delete();
      f.push_back(FC_DATA); f.push_back(8'd30); f.push_back(8'd7); f.push_back(8'(5 + n));
      f.push_back(8'($urandom) & 8'h3F);
      foreach (body[i]) f.push_back(body[i]);
      c = crc16(f); f.push_back(c[15:8]); f.push_back(c[7:0]);
      send(f);
      check(crc_valid && !crcerr, $sformatf("random frame %0d passes", t));
      drain(got);
      check(got == body, $sformatf("random frame %0d payload", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
