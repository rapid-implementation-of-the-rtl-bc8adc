// tb_crc_gen: checks the byte-serial CRC engine.
// CRC-16 (0x1021, preset 0xFFFF): the running register over the transmitted
// MPDU 32,30,10,13,0,10..17 must pass through the values of the reference
// reception waveform (C592, E816, ..., D766) and end at zero after the two CRC
// bytes 215,102. Random messages are compared with a bit-serial polynomial
// division model. CRC-32 (0x04C11DB7, preset all-ones, no reflection) must give
// the known check value 0x0376E6E7 for "123456789".
module tb_crc_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic p16, e16, p32, e32;
  logic [7:0] d16, d32;
  logic [15:0] c16;
  logic [31:0] c32;

  crc_gen #(.WIDTH(16), .POLY(16'h1021), .INIT(16'hFFFF)) dut16 (
    .clk, .rst_n, .preset(p16), .en(e16), .din(d16), .crc(c16));
  crc_gen #(.WIDTH(32), .POLY(32'h04C11DB7), .INIT(32'hFFFFFFFF)) dut32 (
    .clk, .rst_n, .preset(p32), .en(e32), .din(d32), .crc(c32));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // bit-serial reference: shift message bits MSB first through the register
  function automatic logic [15:0] ref16(input logic [7:0] m[$]);
    logic [15:0] r;
    logic fb;
    r = 16'hFFFF;
    foreach (m[i]) for (int b = 7; b >= 0; b--) begin
      fb = r[15] ^ m[i][b];
      r = {r[14:0], 1'b0};
      if (fb) r ^= 16'h1021;
    end
    return r;
  endfunction

  task automatic feed16(input logic [7:0] b);
    d16 = b; e16 = 1; @(posedge clk); #1 e16 = 0;
  endtask

  logic [7:0] frame [15] = '{32,30,10,13,0,10,11,12,13,14,15,16,17,215,102};
  logic [15:0] expect_run [15] = '{16'hC592,16'hE816,16'hCB6C,16'hD58A,16'h11D8,16'h7B5A,
                                   16'h2497,16'h326A,16'hADBC,16'h3989,16'hDF95,16'hBDA3,
                                   16'hD766,16'h6600,16'h0000};
  string s9 = "123456789";

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    p16 = 0; e16 = 0; d16 = 0; p32 = 0; e32 = 0; d32 = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(c16 == 16'hFFFF, "preset value after reset");
    for (int i = 0; i < 15; i++) begin
      feed16(frame[i]);
      check(c16 == expect_run[i], $sformatf("running CRC after byte %0d: %h", i, c16));
    end
    // random messages against the reference
    for (int t = 0; t < 40; t++) begin
      logic [7:0] m[$];
      int n;
      n = 1 + $urandom_range(0, 30);
      m.delete();
      p16 = 1; @(posedge clk); #1 p16 = 0;
      for (int i = 0; i < n; i++) begin m.push_back(8'($urandom)); feed16(m[i]); end
      check(c16 == ref16(m), $sformatf("random message %0d", t));
      // gaps with en low must not change the register
      repeat (3) @(posedge clk);
      check(c16 == ref16(m), "register holds while en is low");
    end
    // CRC-32 check value
    p32 = 1; @(posedge clk); #1 p32 = 0;
    for (int i = 0; i < 9; i++) begin d32 = s9[i]; e32 = 1; @(posedge clk); #1 e32 = 0; end
    check(c32 == 32'h0376E6E7, $sformatf("CRC-32 check value %h", c32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
