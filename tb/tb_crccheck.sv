// tb_crccheck: the receive CRC check on the reference frame
// 32,30,10,13,0,10..17,215,102: the running register must show the values of
// the reference reception waveform (11D8 after byte 5, ..., D766, 6600) and the
// frame must pass; the same frame with one flipped bit must raise crcerr.
module tb_crccheck;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic preset, ena, done, crcerr, crc_valid;
  logic [7:0] data_in;
  logic [15:0] crc_out;

  crccheck dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input logic [7:0] f[15], input int flip_byte, output logic [15:0] run[15]);
    @(negedge clk) preset = 1; @(negedge clk) preset = 0;
    for (int i = 0; i < 15; i++) begin
      data_in = (i == flip_byte) ? f[i] ^ 8'h04 : f[i];
      ena = 1; done = (i == 14);
      @(negedge clk); run[i] = crc_out;
    end
    ena = 0; done = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] fig[15] = '{32,30,10,13,0,10,11,12,13,14,15,16,17,215,102};
    logic [15:0] run[15];
    preset = 0; ena = 0; done = 0; data_in = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    send(fig, -1, run);
    check(run[4] == 16'h11D8 && run[5] == 16'h7B5A && run[6] == 16'h2497 && run[7] == 16'h326A,
          "running CRC over the header and first body bytes");
    check(run[10] == 16'hDF95 && run[12] == 16'hD766 && run[13] == 16'h6600,
          "running CRC at the end of the frame");
    check(crc_valid && !crcerr, "correct frame passes");
    for (int k = 0; k < 15; k++) begin
      send(fig, k, run);
      check(crc_valid && crcerr, $sformatf("bit error in byte %0d detected", k));
    end
    @(negedge clk) preset = 1; @(negedge clk) preset = 0;
    check(!crc_valid && !crcerr, "preset clears the result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
