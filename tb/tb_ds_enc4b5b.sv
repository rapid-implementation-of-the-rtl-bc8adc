// tb_ds_enc4b5b: frames of random bytes go through the 4B/5B encoder; the
// line is decoded with an independent table. Checks Idle between frames, the
// J K start and T R end delimiters, every data nibble (low first), two clocks
// per byte, and the exact number of code groups per frame (2 + 2n + 2).
module tb_ds_enc4b5b;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] in_data;
  logic in_valid, in_last, in_ready, in_frame;
  logic [4:0] sym;
  logic [7:0] src[$];
  logic [4:0] line[$];

  ds_enc4b5b dut (.*);

  assign in_valid = src.size() > 0;
  assign in_data = in_valid ? src[0] : 8'h00;
  assign in_last = src.size() == 1;
  // sample at the falling edge, away from the clock edge the design uses
  bit pend = 0;
  always @(negedge clk) begin
    if (rst_n) line.push_back(sym);
    if (pend) void'(src.pop_front());
    pend = rst_n && in_ready;
  end

  // 100BASE-X data code groups, written out independently of the design
  logic [4:0] code [16];
  initial begin
    code[0] = 5'h1E; code[1] = 5'h09; code[2] = 5'h14; code[3] = 5'h15;
    code[4] = 5'h0A; code[5] = 5'h0B; code[6] = 5'h0E; code[7] = 5'h0F;
    code[8] = 5'h12; code[9] = 5'h13; code[10] = 5'h16; code[11] = 5'h17;
    code[12] = 5'h1A; code[13] = 5'h1B; code[14] = 5'h1C; code[15] = 5'h1D;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] fr[$];
    int k, n, bad;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      fr.delete(); line.delete();
      n = (f == 0) ? 1 : int'($urandom_range(2, 40));
      for (int i = 0; i < n; i++) fr.push_back(8'($urandom));
      repeat (3) @(negedge clk);
      foreach (fr[i]) src.push_back(fr[i]);
      while (src.size() > 0) @(negedge clk);
      repeat (6) @(negedge clk);
      k = 0;
      while (k < line.size() && line[k] == 5'b11111) k++;
      check(k >= 3, "Idle before the frame");
      check(k + 4 + 2 * n <= line.size(), $sformatf("frame %0d complete on the line", f));
      if (k + 4 + 2 * n <= line.size()) begin
        check(line[k] == 5'b11000 && line[k + 1] == 5'b10001, "J K start delimiter");
        bad = 0;
        for (int i = 0; i < n; i++)
          if (line[k + 2 + 2 * i] != code[fr[i][3:0]] || line[k + 3 + 2 * i] != code[fr[i][7:4]]) bad++;
        check(bad == 0, $sformatf("frame %0d: %0d bytes wrongly coded", f, bad));
        check(line[k + 2 + 2 * n] == 5'b01101 && line[k + 3 + 2 * n] == 5'b00111, "T R end delimiter");
        check(line[k + 4 + 2 * n] == 5'b11111 && !in_frame, "Idle after the frame");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
