// tb_macheader: header field extraction and the address rule: frames for this
// station (DA=MY_ADDR=30) are accepted, frames for another station are an
// address error unless ToDS is set (relay through the access point).
module tb_macheader;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rx_indicate, rx_valid, hdr_done, macadd_err, for_me, cr_tods, cr_fraglast;
  logic [7:0] rxdata;
  mac_hdr_t hdr;

  macheader dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input logic [7:0] b[$]);
    @(negedge clk) rx_indicate = 1; @(negedge clk) rx_indicate = 0;
    foreach (b[i]) begin
      rxdata = b[i]; rx_valid = 1; @(negedge clk);
      rx_valid = 0; if (i % 2) @(negedge clk);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rx_indicate = 0; rx_valid = 0; rxdata = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    send('{8'd32, 8'd30, 8'd10, 8'd13, 8'd0, 8'd10, 8'd11});
    check(hdr_done, "header complete");
    check(hdr.fc == 32 && hdr.da == 30 && hdr.sa == 10 && hdr.len == 13 && hdr.seq == 0,
          $sformatf("fields %p", hdr));
    check(for_me && !macadd_err && !cr_tods && cr_fraglast, "own frame, last fragment");
    send('{8'd32, 8'd55, 8'd10, 8'd13, 8'h40});
    check(!for_me && macadd_err && !cr_fraglast, "foreign DA without ToDS: address error, more fragments");
    send('{8'd32, 8'd55, 8'd10, 8'd13, 8'h80});
    check(!for_me && !macadd_err && cr_tods, "foreign DA with ToDS: relay");
    @(negedge clk) rx_indicate = 1; @(negedge clk) rx_indicate = 0;
    check(!hdr_done && !macadd_err, "new frame clears hdr_done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
