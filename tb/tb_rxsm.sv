// tb_rxsm: the receive state machine with hand-driven inputs: wake-up from
// power save, CRC error (discard after SIFS), RTS answered with CTS after SIFS,
// data fragments answered with ACK and queued to the receive or the DS queue,
// CTS passed to the transmitter, address error discarded.
module tb_rxsm;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic f_awake, f_dtim, rx_indicate, a_sifs, crcerr, crc_valid, macadd_err, cr_fraglast, cr_tods;
  logic [7:0] cr_type;
  logic gen_cts, gen_ack, assemble, enqueue_rxq, enqueue_todsq, timer_reset, sifs, cts_ind, ack_ind, discard;
  logic [1:0] state_o;
  int n[string];

  rxsm dut (.*);

  always @(posedge clk) begin
    if (gen_cts) n["cts"]++;
    if (gen_ack) n["ack"]++;
    if (assemble) n["asm"]++;
    if (enqueue_rxq) n["rxq"]++;
    if (enqueue_todsq) n["dsq"]++;
    if (cts_ind) n["ctsind"]++;
    if (discard) n["disc"]++;
    if (sifs) n["sifs"]++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %0d)", msg, state_o); end
  endtask

  // a frame: indicate, then CRC result after a few cycles, then SIFS elapses
  task automatic frame(input logic [7:0] typ, input bit err, input bit aerr, input bit last, input bit tods);
    n.delete();
    @(negedge clk) rx_indicate = 1; @(negedge clk) rx_indicate = 0;
    cr_type = typ; macadd_err = aerr; cr_fraglast = last; cr_tods = tods;
    repeat (4) @(negedge clk);
    crc_valid = 1; crcerr = err;
    repeat (3) @(negedge clk);
    a_sifs = 1;
    repeat (4) @(negedge clk);
    a_sifs = 0; crc_valid = 0; crcerr = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    {f_awake, f_dtim, rx_indicate, a_sifs, crcerr, crc_valid, macadd_err, cr_tods} = '0;
    cr_fraglast = 1; cr_type = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    repeat (2) @(negedge clk);
    check(state_o == 2'd0, "inactive (power save) after reset");
    f_dtim = 1; @(negedge clk); f_dtim = 0;
    check(state_o == 2'd1, "DTIM wakes the receiver");
    @(negedge clk); check(state_o == 2'd0, "back to sleep without F_Awake");
    f_awake = 1; @(negedge clk); @(negedge clk); check(state_o == 2'd1, "awake: idle");
    frame(FC_DATA, 1, 0, 1, 0);
    check(n["disc"] == 1 && n["ack"] == 0 && n["sifs"] == 1, "CRC error: discarded after SIFS, no ACK");
    frame(FC_RTS, 0, 0, 1, 0);
    check(n["cts"] == 1 && n["ack"] == 0, "RTS answered with CTS");
    frame(FC_DATA, 0, 0, 0, 0);
    check(n["ack"] == 1 && n["asm"] == 1 && n["rxq"] == 0, "middle fragment: ACK, assemble");
    frame(FC_DATA, 0, 0, 1, 0);
    check(n["ack"] == 1 && n["rxq"] == 1 && n["dsq"] == 0, "last fragment: ACK, receive queue");
    frame(FC_DATA, 0, 0, 1, 1);
    check(n["ack"] == 1 && n["dsq"] == 1 && n["rxq"] == 0, "ToDS frame: ACK, DS queue");
    frame(FC_CTS, 0, 0, 1, 0);
    check(n["ctsind"] == 1 && n["ack"] == 0 && n["cts"] == 0, "CTS reported to the transmitter");
    frame(FC_DATA, 0, 1, 1, 0);
    check(n["disc"] == 1 && n["ack"] == 0, "address error: discarded");
    check(state_o == 2'd1, "idle at the end");
    f_awake = 0; repeat (2) @(negedge clk);
    check(state_o == 2'd1, "stays awake once TxST is set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
