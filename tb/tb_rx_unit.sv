// tb_rx_unit: the receiver unit with its own timer (tick every clock, SIFS=10).
// Frames built by a reference model (header, body, CRC-16) are sent byte by
// byte. Checks: the reference frame 32,30,10,13,0,10..17,215,102 is answered
// with an ACK about one SIFS after its last byte and its payload queued; an
// RTS is answered with a CTS; a CTS is passed on; a corrupted frame, a frame
// for another station, and a ToDS frame for another station are handled as
// the receive flow chart says.
module tb_rx_unit;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tick, f_awake, f_dtim, rx_ind, rx_valid, rreq, slottime, pifs, difs;
  logic [7:0] rxdata, fifo_out;
  logic emp, full, gen_cts, gen_ack, assemble, enqueue_rxq, enqueue_todsq, cts_ind, ack_ind;
  logic crc_err, frame_ok, for_me, a_pifs, a_difs, a_slot;
  logic [1:0] rxsm_state;
  mac_hdr_t hdr;
  int n[string];
  int cyc = 0, t_end = 0, t_resp = 0;

  rx_unit dut (.*);

  assign tick = 1'b1;
  always @(posedge clk) begin
    cyc++;
    if (gen_cts) begin n["cts"]++; t_resp = cyc; end
    if (gen_ack) begin n["ack"]++; t_resp = cyc; end
    if (enqueue_rxq) n["rxq"]++;
    if (enqueue_todsq) n["dsq"]++;
    if (cts_ind) n["ctsind"]++;
    if (frame_ok) n["ok"]++;
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

  task automatic send(input logic [7:0] fc, input logic [7:0] da, input logic [7:0] seq,
                      input int nbody, input bit corrupt);
    logic [7:0] f[$];
    logic [15:0] c;
    f.push_back(fc); f.push_back(da); f.push_back(8'd10); f.push_back(8'(5 + nbody)); f.push_back(seq);
    for (int i = 0; i < nbody; i++) f.push_back(8'(10 + i));
    c = crc16(f); f.push_back(c[15:8]); f.push_back(c[7:0]);
    if (corrupt) f[2] ^= 8'h01;
    n.delete();
    @(negedge clk) rx_ind = 1; @(negedge clk) rx_ind = 0;
    foreach (f[i]) begin rxdata = f[i]; rx_valid = 1; @(negedge clk); end
    rx_valid = 0; t_end = cyc;
    repeat (40) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int k;
    {f_awake, f_dtim, rx_ind, rx_valid, rreq, slottime, pifs, difs} = '0; rxdata = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    f_awake = 1; repeat (3) @(negedge clk);
    send(FC_DATA, 8'd30, 8'd0, 8, 0);          // the reference frame
    check(n["ok"] == 1 && n["ack"] == 1 && n["rxq"] == 1, "reference frame: ok, ACK, receive queue");
    check(t_resp - t_end >= 10 && t_resp - t_end <= 16, $sformatf("ACK %0d cycles after the frame", t_resp - t_end));
    k = 0;
    while (!emp) begin check(fifo_out == 8'(10 + k), "payload byte"); k++; rreq = 1; @(negedge clk); rreq = 0; end
    check(k == 8, "eight payload bytes");
    send(FC_RTS, 8'd30, 8'd0, 0, 0);
    check(n["cts"] == 1 && n["ack"] == 0, "RTS answered with CTS");
    send(FC_CTS, 8'd30, 8'd0, 0, 0);
    check(n["ctsind"] == 1 && n["cts"] == 0, "CTS passed to the transmitter");
    send(FC_DATA, 8'd30, 8'd0, 4, 1);
    check(crc_err && n["ack"] == 0 && n["ok"] == 0, "corrupted frame: CRC error, no ACK");
    check(emp, "corrupted frame discarded");
    send(FC_DATA, 8'd77, 8'd0, 4, 0);
    check(n["ack"] == 0 && n["rxq"] == 0 && emp, "frame for another station dropped");
    send(FC_DATA, 8'd77, 8'h80, 4, 0);
    check(n["ack"] == 1 && n["dsq"] == 1, "ToDS frame: ACK and DS queue");
    send(FC_DATA, 8'd30, 8'h40, 4, 0);
    check(n["ack"] == 1 && n["rxq"] == 0, "first fragment: ACK, not yet queued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
