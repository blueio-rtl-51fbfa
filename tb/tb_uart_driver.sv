// tb_uart_driver: at 8 cycles per bit, a WRITE of A5h must appear on uart_tx
// as start bit, 8 data bits LSB first and a stop bit, each 8 cycles long, and
// be acknowledged once the frame is out (about 80 cycles). Bytes sent to
// uart_rx are returned by READ with data[8] = 1; READ on an empty receiver
// gives data[8] = 0; a fifth unread byte overruns the 4-deep receive queue.
// The UART is only named in the published design; the frame format,
// acknowledgement rule and receive queue checked here are this design's.
module tb_uart_driver;
  import blueio_pkg::*;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0;
  logic qv, qr, sv, sr, tx, rx;
  pkt_t q, s;
  logic [7:0] ovr;
  int checks = 0, failures = 0;
  int cyc = 0;
  uart_driver #(.CLKS_PER_BIT(CPB), .RX_DEPTH(4)) dut (.clk, .rst_n, .req_valid(qv), .req_ready(qr), .req(q),
    .rsp_valid(sv), .rsp_ready(sr), .rsp(s), .uart_tx(tx), .uart_rx(rx), .rx_overrun(ovr));
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #1000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic send(input logic [3:0] op, input logic [7:0] d);
    @(negedge clk);
    q = '0; q.op = op; q.data = {24'd0, d}; q.cpu_id = 3; qv = 1;
    while (!qr) @(negedge clk);
    @(negedge clk); qv = 0;
  endtask
  task automatic recv(output pkt_t p);
    @(negedge clk);
    while (!sv) @(negedge clk);
    p = s; sr = 1;
    @(negedge clk); sr = 0;
  endtask
  task automatic drive_rx(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rx = f[i]; repeat (CPB) @(posedge clk); end
  endtask
  // transmit-line monitor: samples mid-bit after the falling start edge
  logic [7:0] got_byte; int got_start, got_n = 0; bit got_stop;
  initial forever begin
    @(negedge tx);
    got_start = cyc;
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); got_byte[i] = tx; end
    repeat (CPB) @(posedge clk); got_stop = tx;
    got_n++;
  end
  pkt_t p;
  int t0;
  initial begin
    qv = 0; sr = 0; rx = 1; q = '0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    t0 = cyc;
    send(OP_WRITE, 8'hA5);
    recv(p);
    check(p.op == OP_ACK && p.cpu_id == 3, "write acknowledged");
    check(cyc - t0 >= 10 * CPB && cyc - t0 <= 10 * CPB + 8, $sformatf("ack after frame (%0d cycles)", cyc - t0));
    check(got_n == 1 && got_byte == 8'hA5 && got_stop, $sformatf("line carried %h", got_byte));
    send(OP_READ, 0); recv(p);
    check(p.op == OP_DATA && p.data[8] == 0, "empty read");
    drive_rx(8'h3C); repeat (4) @(posedge clk);
    send(OP_READ, 0); recv(p);
    check(p.data[8:0] == 9'h13C, $sformatf("received 3C (%h)", p.data));
    for (int i = 0; i < 5; i++) drive_rx(8'(8'h10 + i));
    repeat (4) @(posedge clk);
    check(ovr == 1, "overrun counted");
    for (int i = 0; i < 4; i++) begin
      send(OP_READ, 0); recv(p);
      check(p.data[8:0] == {1'b1, 8'(8'h10 + i)}, $sformatf("queued bytes in order %h", p.data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
