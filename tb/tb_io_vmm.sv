// tb_io_vmm: four CPUs share one device through the I/O VMM (PART_BITS = 8).
// A driver model answers each request 5 cycles after taking it, echoing the
// physical address in data. Checks: the physical address is {cpu, addr[7:0]}
// (each VM in its own window); the answer reaches the requesting CPU with its
// own virtual address; with three requests queued per CPU, round robin serves
// CPUs 0,1,2,3,0,1,2,3,... and fixed priority serves all of CPU 0's first;
// under FIFO, requests that queue up while the driver is busy are served in
// the order they arrived.
// The pools and two schedulers are published; address windows and the
// driver model's timing are this design's.
module tb_io_vmm;
  import blueio_pkg::*;
  logic clk = 0, rst_n = 0;
  policy_e pol;
  logic qv, qr, sv, sr, dqv, dqr, dsv, dsr;
  pkt_t q, s, dq, ds;
  int checks = 0, failures = 0;
  io_vmm #(.N_CPU(4), .POOL_DEPTH(4), .FIFO_DEPTH(4), .PART_BITS(8)) dut (.clk, .rst_n,
    .sched1_policy(pol), .sched2_policy(pol), .req_valid(qv), .req_ready(qr), .req(q),
    .rsp_valid(sv), .rsp_ready(sr), .rsp(s), .drv_req_valid(dqv), .drv_req_ready(dqr), .drv_req(dq),
    .drv_rsp_valid(dsv), .drv_rsp_ready(dsr), .drv_rsp(ds));
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // driver model
  int busy = 0, lat = 6; pkt_t held; int order[$];
  bit stall = 0;   // holds the driver off while requests are queued
  assign dqr = (busy == 0) && !dsv && !stall;
  assign dsv = (busy == 1);
  assign ds  = held;
  always @(posedge clk) if (rst_n) begin
    if (dqv && dqr) begin
      automatic pkt_t h = dq;
      h.op = OP_DATA; h.data = 32'(dq.addr);
      held <= h; busy <= lat;
      order.push_back(int'(dq.cpu_id));
      check(dq.addr == ADDR_W'({dq.cpu_id, dq.addr[7:0]}), "physical address in the VM's window");
    end else if (busy > 1) busy <= busy - 1;
    else if (busy == 1 && dsr) busy <= 0;
  end
  // response monitor
  int got [4];
  always @(posedge clk) if (rst_n && sv && sr) begin
    check(s.op == OP_DATA && s.data == 32'({s.cpu_id, 8'(s.addr)}) && s.addr[23:8] == 0,
          $sformatf("answer for cpu %0d carries its virtual address", s.cpu_id));
    got[s.cpu_id]++;
  end
  task automatic put(input int cpu, input int a);
    @(negedge clk);
    q = '0; q.cpu_id = CPU_ID_W'(cpu); q.addr = ADDR_W'(a); q.op = OP_READ; qv = 1;
    while (!qr) @(negedge clk);
    @(negedge clk); qv = 0;
  endtask
  function automatic bit order_is(input int from, input int exp[]);
    if (order.size() < from + exp.size()) return 0;
    foreach (exp[i]) if (order[from + i] != exp[i]) return 0;
    return 1;
  endfunction
  initial begin
    qv = 0; sr = 1; q = '0; pol = POL_RR;
    foreach (got[i]) got[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // hold the driver busy with one request, then queue 3 per CPU
    put(3, 8'h01);
    for (int k = 0; k < 3; k++) for (int c = 0; c < 4; c++) put(c, 16 * c + k + 2);
    repeat (200) @(negedge clk);
    check(order.size() == 13, $sformatf("13 requests served (%0d)", order.size()));
    check(order_is(1, '{0, 1, 2, 3, 0, 1, 2, 3, 0, 1, 2, 3}), "round-robin order");
    check(got[0] == 3 && got[1] == 3 && got[2] == 3 && got[3] == 4, "answers per cpu");
    // fixed priority
    order.delete(); pol = POL_FP;
    stall = 1;
    put(3, 8'h01);
    for (int k = 0; k < 2; k++) for (int c = 3; c >= 0; c--) put(c, 16 * c + k + 2);
    repeat (8) @(negedge clk);
    stall = 0;
    repeat (200) @(negedge clk);
    check(order.size() == 9 && order_is(0, '{0, 0, 1, 1, 2, 2, 3, 3, 3}), "fixed-priority order");
    // FIFO: while the driver is busy with CPU 0, CPUs 3, 1, 2 arrive in that
    // order, some cycles apart; they must be served in arrival order
    order.delete(); pol = POL_FIFO; lat = 40;
    put(0, 8'h01);
    repeat (2) @(negedge clk);
    put(3, 8'h02); repeat (2) @(negedge clk);
    put(1, 8'h02); repeat (2) @(negedge clk);
    put(2, 8'h02);
    repeat (300) @(negedge clk);
    check(order.size() == 4 && order_is(0, '{0, 3, 1, 2}), "FIFO order while the driver is busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
