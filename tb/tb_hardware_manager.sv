// tb_hardware_manager: a GP_LOAD writes its word through port A and is
// acknowledged, and mem_limit follows the highest word stored; a GP_RUN is
// handed to the command queue unchanged; a command-queue answer reaches the
// CPU side; unknown operations and loads past the memory end are answered
// with data = all ones.
// Storing commands through port A and forwarding run requests is published;
// the message encoding and mem_limit are this design's.
module tb_hardware_manager;
  import blueio_pkg::*;
  logic clk = 0, rst_n = 0;
  logic qv, qr, sv, sr, men, mwe, rv, rr, cv, cr;
  logic [5:0] maddr; logic [31:0] mwd; logic [6:0] lim;
  pkt_t q, s, run, c;
  int checks = 0, failures = 0;
  hardware_manager #(.MEM_DEPTH(64)) dut (.clk, .rst_n, .req_valid(qv), .req_ready(qr), .req(q),
    .rsp_valid(sv), .rsp_ready(sr), .rsp(s), .mem_en(men), .mem_we(mwe), .mem_addr(maddr), .mem_wdata(mwd),
    .mem_limit(lim), .run_valid(rv), .run_ready(rr), .run, .cq_rsp_valid(cv), .cq_rsp_ready(cr), .cq_rsp(c));
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic [31:0] mem [64]; int writes = 0; pkt_t runs [$]; pkt_t outs [$];
  always @(posedge clk) if (rst_n) begin
    if (men && mwe) begin mem[maddr] <= mwd; writes++; end
    if (rv && rr) runs.push_back(run);
    if (sv && sr) outs.push_back(s);
  end
  task automatic put(input logic [3:0] op, input int a, input int d);
    @(negedge clk);
    q = '0; q.op = op; q.addr = ADDR_W'(a); q.data = 32'(d); q.cpu_id = 2; qv = 1;
    while (!qr) @(negedge clk);
    @(negedge clk); qv = 0;
  endtask
  initial begin
    qv = 0; sr = 1; rr = 1; cv = 0; q = '0; c = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    put(GP_LOAD, 3, 32'hDEAD_BEEF);
    put(GP_LOAD, 1, 32'h1234);
    repeat (6) @(negedge clk);
    check(writes == 2 && mem[3] == 32'hDEAD_BEEF && mem[1] == 32'h1234, "words stored through port A");
    check(lim == 4, $sformatf("mem_limit %0d", lim));
    check(outs.size() == 2 && outs[0].op == OP_ACK && outs[0].data == 0 && outs[0].cpu_id == 2, "loads acknowledged");
    put(GP_RUN, 'h0507, 1000);
    repeat (4) @(negedge clk);
    check(runs.size() == 1 && runs[0].addr == 'h0507 && runs[0].data == 1000 && runs[0].cpu_id == 2, "run forwarded");
    check(outs.size() == 2, "run not answered by the manager");
    c = '0; c.op = OP_DATA; c.data = 77; cv = 1; #1;
    while (!cr) begin @(negedge clk); #1; end
    @(negedge clk); cv = 0;
    repeat (3) @(negedge clk);
    check(outs.size() == 3 && outs[2].op == OP_DATA && outs[2].data == 77, "queue answer forwarded");
    put(4'hF, 0, 0);
    put(GP_LOAD, 64, 5);
    repeat (6) @(negedge clk);
    check(outs.size() == 5 && outs[3].data == '1 && outs[4].data == '1, "errors answered");
    check(writes == 2, "no write past the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
