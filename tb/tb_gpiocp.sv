// tb_gpiocp: the GPIO command processor with four CPUs, the pins' inputs tied
// to the global timer (so a read returns the time at which it happened).
// Two commands are stored with GP_LOAD: 1 = SET pin 0 high, WAIT 1, SET pin 0
// low; 2 = READ. Checks: all four CPUs reading at t = 400 each get exactly 400
// (zero timing error); pin 0 rises in the cycle the timer reads 500 and falls
// at 503 (the WAIT takes a cycle of its own plus one); a periodic read every 100 cycles from 600 returns 600, 700, 800.
// Zero timing error for timed reads is the published claim being checked;
// encodings and latencies are this design's.
module tb_gpiocp;
  import blueio_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] timer, po;
  logic qv, qr, sv, sr;
  pkt_t q, s;
  int checks = 0, failures = 0;
  gpiocp #(.N_CPU(4), .MEM_DEPTH(64), .PROG_DEPTH(8), .N_PINS(32)) dut (.clk, .rst_n, .timer,
    .req_valid(qv), .req_ready(qr), .req(q), .rsp_valid(sv), .rsp_ready(sr), .rsp(s),
    .pins_out(po), .pins_in(timer));
  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n) if (!rst_n) timer <= 0; else timer <= timer + 1;
  initial begin #1000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  pkt_t outs [$];
  always @(posedge clk) if (rst_n && sv && sr) outs.push_back(s);
  int rise = -1, fall = -1;
  always @(negedge clk) if (rst_n) begin
    if (po[0] && rise < 0) rise = int'(timer);
    if (!po[0] && rise >= 0 && fall < 0) fall = int'(timer);
  end
  task automatic put(input int cpu, input logic [3:0] op, input int a, input int d);
    @(negedge clk);
    q = '0; q.cpu_id = CPU_ID_W'(cpu); q.op = op; q.addr = ADDR_W'(a); q.data = 32'(d); qv = 1;
    while (!qr) @(negedge clk);
    @(negedge clk); qv = 0;
  endtask
  int nd;
  initial begin
    qv = 0; sr = 1; q = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    put(0, GP_LOAD, 0, 1); put(0, GP_LOAD, 1, 3);
    put(0, GP_LOAD, 2, {2'b00, 17'd0, 5'd0, 7'd0, 1'b1});
    put(0, GP_LOAD, 3, {2'b01, 6'd0, 24'd1});
    put(0, GP_LOAD, 4, {2'b00, 17'd0, 5'd0, 7'd0, 1'b0});
    put(0, GP_LOAD, 5, 2); put(0, GP_LOAD, 6, 1);
    put(0, GP_LOAD, 7, {2'b10, 30'd0});
    for (int c = 0; c < 4; c++) put(c, GP_RUN, 2, 400);
    put(0, GP_RUN, 1, 500);
    put(1, GP_RUN, (100 << 8) | 2, 600);
    wait (timer == 900); @(negedge clk);
    nd = 0;
    foreach (outs[i]) if (outs[i].op == OP_DATA) begin
      nd++;
      if (outs[i].cpu_id == 1 && outs[i].data >= 600)
        check(outs[i].data == 600 || outs[i].data == 700 || outs[i].data == 800, $sformatf("periodic read %0d", outs[i].data));
      else
        check(outs[i].data == 400, $sformatf("cpu %0d read at %0d", outs[i].cpu_id, outs[i].data));
    end
    foreach (outs[i]) $display("out cpu=%0d op=%h addr=%h data=%0d", outs[i].cpu_id, outs[i].op, outs[i].addr, outs[i].data);
    check(nd == 7, $sformatf("seven reads (%0d)", nd));
    check(rise == 500 && fall == 503, $sformatf("pin 0 high %0d..%0d", rise, fall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
