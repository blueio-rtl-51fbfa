// tb_bluetree: eight leaves issue read requests to a memory model at the
// root; every request carries its leaf and a sequence number in `data`. The
// model answers each with data = addr * 3 + 1 after a fixed delay. Each leaf
// must get back exactly its own answers, in order; with all leaves saturating
// the tree every leaf must still be served (the blocking counters bound the
// wait), and a lone request must reach memory after log2(8) = 3 cycles.
// The tree shape and bounded waiting are published; leaf stamping and
// per-level timing are this design's.
module tb_bluetree;
  import blueio_pkg::*;
  localparam int N = 8, PER_LEAF = 20;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] qv, qr, sv, sr;
  pkt_t q [N];
  pkt_t s [N];
  logic mqv, mqr, msv, msr;
  bt_t mq, ms;
  int checks = 0, failures = 0;
  bluetree #(.N_LEAF(N), .BLOCK_M(4)) dut (.clk, .rst_n, .leaf_req_valid(qv), .leaf_req_ready(qr), .leaf_req(q),
    .leaf_rsp_valid(sv), .leaf_rsp_ready(sr), .leaf_rsp(s),
    .mem_req_valid(mqv), .mem_req_ready(mqr), .mem_req(mq), .mem_rsp_valid(msv), .mem_rsp_ready(msr), .mem_rsp(ms));
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // memory model: 4-cycle delay line
  bt_t pipe [$];
  int  due [$];
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign mqr = 1;
  assign msv = (due.size() > 0) && (due[0] <= cyc);
  assign ms  = (pipe.size() > 0) ? pipe[0] : '0;
  always @(posedge clk) if (rst_n) begin
    if (msv && msr) begin void'(pipe.pop_front()); void'(due.pop_front()); end
    if (mqv) begin
      automatic bt_t a = mq;
      a.pkt.data = 32'(a.pkt.addr) * 3 + 1;
      a.pkt.addr = mq.pkt.addr;
      pipe.push_back(a); due.push_back(cyc + 4);
      mem_seen++;
    end
  end
  int mem_seen = 0;
  int sent [N], got [N];
  always @(posedge clk) if (rst_n) for (int i = 0; i < N; i++) begin
    if (qv[i] && qr[i]) sent[i]++;
    if (sv[i] && sr[i]) begin
      check(s[i].addr == ADDR_W'(i * 256 + got[i]) && s[i].data == 32'(i * 256 + got[i]) * 3 + 1,
            $sformatf("leaf %0d answer %0d", i, got[i]));
      got[i]++;
    end
  end
  always_comb for (int i = 0; i < N; i++) begin
    q[i] = '0; q[i].mem = 1; q[i].op = OP_READ; q[i].addr = ADDR_W'(i * 256 + sent[i]);
  end
  int t0;
  initial begin
    qv = 0; sr = '1;
    foreach (sent[i]) begin sent[i] = 0; got[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    // lone request from leaf 5: three register levels
    t0 = cyc; qv[5] = 1; @(negedge clk); qv[5] = 0;
    wait (mqv); check(cyc - t0 == 3, $sformatf("lone request latency %0d", cyc - t0));
    wait (got[5] == 1); @(negedge clk);
    // saturation: all leaves, PER_LEAF requests each
    for (int k = 0; k < PER_LEAF * N * 4; k++) begin
      for (int i = 0; i < N; i++) qv[i] = (sent[i] < PER_LEAF + (i == 5));
      @(negedge clk);
      if (qv == 0) break;
    end
    qv = 0;
    repeat (40) @(negedge clk);
    for (int i = 0; i < N; i++) check(got[i] == PER_LEAF + (i == 5), $sformatf("leaf %0d served all (%0d)", i, got[i]));
    check(mem_seen == N * PER_LEAF + 1, "memory saw every request once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
