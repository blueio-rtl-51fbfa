// tb_flash_workload: the shared-flash workloads of the evaluation, run on the
// VCDC at its default size (16 CPUs, SCK = clk/4).
// Response time: 1, 4, 8 and 16 CPUs each read the flash continuously (a CPU
// sends its next one-byte read as soon as the previous answer arrives), under
// FIFO and under round-robin scheduling. Every answer must carry the byte
// that CPU stored earlier at the same virtual address, and the worst response
// time must stay within n_active x (one lone read + 40 cycles): a CPU never
// waits for more than one read of each other CPU. Worst case and variation
// (worst - best) are printed per case.
// Throughput: 4 CPUs write one byte per request continuously for 60,000
// cycles under round robin; each CPU's share must be equal to within one
// byte, and the rate is printed in KB/s at a 100 MHz clock.
// The workloads (CPU counts, policies, one byte per request) follow the
// published evaluation; the response times are this design's and are not
// comparable with the published ones, which include CPU software and the
// network.
module tb_flash_workload;
  import blueio_pkg::*;
  localparam int NC = 16;
  logic clk = 0, rst_n = 0;
  logic qv, qr, sv, sr, tx, cs_n, sck, mosi, miso;
  pkt_t q, s;
  policy_e pol;
  int checks = 0, failures = 0;
  vcdc dut (.clk, .rst_n, .sched_policy(pol), .vmm_policy(pol), .req_valid(qv), .req_ready(qr), .req(q),
    .rsp_valid(sv), .rsp_ready(sr), .rsp(s), .uart_tx(tx), .uart_rx(1'b1),
    .spi_cs_n(cs_n), .spi_sck(sck), .spi_mosi(mosi), .spi_miso(miso));
  spi_flash_model #(.BUSY_POLLS(1)) flash (.cs_n, .sck, .mosi, .miso);
  always #5 clk = ~clk;
  initial begin #20ms; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // request queue from all CPUs into the single input port
  pkt_t txq [$];
  logic acc = 0;
  always @(posedge clk) acc <= qv && qr;
  always @(negedge clk) if (acc) void'(txq.pop_front());
  assign qv = txq.size() > 0;
  assign q  = (txq.size() > 0) ? txq[0] : '0;
  assign sr = 1'b1;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int   sent_at [NC];
  int   left [NC];
  int   done [NC];
  int   worst, best, n_bad;
  bit   active [NC];
  logic [3:0] mode_op;
  function automatic pkt_t mk(input int c, input logic [3:0] op, input int d);
    pkt_t p = '0;
    p.to_vcdc = 1; p.io_idx = 2; p.cpu_id = CPU_ID_W'(c); p.op = op; p.addr = 'h80; p.data = 32'(d);
    return p;
  endfunction
  // closed loop: each answer triggers that CPU's next request
  always @(posedge clk) if (rst_n && sv) begin
    automatic int c = int'(s.cpu_id);
    automatic int lat = cyc - sent_at[c];
    done[c]++;
    if (mode_op == OP_READ) begin
      if (s.data != 32'h60 + 32'(c)) n_bad++;
      if (lat > worst) worst = lat;
      if (lat < best) best = lat;
    end
    if (left[c] > 0) begin left[c]--; want[c] = 1; end
  end
  // the next request enters the queue at the following falling edge
  bit want [NC];
  always @(negedge clk) for (int c = 0; c < NC; c++) if (want[c]) begin
    want[c] = 0; sent_at[c] = cyc; txq.push_back(mk(c, mode_op, 'h60 + c));
  end

  task automatic run(input int n_act, input policy_e p, input logic [3:0] op, input int per_cpu);
    pol = p; mode_op = op; worst = 0; best = 1 << 30; n_bad = 0;
    @(negedge clk);
    for (int c = 0; c < NC; c++) begin done[c] = 0; left[c] = (c < n_act) ? per_cpu - 1 : 0; end
    for (int c = 0; c < n_act; c++) begin sent_at[c] = cyc; txq.push_back(mk(c, op, 'h60 + c)); end
  endtask
  task automatic wait_done(input int n_act, input int per_cpu, input int max_cycles);
    int all;
    for (int i = 0; i < max_cycles; i++) begin
      all = 1;
      for (int c = 0; c < n_act; c++) if (done[c] < per_cpu) all = 0;
      if (all) break;
      @(negedge clk);
    end
  endtask

  int lone, bound, sizes [4] = '{1, 4, 8, 16};
  int bytes [4], t0, tp_min, tp_max;
  initial begin
    pol = POL_RR; mode_op = OP_WRITE;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    // every CPU stores its byte 60h + cpu at virtual address 80h
    run(NC, POL_RR, OP_WRITE, 1);
    wait_done(NC, 1, 100000);
    for (int c = 0; c < NC; c++) check(flash.rd({8'(c), 16'h0080}) == 8'h60 + 8'(c), $sformatf("cpu %0d byte stored", c));
    // a lone read gives the reference time
    run(1, POL_RR, OP_READ, 1); wait_done(1, 1, 10000); lone = worst;
    $display("lone read: %0d cycles", lone);
    for (int pi = 0; pi < 2; pi++) begin
      for (int si = 0; si < 4; si++) begin
        automatic policy_e p = (pi == 0) ? POL_FIFO : POL_RR;
        run(sizes[si], p, OP_READ, 8);
        wait_done(sizes[si], 8, 400000);
        repeat (20) @(negedge clk);
        bound = sizes[si] * (lone + 40);
        $display("%s %0d CPUs: worst %0d, variation %0d cycles (bound %0d)", pi == 0 ? "FIFO" : "RR", sizes[si], worst, worst - best, bound);
        for (int c = 0; c < sizes[si]; c++) check(done[c] == 8, $sformatf("cpu %0d got all answers", c));
        check(n_bad == 0, "each CPU read its own byte");
        check(worst <= bound, "worst-case response time within n x one read");
      end
    end
    // throughput: 4 CPUs writing continuously
    run(4, POL_RR, OP_WRITE, 100000);
    t0 = cyc;
    repeat (60000) @(negedge clk);
    tp_min = 1 << 30; tp_max = 0;
    for (int c = 0; c < 4; c++) begin
      if (done[c] < tp_min) tp_min = done[c];
      if (done[c] > tp_max) tp_max = done[c];
      $display("cpu %0d wrote %0d bytes in %0d cycles: %0d KB/s at 100 MHz", c, done[c], cyc - t0,
               (done[c] * 100000) / ((cyc - t0) / 1000) / 1024);
    end
    check(tp_min > 0 && tp_max - tp_min <= 1, "equal write throughput under round robin");
    for (int c = 0; c < 4; c++) left[c] = 0;
    repeat (3000) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
