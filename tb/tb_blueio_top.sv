// tb_blueio_top: end-to-end test of the whole I/O system at its default size
// (16 CPUs, 32-leaf memory tree, 115200-baud UART at 868 cycles per bit).
// The testbench plays the network (one packet per cycle into the home port),
// the CPUs' memory traffic, the flash chip, the memory, and an external I/O
// controller on BlueGrass port 1 that serves a CPU's read by fetching the
// word from memory through BlueGrass and the memory tree.
//
// Scenarios and what each must show:
//  1 timed read: all 16 CPUs ask the GPIO command processor to read the pins
//    (tied to the global timer) at the same time t; each must get exactly t.
//  2 timed write: a pin rises exactly when the timer reads the start time.
//  3 periodic command: three reads exactly one period apart.
//  4 virtualized flash: 16 CPUs write their own byte at the same virtual
//    address, then read it back under round robin, then again under fixed
//    priority (a policy switch); every CPU gets its own byte back.
//  5 UART shared while the flash works: the UART byte appears on the line.
//  6 memory path: the external controller fetches memory data for a CPU
//    while 8 CPUs load the memory tree (the tree's blocking counters act).
//  7 back-pressure: the network stops taking responses for a while; nothing
//    is lost.
//  8 a request for a device that does not exist is dropped.
//  9 one VM erases its flash sector without touching another VM's data.
// 10 a byte arriving on the UART line is read by a CPU.
// Each mechanism is counted, and one that never happened is a failure.
// The scenarios mirror the published evaluation (timed GPIO reads with zero
// error, shared flash, parallel devices); sizes, encodings and timings are this
// design's.
module tb_blueio_top;
  import blueio_pkg::*;
  localparam int NC = 16, NL = 32;
  logic clk = 0, rst_n = 0, urx = 1;
  logic tiv, tir, tov, tor, dqv, dqr, dsv, dsr, utx, cs_n, sck, mosi, miso, mqv, mqr, msv, msr;
  pkt_t ti, to, dq, ds;
  logic [31:0] tnow, gout;
  logic [NL-1:1] cqv, cqr, csv, csr;
  pkt_t cq [NL-1:1];
  pkt_t cs [NL-1:1];
  bt_t mq, ms;
  policy_e vmm_pol;
  int checks = 0, failures = 0;

  blueio_top dut (.clk, .rst_n, .bg_arb0_policy(POL_RR), .bg_arb1_policy(POL_RR), .vcdc_policy(POL_RR),
    .vmm_policy(vmm_pol), .timer_enable(1'b1), .timer_load(1'b0), .timer_load_value(32'd0), .time_now(tnow),
    .tile_in_valid(tiv), .tile_in_ready(tir), .tile_in(ti), .tile_out_valid(tov), .tile_out_ready(tor), .tile_out(to),
    .dio_req_valid(dqv), .dio_req_ready(dqr), .dio_req(dq), .dio_rsp_valid(dsv), .dio_rsp_ready(dsr), .dio_rsp(ds),
    .uart_tx(utx), .uart_rx(urx), .spi_cs_n(cs_n), .spi_sck(sck), .spi_mosi(mosi), .spi_miso(miso),
    .gpio_out(gout), .gpio_in(tnow),
    .cpu_mem_req_valid(cqv), .cpu_mem_req_ready(cqr), .cpu_mem_req(cq),
    .cpu_mem_rsp_valid(csv), .cpu_mem_rsp_ready(csr), .cpu_mem_rsp(cs),
    .mem_req_valid(mqv), .mem_req_ready(mqr), .mem_req(mq), .mem_rsp_valid(msv), .mem_rsp_ready(msr), .mem_rsp(ms));

  spi_flash_model #(.BUSY_POLLS(30)) flash (.cs_n, .sck, .mosi, .miso);
  mem_model #(.LATENCY(6)) memory (.clk, .rst_n, .req_valid(mqv), .req_ready(mqr), .req(mq),
    .rsp_valid(msv), .rsp_ready(msr), .rsp(ms));

  always #5 clk = ~clk;
  initial begin
    #20ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- network side ----------------
  pkt_t txq [$];
  pkt_t rx [$];
  int   n_stall = 0;
  logic acc = 0;
  always @(posedge clk) acc <= tiv && tir;
  always @(negedge clk) if (acc) void'(txq.pop_front());
  always @(posedge clk) if (rst_n) begin
    if (tov && tor) rx.push_back(to);
    if (tov && !tor) n_stall++;
  end
  assign tiv = (txq.size() > 0);
  assign ti  = (txq.size() > 0) ? txq[0] : '0;

  function automatic pkt_t mk(input int cpu, input bit v, input int io, input logic [3:0] op, input int a, input int d);
    pkt_t p = '0;
    p.to_vcdc = v; p.io_idx = IO_IDX_W'(io); p.cpu_id = CPU_ID_W'(cpu); p.op = op; p.addr = ADDR_W'(a); p.data = 32'(d);
    return p;
  endfunction
  function automatic int count_rx(input int io, input bit v, input logic [3:0] op);
    int n = 0;
    foreach (rx[i]) if (rx[i].io_idx == io && rx[i].to_vcdc == v && rx[i].op == op) n++;
    return n;
  endfunction
  task automatic wait_rx(input int n, input int max_cycles);
    for (int i = 0; i < max_cycles && rx.size() < n; i++) @(negedge clk);
  endtask

  // ---------------- external I/O controller on port 1 ----------------
  // A CPU's OP_READ becomes a memory read; the memory data becomes the answer.
  pkt_t dio_out [$];
  int   n_dio_mem = 0;
  assign dqr = 1'b1;
  assign dsv = (dio_out.size() > 0);
  assign ds  = (dio_out.size() > 0) ? dio_out[0] : '0;
  always @(posedge clk) if (rst_n) begin
    if (dsv && dsr) void'(dio_out.pop_front());
    if (dqv) begin
      automatic pkt_t p = dq;
      if (!dq.mem) begin p.mem = 1; dio_out.push_back(p); end          // fetch from memory
      else begin p.mem = 0; p.to_vcdc = 0; p.io_idx = 1; dio_out.push_back(p); n_dio_mem++; end
    end
  end

  // ---------------- CPUs' own memory traffic on tree leaves ----------------
  int n_cpu_mem_sent = 0, n_cpu_mem_got = 0, n_block = 0;
  bit cpu_mem_on = 0;
  always_comb for (int i = 1; i < NL; i++) begin
    cq[i] = '0; cq[i].mem = 1; cq[i].op = OP_READ; cq[i].addr = ADDR_W'(i * 4096);
    cqv[i] = cpu_mem_on && (i <= 8);
  end
  assign csr = '1;
  always @(posedge clk) if (rst_n) begin
    for (int i = 1; i < NL; i++) begin
      if (cqv[i] && cqr[i]) n_cpu_mem_sent++;
      if (csv[i]) begin
        n_cpu_mem_got++;
        check(cs[i].data == 32'(i * 4096) * 3 + 1, "CPU memory read data");
      end
    end
    if (dut.u_bluetree.g_node[4].u_mux.block_count == 4 || dut.u_bluetree.g_node[8].u_mux.block_count == 4 ||
        dut.u_bluetree.g_node[16].u_mux.block_count == 4) n_block++;
  end

  // ---------------- GPIO pin monitor ----------------
  int rise_t = -1;
  always @(negedge clk) if (rst_n && gout[3] && rise_t < 0) rise_t = int'(tnow);

  // ---------------- UART line monitor ----------------
  logic [7:0] u_byte; int u_n = 0;
  initial forever begin
    @(negedge utx);
    repeat (434) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (868) @(posedge clk); u_byte[i] = utx; end
    repeat (868) @(posedge clk);
    u_n++;
  end

  int base, n_ok, T;
  int mech_timed_read = 0, mech_timed_write = 0, mech_periodic = 0, mech_flash_rr = 0, mech_flash_fp = 0,
      mech_uart = 0, mech_mem_path = 0, mech_drop = 0, mech_uart_rx = 0, mech_erase = 0;
  initial begin
    vmm_pol = POL_RR; tor = 1;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);

    // store GPIO commands: 1 = READ; 2 = SET pin 3 high
    txq.push_back(mk(0, 0, 0, GP_LOAD, 0, 1)); txq.push_back(mk(0, 0, 0, GP_LOAD, 1, 1));
    txq.push_back(mk(0, 0, 0, GP_LOAD, 2, {2'b10, 30'd0}));
    txq.push_back(mk(0, 0, 0, GP_LOAD, 3, 2)); txq.push_back(mk(0, 0, 0, GP_LOAD, 4, 1));
    txq.push_back(mk(0, 0, 0, GP_LOAD, 5, {2'b00, 17'd0, 5'd3, 7'd0, 1'b1}));
    wait_rx(6, 200);
    check(count_rx(0, 0, OP_ACK) == 6, "commands stored");

    // 1: all CPUs read at T; 2: pin 3 rises at T + 50
    rx.delete();
    T = int'(tnow) + 600;
    for (int c = 0; c < NC; c++) txq.push_back(mk(c, 0, 0, GP_RUN, 1, T));
    txq.push_back(mk(5, 0, 0, GP_RUN, 2, T + 50));
    wait (int'(tnow) == T + 100);
    wait_rx(2 * NC + 1, 200);
    n_ok = 0;
    foreach (rx[i]) if (rx[i].op == OP_DATA && rx[i].io_idx == 0) begin
      check(rx[i].data == 32'(T), $sformatf("cpu %0d read at %0d, wanted %0d", rx[i].cpu_id, rx[i].data, T));
      if (rx[i].data == 32'(T)) n_ok++;
    end
    check(n_ok == NC, $sformatf("all CPUs read at exactly t (%0d)", n_ok));
    mech_timed_read = n_ok;
    check(rise_t == T + 50, $sformatf("pin rose at %0d, wanted %0d", rise_t, T + 50));
    if (rise_t == T + 50) mech_timed_write++;

    // 3: periodic read, period 200, three runs, then a new command stops it
    rx.delete();
    T = int'(tnow) + 300;
    txq.push_back(mk(9, 0, 0, GP_RUN, (200 << 8) | 1, T));
    wait (int'(tnow) == T + 300);
    txq.push_back(mk(9, 0, 0, GP_RUN, 2, T + 600));   // queued: ends the repetition after the run at T+400
    wait (int'(tnow) == T + 700);
    n_ok = 0;
    foreach (rx[i]) if (rx[i].op == OP_DATA && rx[i].cpu_id == 9) begin
      check(rx[i].data == 32'(T + 200 * n_ok), $sformatf("periodic read %0d", rx[i].data));
      n_ok++;
    end
    check(n_ok == 3, $sformatf("three periodic reads (%0d)", n_ok));
    mech_periodic = n_ok;

    // 4+5: every CPU writes its byte at virtual address 40h; a UART byte meanwhile
    rx.delete();
    for (int c = 0; c < NC; c++) txq.push_back(mk(c, 1, 2, OP_WRITE, 'h40, 'h30 + c));
    txq.push_back(mk(3, 1, 1, OP_WRITE, 0, 'hC3));
    txq.push_back(mk(3, 1, 7, OP_READ, 0, 0));       // 8: no such device
    wait_rx(NC + 1, 200000);
    check(count_rx(2, 1, OP_ACK) == NC, "flash writes acknowledged");
    check(count_rx(1, 1, OP_ACK) == 1, "UART write acknowledged");
    check(u_n == 1 && u_byte == 8'hC3, $sformatf("UART line carried %h", u_byte));
    if (u_n == 1) mech_uart++;
    // UART finished before the last flash write: the devices ran in parallel
    base = -1;
    foreach (rx[i]) if (rx[i].io_idx == 1) base = i;
    check(base >= 0 && base < NC, $sformatf("UART answered while the flash was busy (%0d)", base));
    repeat (100) @(negedge clk);
    check(count_rx(7, 1, OP_DATA) == 0 && rx.size() == NC + 1, "request to a missing device dropped");
    if (rx.size() == NC + 1) mech_drop++;

    // read back under round robin, with the network stalling responses (7)
    rx.delete();
    for (int c = 0; c < NC; c++) txq.push_back(mk(c, 1, 2, OP_READ, 'h40, 0));
    fork begin
      repeat (3000) @(negedge clk); tor = 0; repeat (2000) @(negedge clk); tor = 1;
    end join_none
    wait_rx(NC, 200000);
    foreach (rx[i]) begin
      check(rx[i].op == OP_DATA && rx[i].data == 32'h30 + 32'(rx[i].cpu_id), $sformatf("cpu %0d flash byte %h", rx[i].cpu_id, rx[i].data));
      if (rx[i].data == 32'h30 + 32'(rx[i].cpu_id)) mech_flash_rr++;
    end
    // policy switch: fixed priority
    vmm_pol = POL_FP;
    rx.delete();
    for (int c = NC - 1; c >= 0; c--) txq.push_back(mk(c, 1, 2, OP_READ, 'h40, 0));
    wait_rx(NC, 200000);
    foreach (rx[i]) if (rx[i].data == 32'h30 + 32'(rx[i].cpu_id)) mech_flash_fp++;
    check(mech_flash_fp == NC, "fixed-priority reads");
    check(flash.rd(32'h0F_0040) == 8'h3F && flash.rd(32'h00_0040) == 8'h30, "physical windows per VM");
    vmm_pol = POL_RR;

    // CPU 2 erases its sector; CPU 3's byte at the same virtual address stays
    rx.delete();
    txq.push_back(mk(2, 1, 2, OP_ERASE, 'h40, 0));
    txq.push_back(mk(2, 1, 2, OP_READ, 'h40, 0));
    txq.push_back(mk(3, 1, 2, OP_READ, 'h40, 0));
    wait_rx(3, 100000);
    n_ok = 0;
    foreach (rx[i]) begin
      if (rx[i].cpu_id == 2 && rx[i].op == OP_DATA) begin check(rx[i].data == 32'hFF, "erased byte reads FFh"); if (rx[i].data == 32'hFF) n_ok++; end
      if (rx[i].cpu_id == 3) begin check(rx[i].data == 32'h33, "other VM's byte survives the erase"); if (rx[i].data == 32'h33) n_ok++; end
    end
    check(rx.size() == 3 && n_ok == 2, "erase answered, both reads answered");
    if (n_ok == 2) mech_erase++;

    // a byte arrives on the UART line and CPU 7 reads it
    rx.delete();
    begin
      automatic logic [9:0] frame = {1'b1, 8'h5A, 1'b0};
      for (int i = 0; i < 10; i++) begin urx = frame[i]; repeat (868) @(negedge clk); end
    end
    txq.push_back(mk(7, 1, 1, OP_READ, 0, 0));
    wait_rx(1, 2000);
    check(rx.size() == 1 && rx[0].cpu_id == 7 && rx[0].data == 32'h15A, "UART byte received");
    if (rx.size() == 1 && rx[0].data == 32'h15A) mech_uart_rx++;

    // 6: memory path through the external controller while CPUs load the tree
    rx.delete();
    cpu_mem_on = 1;
    for (int c = 0; c < 4; c++) txq.push_back(mk(c, 0, 1, OP_READ, 'h1000 + c, 0));
    wait_rx(4, 5000);
    repeat (50) @(negedge clk);
    cpu_mem_on = 0;
    repeat (100) @(negedge clk);
    foreach (rx[i]) begin
      check(rx[i].op == OP_DATA && rx[i].data == 32'('h1000 + rx[i].cpu_id) * 3 + 1, $sformatf("memory word for cpu %0d", rx[i].cpu_id));
      if (rx[i].data == 32'('h1000 + rx[i].cpu_id) * 3 + 1) mech_mem_path++;
    end
    check(n_cpu_mem_got == n_cpu_mem_sent && n_cpu_mem_sent > 0, $sformatf("CPU memory reads answered %0d/%0d", n_cpu_mem_got, n_cpu_mem_sent));

    $display("mechanisms: timed_read=%0d timed_write=%0d periodic=%0d flash_rr=%0d flash_fp=%0d uart=%0d mem_path=%0d dio_mem=%0d tree_block=%0d stall=%0d drop=%0d",
      mech_timed_read, mech_timed_write, mech_periodic, mech_flash_rr, mech_flash_fp, mech_uart, mech_mem_path, n_dio_mem, n_block, n_stall, mech_drop);
    $display("            uart_rx=%0d erase=%0d", mech_uart_rx, mech_erase);
    check(mech_uart_rx > 0, "UART reception happened");
    check(mech_erase > 0, "flash erase happened");
    check(mech_timed_read > 0, "timed read happened");
    check(mech_timed_write > 0, "timed write happened");
    check(mech_periodic > 0, "periodic command happened");
    check(mech_flash_rr > 0 && mech_flash_fp > 0, "flash under both policies");
    check(mech_uart > 0, "UART transfer happened");
    check(mech_mem_path > 0 && n_dio_mem > 0, "memory path happened");
    check(n_block > 0, "tree blocking counter acted");
    check(n_stall > 0, "network back-pressure happened");
    check(mech_drop > 0, "drop happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
