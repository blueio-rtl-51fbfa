// tb_vcdc: four CPUs use the VCDC's UART (I/O 1) and SPI flash (I/O 2).
// CPUs 0 and 1 each write a byte to the same virtual flash address 10h and
// read it back: each must get its own byte (separate windows: physical
// 0000_10h and 0100_10h in the flash model). CPU 2 transmits 42h on the UART
// while the flash is busy: its acknowledgement must arrive before the flash
// work is done (the two devices work in parallel). A request for I/O 5 is
// dropped. Responses carry the I/O index and the CPU ID.
// Per-device modules working in parallel and per-VM isolation are published;
// the I/O numbering and address windows are this design's.
module tb_vcdc;
  import blueio_pkg::*;
  logic clk = 0, rst_n = 0;
  logic qv, qr, sv, sr, tx, cs_n, sck, mosi, miso;
  pkt_t q, s;
  int checks = 0, failures = 0;
  vcdc #(.N_CPU(4), .FLASH_PART_BITS(16), .UART_CLKS_PER_BIT(4), .SPI_SCK_HALF(2)) dut (.clk, .rst_n,
    .sched_policy(POL_RR), .vmm_policy(POL_RR), .req_valid(qv), .req_ready(qr), .req(q),
    .rsp_valid(sv), .rsp_ready(sr), .rsp(s), .uart_tx(tx), .uart_rx(1'b1),
    .spi_cs_n(cs_n), .spi_sck(sck), .spi_mosi(mosi), .spi_miso(miso));
  spi_flash_model #(.BUSY_POLLS(2)) flash (.cs_n, .sck, .mosi, .miso);
  always #5 clk = ~clk;
  initial begin #3000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic put(input int cpu, input int io, input logic [3:0] op, input int a, input int d);
    @(negedge clk);
    q = '0; q.to_vcdc = 1; q.io_idx = IO_IDX_W'(io); q.cpu_id = CPU_ID_W'(cpu); q.op = op;
    q.addr = ADDR_W'(a); q.data = 32'(d); qv = 1;
    while (!qr) @(negedge clk);
    @(negedge clk); qv = 0;
  endtask
  pkt_t log [$];
  always @(posedge clk) if (rst_n && sv && sr) log.push_back(s);
  function automatic int find(input int cpu, input int io, input logic [3:0] op, input int nth);
    int n = 0;
    foreach (log[i]) if (log[i].cpu_id == cpu && log[i].io_idx == io && log[i].op == op) begin
      if (n == nth) return i;
      n++;
    end
    return -1;
  endfunction
  int iu, if0, if1, r0, r1;
  initial begin
    qv = 0; sr = 1; q = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    put(0, 2, OP_WRITE, 'h10, 'hAB);
    put(1, 2, OP_WRITE, 'h10, 'hCD);
    put(2, 1, OP_WRITE, 0, 'h42);
    put(3, 5, OP_READ, 0, 0);
    put(0, 2, OP_READ, 'h10, 0);
    put(1, 2, OP_READ, 'h10, 0);
    repeat (3000) @(negedge clk);
    iu = find(2, 1, OP_ACK, 0); if0 = find(0, 2, OP_ACK, 0); if1 = find(1, 2, OP_ACK, 0);
    r0 = find(0, 2, OP_DATA, 0); r1 = find(1, 2, OP_DATA, 0);
    check(log.size() == 5, $sformatf("five answers (%0d), none for I/O 5", log.size()));
    check(iu >= 0 && if0 >= 0 && if1 >= 0, "all writes acknowledged");
    check(iu >= 0 && iu < if1, "UART done while the flash was still busy");
    check(r0 >= 0 && log[r0].data == 32'hAB && log[r0].addr == 'h10, "CPU 0 reads its own byte");
    check(r1 >= 0 && log[r1].data == 32'hCD && log[r1].addr == 'h10, "CPU 1 reads its own byte");
    check(flash.rd(32'h00_0010) == 8'hAB && flash.rd(32'h01_0010) == 8'hCD, "separate physical windows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
