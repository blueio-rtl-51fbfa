// tb_spi_flash_driver: drives the flash driver against the flash model.
// Reads of unwritten bytes return FFh; WRITE programs a byte (the model
// sees WREN, PP and at least BUSY_POLLS+1 status reads) and a READ at the
// same address returns it; ERASE restores FFh across the 4 KB sector. A read
// takes 40 SCK periods plus handshakes: checked to lie within 160..180 cycles
// at SCK_HALF = 2.
// The flash command set follows the part the published system used; the
// sequencing and SCK rate are this design's.
module tb_spi_flash_driver;
  import blueio_pkg::*;
  logic clk = 0, rst_n = 0;
  logic qv, qr, sv, sr, cs_n, sck, mosi, miso;
  pkt_t q, s, p;
  int checks = 0, failures = 0;
  int cyc = 0;
  spi_flash_driver #(.SCK_HALF(2)) dut (.clk, .rst_n, .req_valid(qv), .req_ready(qr), .req(q),
    .rsp_valid(sv), .rsp_ready(sr), .rsp(s), .spi_cs_n(cs_n), .spi_sck(sck), .spi_mosi(mosi), .spi_miso(miso));
  spi_flash_model #(.BUSY_POLLS(3)) flash (.cs_n, .sck, .mosi, .miso);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic op(input logic [3:0] o, input logic [23:0] a, input logic [7:0] d, output pkt_t r, output int lat);
    int t0;
    @(negedge clk);
    q = '0; q.op = o; q.addr = a; q.data = {24'd0, d}; q.cpu_id = 7; qv = 1; t0 = cyc;
    while (!qr) @(negedge clk);
    @(negedge clk); qv = 0;
    while (!sv) @(negedge clk);
    r = s; lat = cyc - t0; sr = 1;
    @(negedge clk); sr = 0;
  endtask
  int lat;
  initial begin
    qv = 0; sr = 0; q = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    op(OP_READ, 24'h012345, 0, p, lat);
    check(p.op == OP_DATA && p.data == 32'hFF && p.cpu_id == 7, $sformatf("blank read %h", p.data));
    check(lat >= 160 && lat <= 180, $sformatf("read latency %0d", lat));
    op(OP_WRITE, 24'h012345, 8'h5A, p, lat);
    check(p.op == OP_ACK, "write acknowledged");
    check(flash.n_wren == 1 && flash.n_prog == 1 && flash.n_rdsr >= 4, $sformatf("WREN/PP/RDSR seen %0d %0d %0d", flash.n_wren, flash.n_prog, flash.n_rdsr));
    op(OP_READ, 24'h012345, 0, p, lat);
    check(p.data == 32'h5A, $sformatf("read back %h", p.data));
    op(OP_WRITE, 24'h012FFF, 8'h11, p, lat);
    op(OP_READ, 24'h012FFF, 0, p, lat);
    check(p.data == 32'h11, "second byte");
    op(OP_ERASE, 24'h012000, 0, p, lat);
    check(p.op == OP_ACK && flash.n_erase == 1, "erase");
    op(OP_READ, 24'h012345, 0, p, lat);
    check(p.data == 32'hFF, "erased 1");
    op(OP_READ, 24'h012FFF, 0, p, lat);
    check(p.data == 32'hFF, "erased 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
