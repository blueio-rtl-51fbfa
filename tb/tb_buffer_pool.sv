// tb_buffer_pool: fills the request queue of one pool to its depth, checks
// that it then refuses more, drains it in order; does the same for the
// response queue while requests flow, showing the two queues are independent.
// Per-CPU request/response queues are published; the depth (4) is this
// design's.
module tb_buffer_pool;
  import blueio_pkg::*;
  logic clk = 0, rst_n = 0;
  logic qi_v, qi_r, qo_v, qo_r, si_v, si_r, so_v, so_r;
  pkt_t qi, qo, si, so;
  int checks = 0, failures = 0;
  buffer_pool #(.DEPTH(4)) dut (.clk, .rst_n,
    .req_in_valid(qi_v), .req_in_ready(qi_r), .req_in(qi), .req_out_valid(qo_v), .req_out_ready(qo_r), .req_out(qo),
    .rsp_in_valid(si_v), .rsp_in_ready(si_r), .rsp_in(si), .rsp_out_valid(so_v), .rsp_out_ready(so_r), .rsp_out(so));
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    qi_v = 0; qo_r = 0; si_v = 0; so_r = 0; qi = '0; si = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    check(!qo_v && !so_v && qi_r && si_r, "empty after reset");
    for (int i = 0; i < 4; i++) begin
      qi = '0; qi.data = 32'(100 + i); qi_v = 1; #1;
      check(qi_r, "accepts while not full");
      @(negedge clk);
    end
    qi_v = 1; #1; check(!qi_r, "full refuses"); qi_v = 0;
    check(!so_v, "response queue untouched");
    // response queue works while request queue is full
    si = '0; si.data = 32'h55; si_v = 1; @(negedge clk); si_v = 0;
    check(so_v && so.data == 32'h55, "response passes");
    so_r = 1; @(negedge clk); so_r = 0;
    check(!so_v, "response queue empty");
    for (int i = 0; i < 4; i++) begin
      check(qo_v && qo.data == 32'(100 + i), "request order");
      qo_r = 1; @(negedge clk); qo_r = 0;
    end
    check(!qo_v, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
