// tb_bluetree_mux: with both children always requesting and the parent
// always ready, the output order must be BLOCK_M (4) left packets, then one
// right packet, repeated; a lone right packet goes straight through; responses
// are routed by bit LEVEL (1) of the source index.
// Left priority with a blocking counter is the published rule; the value 4
// and index-bit routing are this design's choices.
module tb_bluetree_mux;
  import blueio_pkg::*;
  logic clk = 0, rst_n = 0;
  logic lv, lr, rv, rr, pv, pr, prv, prr, lrv, lrr, rrv, rrr;
  bt_t l, r, p, prsp, lrsp, rrsp;
  logic [2:0] bc;
  int checks = 0, failures = 0;
  bluetree_mux #(.BLOCK_M(4), .LEVEL(1)) dut (.clk, .rst_n,
    .l_req_valid(lv), .l_req_ready(lr), .l_req(l), .r_req_valid(rv), .r_req_ready(rr), .r_req(r),
    .p_req_valid(pv), .p_req_ready(pr), .p_req(p), .p_rsp_valid(prv), .p_rsp_ready(prr), .p_rsp(prsp),
    .l_rsp_valid(lrv), .l_rsp_ready(lrr), .l_rsp(lrsp), .r_rsp_valid(rrv), .r_rsp_ready(rrr), .r_rsp(rrsp),
    .block_count(bc));
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  int nl = 0, nr = 0;
  int right_seen = 0;
  string seq = "";
  always @(posedge clk) if (rst_n) begin
    if (lv && lr) nl++;
    if (rv && rr) nr++;
    if (pv && pr) seq = {seq, (p.src == 1) ? "R" : "L"};
  end
  initial begin
    lv = 0; rv = 0; pr = 1; prv = 0; lrr = 1; rrr = 1; l = '0; r = '0; prsp = '0;
    l.src = 0; r.src = 1;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    lv = 1; rv = 1;
    repeat (15) @(negedge clk);
    lv = 0; rv = 0; @(negedge clk); @(negedge clk);
    check(seq.substr(0, 14) == "LLLLRLLLLRLLLLR", {"order ", seq});
    check(nl == 12 && nr == 3, "served counts");
    // lone right packet: taken at once
    seq = ""; rv = 1; @(negedge clk); rv = 0; @(negedge clk);
    check(seq == "R", "lone right");
    check(bc == 0, "counter restarts when right served");
    // backpressure from the parent holds the output
    lv = 1; pr = 0; repeat (3) @(negedge clk);
    check(pv && !lr, "stall holds");
    pr = 1; lv = 0; @(negedge clk);
    // response routing on bit 1 of src
    prv = 1; prsp = '0; prsp.src = 6'b000010; prsp.pkt.data = 32'hAA; @(negedge clk);
    prsp.src = 6'b000101; prsp.pkt.data = 32'hBB; @(negedge clk); prv = 0;
    check(lrv && lrsp.pkt.data == 32'hBB, "src bit1=0 goes left");
    check(!rrv && right_seen == 1, "src bit1=1 went right, once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // the response with src bit1 = 1 must appear on the right port
  always @(posedge clk) if (rrv && rrr && rrsp.pkt.data == 32'hAA) right_seen++;
endmodule
