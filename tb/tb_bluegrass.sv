// tb_bluegrass: routes packets both ways. Downward: packets from the mesh
// marked to_vcdc reach the VCDC port, others the I/O port named by io_idx;
// when the mesh and memory both offer packets every cycle, they are accepted
// alternately. Upward: responses from the VCDC and two I/O ports all reach
// the mesh, and a packet marked mem goes to the memory port instead; with
// Arbiter_1 on fixed priority, pending VCDC responses go before I/O ones.
// A packet for an I/O port that does not exist is dropped.
// Routing by destination and the two-arbiter upward path are the published
// structure; the alternation and the drop rule are this design's choices.
module tb_bluegrass;
  import blueio_pkg::*;
  logic clk = 0, rst_n = 0;
  policy_e p0, p1;
  logic tiv, tir, tov, tor, miv, mir, mov, mor, vqv, vqr, vsv, vsr;
  pkt_t ti, to, mi, mo, vq, vs;
  logic [1:0] iqv, iqr, isv, isr;
  pkt_t iq [2];
  pkt_t is_ [2];
  int checks = 0, failures = 0;
  bluegrass #(.N_IO(2), .FIFO_DEPTH(4)) dut (.clk, .rst_n, .arb0_policy(p0), .arb1_policy(p1),
    .tile_in_valid(tiv), .tile_in_ready(tir), .tile_in(ti), .tile_out_valid(tov), .tile_out_ready(tor), .tile_out(to),
    .mem_in_valid(miv), .mem_in_ready(mir), .mem_in(mi), .mem_out_valid(mov), .mem_out_ready(mor), .mem_out(mo),
    .vcdc_req_valid(vqv), .vcdc_req_ready(vqr), .vcdc_req(vq), .vcdc_rsp_valid(vsv), .vcdc_rsp_ready(vsr), .vcdc_rsp(vs),
    .io_req_valid(iqv), .io_req_ready(iqr), .io_req(iq), .io_rsp_valid(isv), .io_rsp_ready(isr), .io_rsp(is_));
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // sinks record what arrives where
  int n_v = 0, n_io [2], n_to = 0, n_mo = 0;
  string src_seq = "", up_seq = "";
  always @(posedge clk) if (rst_n) begin
    if (vqv && vqr) begin n_v++; check(vq.to_vcdc, "VCDC gets to_vcdc packets"); end
    for (int i = 0; i < 2; i++) if (iqv[i] && iqr[i]) begin
      n_io[i]++; check(!iq[i].to_vcdc && iq[i].io_idx == i, "I/O port by index");
      src_seq = {src_seq, iq[i].mem ? "M" : "T"};
    end
    if (tiv && tir) ;
    if (tov && tor) begin n_to++; check(!to.mem, "mesh gets responses"); up_seq = {up_seq, to.data[7:0] == 8'hEE ? "V" : "I"}; end
    if (mov && mor) begin n_mo++; check(mo.mem, "memory gets memory requests"); end
  end
  initial begin
    p0 = POL_RR; p1 = POL_RR;
    tiv = 0; miv = 0; vsv = 0; isv = 0; tor = 1; mor = 1; vqr = 1; iqr = 2'b11;
    ti = '0; mi = '0; vs = '0; is_[0] = '0; is_[1] = '0;
    n_io[0] = 0; n_io[1] = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    // downward steering
    ti = '0; ti.to_vcdc = 1; ti.io_idx = 2; tiv = 1; @(negedge clk);
    ti.to_vcdc = 0; ti.io_idx = 1; @(negedge clk);
    ti.io_idx = 0; @(negedge clk); tiv = 0;
    repeat (4) @(negedge clk);
    check(n_v == 1 && n_io[1] == 1 && n_io[0] == 1, "one packet at each destination");
    // mesh and memory both streaming to I/O 1: alternate
    src_seq = "";
    ti = '0; ti.io_idx = 1; mi = '0; mi.mem = 1; mi.io_idx = 1;
    tiv = 1; miv = 1; repeat (8) @(negedge clk); tiv = 0; miv = 0;
    repeat (6) @(negedge clk);
    check(src_seq.len() == 8 && (src_seq == "TMTMTMTM" || src_seq == "MTMTMTMT"), {"alternation ", src_seq});
    // upward: VCDC and I/O responses with the mesh stalled, Arbiter_1 fixed priority
    p1 = POL_FP; tor = 0;
    vs = '0; vs.data = 32'hEE; is_[1] = '0; is_[1].data = 32'h11;
    vsv = 1; isv = 2'b10;
    repeat (2) @(negedge clk); vsv = 0; isv = 0;   // 2 VCDC + 2 I/O accepted? (FP: VCDC first)
    tor = 1; repeat (8) @(negedge clk);
    check(up_seq == "VV", {"VCDC first under fixed priority ", up_seq});
    // I/O memory request goes to memory
    is_[0] = '0; is_[0].mem = 1; isv = 2'b01; @(negedge clk); isv = 0;
    repeat (4) @(negedge clk);
    check(n_mo == 1, "memory request to memory port");
    // a packet for a port that does not exist is dropped and does not block
    n_io[0] = 0;
    ti = '0; ti.io_idx = 5; tiv = 1; @(negedge clk);
    ti.io_idx = 0; @(negedge clk); tiv = 0;
    repeat (6) @(negedge clk);
    check(n_io[0] == 1 && n_io[1] == 8 + 1, "unknown port dropped, next packet delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
