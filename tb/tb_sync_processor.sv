// tb_sync_processor: four CPUs. A set issued in cycle x shows on the pins
// from cycle x+2; when CPUs 1 and 2 set the same pin in one cycle, CPU 1's
// level wins; sets on different pins in one cycle all take effect; a read
// issued in cycle x returns, in cycle x+3, the pins as they were in cycle x+2.
// Per-CPU registers feeding one pin merge are published; the stage counts and
// the lowest-CPU-wins rule are this design's.
module tb_sync_processor;
  logic clk = 0, rst_n = 0;
  logic [3:0] av, ar, al, rv;
  logic [4:0] ap [4];
  logic [31:0] po, pi, rd [4];
  int checks = 0, failures = 0;
  int cyc = 0;
  sync_processor #(.N_CPU(4), .N_PINS(32)) dut (.clk, .rst_n, .act_valid(av), .act_read(ar), .act_pin(ap),
    .act_level(al), .pins_out(po), .pins_in(pi), .rd_valid(rv), .rd_data(rd));
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign pi = 32'(cyc) * 32'h01010101;   // pins_in changes every cycle
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s po=%h", what, po); end
  endtask
  int x;
  initial begin
    av = 0; ar = 0; al = 0; foreach (ap[i]) ap[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    check(po == 0, "reset");
    // CPU0 sets pin 3, CPU1 and CPU2 conflict on pin 7
    av = 4'b0111; ar = 0; al = 4'b0011; ap[0] = 3; ap[1] = 7; ap[2] = 7;
    @(negedge clk); av = 0;
    check(po == 0, "not yet at x+1");
    @(negedge clk);
    check(po == 32'h0000_0088, "sets at x+2, lowest CPU wins pin 7");
    // clear pin 3 only
    av = 4'b1000; al = 0; ap[3] = 3; @(negedge clk); av = 0; @(negedge clk);
    check(po == 32'h0000_0080, "pin 3 cleared, pin 7 held");
    // reads from CPU 1 and 3 in cycle x
    x = cyc;
    av = 4'b1010; ar = 4'b1010; @(negedge clk); av = 0; ar = 0;
    check(rv == 0, "no result at x+1");
    @(negedge clk); check(rv == 0, "no result at x+2");
    @(negedge clk);
    check(rv == 4'b1010, "results at x+3");
    check(rd[1] == 32'(x + 2) * 32'h01010101 && rd[3] == rd[1], "read samples cycle x+2");
    @(negedge clk); check(rv == 0, "one result per read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
