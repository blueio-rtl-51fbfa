// tb_rt_arbiter: checks the three arbitration policies against a reference
// model. Round robin: with all four inputs requesting, grants rotate 0,1,2,3;
// with a random request set the grant is the first requester after the last
// grant. Fixed priority: the lowest requesting index wins. FIFO: a requester
// that raised its request earlier is served before later ones.
// The three policies are published; their exact tie and pointer rules are
// this design's.
module tb_rt_arbiter;
  import blueio_pkg::*;
  logic clk = 0, rst_n = 0;
  policy_e policy;
  logic [3:0] req, grant;
  logic [1:0] gidx;
  logic gv, adv;
  int checks = 0, failures = 0;

  rt_arbiter #(.N(4)) dut (.clk, .rst_n, .policy, .req, .advance(adv), .grant, .grant_idx(gidx), .grant_valid(gv));

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s req=%b grant=%b", what, req, grant); end
  endtask

  int last, exp_idx;
  logic [3:0] pending;
  int order[4];
  initial begin
    policy = POL_RR; req = 0; adv = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    // round robin, all requesting
    last = 3;
    req = 4'b1111; adv = 1;
    #1;
    for (int i = 0; i < 8; i++) begin
      check(gv && gidx == 2'((last + 1) % 4) && grant == 4'(1 << ((last + 1) % 4)), "rr full");
      last = (last + 1) % 4;
      @(negedge clk); #1;
    end
    // round robin, random requests
    for (int i = 0; i < 200; i++) begin
      req = 4'($urandom);
      #1;
      exp_idx = -1;
      for (int k = 1; k <= 4; k++) if (exp_idx < 0 && req[(last + k) % 4]) exp_idx = (last + k) % 4;
      if (exp_idx < 0) check(!gv && grant == 0, "rr idle");
      else begin check(gv && 32'(gidx) == exp_idx, "rr random"); last = exp_idx; end
      @(negedge clk);
    end
    // fixed priority
    policy = POL_FP;
    for (int i = 0; i < 100; i++) begin
      req = 4'($urandom);
      #1;
      exp_idx = -1;
      for (int k = 3; k >= 0; k--) if (req[k]) exp_idx = k;
      if (exp_idx >= 0) check(gv && 32'(gidx) == exp_idx, "fp");
      else check(!gv, "fp idle");
      @(negedge clk);
    end
    // FIFO: requests arrive 3, then 1, then 0, then 2; served in that order
    policy = POL_FIFO; req = 0; adv = 0;
    @(negedge clk);
    req = 4'b1000; @(negedge clk);
    req = 4'b1010; @(negedge clk);
    req = 4'b1011; @(negedge clk);
    req = 4'b1111; @(negedge clk);
    pending = 4'b1111;
    order = '{3, 1, 0, 2};
    #1;
    for (int i = 0; i < 4; i++) begin
      check(gv && 32'(gidx) == order[i], "fifo order");
      pending[gidx] = 0;
      adv = 1; @(negedge clk); adv = 0;
      req = pending;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
