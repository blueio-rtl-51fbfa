// tb_command_queue: command memory (a model with one-cycle reads) holds
// command 7 (2 sub-commands) followed by command 9 (3 sub-commands). A RUN of
// command 9 from CPU 1 must skip command 7, push the three sub-commands to
// GPIO CPU 1 only, then an arm word with the start time and period, and
// answer OP_ACK data 0; a RUN of a command not stored answers data 1 and
// loads nothing; a GPIO CPU result passes through the SH merge.
// Lookup and load into the requesting CPU's GPIO CPU are the published
// function; the command layout, walk and answer codes are this design's.
module tb_command_queue;
  import blueio_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rv, rr, men, sv, sr, arm;
  logic [5:0] maddr; logic [31:0] mrd; logic [6:0] lim;
  logic [1:0] lv, lr, gv, gr;
  logic [31:0] lw; logic [15:0] lp; logic [7:0] lc;
  pkt_t run, s;
  pkt_t g [2];
  int checks = 0, failures = 0;
  command_queue #(.N_CPU(2), .MEM_DEPTH(64)) dut (.clk, .rst_n, .run_valid(rv), .run_ready(rr), .run,
    .mem_en(men), .mem_addr(maddr), .mem_rdata(mrd), .mem_limit(lim),
    .ld_valid(lv), .ld_ready(lr), .ld_arm(arm), .ld_word(lw), .ld_period(lp), .ld_cmd_id(lc),
    .g_rsp_valid(gv), .g_rsp_ready(gr), .g_rsp(g), .rsp_valid(sv), .rsp_ready(sr), .rsp(s));
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic [31:0] mem [64];
  always @(posedge clk) if (men) mrd <= mem[maddr];
  logic [31:0] got [$]; int arms = 0, wrong = 0; logic [31:0] arm_t; logic [15:0] arm_p; pkt_t outs [$];
  always @(posedge clk) if (rst_n) begin
    if (lv[0]) wrong++;
    if (lv[1] && lr[1]) begin
      if (arm) begin arms++; arm_t = lw; arm_p = lp; end else got.push_back(lw);
    end
    if (sv && sr) outs.push_back(s);
  end
  task automatic put(input int id, input int per, input int t);
    @(negedge clk);
    run = '0; run.op = GP_RUN; run.cpu_id = 1; run.addr = ADDR_W'((per << 8) | id); run.data = 32'(t); rv = 1;
    while (!rr) @(negedge clk);
    @(negedge clk); rv = 0;
  endtask
  initial begin
    mem[0] = 7; mem[1] = 2; mem[2] = 'hA0; mem[3] = 'hA1;
    mem[4] = 9; mem[5] = 3; mem[6] = 'hB0; mem[7] = 'hB1; mem[8] = 'hB2;
    lim = 9; rv = 0; run = '0; lr = 2'b11; gv = 0; sr = 1; g[0] = '0; g[1] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    put(9, 40, 500);
    repeat (40) @(negedge clk);
    check(got.size() == 3 && got[0] == 'hB0 && got[1] == 'hB1 && got[2] == 'hB2, "sub-commands of command 9");
    check(arms == 1 && arm_t == 500 && arm_p == 40, "armed with start and period");
    check(wrong == 0, "other GPIO CPU untouched");
    check(outs.size() == 1 && outs[0].op == OP_ACK && outs[0].data == 0 && outs[0].cpu_id == 1, "started");
    put(4, 0, 0);
    repeat (40) @(negedge clk);
    check(outs.size() == 2 && outs[1].data == 1 && got.size() == 3, "unknown command");
    g[0] = '0; g[0].op = OP_DATA; g[0].data = 99; gv = 2'b01; @(negedge clk); gv = 0;
    repeat (2) @(negedge clk);
    check(outs.size() == 3 && outs[2].data == 99, "GPIO CPU result merged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
