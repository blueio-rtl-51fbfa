// tb_gpiocpu: loads the program SET pin2=1; WAIT 3; SET pin2=0; READ; END,
// arms it for start time 100 with period 50, and checks that the actions
// leave the GPIO CPU exactly 3 cycles before their pin time (the
// synchronization processor adds the rest): decided at timer 97, 102 and 103, then
// again at 147, 152, 153. A read result fed back becomes an OP_DATA packet.
// Queuing a further command stops the repetition after the run already armed.
// A per-CPU FSM with FIFO and local timer is published; the sub-command
// encoding, the lead of 3 cycles and the periodic rule are this design's.
module tb_gpiocpu;
  import blueio_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] timer;
  logic ld_valid, ld_ready, ld_arm, av, ar, al, rdv, rsp_valid, rsp_ready;
  logic [31:0] ld_word;
  logic [15:0] ld_period;
  logic [7:0] ld_cmd_id;
  logic [4:0] ap;
  logic [31:0] rdd;
  pkt_t rsp;
  int checks = 0, failures = 0;
  gpiocpu #(.DEPTH(8), .CPU_ID(5)) dut (.clk, .rst_n, .timer, .ld_valid, .ld_ready, .ld_arm, .ld_word,
    .ld_period, .ld_cmd_id, .act_valid(av), .act_read(ar), .act_pin(ap), .act_level(al),
    .rd_valid(rdv), .rd_data(rdd), .rsp_valid, .rsp_ready, .rsp);
  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n) if (!rst_n) timer <= 0; else timer <= timer + 1;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s timer=%0d", what, timer); end
  endtask
  // action log: timer value at which each action is seen
  int seen_t[$];
  string seen_k[$];
  always @(negedge clk) if (rst_n && av) begin
    seen_t.push_back(int'(timer) - 1);   // registered: decided when timer was one less
    seen_k.push_back(ar ? "R" : (al ? "S1" : "S0"));
  end
  // read results come back 3 cycles after the read action, like the synchronization processor
  logic [2:0] rpipe;
  always_ff @(posedge clk or negedge rst_n) if (!rst_n) rpipe <= 0; else rpipe <= {rpipe[1:0], av && ar};
  assign rdv = rpipe[1];
  assign rdd = timer;
  task automatic load(input logic arm, input logic [31:0] w, input logic [15:0] per);
    ld_valid = 1; ld_arm = arm; ld_word = w; ld_period = per; ld_cmd_id = 8'd9;
    do @(posedge clk); while (!ld_ready);
    #1 ld_valid = 0;
  endtask
  initial begin
    ld_valid = 0; ld_arm = 0; ld_word = 0; ld_period = 0; ld_cmd_id = 0; rsp_ready = 0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    load(0, {2'b00, 17'd0, 5'd2, 7'd0, 1'b1}, 0);   // SET pin 2 = 1
    load(0, {2'b01, 6'd0, 24'd3}, 0);               // WAIT 3
    load(0, {2'b00, 17'd0, 5'd2, 7'd0, 1'b0}, 0);   // SET pin 2 = 0
    load(0, {2'b10, 30'd0}, 0);                     // READ
    load(0, {2'b11, 30'd0}, 0);                     // END
    load(1, 32'd100, 16'd50);                       // run at 100, every 50
    wait (timer == 160); @(negedge clk);
    foreach (seen_t[i]) $display("act %0d %s", seen_t[i], seen_k[i]);
    check(seen_t.size() == 6, "six actions in two periods");
    if (seen_t.size() == 6) begin
      check(seen_t[0] == 97 && seen_k[0] == "S1", "set 1 decided at 97 (pins at 100)");
      check(seen_t[1] == 102 && seen_k[1] == "S0", "set 0 five cycles later");
      check(seen_t[2] == 103 && seen_k[2] == "R", "read one cycle later");
      check(seen_t[3] == 147 && seen_k[3] == "S1", "repeat after period");
      check(seen_t[4] == 152 && seen_t[5] == 153, "repeat keeps offsets");
    end
    check(rsp_valid && rsp.op == OP_DATA && rsp.cpu_id == 5 && rsp.addr == 9, "read result packet");
    rsp_ready = 1; @(negedge clk);
    check(rsp_valid, "second result queued"); @(negedge clk); rsp_ready = 0;
    check(!rsp_valid, "two results in all");
    // a new program stops the repetition
    load(0, {2'b11, 30'd0}, 0);
    wait (timer == 360);
    check(seen_t.size() == 9, "the armed run at 200 completes, then repetition stops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
