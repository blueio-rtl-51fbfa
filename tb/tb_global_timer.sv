// tb_global_timer: the counter clears on reset, advances one per enabled
// cycle, holds when disabled, loads a value and wraps past all ones.
// One shared timer is published; width, load port and wrap are this
// design's.
module tb_global_timer;
  logic clk = 0, rst_n = 0, en = 0, ld = 0;
  logic [31:0] lv = 0, t;
  int checks = 0, failures = 0;
  global_timer dut (.clk, .rst_n, .enable(en), .load(ld), .load_value(lv), .time_now(t));
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s t=%0d", what, t); end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    check(t == 0, "reset");
    en = 1;
    for (int i = 1; i <= 20; i++) begin @(negedge clk); check(t == 32'(i), "count"); end
    en = 0; repeat (5) @(negedge clk); check(t == 20, "hold");
    ld = 1; lv = 32'hFFFF_FFFE; @(negedge clk); ld = 0; check(t == 32'hFFFF_FFFE, "load");
    en = 1; @(negedge clk); check(t == 32'hFFFF_FFFF, "count after load");
    @(negedge clk); check(t == 0, "wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
