// tb_command_memory: writes 64 words through port A and 64 through port B
// (alternating halves), reads every word back through the other port one cycle
// after the request, and checks a same-cycle read returns the old word.
// Two ports and the 64 x 32 size are published; the one-cycle read and the
// read-during-write rule are this design's.
module tb_command_memory;
  logic clk = 0;
  logic a_en, a_we, b_en, b_we;
  logic [5:0] a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [31:0] model [64];
  int checks = 0, failures = 0;
  command_memory dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata, .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      a_en = 1; a_we = 1; a_addr = 6'(i);      a_wdata = $urandom; model[i] = a_wdata;
      b_en = 1; b_we = 1; b_addr = 6'(i + 32); b_wdata = $urandom; model[i + 32] = b_wdata;
      @(negedge clk);
    end
    a_we = 0; b_we = 0;
    for (int i = 0; i < 64; i++) begin
      a_addr = 6'(63 - i); b_addr = 6'(i);
      @(negedge clk);
      check(a_rdata == model[63 - i], "port A read");
      check(b_rdata == model[i], "port B read");
    end
    // write on A, read same word on B in the same cycle: old data
    a_we = 1; a_addr = 5; a_wdata = ~model[5]; b_addr = 5;
    @(negedge clk);
    check(b_rdata == model[5], "read-during-write returns old word");
    a_we = 0; @(negedge clk);
    check(b_rdata == ~model[5], "new word after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
