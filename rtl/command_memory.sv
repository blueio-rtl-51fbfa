// command_memory: dual-port storage for GPIO commands.
//
// DEPTH words of WIDTH bits (64 x 32 by default, as published). Commands are
// stored one after another: an identifier word, a length word (number of
// sub-commands), then that many sub-command words. Port A is used by the
// hardware manager to store new commands, port B by the command queue to look
// commands up; both ports can read and write. Reads are synchronous: the word
// at `addr` appears on `rdata` one cycle after `en`. Contents are not reset.
// A write and a read of the same word in one cycle on different ports return
// the old word; two writes to one word in a cycle leave port B's data.
module command_memory #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [WIDTH-1:0]         a_wdata,
  output logic [WIDTH-1:0]         a_rdata,
  input  logic                     b_en,
  input  logic                     b_we,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic [WIDTH-1:0]         b_wdata,
  output logic [WIDTH-1:0]         b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end
endmodule
