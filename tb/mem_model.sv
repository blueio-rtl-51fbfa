// mem_model: behavioural model of the memory behind the tree root (a DDR
// controller is outside the design). Accepts one request per cycle and answers
// each after LATENCY cycles in order, echoing the request (so the answer finds
// its way back). OP_WRITE stores data at addr and answers OP_ACK; any other
// operation reads: unwritten words read as addr * 3 + 1.
// The published system puts a DDR controller here; this stand-in, its latency
// and its fill pattern are the testbench's own.
module mem_model
  import blueio_pkg::*;
#(
  parameter int LATENCY = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req_valid,
  output logic req_ready,
  input  bt_t  req,
  output logic rsp_valid,
  input  logic rsp_ready,
  output bt_t  rsp
);
  logic [31:0] mem [int];
  bt_t pend [$];
  int  due [$];
  int  cyc = 0;
  int  n_req = 0;
  assign req_ready = 1'b1;
  assign rsp_valid = (due.size() > 0) && (due[0] <= cyc);
  assign rsp       = (pend.size() > 0) ? pend[0] : '0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (rsp_valid && rsp_ready) begin void'(pend.pop_front()); void'(due.pop_front()); end
      if (req_valid) begin
        automatic bt_t a = req;
        if (req.pkt.op == OP_WRITE) begin mem[int'(req.pkt.addr)] = req.pkt.data; a.pkt.op = OP_ACK; end
        else begin
          a.pkt.op   = OP_DATA;
          a.pkt.data = mem.exists(int'(req.pkt.addr)) ? mem[int'(req.pkt.addr)] : 32'(req.pkt.addr) * 3 + 1;
        end
        pend.push_back(a); due.push_back(cyc + LATENCY);
        n_req++;
      end
    end
  end
endmodule
