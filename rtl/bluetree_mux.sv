// bluetree_mux: one 2-into-1 full-duplex multiplexer of the memory tree.
//
// Upward (requests toward memory): packets from the left and right children
// are merged into one output register. The left child has priority, but a
// blocking counter counts how often a waiting right packet was passed over;
// once it reaches BLOCK_M the next slot goes to the right packet and the
// counter restarts. Serving a right packet always restarts the counter. A
// right packet therefore waits at most BLOCK_M left packets, which bounds the
// worst-case memory latency of every requester.
// Downward (responses): the parent's responses are routed to the left child
// if bit LEVEL of the response's source leaf index is 0, else to the right.
// Both directions have a one-entry output register (one cycle per level) and
// run independently. Valid/ready everywhere.
// The priority rule and the blocking counter follow the published BlueTree
// description; the value of BLOCK_M (called m there) is not given, 4 is this
// design's default, and the source-index routing is this design's choice.
module bluetree_mux
  import blueio_pkg::*;
#(
  parameter int unsigned BLOCK_M = 4,
  parameter int unsigned LEVEL   = 0
) (
  input  logic clk,
  input  logic rst_n,
  // requests from the children
  input  logic l_req_valid,
  output logic l_req_ready,
  input  bt_t  l_req,
  input  logic r_req_valid,
  output logic r_req_ready,
  input  bt_t  r_req,
  // request to the parent
  output logic p_req_valid,
  input  logic p_req_ready,
  output bt_t  p_req,
  // responses from the parent
  input  logic p_rsp_valid,
  output logic p_rsp_ready,
  input  bt_t  p_rsp,
  // responses to the children
  output logic l_rsp_valid,
  input  logic l_rsp_ready,
  output bt_t  l_rsp,
  output logic r_rsp_valid,
  input  logic r_rsp_ready,
  output bt_t  r_rsp,
  output logic [$clog2(BLOCK_M+1)-1:0] block_count
);
  localparam int unsigned BW = $clog2(BLOCK_M + 1);

  // ---------------- upward ----------------
  logic take, take_right;
  assign take       = !p_req_valid || p_req_ready;
  assign take_right = r_req_valid && (!l_req_valid || block_count == BW'(BLOCK_M));
  assign l_req_ready = take && !take_right;
  assign r_req_ready = take && take_right;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_req_valid <= 1'b0;
      p_req       <= '0;
      block_count <= '0;
    end else if (take) begin
      p_req_valid <= l_req_valid || r_req_valid;
      p_req       <= take_right ? r_req : l_req;
      if (take_right)                     block_count <= '0;
      else if (l_req_valid && r_req_valid) block_count <= block_count + 1'b1;
    end
  end

  // ---------------- downward ----------------
  logic go_right, free;
  assign go_right    = p_rsp.src[LEVEL];
  assign free        = (!l_rsp_valid || l_rsp_ready) && (!r_rsp_valid || r_rsp_ready);
  assign p_rsp_ready = free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_rsp_valid <= 1'b0;
      r_rsp_valid <= 1'b0;
      l_rsp       <= '0;
      r_rsp       <= '0;
    end else begin
      if (l_rsp_valid && l_rsp_ready) l_rsp_valid <= 1'b0;
      if (r_rsp_valid && r_rsp_ready) r_rsp_valid <= 1'b0;
      if (p_rsp_valid && free) begin
        if (go_right) begin r_rsp_valid <= 1'b1; r_rsp <= p_rsp; end
        else          begin l_rsp_valid <= 1'b1; l_rsp <= p_rsp; end
      end
    end
  end

  a_bounded_block: assert property (@(posedge clk) disable iff (!rst_n) 32'(block_count) <= BLOCK_M);
endmodule
