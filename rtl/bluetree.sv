// bluetree: tree-shaped memory interconnect joining N_LEAF requesters (CPUs
// and I/O) to one memory port.
//
// The tree is built from bluetree_mux nodes in heap order: node k (1 ..
// N_LEAF-1) has children 2k and 2k+1, and heap positions N_LEAF .. 2N_LEAF-1
// are the leaf ports, leaf i at position N_LEAF+i. Each leaf's requests are
// stamped with its index i on entry; a node h levels above the leaves routes
// responses by bit h-1 of that index, so a response finds its leaf without a
// lookup table. Arbitration is spread over the nodes instead of one large
// arbiter at the memory: at each node the lower-index (left) side has
// priority, bounded by the node's blocking counter, so every leaf has a
// worst-case wait. A request climbs one register per level (log2 N_LEAF
// cycles with no contention), a response descends one per level.
// N_LEAF must be a power of two, 2 .. 64.
module bluetree
  import blueio_pkg::*;
#(
  parameter int unsigned N_LEAF  = 8,
  parameter int unsigned BLOCK_M = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_LEAF-1:0] leaf_req_valid,
  output logic [N_LEAF-1:0] leaf_req_ready,
  input  pkt_t              leaf_req [N_LEAF],
  output logic [N_LEAF-1:0] leaf_rsp_valid,
  input  logic [N_LEAF-1:0] leaf_rsp_ready,
  output pkt_t              leaf_rsp [N_LEAF],
  // memory side (root)
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output bt_t               mem_req,
  input  logic              mem_rsp_valid,
  output logic              mem_rsp_ready,
  input  bt_t               mem_rsp
);
  localparam int unsigned NN = 2 * N_LEAF;
  localparam int unsigned LG = $clog2(N_LEAF);

  // heap-indexed wires: index 1 = root node output, N_LEAF+i = leaf i;
  // index 0 exists only to keep the numbering and is left unused
  logic [NN-1:0] up_valid, up_ready, dn_valid, dn_ready;
  bt_t           up [NN];
  bt_t           dn [NN];

  for (genvar i = 0; i < N_LEAF; i++) begin : g_leaf
    assign up_valid[N_LEAF+i]  = leaf_req_valid[i];
    assign leaf_req_ready[i]   = up_ready[N_LEAF+i];
    assign up[N_LEAF+i].src    = BT_SRC_W'(i);
    assign up[N_LEAF+i].pkt    = leaf_req[i];
    assign leaf_rsp_valid[i]   = dn_valid[N_LEAF+i];
    assign dn_ready[N_LEAF+i]  = leaf_rsp_ready[i];
    assign leaf_rsp[i]         = dn[N_LEAF+i].pkt;
  end

  for (genvar k = 1; k < N_LEAF; k++) begin : g_node
    // height of node k above the leaves
    localparam int unsigned H = LG + 1 - $clog2(k + 1);
    bluetree_mux #(.BLOCK_M(BLOCK_M), .LEVEL(H - 1)) u_mux (
      .clk, .rst_n,
      .l_req_valid(up_valid[2*k]),   .l_req_ready(up_ready[2*k]),   .l_req(up[2*k]),
      .r_req_valid(up_valid[2*k+1]), .r_req_ready(up_ready[2*k+1]), .r_req(up[2*k+1]),
      .p_req_valid(up_valid[k]),     .p_req_ready(up_ready[k]),     .p_req(up[k]),
      .p_rsp_valid(dn_valid[k]),     .p_rsp_ready(dn_ready[k]),     .p_rsp(dn[k]),
      .l_rsp_valid(dn_valid[2*k]),   .l_rsp_ready(dn_ready[2*k]),   .l_rsp(dn[2*k]),
      .r_rsp_valid(dn_valid[2*k+1]), .r_rsp_ready(dn_ready[2*k+1]), .r_rsp(dn[2*k+1]),
      .block_count());
  end

  assign mem_req_valid = up_valid[1];
  assign up_ready[1]   = mem_req_ready;
  assign mem_req       = up[1];
  assign dn_valid[1]   = mem_rsp_valid;
  assign mem_rsp_ready = dn_ready[1];
  assign dn[1]         = mem_rsp;

  // heap position 0 is unused
  assign up_valid[0] = 1'b0;
  assign up_ready[0] = 1'b0;
  assign up[0]       = '0;
  assign dn_valid[0] = 1'b0;
  assign dn_ready[0] = 1'b0;
  assign dn[0]       = '0;
endmodule
