// bluegrass: communication hub between the CPUs' network, memory, the VCDC and
// the directly attached I/O controllers.
//
// Downward path: a 2-into-1 multiplexer takes packets from the mesh (CPU
// requests) and from the memory interconnect (data fetched from memory),
// alternating between the two when both wait, and queues them in the downward
// FIFO. The FIFO head is steered by the packet itself: `to_vcdc` selects the
// VCDC, otherwise `io_idx` selects one of N_IO direct I/O ports.
//
// Upward path: Arbiter_0 picks one of the I/O ports' outgoing packets,
// Arbiter_1 picks between the VCDC and Arbiter_0's winner, the result is queued
// in the upward FIFO, and a 1-into-2 demultiplexer sends the head to memory
// (`mem` set: a memory request) or back to the mesh (a response to a CPU).
// Both arbiters take their policy (round robin, fixed priority, FIFO) at run
// time. The structure follows the published block diagram; the alternation at
// the downward mux, the FIFO depths and the packet fields used for steering are
// this design's choices.
//
// All ports are valid/ready; a packet moves when both are high. A packet
// needs at least one cycle in each FIFO, so the minimum latency from input to
// output is one cycle downward and one cycle upward.
module bluegrass
  import blueio_pkg::*;
#(
  parameter int unsigned N_IO       = 2,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  policy_e arb0_policy,
  input  policy_e arb1_policy,
  // mesh (BlueTile home port)
  input  logic    tile_in_valid,
  output logic    tile_in_ready,
  input  pkt_t    tile_in,
  output logic    tile_out_valid,
  input  logic    tile_out_ready,
  output pkt_t    tile_out,
  // memory interconnect (BlueTree leaf)
  input  logic    mem_in_valid,
  output logic    mem_in_ready,
  input  pkt_t    mem_in,
  output logic    mem_out_valid,
  input  logic    mem_out_ready,
  output pkt_t    mem_out,
  // VCDC
  output logic    vcdc_req_valid,
  input  logic    vcdc_req_ready,
  output pkt_t    vcdc_req,
  input  logic    vcdc_rsp_valid,
  output logic    vcdc_rsp_ready,
  input  pkt_t    vcdc_rsp,
  // direct I/O controllers
  output logic [N_IO-1:0] io_req_valid,
  input  logic [N_IO-1:0] io_req_ready,
  output pkt_t            io_req [N_IO],
  input  logic [N_IO-1:0] io_rsp_valid,
  output logic [N_IO-1:0] io_rsp_ready,
  input  pkt_t            io_rsp [N_IO]
);
  localparam int unsigned IW = (N_IO > 1) ? $clog2(N_IO) : 1;

  // ---------------- downward path ----------------
  logic dn_sel_mem, dn_last_mem_q;
  logic dn_in_valid, dn_in_ready;
  pkt_t dn_in;
  logic dn_out_valid, dn_out_ready;
  pkt_t dn_out;

  always_comb begin
    // alternate when both sources wait, otherwise take whichever waits
    if (tile_in_valid && mem_in_valid) dn_sel_mem = !dn_last_mem_q;
    else                               dn_sel_mem = mem_in_valid;
    dn_in_valid   = tile_in_valid || mem_in_valid;
    dn_in         = dn_sel_mem ? mem_in : tile_in;
    tile_in_ready = dn_in_ready && !dn_sel_mem;
    mem_in_ready  = dn_in_ready &&  dn_sel_mem;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           dn_last_mem_q <= 1'b0;
    else if (dn_in_valid && dn_in_ready)  dn_last_mem_q <= dn_sel_mem;
  end

  sync_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_dn_fifo (
    .clk, .rst_n,
    .in_valid(dn_in_valid), .in_ready(dn_in_ready), .in_data(dn_in),
    .out_valid(dn_out_valid), .out_ready(dn_out_ready), .out_data(dn_out),
    .count()
  );

  always_comb begin
    vcdc_req       = dn_out;
    vcdc_req_valid = dn_out_valid && dn_out.to_vcdc;
    dn_out_ready   = dn_out.to_vcdc && vcdc_req_ready;
    for (int i = 0; i < N_IO; i++) begin
      io_req[i]       = dn_out;
      io_req_valid[i] = dn_out_valid && !dn_out.to_vcdc && (dn_out.io_idx == IO_IDX_W'(i));
      if (!dn_out.to_vcdc && (dn_out.io_idx == IO_IDX_W'(i)))
        dn_out_ready = io_req_ready[i];
    end
    // a packet addressed to a port that does not exist is dropped
    if (!dn_out.to_vcdc && (32'(dn_out.io_idx) >= N_IO)) dn_out_ready = 1'b1;
  end

  // ---------------- upward path ----------------
  logic [N_IO-1:0] a0_grant;
  logic [IW-1:0]   a0_idx;
  logic            a0_valid;
  logic [1:0]      a1_req, a1_grant;
  logic            a1_valid;
  logic            up_in_ready;
  pkt_t            up_in;
  logic            up_out_valid, up_out_ready;
  pkt_t            up_out;

  rt_arbiter #(.N(N_IO)) u_arbiter_0 (
    .clk, .rst_n, .policy(arb0_policy), .req(io_rsp_valid),
    .advance(a1_grant[1] && up_in_ready),
    .grant(a0_grant), .grant_idx(a0_idx), .grant_valid(a0_valid)
  );

  assign a1_req = {a0_valid, vcdc_rsp_valid};

  rt_arbiter #(.N(2)) u_arbiter_1 (
    .clk, .rst_n, .policy(arb1_policy), .req(a1_req),
    .advance(up_in_ready),
    .grant(a1_grant), .grant_idx(), .grant_valid(a1_valid)
  );

  assign up_in          = a1_grant[0] ? vcdc_rsp : io_rsp[a0_idx];
  assign vcdc_rsp_ready = a1_grant[0] && up_in_ready;
  assign io_rsp_ready   = (a1_grant[1] && up_in_ready) ? a0_grant : '0;

  sync_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_up_fifo (
    .clk, .rst_n,
    .in_valid(a1_valid), .in_ready(up_in_ready), .in_data(up_in),
    .out_valid(up_out_valid), .out_ready(up_out_ready), .out_data(up_out),
    .count()
  );

  assign mem_out        = up_out;
  assign tile_out       = up_out;
  assign mem_out_valid  = up_out_valid &&  up_out.mem;
  assign tile_out_valid = up_out_valid && !up_out.mem;
  assign up_out_ready   = up_out.mem ? mem_out_ready : tile_out_ready;

  a_tile_stable: assert property (@(posedge clk) disable iff (!rst_n)
    tile_out_valid && !tile_out_ready |=> tile_out_valid && $stable(tile_out));
endmodule
