// buffer_pool: the per-CPU pair of queues inside an I/O VMM.
//
// One buffer pool belongs to one CPU (one guest VM). Its request queue holds
// that CPU's pending I/O requests for this device until the VMM's request
// scheduler serves them; its response queue holds results for that CPU until
// the response scheduler returns them. Because each CPU has its own queues, a
// CPU that floods a device fills only its own pool and cannot take queue space
// from another VM; this is the isolation the per-CPU pools provide.
// Both queues are DEPTH deep (the depth is left open by the published design;
// 4 is this design's default). Valid/ready on all four sides; one cycle from
// write to read.
module buffer_pool
  import blueio_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req_in_valid,
  output logic req_in_ready,
  input  pkt_t req_in,
  output logic req_out_valid,
  input  logic req_out_ready,
  output pkt_t req_out,
  input  logic rsp_in_valid,
  output logic rsp_in_ready,
  input  pkt_t rsp_in,
  output logic rsp_out_valid,
  input  logic rsp_out_ready,
  output pkt_t rsp_out
);
  sync_fifo #(.WIDTH(PKT_W), .DEPTH(DEPTH)) u_req_q (
    .clk, .rst_n,
    .in_valid(req_in_valid), .in_ready(req_in_ready), .in_data(req_in),
    .out_valid(req_out_valid), .out_ready(req_out_ready), .out_data(req_out),
    .count()
  );
  sync_fifo #(.WIDTH(PKT_W), .DEPTH(DEPTH)) u_rsp_q (
    .clk, .rst_n,
    .in_valid(rsp_in_valid), .in_ready(rsp_in_ready), .in_data(rsp_in),
    .out_valid(rsp_out_valid), .out_ready(rsp_out_ready), .out_data(rsp_out),
    .count()
  );
endmodule
