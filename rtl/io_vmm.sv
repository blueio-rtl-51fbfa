// io_vmm: I/O virtual machine monitor for one physical device.
//
// Requests from all CPUs arrive in an input FIFO and are steered by their CPU
// ID into that CPU's buffer pool. Scheduler_1 (round robin, fixed priority or
// FIFO) picks which pool's head request goes next to the virtualization
// module, which turns the guest's virtual request into a physical one and
// passes it to the low-layer driver. The driver serves one request at a time;
// its response is written into the owner's buffer pool response queue, and
// Scheduler_2 returns responses from the pools to the output FIFO.
//
// Virtualization: with PART_BITS > 0 each VM owns a private window of the
// device's address space of 2**PART_BITS bytes; the physical address is
// {cpu_id, addr[PART_BITS-1:0]}, so no VM can reach another's data. With
// PART_BITS = 0 (a stream device such as a UART) addresses pass unchanged and
// the device is time-shared. The response carries the guest's own (virtual)
// address back. Request IDs above N_CPU-1 are dropped. The partitioning rule,
// the one-outstanding-request rule and all depths are this design's choices;
// the structure (FIFO, CPU-ID demux, buffer pools, two schedulers,
// virtualization module) follows the published block diagram.
//
// Timing: a request needs at least 1 cycle in the input FIFO, 1 in its buffer
// pool, then is handed to the driver; the response needs 1 cycle in the pool
// and 1 in the output FIFO.
module io_vmm
  import blueio_pkg::*;
#(
  parameter int unsigned N_CPU      = 16,
  parameter int unsigned POOL_DEPTH = 4,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned PART_BITS  = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  policy_e sched1_policy,
  input  policy_e sched2_policy,
  input  logic    req_valid,
  output logic    req_ready,
  input  pkt_t    req,
  output logic    rsp_valid,
  input  logic    rsp_ready,
  output pkt_t    rsp,
  // low-layer driver
  output logic    drv_req_valid,
  input  logic    drv_req_ready,
  output pkt_t    drv_req,
  input  logic    drv_rsp_valid,
  output logic    drv_rsp_ready,
  input  pkt_t    drv_rsp
);
  localparam int unsigned CW = (N_CPU > 1) ? $clog2(N_CPU) : 1;

  // input FIFO
  logic in_valid, in_ready;
  pkt_t in_pkt;
  sync_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .in_valid(req_valid), .in_ready(req_ready), .in_data(req),
    .out_valid(in_valid), .out_ready(in_ready), .out_data(in_pkt), .count()
  );

  // buffer pools
  logic [N_CPU-1:0] bp_req_in_valid, bp_req_in_ready;
  logic [N_CPU-1:0] bp_req_out_valid, bp_req_out_ready;
  logic [N_CPU-1:0] bp_rsp_in_valid, bp_rsp_in_ready;
  logic [N_CPU-1:0] bp_rsp_out_valid, bp_rsp_out_ready;
  pkt_t             bp_req_out [N_CPU];
  pkt_t             bp_rsp_out [N_CPU];
  pkt_t             rsp_to_pool;

  for (genvar c = 0; c < N_CPU; c++) begin : g_pool
    buffer_pool #(.DEPTH(POOL_DEPTH)) u_pool (
      .clk, .rst_n,
      .req_in_valid(bp_req_in_valid[c]), .req_in_ready(bp_req_in_ready[c]), .req_in(in_pkt),
      .req_out_valid(bp_req_out_valid[c]), .req_out_ready(bp_req_out_ready[c]), .req_out(bp_req_out[c]),
      .rsp_in_valid(bp_rsp_in_valid[c]), .rsp_in_ready(bp_rsp_in_ready[c]), .rsp_in(rsp_to_pool),
      .rsp_out_valid(bp_rsp_out_valid[c]), .rsp_out_ready(bp_rsp_out_ready[c]), .rsp_out(bp_rsp_out[c])
    );
  end

  // CPU-ID demultiplexer
  always_comb begin
    bp_req_in_valid = '0;
    in_ready        = 1'b1;  // unknown CPU IDs are dropped
    for (int c = 0; c < N_CPU; c++)
      if (32'(in_pkt.cpu_id) == c) begin
        bp_req_in_valid[c] = in_valid;
        in_ready           = bp_req_in_ready[c];
      end
  end

  // Scheduler_1 and the virtualization module
  logic [N_CPU-1:0] s1_grant;
  logic [CW-1:0]    s1_idx;
  logic             s1_valid;
  logic             busy_q;      // one request outstanding at the driver
  logic [CW-1:0]    owner_q;
  logic [ADDR_W-1:0] vaddr_q;
  logic             issue;

  rt_arbiter #(.N(N_CPU)) u_scheduler_1 (
    .clk, .rst_n, .policy(sched1_policy),
    .req(bp_req_out_valid), .advance(issue),   // held while the driver is busy
    .grant(s1_grant), .grant_idx(s1_idx), .grant_valid(s1_valid)
  );

  always_comb begin
    drv_req = bp_req_out[s1_idx];
    if (PART_BITS > 0)
      drv_req.addr = ADDR_W'({bp_req_out[s1_idx].cpu_id, bp_req_out[s1_idx].addr[(PART_BITS > 0 ? PART_BITS : 1)-1:0]})
                     & ((PART_BITS > 0) ? ADDR_W'((64'(1) << (PART_BITS + CPU_ID_W)) - 1) : '1);
    drv_req_valid    = s1_valid && !busy_q;
    issue            = drv_req_valid && drv_req_ready;
    bp_req_out_ready = issue ? s1_grant : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
      vaddr_q <= '0;
    end else begin
      if (issue) begin
        busy_q  <= 1'b1;
        owner_q <= s1_idx;
        vaddr_q <= bp_req_out[s1_idx].addr;
      end else if (drv_rsp_valid && drv_rsp_ready) begin
        busy_q  <= 1'b0;
      end
    end
  end

  // driver response back into the owner's pool
  always_comb begin
    rsp_to_pool        = drv_rsp;
    rsp_to_pool.cpu_id = CPU_ID_W'(owner_q);
    rsp_to_pool.addr   = vaddr_q;
    bp_rsp_in_valid    = '0;
    bp_rsp_in_valid[owner_q] = drv_rsp_valid && busy_q;
    drv_rsp_ready      = busy_q && bp_rsp_in_ready[owner_q];
  end

  // Scheduler_2 and the output FIFO
  logic [N_CPU-1:0] s2_grant;
  logic [CW-1:0]    s2_idx;
  logic             s2_valid, out_ready;

  rt_arbiter #(.N(N_CPU)) u_scheduler_2 (
    .clk, .rst_n, .policy(sched2_policy),
    .req(bp_rsp_out_valid), .advance(out_ready),
    .grant(s2_grant), .grant_idx(s2_idx), .grant_valid(s2_valid)
  );
  assign bp_rsp_out_ready = out_ready ? s2_grant : '0;

  sync_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .in_valid(s2_valid), .in_ready(out_ready), .in_data(bp_rsp_out[s2_idx]),
    .out_valid(rsp_valid), .out_ready(rsp_ready), .out_data(rsp), .count()
  );
endmodule
