// vcdc: Virtualized Complicated Device Controller.
//
// Holds one device module per virtualized I/O, each an I/O VMM in front of the
// device's low-layer driver. Incoming requests are queued in an input FIFO and
// steered by their I/O index (the "I/O type") to the matching module; the
// modules work in parallel, so CPUs can use different devices at the same
// time. A scheduler (policy chosen at run time) merges the modules' responses
// into the output FIFO.
//
// I/O indices follow the numbering of the published hardware-cost analysis:
//   1 = UART (time-shared stream device, no address partitioning)
//   2 = SPI NOR flash (each VM owns a private 2**FLASH_PART_BITS byte window)
// Requests for any other index are dropped. The VGA and Ethernet modules of the
// published design are not part of this controller.
//
// All request/response ports are valid/ready. `sched_policy` drives the VCDC
// scheduler, `vmm_policy` both schedulers of every I/O VMM.
module vcdc
  import blueio_pkg::*;
#(
  parameter int unsigned N_CPU           = 16,
  parameter int unsigned POOL_DEPTH      = 4,
  parameter int unsigned FIFO_DEPTH      = 4,
  parameter int unsigned FLASH_PART_BITS = 16,
  parameter int unsigned UART_CLKS_PER_BIT = 868,
  parameter int unsigned SPI_SCK_HALF    = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  policy_e sched_policy,
  input  policy_e vmm_policy,
  input  logic    req_valid,
  output logic    req_ready,
  input  pkt_t    req,
  output logic    rsp_valid,
  input  logic    rsp_ready,
  output pkt_t    rsp,
  output logic    uart_tx,
  input  logic    uart_rx,
  output logic    spi_cs_n,
  output logic    spi_sck,
  output logic    spi_mosi,
  input  logic    spi_miso
);
  localparam int unsigned NM = 2;               // device modules
  localparam logic [IO_IDX_W-1:0] IDX_UART = 4'd1, IDX_FLASH = 4'd2;

  logic in_valid, in_ready;
  pkt_t in_pkt;
  sync_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n, .in_valid(req_valid), .in_ready(req_ready), .in_data(req),
    .out_valid(in_valid), .out_ready(in_ready), .out_data(in_pkt), .count());

  logic [NM-1:0] m_req_valid, m_req_ready, m_rsp_valid, m_rsp_ready;
  pkt_t          m_rsp [NM];

  // I/O-type demultiplexer
  always_comb begin
    m_req_valid    = '0;
    m_req_valid[0] = in_valid && (in_pkt.io_idx == IDX_UART);
    m_req_valid[1] = in_valid && (in_pkt.io_idx == IDX_FLASH);
    unique case (in_pkt.io_idx)
      IDX_UART:  in_ready = m_req_ready[0];
      IDX_FLASH: in_ready = m_req_ready[1];
      default:   in_ready = 1'b1;  // no such device: dropped
    endcase
  end

  // UART module
  logic u_dv, u_dr, u_rv, u_rr;
  pkt_t u_d, u_r;
  io_vmm #(.N_CPU(N_CPU), .POOL_DEPTH(POOL_DEPTH), .FIFO_DEPTH(FIFO_DEPTH), .PART_BITS(0)) u_uart_vmm (
    .clk, .rst_n, .sched1_policy(vmm_policy), .sched2_policy(vmm_policy),
    .req_valid(m_req_valid[0]), .req_ready(m_req_ready[0]), .req(in_pkt),
    .rsp_valid(m_rsp_valid[0]), .rsp_ready(m_rsp_ready[0]), .rsp(m_rsp[0]),
    .drv_req_valid(u_dv), .drv_req_ready(u_dr), .drv_req(u_d),
    .drv_rsp_valid(u_rv), .drv_rsp_ready(u_rr), .drv_rsp(u_r));
  uart_driver #(.CLKS_PER_BIT(UART_CLKS_PER_BIT)) u_uart_drv (
    .clk, .rst_n, .req_valid(u_dv), .req_ready(u_dr), .req(u_d),
    .rsp_valid(u_rv), .rsp_ready(u_rr), .rsp(u_r),
    .uart_tx, .uart_rx, .rx_overrun());

  // SPI flash module
  logic f_dv, f_dr, f_rv, f_rr;
  pkt_t f_d, f_r;
  io_vmm #(.N_CPU(N_CPU), .POOL_DEPTH(POOL_DEPTH), .FIFO_DEPTH(FIFO_DEPTH), .PART_BITS(FLASH_PART_BITS)) u_flash_vmm (
    .clk, .rst_n, .sched1_policy(vmm_policy), .sched2_policy(vmm_policy),
    .req_valid(m_req_valid[1]), .req_ready(m_req_ready[1]), .req(in_pkt),
    .rsp_valid(m_rsp_valid[1]), .rsp_ready(m_rsp_ready[1]), .rsp(m_rsp[1]),
    .drv_req_valid(f_dv), .drv_req_ready(f_dr), .drv_req(f_d),
    .drv_rsp_valid(f_rv), .drv_rsp_ready(f_rr), .drv_rsp(f_r));
  spi_flash_driver #(.SCK_HALF(SPI_SCK_HALF)) u_flash_drv (
    .clk, .rst_n, .req_valid(f_dv), .req_ready(f_dr), .req(f_d),
    .rsp_valid(f_rv), .rsp_ready(f_rr), .rsp(f_r),
    .spi_cs_n, .spi_sck, .spi_mosi, .spi_miso);

  // response scheduler and output FIFO
  logic [NM-1:0] s_grant;
  logic [0:0]    s_idx;
  logic          s_valid, out_ready;
  rt_arbiter #(.N(NM)) u_scheduler (
    .clk, .rst_n, .policy(sched_policy), .req(m_rsp_valid), .advance(out_ready),
    .grant(s_grant), .grant_idx(s_idx), .grant_valid(s_valid));
  assign m_rsp_ready = out_ready ? s_grant : '0;

  pkt_t out_pkt;
  always_comb begin
    out_pkt         = m_rsp[s_idx];
    out_pkt.to_vcdc = 1'b1;
    out_pkt.io_idx  = s_idx ? IDX_FLASH : IDX_UART;
    out_pkt.mem     = 1'b0;
  end

  sync_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n, .in_valid(s_valid), .in_ready(out_ready), .in_data(out_pkt),
    .out_valid(rsp_valid), .out_ready(rsp_ready), .out_data(rsp), .count());
endmodule
