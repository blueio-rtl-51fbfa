// blueio_top: the real-time I/O virtualization system with its time base and
// memory interconnect.
//
// CPU packets arrive from the network's home port (tile_*) at BlueGrass.
// Packets marked to_vcdc go to the VCDC, whose I/O VMMs virtualize a UART
// (I/O 1) and an SPI NOR flash (I/O 2) for all CPUs; other packets go to a
// directly attached controller chosen by io_idx: 0 = the GPIO command
// processor (timed pin I/O driven by the global timer), 1 = an external I/O
// controller brought out on the dio_* ports. Responses return through
// BlueGrass's two arbiters to the network; memory requests from the I/O side
// (mem = 1) go up the BlueTree, whose leaf 0 is BlueGrass and whose other
// leaves (1 .. BT_LEAVES-1) are ports for the CPUs, to the memory port at the
// root (mem_*); memory data comes back the same way.
// The partition into BlueGrass, VCDC, GPIOCP, BlueTree and a global timer,
// and the way they connect, follow the published platform. The network, the
// CPUs and the DDR memory are outside and appear as ports.
// Arbitration policies of BlueGrass, the VCDC and the I/O VMMs are inputs.
module blueio_top
  import blueio_pkg::*;
#(
  parameter int unsigned N_CPU          = 16,
  parameter int unsigned BT_LEAVES      = 32,
  parameter int unsigned N_PINS         = 32,
  parameter int unsigned UART_CLKS_PER_BIT = 868,
  parameter int unsigned SPI_SCK_HALF   = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  policy_e bg_arb0_policy,
  input  policy_e bg_arb1_policy,
  input  policy_e vcdc_policy,
  input  policy_e vmm_policy,
  // global timer
  input  logic        timer_enable,
  input  logic        timer_load,
  input  logic [31:0] timer_load_value,
  output logic [31:0] time_now,
  // network home port
  input  logic    tile_in_valid,
  output logic    tile_in_ready,
  input  pkt_t    tile_in,
  output logic    tile_out_valid,
  input  logic    tile_out_ready,
  output pkt_t    tile_out,
  // external directly attached I/O controller (BlueGrass port 1)
  output logic    dio_req_valid,
  input  logic    dio_req_ready,
  output pkt_t    dio_req,
  input  logic    dio_rsp_valid,
  output logic    dio_rsp_ready,
  input  pkt_t    dio_rsp,
  // device pins
  output logic              uart_tx,
  input  logic              uart_rx,
  output logic              spi_cs_n,
  output logic              spi_sck,
  output logic              spi_mosi,
  input  logic              spi_miso,
  output logic [N_PINS-1:0] gpio_out,
  input  logic [N_PINS-1:0] gpio_in,
  // memory tree leaves 1 .. BT_LEAVES-1 (CPUs)
  input  logic [BT_LEAVES-1:1] cpu_mem_req_valid,
  output logic [BT_LEAVES-1:1] cpu_mem_req_ready,
  input  pkt_t                 cpu_mem_req [BT_LEAVES-1:1],
  output logic [BT_LEAVES-1:1] cpu_mem_rsp_valid,
  input  logic [BT_LEAVES-1:1] cpu_mem_rsp_ready,
  output pkt_t                 cpu_mem_rsp [BT_LEAVES-1:1],
  // memory port (DDR back end)
  output logic    mem_req_valid,
  input  logic    mem_req_ready,
  output bt_t     mem_req,
  input  logic    mem_rsp_valid,
  output logic    mem_rsp_ready,
  input  bt_t     mem_rsp
);
  global_timer #(.WIDTH(32)) u_timer (
    .clk, .rst_n, .enable(timer_enable), .load(timer_load), .load_value(timer_load_value),
    .time_now);

  // BlueGrass
  logic bg_mem_in_valid, bg_mem_in_ready, bg_mem_out_valid, bg_mem_out_ready;
  pkt_t bg_mem_in, bg_mem_out;
  logic vcdc_req_valid, vcdc_req_ready, vcdc_rsp_valid, vcdc_rsp_ready;
  pkt_t vcdc_req, vcdc_rsp;
  logic [1:0] io_req_valid, io_req_ready, io_rsp_valid, io_rsp_ready;
  pkt_t       io_req [2];
  pkt_t       io_rsp [2];

  bluegrass #(.N_IO(2)) u_bluegrass (
    .clk, .rst_n, .arb0_policy(bg_arb0_policy), .arb1_policy(bg_arb1_policy),
    .tile_in_valid, .tile_in_ready, .tile_in, .tile_out_valid, .tile_out_ready, .tile_out,
    .mem_in_valid(bg_mem_in_valid), .mem_in_ready(bg_mem_in_ready), .mem_in(bg_mem_in),
    .mem_out_valid(bg_mem_out_valid), .mem_out_ready(bg_mem_out_ready), .mem_out(bg_mem_out),
    .vcdc_req_valid, .vcdc_req_ready, .vcdc_req, .vcdc_rsp_valid, .vcdc_rsp_ready, .vcdc_rsp,
    .io_req_valid, .io_req_ready, .io_req, .io_rsp_valid, .io_rsp_ready, .io_rsp);

  // VCDC
  vcdc #(.N_CPU(N_CPU), .UART_CLKS_PER_BIT(UART_CLKS_PER_BIT), .SPI_SCK_HALF(SPI_SCK_HALF)) u_vcdc (
    .clk, .rst_n, .sched_policy(vcdc_policy), .vmm_policy,
    .req_valid(vcdc_req_valid), .req_ready(vcdc_req_ready), .req(vcdc_req),
    .rsp_valid(vcdc_rsp_valid), .rsp_ready(vcdc_rsp_ready), .rsp(vcdc_rsp),
    .uart_tx, .uart_rx, .spi_cs_n, .spi_sck, .spi_mosi, .spi_miso);

  // GPIOCP on BlueGrass port 0
  gpiocp #(.N_CPU(N_CPU), .N_PINS(N_PINS)) u_gpiocp (
    .clk, .rst_n, .timer(time_now),
    .req_valid(io_req_valid[0]), .req_ready(io_req_ready[0]), .req(io_req[0]),
    .rsp_valid(io_rsp_valid[0]), .rsp_ready(io_rsp_ready[0]), .rsp(io_rsp[0]),
    .pins_out(gpio_out), .pins_in(gpio_in));

  // external controller on BlueGrass port 1
  assign dio_req_valid   = io_req_valid[1];
  assign io_req_ready[1] = dio_req_ready;
  assign dio_req         = io_req[1];
  assign io_rsp_valid[1] = dio_rsp_valid;
  assign dio_rsp_ready   = io_rsp_ready[1];
  assign io_rsp[1]       = dio_rsp;

  // BlueTree: leaf 0 is BlueGrass
  logic [BT_LEAVES-1:0] lq_valid, lq_ready, lr_valid, lr_ready;
  pkt_t                 lq [BT_LEAVES];
  pkt_t                 lr [BT_LEAVES];

  assign lq_valid[0]      = bg_mem_out_valid;
  assign bg_mem_out_ready = lq_ready[0];
  assign lq[0]            = bg_mem_out;
  assign bg_mem_in_valid  = lr_valid[0];
  assign lr_ready[0]      = bg_mem_in_ready;
  assign bg_mem_in        = lr[0];
  for (genvar i = 1; i < BT_LEAVES; i++) begin : g_cpu_leaf
    assign lq_valid[i]          = cpu_mem_req_valid[i];
    assign cpu_mem_req_ready[i] = lq_ready[i];
    assign lq[i]                = cpu_mem_req[i];
    assign cpu_mem_rsp_valid[i] = lr_valid[i];
    assign lr_ready[i]          = cpu_mem_rsp_ready[i];
    assign cpu_mem_rsp[i]       = lr[i];
  end

  bluetree #(.N_LEAF(BT_LEAVES)) u_bluetree (
    .clk, .rst_n,
    .leaf_req_valid(lq_valid), .leaf_req_ready(lq_ready), .leaf_req(lq),
    .leaf_rsp_valid(lr_valid), .leaf_rsp_ready(lr_ready), .leaf_rsp(lr),
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_ready, .mem_rsp);
endmodule
