// gpiocp: GPIO command processor, a programmable controller that performs
// sequences of pin operations at exact clock cycles on behalf of the CPUs.
//
// A CPU first stores a command (identifier, length, sub-commands) into the
// command memory with GP_LOAD messages, then at run time sends GP_RUN
// ("run command X at time t, repeat every Z cycles"). The hardware manager
// stores commands (port A) and forwards run requests; the command queue looks
// the command up (port B) and loads it into the requesting CPU's own GPIO CPU,
// which waits for the global timer and executes it; the synchronization
// processor merges all GPIO CPUs' pin actions onto the pins and samples the
// pins for reads. Because every CPU has its own GPIO CPU, commands of
// different CPUs run in parallel and the time a command runs at does not
// depend on the network or on other CPUs' traffic: the first action of a
// command starting at t takes effect in the cycle the global timer reads t.
// Read results (OP_DATA, data = pins) and acknowledgements return on rsp.
// The four-part structure follows the published design; encodings, depths
// and the latency compensation are this design's choices.
module gpiocp
  import blueio_pkg::*;
#(
  parameter int unsigned N_CPU      = 16,
  parameter int unsigned MEM_DEPTH  = 64,
  parameter int unsigned PROG_DEPTH = 8,
  parameter int unsigned N_PINS     = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [31:0]       timer,
  input  logic              req_valid,
  output logic              req_ready,
  input  pkt_t              req,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output pkt_t              rsp,
  output logic [N_PINS-1:0] pins_out,
  input  logic [N_PINS-1:0] pins_in
);
  localparam int unsigned AW = $clog2(MEM_DEPTH);

  logic          a_en, a_we, b_en;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0]   a_wdata, b_rdata;
  logic [AW:0]   mem_limit;
  logic          run_valid, run_ready, cq_rsp_valid, cq_rsp_ready;
  pkt_t          run, cq_rsp;

  hardware_manager #(.MEM_DEPTH(MEM_DEPTH)) u_hw_mgr (
    .clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready, .rsp,
    .mem_en(a_en), .mem_we(a_we), .mem_addr(a_addr), .mem_wdata(a_wdata), .mem_limit,
    .run_valid, .run_ready, .run, .cq_rsp_valid, .cq_rsp_ready, .cq_rsp);

  command_memory #(.DEPTH(MEM_DEPTH), .WIDTH(32)) u_cmd_mem (
    .clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata(),   // port A only writes
    .b_en, .b_we(1'b0), .b_addr, .b_wdata(32'd0), .b_rdata);

  logic [N_CPU-1:0] ld_valid, ld_ready, g_rsp_valid, g_rsp_ready;
  logic             ld_arm;
  logic [31:0]      ld_word;
  logic [15:0]      ld_period;
  logic [7:0]       ld_cmd_id;
  pkt_t             g_rsp [N_CPU];

  command_queue #(.N_CPU(N_CPU), .MEM_DEPTH(MEM_DEPTH)) u_cmd_q (
    .clk, .rst_n, .run_valid, .run_ready, .run,
    .mem_en(b_en), .mem_addr(b_addr), .mem_rdata(b_rdata), .mem_limit,
    .ld_valid, .ld_ready, .ld_arm, .ld_word, .ld_period, .ld_cmd_id,
    .g_rsp_valid, .g_rsp_ready, .g_rsp,
    .rsp_valid(cq_rsp_valid), .rsp_ready(cq_rsp_ready), .rsp(cq_rsp));

  logic [N_CPU-1:0]  act_valid, act_read, act_level, rd_valid;
  logic [4:0]        act_pin [N_CPU];
  logic [N_PINS-1:0] rd_data [N_CPU];

  for (genvar c = 0; c < N_CPU; c++) begin : g_cpu
    gpiocpu #(.DEPTH(PROG_DEPTH), .CPU_ID(c), .N_PINS(N_PINS)) u_gpiocpu (
      .clk, .rst_n, .timer,
      .ld_valid(ld_valid[c]), .ld_ready(ld_ready[c]), .ld_arm, .ld_word, .ld_period, .ld_cmd_id,
      .act_valid(act_valid[c]), .act_read(act_read[c]), .act_pin(act_pin[c]), .act_level(act_level[c]),
      .rd_valid(rd_valid[c]), .rd_data(rd_data[c]),
      .rsp_valid(g_rsp_valid[c]), .rsp_ready(g_rsp_ready[c]), .rsp(g_rsp[c]));
  end

  sync_processor #(.N_CPU(N_CPU), .N_PINS(N_PINS)) u_sync (
    .clk, .rst_n, .act_valid, .act_read, .act_pin, .act_level,
    .pins_out, .pins_in, .rd_valid, .rd_data);
endmodule
