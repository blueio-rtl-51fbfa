// command_queue: finds a stored GPIO command and hands it to a GPIO CPU.
//
// The translation module takes a GP_RUN request (addr[7:0] = command
// identifier, addr[23:8] = repeat period in cycles, data = start time) and,
// through FSM B and command-memory port B, walks the stored commands from word
// 0: it reads an identifier and a length, and either skips 2 + length words to
// the next command or, on a match, reads the sub-commands one by one into its
// output register (REG) and pushes each to the GPIO CPU that belongs to the
// requesting CPU, followed by an arm word carrying the start time and period.
// It then answers the CPU with OP_ACK (data 0 = started, 1 = no such command
// below mem_limit). The search costs 3 cycles per skipped command and each
// sub-command 3 cycles, so a command must be sent ahead of its start time by
// at least that much.
// The SH scheduler merges, round robin, the GPIO CPUs' read results and the
// translation module's own answers into one response stream.
// Ports: run (valid/ready), memory port B, per-GPIO-CPU load handshake
// (ld_valid/ld_ready, with shared ld_* data), per-GPIO-CPU responses.
module command_queue
  import blueio_pkg::*;
#(
  parameter int unsigned N_CPU     = 16,
  parameter int unsigned MEM_DEPTH = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run_valid,
  output logic run_ready,
  input  pkt_t run,
  // command memory port B
  output logic                         mem_en,
  output logic [$clog2(MEM_DEPTH)-1:0] mem_addr,
  input  logic [31:0]                  mem_rdata,
  input  logic [$clog2(MEM_DEPTH):0]   mem_limit,
  // GPIO CPUs
  output logic [N_CPU-1:0] ld_valid,
  input  logic [N_CPU-1:0] ld_ready,
  output logic             ld_arm,
  output logic [31:0]      ld_word,
  output logic [15:0]      ld_period,
  output logic [7:0]       ld_cmd_id,
  input  logic [N_CPU-1:0] g_rsp_valid,
  output logic [N_CPU-1:0] g_rsp_ready,
  input  pkt_t             g_rsp [N_CPU],
  // responses to the hardware manager
  output logic rsp_valid,
  input  logic rsp_ready,
  output pkt_t rsp
);
  localparam int unsigned AW = $clog2(MEM_DEPTH);

  typedef enum logic [3:0] {
    S_IDLE, S_RD_ID, S_RD_LEN, S_CHECK, S_RD_SUB, S_GET_SUB, S_PUSH, S_ARM, S_ANSWER
  } state_e;

  state_e      state;
  pkt_t        job_q;
  logic [AW:0] ptr_q;      // start of the command being examined
  logic [AW:0] sub_q;      // next sub-command word
  logic [31:0] id_q, left_q;
  logic [31:0] reg_q;      // REG between translation and the GPIO CPUs
  logic        found_q;

  logic [CPU_ID_W-1:0] tgt;
  assign tgt       = job_q.cpu_id;
  assign run_ready = (state == S_IDLE);

  always_comb begin
    mem_en   = 1'b0;
    mem_addr = '0;
    unique case (state)
      S_RD_ID:  begin mem_en = 1'b1; mem_addr = AW'(ptr_q); end
      S_RD_LEN: begin mem_en = 1'b1; mem_addr = AW'(ptr_q + 1'b1); end
      S_RD_SUB: begin mem_en = 1'b1; mem_addr = AW'(sub_q); end
      default: ;
    endcase
  end

  always_comb begin
    ld_valid  = '0;
    ld_arm    = (state == S_ARM);
    ld_word   = (state == S_ARM) ? job_q.data : reg_q;
    ld_period = job_q.addr[23:8];
    ld_cmd_id = job_q.addr[7:0];
    if ((state == S_PUSH || state == S_ARM) && (32'(tgt) < N_CPU)) ld_valid[tgt] = 1'b1;
  end

  logic ans_ready;
  logic tgt_ready;
  assign tgt_ready = (32'(tgt) < N_CPU) ? ld_ready[tgt] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; job_q <= '0; ptr_q <= '0; sub_q <= '0; id_q <= '0;
      left_q <= '0; reg_q <= '0; found_q <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (run_valid) begin
          job_q   <= run;
          ptr_q   <= '0;
          found_q <= 1'b0;
          state   <= S_RD_ID;
        end
        S_RD_ID:  state <= (32'(ptr_q) + 2 > 32'(mem_limit)) ? S_ANSWER : S_RD_LEN;
        S_RD_LEN: begin id_q <= mem_rdata; state <= S_CHECK; end
        S_CHECK: begin
          if (id_q == 32'(job_q.addr[7:0]) && 32'(ptr_q) + 2 + mem_rdata <= 32'(mem_limit)) begin
            found_q <= 1'b1;
            sub_q   <= ptr_q + (AW + 1)'(2);
            left_q  <= mem_rdata;
            state   <= (mem_rdata == 0) ? S_ARM : S_RD_SUB;
          end else if (32'(ptr_q) + 2 + mem_rdata >= 32'(mem_limit)) begin
            state <= S_ANSWER;
          end else begin
            ptr_q <= ptr_q + (AW + 1)'(mem_rdata + 2);
            state <= S_RD_ID;
          end
        end
        S_RD_SUB:  state <= S_GET_SUB;
        S_GET_SUB: begin reg_q <= mem_rdata; state <= S_PUSH; end
        S_PUSH: if (tgt_ready) begin
          sub_q  <= sub_q + 1'b1;
          left_q <= left_q - 1'b1;
          state  <= (left_q == 1) ? S_ARM : S_RD_SUB;
        end
        S_ARM:    if (tgt_ready) state <= S_ANSWER;
        S_ANSWER: if (ans_ready) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  // SH: GPIO CPU results and the translation module's answers
  pkt_t ans;
  always_comb begin
    ans      = job_q;
    ans.op   = OP_ACK;
    ans.data = found_q ? 32'd0 : 32'd1;
  end

  localparam int unsigned NS = N_CPU + 1;
  logic [NS-1:0]         sh_req, sh_grant;
  logic [$clog2(NS)-1:0] sh_idx;
  logic                  sh_valid;
  assign sh_req = {(state == S_ANSWER), g_rsp_valid};
  rt_arbiter #(.N(NS)) u_sh (
    .clk, .rst_n, .policy(POL_RR), .req(sh_req), .advance(rsp_ready),
    .grant(sh_grant), .grant_idx(sh_idx), .grant_valid(sh_valid));
  assign rsp_valid   = sh_valid;
  always_comb begin
    rsp = ans;
    for (int c = 0; c < N_CPU; c++)
      if (32'(sh_idx) == c) rsp = g_rsp[c];
  end
  assign g_rsp_ready = rsp_ready ? sh_grant[N_CPU-1:0] : '0;
  assign ans_ready   = rsp_ready && sh_grant[N_CPU];
endmodule
