// gpiocpu: one GPIO CPU, the execution unit that gives a CPU cycle-exact I/O.
//
// A small finite state machine with a command FIFO, a program buffer of DEPTH
// sub-commands, a local timer (wait counter) and a response FIFO. The command
// queue pushes a command as its sub-command words (ld_arm = 0) followed by an
// arm word (ld_arm = 1) carrying the start time and period; commands queue in
// the FIFO (DEPTH words) behind the one being executed. The FSM copies one
// command into the program buffer, waits until the global timer reaches
// start - LEAD, then executes one sub-command per cycle:
//   SC_SET  pin := level        SC_WAIT n  the next sub-command follows n+1
//   SC_READ sample all pins                cycles later (instead of 1)
//   SC_END  stop (also after the last stored word)
// (bits [29:24] of a sub-command word are unused by this encoding)
// Each action is registered here and passes two more register stages in the
// synchronization processor; LEAD (4) makes the first action land on the pins
// in exactly the cycle in which the global timer reads `start`, and every
// later action a fixed, program-defined number of cycles after it.
// With a nonzero period the command runs again at start + period,
// start + 2*period, ... for as long as no further command is queued; a queued
// command takes over after the current run. A start time already passed runs
// at once. Sub-commands past DEPTH are dropped.
// Read results come back on rd_valid/rd_data and are queued (a result that
// finds the DEPTH-deep queue full is dropped) as OP_DATA packets
// (addr = command identifier, data = pin values) for the CPU.
// The sub-command encoding, LEAD, the queueing and the periodic rule are this
// design's own; the FIFO, local timer and FSM are the published structure.
module gpiocpu
  import blueio_pkg::*;
#(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned CPU_ID = 0,
  parameter int unsigned N_PINS = 32,
  parameter int unsigned LEAD   = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [31:0]       timer,
  // program loading from the command queue
  input  logic              ld_valid,
  output logic              ld_ready,
  input  logic              ld_arm,
  input  logic [31:0]       ld_word,      // sub-command, or start time when arming
  input  logic [15:0]       ld_period,
  input  logic [7:0]        ld_cmd_id,
  // pin actions to the synchronization processor
  output logic              act_valid,
  output logic              act_read,
  output logic [4:0]        act_pin,
  output logic              act_level,
  input  logic              rd_valid,
  input  logic [N_PINS-1:0] rd_data,
  // responses
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output pkt_t              rsp
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef enum logic [1:0] {S_FETCH, S_ARMED, S_EXEC} state_e;
  typedef struct packed {
    logic        arm;
    logic [31:0] word;
    logic [15:0] period;
    logic [7:0]  cmd_id;
  } ld_t;

  state_e        state;
  logic [31:0]   prog [DEPTH];
  logic [PW:0]   len_q;
  logic [PW-1:0] pc;
  logic [31:0]   start_q;
  logic [15:0]   period_q;
  logic [7:0]    cmd_id_q;
  logic [23:0]   wait_q;     // local timer
  logic [31:0]   cur;
  logic          last;
  logic          q_valid, q_pop;
  ld_t           q_head;

  // command FIFO: queued words of the commands that follow the current one
  sync_fifo #(.WIDTH($bits(ld_t)), .DEPTH(DEPTH)) u_cmd_fifo (
    .clk, .rst_n, .in_valid(ld_valid), .in_ready(ld_ready),
    .in_data({ld_arm, ld_word, ld_period, ld_cmd_id}),
    .out_valid(q_valid), .out_ready(q_pop), .out_data(q_head), .count());

  assign q_pop = (state == S_FETCH) && q_valid;
  assign cur   = prog[pc];
  assign last  = (32'(pc) + 1 >= 32'(len_q)) || (subcmd_kind_e'(cur[31:30]) == SC_END);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_FETCH; len_q <= '0; pc <= '0; start_q <= '0; period_q <= '0;
      cmd_id_q <= '0; wait_q <= '0;
      act_valid <= 1'b0; act_read <= 1'b0; act_pin <= '0; act_level <= 1'b0;
    end else begin
      act_valid <= 1'b0;
      act_read  <= 1'b0;
      unique case (state)
        S_FETCH: if (q_valid) begin
          if (q_head.arm) begin
            start_q  <= q_head.word;
            period_q <= q_head.period;
            cmd_id_q <= q_head.cmd_id;
            if (len_q != 0) state <= S_ARMED;
          end else if (32'(len_q) < DEPTH) begin
            prog[PW'(len_q)] <= q_head.word;
            len_q            <= len_q + 1'b1;
          end
        end
        S_ARMED: if ($signed(start_q - (timer + LEAD)) <= 0) begin
          state  <= S_EXEC;
          pc     <= '0;
          wait_q <= '0;
        end
        S_EXEC: begin
          if (wait_q != 0) wait_q <= wait_q - 1'b1;
          else begin
            unique case (subcmd_kind_e'(cur[31:30]))
              SC_SET:  begin act_valid <= 1'b1; act_pin <= cur[12:8]; act_level <= cur[0]; end
              SC_READ: begin act_valid <= 1'b1; act_read <= 1'b1; end
              SC_WAIT: wait_q <= cur[23:0];
              default: ;
            endcase
            pc <= pc + 1'b1;
            if (last) begin
              pc <= '0;
              if (period_q != 0 && !q_valid) begin
                start_q <= start_q + 32'(period_q);
                state   <= S_ARMED;
              end else begin
                len_q <= '0;
                state <= S_FETCH;
              end
            end
          end
        end
        default: state <= S_FETCH;
      endcase
    end
  end

  // response FIFO for read results
  pkt_t rd_pkt;
  // a result that finds the queue full is dropped, so in_ready is not used
  always_comb begin
    rd_pkt        = '0;
    rd_pkt.cpu_id = CPU_ID_W'(CPU_ID);
    rd_pkt.op     = OP_DATA;
    rd_pkt.addr   = ADDR_W'(cmd_id_q);
    rd_pkt.data   = DATA_W'(rd_data);
  end
  sync_fifo #(.WIDTH(PKT_W), .DEPTH(DEPTH)) u_rsp_fifo (
    .clk, .rst_n, .in_valid(rd_valid), .in_ready(), .in_data(rd_pkt),
    .out_valid(rsp_valid), .out_ready(rsp_ready), .out_data(rsp), .count());
endmodule
