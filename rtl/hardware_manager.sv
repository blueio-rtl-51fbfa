// hardware_manager: the GPIO command processor's port to the CPUs.
//
// Messages from the CPUs are queued in an input FIFO and taken one at a time
// into a holding register. The operation code is the control signal:
//   GP_LOAD - FSM A stores `data` into command-memory word `addr` through
//             port A and answers OP_ACK (data 0). Words are expected to be
//             stored from address 0 upward; `mem_limit` (one past the highest
//             word stored since reset) bounds the command queue's search.
//   GP_RUN  - passed on to the command queue, which answers itself.
//   other   - answered with OP_ACK, data = all ones (not understood).
// Answers from FSM A and from the command queue are merged round robin into
// the output FIFO back to the CPUs. All streams are valid/ready; a LOAD takes
// 3 cycles from the input FIFO's head to its ACK entering the output FIFO.
// The message encoding and mem_limit are this design's choices.
module hardware_manager
  import blueio_pkg::*;
#(
  parameter int unsigned MEM_DEPTH  = 64,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req_valid,
  output logic req_ready,
  input  pkt_t req,
  output logic rsp_valid,
  input  logic rsp_ready,
  output pkt_t rsp,
  // command memory port A
  output logic                         mem_en,
  output logic                         mem_we,
  output logic [$clog2(MEM_DEPTH)-1:0] mem_addr,
  output logic [31:0]                  mem_wdata,
  output logic [$clog2(MEM_DEPTH):0]   mem_limit,
  // command queue
  output logic run_valid,
  input  logic run_ready,
  output pkt_t run,
  input  logic cq_rsp_valid,
  output logic cq_rsp_ready,
  input  pkt_t cq_rsp
);
  localparam int unsigned AW = $clog2(MEM_DEPTH);

  logic in_valid, in_ready;
  pkt_t in_pkt;
  sync_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n, .in_valid(req_valid), .in_ready(req_ready), .in_data(req),
    .out_valid(in_valid), .out_ready(in_ready), .out_data(in_pkt), .count());

  // holding register and FSM A
  typedef enum logic [1:0] {S_IDLE, S_DISPATCH, S_ACK} state_e;
  state_e state;
  pkt_t   hold_q;
  pkt_t   ack_q;

  assign in_ready  = (state == S_IDLE);
  assign run       = hold_q;
  assign run_valid = (state == S_DISPATCH) && (gp_op_e'(hold_q.op) == GP_RUN);

  logic ack_valid, ack_ready;
  assign ack_valid = (state == S_ACK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; hold_q <= '0; ack_q <= '0; mem_limit <= '0;
      mem_en <= 1'b0; mem_we <= 1'b0; mem_addr <= '0; mem_wdata <= '0;
    end else begin
      mem_en <= 1'b0;
      mem_we <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          hold_q <= in_pkt;
          state  <= S_DISPATCH;
        end
        S_DISPATCH: begin
          ack_q      <= hold_q;
          ack_q.op   <= OP_ACK;
          ack_q.data <= '0;
          if (gp_op_e'(hold_q.op) == GP_RUN) begin
            if (run_ready) state <= S_IDLE;
          end else if (gp_op_e'(hold_q.op) == GP_LOAD && 32'(hold_q.addr) < MEM_DEPTH) begin
            mem_en    <= 1'b1;
            mem_we    <= 1'b1;
            mem_addr  <= AW'(hold_q.addr);
            mem_wdata <= hold_q.data;
            if (32'(hold_q.addr) + 1 > 32'(mem_limit)) mem_limit <= (AW + 1)'(hold_q.addr + 1);
            state     <= S_ACK;
          end else begin
            ack_q.data <= '1;
            state      <= S_ACK;
          end
        end
        S_ACK: if (ack_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // output multiplexer
  logic [1:0] g;
  logic [0:0] gi;
  logic       gv, out_ready;
  rt_arbiter #(.N(2)) u_out_arb (
    .clk, .rst_n, .policy(POL_RR), .req({cq_rsp_valid, ack_valid}), .advance(out_ready),
    .grant(g), .grant_idx(gi), .grant_valid(gv));
  assign ack_ready    = g[0] && out_ready;
  assign cq_rsp_ready = g[1] && out_ready;

  sync_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n, .in_valid(gv), .in_ready(out_ready), .in_data(gi[0] ? cq_rsp : ack_q),
    .out_valid(rsp_valid), .out_ready(rsp_ready), .out_data(rsp), .count());
endmodule
