// rt_arbiter: N-input arbiter with a selectable real-time policy.
//
// This is the arbitration element behind BlueGrass's Arbiter_0 and Arbiter_1
// and the VCDC and I/O VMM schedulers. Each cycle it grants at most one of the
// requesters in `req` (one-hot `grant`, index `grant_idx`); `advance` tells it
// that the granted requester was actually served this cycle, which is when the
// round-robin pointer moves. The grant is combinational from `req` and state.
//
// Policies (policy_e, chosen at run time by `policy`):
//   POL_RR   - round robin: search starts just past the last served input.
//   POL_FP   - fixed priority: input 0 highest.
//   POL_FIFO - first come, first served: a request takes a ticket from a
//              counter in the cycle after it appears (the counter advances
//              once per cycle in which any request arrives); the oldest
//              ticket wins, ties (same arrival cycle) go to the lowest index.
//              Tickets are TW = log2(N) + 4 bits and compared relative to the
//              counter, so the order is exact while no request has seen more
//              than 2**TW - 1 later arrivals (always, under FIFO, since
//              each other requester can arrive at most once ahead of it;
//              after a long spell under fixed priority an old ticket may
//              alias, which only perturbs the order once).
// The three policies are those the system offers; how each is realised is this
// design's choice. A requester is expected to hold `req` until served.
module rt_arbiter
  import blueio_pkg::*;
#(
  parameter int unsigned N     = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  policy_e              policy,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         grant,
  output logic [((N > 1) ? $clog2(N) : 1)-1:0] grant_idx,
  output logic                 grant_valid
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  localparam int unsigned TW = IW + 4;

  logic [IW-1:0] last_q;
  logic [TW-1:0] next_q;          // ticket counter
  logic [TW-1:0] tick_q [N];      // ticket of each waiting request
  logic [N-1:0]  has_q;           // request i holds a ticket
  logic [TW-1:0] age [N];         // arrivals since request i's ticket

  always_comb
    for (int i = 0; i < N; i++) age[i] = has_q[i] ? TW'(next_q - tick_q[i]) : '0;

  always_comb begin
    logic [IW-1:0]    cand;
    logic [TW-1:0] best_age;
    grant_valid = 1'b0;
    grant_idx   = '0;
    best_age    = '0;
    unique case (policy)
      POL_FP: begin
        for (int i = N - 1; i >= 0; i--)
          if (req[i]) begin grant_valid = 1'b1; grant_idx = IW'(i); end
      end
      POL_FIFO: begin
        for (int i = 0; i < N; i++)
          if (req[i] && (!grant_valid || age[i] > best_age)) begin
            grant_valid = 1'b1; grant_idx = IW'(i); best_age = age[i];
          end
      end
      default: begin  // POL_RR
        for (int k = N; k >= 1; k--) begin
          cand = IW'((32'(last_q) + k) % N);
          if (req[cand]) begin grant_valid = 1'b1; grant_idx = cand; end
        end
      end
    endcase
    grant = grant_valid ? (N'(1) << grant_idx) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q <= IW'(N - 1);
      next_q <= '0;
      has_q  <= '0;
      for (int i = 0; i < N; i++) tick_q[i] <= '0;
    end else begin
      if (advance && grant_valid) last_q <= grant_idx;
      for (int i = 0; i < N; i++) begin
        if (!req[i] || (advance && grant[i])) has_q[i] <= 1'b0;
        else if (!has_q[i]) begin has_q[i] <= 1'b1; tick_q[i] <= next_q; end
      end
      if ((req & ~has_q & ~(advance ? grant : '0)) != '0) next_q <= next_q + 1'b1;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_grant_req: assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);
endmodule
