// uart_driver: low-layer I/O driver and controller for a UART (8N1).
//
// Requests come from the I/O VMM through an input FIFO; the operation code is
// the control signal that selects the function unit:
//   OP_WRITE - transmit data[7:0]; the ACK response is sent once the stop bit
//              has been driven, so a CPU knows its byte has left.
//   OP_READ  - return the oldest received byte: response data[8] = 1 and
//              data[7:0] = the byte, or data[8] = 0 when nothing was received.
// Other codes are answered with an ACK and have no effect.
// The receiver runs independently and keeps up to RX_DEPTH bytes; a byte
// arriving when that queue is full is lost and counted in rx_overrun.
// Line format is 8 data bits, no parity, one stop bit, LSB first, one bit every
// CLKS_PER_BIT cycles (868 = 115200 baud at the evaluated 100 MHz clock).
// The baud rate, frame format and response rules are this design's choices;
// the driver's place and its FIFO-in / function units / FIFO-out structure
// follow the published VCDC diagram.
module uart_driver
  import blueio_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned RX_DEPTH     = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  output logic       req_ready,
  input  pkt_t       req,
  output logic       rsp_valid,
  input  logic       rsp_ready,
  output pkt_t       rsp,
  output logic       uart_tx,
  input  logic       uart_rx,
  output logic [7:0] rx_overrun
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  // input and output FIFOs
  logic cmd_valid, cmd_ready;
  pkt_t cmd;
  logic out_valid, out_ready;
  pkt_t out_pkt;
  sync_fifo #(.WIDTH(PKT_W), .DEPTH(2)) u_in_fifo (
    .clk, .rst_n, .in_valid(req_valid), .in_ready(req_ready), .in_data(req),
    .out_valid(cmd_valid), .out_ready(cmd_ready), .out_data(cmd), .count());
  sync_fifo #(.WIDTH(PKT_W), .DEPTH(2)) u_out_fifo (
    .clk, .rst_n, .in_valid(out_valid), .in_ready(out_ready), .in_data(out_pkt),
    .out_valid(rsp_valid), .out_ready(rsp_ready), .out_data(rsp), .count());

  // ---------------- receiver ----------------
  logic [1:0]    rx_sync;
  logic          rx_busy;
  logic [CW-1:0] rx_cnt;
  logic [3:0]    rx_bit;
  logic [7:0]    rx_shift;
  logic          rxq_push, rxq_ready, rxq_valid, rxq_pop;
  logic [7:0]    rxq_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync <= 2'b11; rx_busy <= 1'b0; rx_cnt <= '0; rx_bit <= '0;
      rx_shift <= '0; rxq_push <= 1'b0; rx_overrun <= '0;
    end else begin
      rx_sync  <= {rx_sync[0], uart_rx};
      rxq_push <= 1'b0;
      if (!rx_busy) begin
        if (!rx_sync[1]) begin  // start bit: sample in the middle of each bit
          rx_busy <= 1'b1;
          rx_cnt  <= CW'(CLKS_PER_BIT / 2);
          rx_bit  <= '0;
        end
      end else if (rx_cnt != 0) begin
        rx_cnt <= rx_cnt - 1'b1;
      end else begin
        rx_cnt <= CW'(CLKS_PER_BIT - 1);
        rx_bit <= rx_bit + 1'b1;
        if (rx_bit == 0) begin
          if (rx_sync[1]) rx_busy <= 1'b0;  // false start
        end else if (rx_bit <= 8) begin
          rx_shift <= {rx_sync[1], rx_shift[7:1]};
        end else begin
          rx_busy <= 1'b0;
          if (rx_sync[1]) begin  // valid stop bit
            if (rxq_ready) rxq_push <= 1'b1;
            else if (rx_overrun != '1) rx_overrun <= rx_overrun + 1'b1;
          end
        end
      end
    end
  end

  sync_fifo #(.WIDTH(8), .DEPTH(RX_DEPTH)) u_rx_q (
    .clk, .rst_n, .in_valid(rxq_push), .in_ready(rxq_ready), .in_data(rx_shift),
    .out_valid(rxq_valid), .out_ready(rxq_pop), .out_data(rxq_data), .count());

  // ---------------- transmitter and command FSM ----------------
  typedef enum logic [1:0] {S_IDLE, S_TX, S_RESP} state_e;
  state_e        state;
  logic [9:0]    tx_frame;
  logic [3:0]    tx_bit;
  logic [CW-1:0] tx_cnt;
  pkt_t          resp_q;

  assign cmd_ready = (state == S_IDLE) && cmd_valid;
  assign rxq_pop   = cmd_ready && (cmd.op == OP_READ) && rxq_valid;
  assign out_valid = (state == S_RESP);
  assign out_pkt   = resp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; uart_tx <= 1'b1; tx_frame <= '1; tx_bit <= '0;
      tx_cnt <= '0; resp_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          resp_q      <= cmd;
          resp_q.op   <= OP_ACK;
          resp_q.data <= '0;
          if (cmd.op == OP_WRITE) begin
            tx_frame <= {1'b1, cmd.data[7:0], 1'b0};
            tx_bit   <= '0;
            tx_cnt   <= CW'(CLKS_PER_BIT - 1);
            uart_tx  <= 1'b0;
            state    <= S_TX;
          end else begin
            if (cmd.op == OP_READ) begin
              resp_q.op   <= OP_DATA;
              resp_q.data <= rxq_valid ? {23'd0, 1'b1, rxq_data} : '0;
            end
            state <= S_RESP;
          end
        end
        S_TX: begin
          if (tx_cnt != 0) tx_cnt <= tx_cnt - 1'b1;
          else if (tx_bit == 4'd9) begin
            state <= S_RESP;
          end else begin
            tx_bit  <= tx_bit + 1'b1;
            uart_tx <= tx_frame[tx_bit + 1'b1];
            tx_cnt  <= CW'(CLKS_PER_BIT - 1);
          end
        end
        S_RESP: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
