// spi_flash_driver: low-layer I/O driver for an SPI NOR flash (S25FL128S-style
// command set, SPI mode 0, single data line each way).
//
// One request at a time is taken from the input FIFO; its operation code
// selects the function unit, which is a short sequence of SPI transactions:
//   OP_READ  - READ (03h) + 24-bit address, one byte read back.
//              Response OP_DATA with data[7:0] = the byte.
//   OP_WRITE - WREN (06h); PP (02h) + address + data[7:0]; then RDSR (05h)
//              repeated until the write-in-progress bit (status bit 0) clears.
//              Response OP_ACK.
//   OP_ERASE - WREN; P4E (20h) + address (4 KB sector); RDSR polling. OP_ACK.
// Other codes are answered with OP_ACK without touching the flash.
// Chip select goes high for CS_GAP cycles between transactions. SCK is low at
// rest; each half period is SCK_HALF cycles; MOSI changes while SCK is low and
// MISO is sampled on the rising edge, MSB first.
// Timing: a read takes 40 SCK periods plus chip-select gaps; at SCK_HALF = 2
// that is 160 cycles + a few of handshake.
// The command codes are those of the flash part the published evaluation
// used; the sequencing and clocking are this design's choices.
module spi_flash_driver
  import blueio_pkg::*;
#(
  parameter int unsigned SCK_HALF = 2,
  parameter int unsigned CS_GAP   = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req_valid,
  output logic req_ready,
  input  pkt_t req,
  output logic rsp_valid,
  input  logic rsp_ready,
  output pkt_t rsp,
  output logic spi_cs_n,
  output logic spi_sck,
  output logic spi_mosi,
  input  logic spi_miso
);
  localparam logic [7:0] CMD_READ = 8'h03, CMD_WREN = 8'h06, CMD_PP = 8'h02,
                         CMD_P4E  = 8'h20, CMD_RDSR = 8'h05;
  localparam int unsigned HW = $clog2(SCK_HALF + CS_GAP + 1);

  logic cmd_valid, cmd_ready, out_valid, out_ready;
  pkt_t cmd, out_pkt;
  sync_fifo #(.WIDTH(PKT_W), .DEPTH(2)) u_in_fifo (
    .clk, .rst_n, .in_valid(req_valid), .in_ready(req_ready), .in_data(req),
    .out_valid(cmd_valid), .out_ready(cmd_ready), .out_data(cmd), .count());
  sync_fifo #(.WIDTH(PKT_W), .DEPTH(2)) u_out_fifo (
    .clk, .rst_n, .in_valid(out_valid), .in_ready(out_ready), .in_data(out_pkt),
    .out_valid(rsp_valid), .out_ready(rsp_ready), .out_data(rsp), .count());

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_SHIFT, S_GAP, S_RESP} state_e;
  typedef enum logic [2:0] {PH_READ, PH_WREN, PH_PROG, PH_ERASE, PH_POLL} phase_e;

  state_e      state;
  phase_e      phase;
  pkt_t        job;
  logic [39:0] tx_sh;      // up to 5 bytes out
  logic [5:0]  nbits;      // bits left in this transaction
  logic [7:0]  rx_sh;
  logic        sck_hi;
  logic [HW-1:0] tmr;
  logic        erase_q;

  assign cmd_ready = (state == S_IDLE) && cmd_valid;
  assign out_valid = (state == S_RESP);
  assign out_pkt   = job;
  assign spi_mosi  = tx_sh[39];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; phase <= PH_READ; job <= '0; tx_sh <= '0; nbits <= '0;
      rx_sh <= '0; sck_hi <= 1'b0; tmr <= '0; spi_cs_n <= 1'b1; spi_sck <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          job      <= cmd;
          job.data <= '0;
          state    <= S_LOAD;
          unique case (cmd.op)
            OP_READ:  phase <= PH_READ;
            OP_WRITE: phase <= PH_WREN;
            OP_ERASE: phase <= PH_WREN;
            default:  begin job.op <= OP_ACK; state <= S_RESP; end
          endcase
          if (cmd.op == OP_READ) job.op <= OP_DATA; else job.op <= OP_ACK;
          job.data <= (cmd.op == OP_WRITE) ? {24'd0, cmd.data[7:0]} : '0;
        end
        S_LOAD: begin  // set up one transaction
          spi_cs_n <= 1'b0;
          sck_hi   <= 1'b0;
          tmr      <= HW'(SCK_HALF - 1);
          state    <= S_SHIFT;
          unique case (phase)
            PH_READ:  begin tx_sh <= {CMD_READ, job.addr, 8'h00}; nbits <= 6'd40; end
            PH_WREN:  begin tx_sh <= {CMD_WREN, 32'h0};          nbits <= 6'd8;  end
            PH_PROG:  begin tx_sh <= {CMD_PP, job.addr, job.data[7:0]}; nbits <= 6'd40; end
            PH_ERASE: begin tx_sh <= {CMD_P4E, job.addr, 8'h00}; nbits <= 6'd32; end
            default:  begin tx_sh <= {CMD_RDSR, 32'h0};          nbits <= 6'd16; end
          endcase
        end
        S_SHIFT: begin
          if (tmr != 0) tmr <= tmr - 1'b1;
          else begin
            tmr <= HW'(SCK_HALF - 1);
            if (!sck_hi) begin            // rising edge: sample MISO
              spi_sck <= 1'b1; sck_hi <= 1'b1;
              rx_sh   <= {rx_sh[6:0], spi_miso};
            end else begin                // falling edge: next bit
              spi_sck <= 1'b0; sck_hi <= 1'b0;
              tx_sh   <= {tx_sh[38:0], 1'b0};
              nbits   <= nbits - 1'b1;
              if (nbits == 6'd1) begin
                spi_cs_n <= 1'b1;
                tmr      <= HW'(CS_GAP - 1);
                state    <= S_GAP;
              end
            end
          end
        end
        S_GAP: begin
          if (tmr != 0) tmr <= tmr - 1'b1;
          else begin
            state <= S_LOAD;
            unique case (phase)
              PH_READ:  begin job.data <= {24'd0, rx_sh}; state <= S_RESP; end
              PH_WREN:  phase <= erase_q ? PH_ERASE : PH_PROG;
              PH_PROG, PH_ERASE: phase <= PH_POLL;
              default:  if (!rx_sh[0]) begin job.data <= '0; state <= S_RESP; end
            endcase
          end
        end
        S_RESP: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // remembers whether the current job is an erase (its op field now holds the response code)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) erase_q <= 1'b0;
    else if (cmd_ready) erase_q <= (cmd.op == OP_ERASE);
  end
endmodule
