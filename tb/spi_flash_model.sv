// spi_flash_model: behavioural model of the part of an SPI NOR flash's
// command set the flash driver uses (SPI mode 0, MSB first): READ 03h with a
// 24-bit address (continuous), WREN 06h, PP 02h (programs bytes, 1 -> 0 only,
// needs the write-enable latch), P4E 20h (erases a 4 KB sector to FFh, needs
// the latch) and RDSR 05h (bit 0 write in progress, bit 1 write enable).
// A program or erase keeps "write in progress" set for the next BUSY_POLLS
// status reads. Unwritten bytes read as FFh. Counts the commands it saw.
// The command codes are those of the S25FL128S flash used with the published
// system; the busy time counted in status polls is the model's simplification.
module spi_flash_model #(
  parameter int BUSY_POLLS = 3
) (
  input  logic cs_n,
  input  logic sck,
  input  logic mosi,
  output logic miso
);
  logic [7:0] mem [int];
  logic [7:0] cmd, sh, out_sh;
  logic [23:0] addr;
  int  nbits, nbytes;
  bit  wel = 0;
  int  busy = 0;
  int  n_read = 0, n_prog = 0, n_erase = 0, n_rdsr = 0, n_wren = 0;

  function automatic logic [7:0] rd(input int a);
    return mem.exists(a) ? mem[a] : 8'hFF;
  endfunction

  initial miso = 0;
  always @(negedge cs_n) begin nbits = 0; nbytes = 0; out_sh = 0; end
  always @(posedge cs_n) begin
    if (nbytes >= 1) case (cmd)
      8'h06: begin wel = 1; n_wren++; end
      8'h02: if (wel && nbytes >= 5) begin wel = 0; busy = BUSY_POLLS; n_prog++; end
      8'h20: if (wel && nbytes >= 4) begin
               for (int i = 0; i < 4096; i++) if (mem.exists({addr[23:12], 12'h0} + i)) mem.delete({addr[23:12], 12'h0} + i);
               wel = 0; busy = BUSY_POLLS; n_erase++;
             end
      8'h05: begin n_rdsr++; if (busy > 0) busy--; end
      8'h03: n_read++;
      default: ;
    endcase
  end
  always @(posedge sck) if (!cs_n) begin
    sh = {sh[6:0], mosi};
    nbits++;
    if (nbits % 8 == 0) begin
      nbytes = nbits / 8;
      if (nbytes == 1) cmd = sh;
      else if (nbytes <= 4) addr = {addr[15:0], sh};
      else if (cmd == 8'h02 && wel) begin
        mem[int'(addr)] = rd(int'(addr)) & sh;
        addr = addr + 1;
      end
      // prepare the byte shifted out next
      if (cmd == 8'h03 && nbytes >= 4) begin out_sh = rd(int'(addr)); addr = addr + 1; end
      else if (cmd == 8'h05) out_sh = {6'd0, wel, busy > 0};
      else out_sh = 0;
    end
  end
  always @(negedge sck) if (!cs_n) begin
    miso   = out_sh[7];
    out_sh = {out_sh[6:0], 1'b0};
  end
endmodule
