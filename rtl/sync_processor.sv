// sync_processor: merges the pin actions of all GPIO CPUs onto one set of pins.
//
// Each GPIO CPU's action (set a pin, or read the pins) is first captured in
// its own register (REG). The synchronization module then updates the pin
// register: for every pin, the lowest-numbered CPU that sets it in this cycle
// decides its level; pins nobody sets keep their level. So a set issued by a
// GPIO CPU in cycle c is on `pins_out` from cycle c+2 on (counting the GPIO
// CPU's own action register, c+3 from its decision).
// A read passes REG and one more stage and then samples `pins_in` in the same
// cycle in which a set issued alongside it would appear on `pins_out`; the
// sampled value is returned to that CPU one cycle later (rd_valid/rd_data).
// Reads and writes of all CPUs therefore happen in the cycle their programs
// name, whatever the other CPUs do. The priority rule for conflicting sets is
// this design's choice.
module sync_processor #(
  parameter int unsigned N_CPU  = 16,
  parameter int unsigned N_PINS = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_CPU-1:0]  act_valid,
  input  logic [N_CPU-1:0]  act_read,
  input  logic [4:0]        act_pin   [N_CPU],
  input  logic [N_CPU-1:0]  act_level,
  output logic [N_PINS-1:0] pins_out,
  input  logic [N_PINS-1:0] pins_in,
  output logic [N_CPU-1:0]  rd_valid,
  output logic [N_PINS-1:0] rd_data   [N_CPU]
);
  // REG stage, one per GPIO CPU
  logic [N_CPU-1:0] r_set, r_read, r_level, r_read2;
  logic [4:0]       r_pin [N_CPU];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_set <= '0; r_read <= '0; r_level <= '0; r_read2 <= '0; rd_valid <= '0;
      pins_out <= '0;
      for (int c = 0; c < N_CPU; c++) begin r_pin[c] <= '0; rd_data[c] <= '0; end
    end else begin
      r_set   <= act_valid & ~act_read;
      r_read  <= act_valid & act_read;
      r_level <= act_level;
      for (int c = 0; c < N_CPU; c++) r_pin[c] <= act_pin[c];
      // synchronization module: lowest CPU index wins a pin
      for (int c = N_CPU - 1; c >= 0; c--)
        if (r_set[c] && (32'(r_pin[c]) < N_PINS)) pins_out[r_pin[c]] <= r_level[c];
      // reads sample the pins one stage later, when sets issued with them show
      r_read2  <= r_read;
      rd_valid <= r_read2;
      for (int c = 0; c < N_CPU; c++)
        if (r_read2[c]) rd_data[c] <= pins_in;
    end
  end
endmodule
