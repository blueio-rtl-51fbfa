// global_timer: the system-wide time base.
//
// A free-running 32-bit cycle counter shared by every GPIO CPU (and available
// to the CPUs), so that all timed I/O refers to one clock: a command "at time
// t" means the cycle in which `time_now` reads t. The counter clears on reset
// and advances by one each cycle while `enable` is high; `load` sets it to
// `load_value` (to align it with a time base elsewhere). It wraps after 2**32
// cycles (about 43 s at 100 MHz). Width and the load port are this design's
// choices; the published system only requires a single synchronized timer.
module global_timer #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             load,
  input  logic [WIDTH-1:0] load_value,
  output logic [WIDTH-1:0] time_now
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      time_now <= '0;
    else if (load)   time_now <= load_value;
    else if (enable) time_now <= time_now + 1'b1;
  end
endmodule
