// blueio_pkg: types and constants shared by the I/O virtualization system.
//
// Every transfer inside the system carries one packet of type pkt_t. A packet
// names the requesting CPU (one guest VM per CPU), where it goes (VCDC or a
// directly attached I/O controller, and which one), an operation code and two
// argument fields. The same layout is used downward (CPU -> I/O, memory data ->
// I/O) and upward (I/O -> CPU responses, I/O -> memory requests); the `mem`
// flag tells memory traffic from CPU traffic.
//
// The packet layout, the operation codes and the GPIO sub-command encoding are
// this design's own: the system is defined by its structure and behaviour, not
// by a published bit layout. The 32-bit data word matches the 32-bit on-chip
// packet of the mesh the system attaches to.
package blueio_pkg;

  localparam int unsigned CPU_ID_W = 6;   // up to 64 CPUs (the largest system sized)
  localparam int unsigned IO_IDX_W = 4;   // up to 16 I/O controllers per path
  localparam int unsigned OP_W     = 4;
  localparam int unsigned ADDR_W   = 24;  // 24-bit byte address: a 16 MB SPI NOR flash
  localparam int unsigned DATA_W   = 32;  // on-chip packet width

  typedef struct packed {
    logic                mem;      // memory traffic (request up, read data down)
    logic                to_vcdc;  // downward: 1 = virtualized I/O behind the VCDC
    logic [IO_IDX_W-1:0] io_idx;   // I/O (VCDC: I/O module, else direct port)
    logic [CPU_ID_W-1:0] cpu_id;   // requesting CPU / guest VM
    logic [OP_W-1:0]     op;       // operation, see op_e / gp_op_e
    logic [ADDR_W-1:0]   addr;     // first argument (address, command id, ...)
    logic [DATA_W-1:0]   data;     // second argument or returned data
  } pkt_t;

  localparam int unsigned PKT_W = $bits(pkt_t);

  // Memory interconnect transfer: a packet plus the index of the tree leaf it
  // came from, stamped at the leaf and used to route the response back.
  localparam int unsigned BT_SRC_W = 6;
  typedef struct packed {
    logic [BT_SRC_W-1:0] src;
    pkt_t                pkt;
  } bt_t;

  // Operations understood by the low-layer drivers behind the VCDC.
  typedef enum logic [OP_W-1:0] {
    OP_WRITE = 4'h1,   // write data[7:0] (UART: transmit; flash: program byte at addr)
    OP_READ  = 4'h2,   // read one byte (UART: receive; flash: read byte at addr)
    OP_ERASE = 4'h3    // flash: erase the 4 KB sector holding addr
  } op_e;

  // Operations understood by the GPIO command processor.
  typedef enum logic [OP_W-1:0] {
    GP_LOAD = 4'h4,    // store data into command memory word addr
    GP_RUN  = 4'h5     // run command addr[7:0] at global time data, repeat every addr[23:8] cycles (0 = once)
  } gp_op_e;

  // Response op codes: an acknowledgement or returned data.
  localparam logic [OP_W-1:0] OP_ACK  = 4'hA;
  localparam logic [OP_W-1:0] OP_DATA = 4'hB;

  // GPIO sub-command, one 32-bit word of command memory.
  //   [31:30] kind: 00 set pin, 01 wait, 10 read pins, 11 end
  //   set pin : [12:8] pin number, [0] level
  //   wait    : [23:0] extra idle cycles before the next sub-command
  typedef enum logic [1:0] {
    SC_SET  = 2'b00,
    SC_WAIT = 2'b01,
    SC_READ = 2'b10,
    SC_END  = 2'b11
  } subcmd_kind_e;

  // Arbitration policies of the schedulers and arbiters.
  typedef enum logic [1:0] {
    POL_RR   = 2'd0,   // round robin
    POL_FP   = 2'd1,   // fixed priority, input 0 highest
    POL_FIFO = 2'd2    // first come, first served (by arrival order)
  } policy_e;

endpackage
