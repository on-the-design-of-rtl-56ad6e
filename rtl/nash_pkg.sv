// nash_pkg: types and constants shared by the NASH spiking neuromorphic system.
//
// The 81-bit flit follows the document's layout: a 2-bit type ("00" configuration,
// "11" spike), a 9-bit source node address (3 bits each for X, Y, Z), a 6-bit time
// field and a 64-bit spike vector. This design splits the 6-bit time field into a
// 4-bit time step (the same width as the core's time-step counter) and a 2-bit
// segment number that says which 64-neuron slice of the 256-neuron output vector
// the flit carries. Links carry the flit together with a valid bit and the
// fault_flag bit of the fault-tolerant routing algorithm as sideband signals.
package nash_pkg;

  localparam int unsigned FLIT_W   = 81;
  localparam int unsigned SEG_W    = 64;    // spike bits per flit
  localparam int unsigned COORD_W  = 3;     // bits per mesh coordinate
  localparam int unsigned NPORT    = 7;     // router ports
  localparam int unsigned WEIGHT_W = 8;     // synapse precision
  localparam int unsigned VMEM_W   = 13;    // membrane value bits (plus 1 overflow bit)

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,   // y + 1
    P_EAST  = 3'd2,   // x + 1
    P_SOUTH = 3'd3,   // y - 1
    P_WEST  = 3'd4,   // x - 1
    P_UP    = 3'd5,   // z + 1 (through TSVs)
    P_DOWN  = 3'd6    // z - 1 (through TSVs)
  } port_e;

  typedef enum logic [1:0] {
    FT_CFG   = 2'b00,
    FT_SPIKE = 2'b11
  } flit_type_e;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] z;
  } node_addr_t;

  typedef struct packed {
    logic [1:0] seg;    // 64-bit slice of the source core's output vector
    logic [3:0] step;   // time step in which the source neurons fired
  } tstamp_t;

  typedef struct packed {
    flit_type_e       ftype;
    node_addr_t       src;
    tstamp_t          tstamp;
    logic [SEG_W-1:0] spikes;
  } flit_t;

  typedef struct packed {
    logic  valid;
    logic  fault_flag;   // 1: the flit travels on a backup branch
    flit_t flit;
  } link_t;

  localparam link_t LINK_IDLE = '0;

  // Host configuration bus targets of a node.
  typedef enum logic [2:0] {
    CFG_ROUTE_PRI = 3'd0,   // primary routing table: addr = source node, data[6:0] = ports
    CFG_ROUTE_BAK = 3'd1,   // backup routing table
    CFG_DEC_MAP   = 3'd2,   // decoder map: addr = {source, segment}, data[2:0] = {en, slot}
    CFG_SYN_ROW   = 3'd3,   // synapse row: addr[7:0] = presynaptic index, row data bus
    CFG_PARAM     = 3'd4    // core parameter: addr = CP_*, data = value
  } cfg_target_e;

  localparam logic [10:0] CP_THRESHOLD = 11'd0;
  localparam logic [10:0] CP_LEAK      = 11'd1;
  localparam logic [10:0] CP_REFRACT   = 11'd2;
  localparam logic [10:0] CP_LEARN_EN  = 11'd3;
  localparam logic [10:0] CP_LTP       = 11'd4;
  localparam logic [10:0] CP_LTD       = 11'd5;
  localparam logic [10:0] CP_SAW       = 11'd6;

  // States of the core controller, in the order the document lists them.
  typedef enum logic [2:0] {
    CS_IDLE   = 3'd0,
    CS_DWNLD  = 3'd1,   // download the input spike vector
    CS_COMP   = 3'd2,   // crossbar / parallel neuron update
    CS_LEAK   = 3'd3,
    CS_FIRE   = 3'd4,
    CS_UPLD   = 3'd5,   // upload output spikes to the network interface
    CS_LEARN  = 3'd6    // STDP / parallel weight update
  } ctrl_state_e;

endpackage
