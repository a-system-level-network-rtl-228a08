// onoc_pkg: types and constants shared by every block of the mesh network.
//
// A flit is the smallest unit that crosses the network. Every flit carries a
// full header, so each one is routed on its own. The header fields are
// priority, time stamp, source X, source Y, destination X and destination Y,
// in that order. A payload word follows the header. The field order is the
// documented flit header. The field widths are this design's choice: 2-bit
// coordinates cover a 4x4 mesh, and 16-bit time stamps and payloads are wide
// enough for latency measurement and a sequence number.
//
// There are three traffic classes. High is for single-flit control messages.
// Mid is for real-time traffic and Low for bulk transfers. The node ports are
// numbered North, East, South, West, then the local network interface (NI).
// X grows to the East and Y grows to the South, so node (0,0) is the
// north-west corner.
package onoc_pkg;

  localparam int unsigned COORD_W   = 2;   // coordinate bits, up to 4 nodes per axis
  localparam int unsigned TS_W      = 16;  // time stamp bits
  localparam int unsigned PAYLOAD_W = 16;  // payload bits
  localparam int unsigned NPORTS     = 5;   // N, E, S, W, NI
  localparam int unsigned PORT_IDX_W = 3;

  typedef enum logic [1:0] {
    PRI_HIGH = 2'd0,
    PRI_MID  = 2'd1,
    PRI_LOW  = 2'd2
  } prio_e;

  typedef enum logic [PORT_IDX_W-1:0] {
    PORT_N  = 3'd0,
    PORT_E  = 3'd1,
    PORT_S  = 3'd2,
    PORT_W  = 3'd3,
    PORT_NI = 3'd4
  } port_e;

  typedef struct packed {
    prio_e                prio;
    logic [TS_W-1:0]      timestamp;
    logic [COORD_W-1:0]   src_x;
    logic [COORD_W-1:0]   src_y;
    logic [COORD_W-1:0]   dst_x;
    logic [COORD_W-1:0]   dst_y;
  } flit_hdr_t;

  typedef struct packed {
    flit_hdr_t              hdr;
    logic [PAYLOAD_W-1:0]   payload;
  } flit_t;

  // Traffic distributions of the producer.
  typedef enum logic [1:0] {
    DIST_UNIFORM     = 2'd0,  // one flit every `interval` cycles
    DIST_EXPONENTIAL = 2'd1,  // exponentially distributed gaps, mean `interval`
    DIST_BERNOULLI   = 2'd2   // a flit in each cycle with probability rate/256
  } dist_e;

  // Run-time configuration of one producer.
  typedef struct packed {
    logic                 enable;
    dist_e                pattern;
    logic [7:0]           interval;    // uniform / exponential mean gap, cycles
    logic [7:0]           rate;        // Bernoulli probability, in 1/256
    logic                 dst_random;  // 1: uniform random destination
    logic [COORD_W-1:0]   dst_x;       // fixed destination when dst_random = 0
    logic [COORD_W-1:0]   dst_y;
    logic [15:0]          max_flits;   // 0: unlimited
  } prod_cfg_t;

  // Latency statistics of one consumer, for one priority class.
  typedef struct packed {
    logic [15:0] count;
    logic [31:0] lat_sum;
    logic [15:0] lat_max;
  } lat_stat_t;

endpackage
