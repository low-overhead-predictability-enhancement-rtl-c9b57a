// pfs_pkg: types and constants shared by the priority-forwarded packet splitting (PFS) NoC.
//
// Flits are FLIT_W bits wide and the most significant bit of every flit marks the tail flit
// of a packet, as in the reference design. Everything else in the flit layout is this
// implementation's own choice:
//   header  : {tail, prio[3:0], size[10:0], src_x[3:0], src_y[3:0], dst_x[3:0], dst_y[3:0]}
//   payload : {tail, last, stamp[29:0]}
// 'size' is the number of payload flits that follow the header. 'last' marks the final flit
// of the original packet (it survives splitting, unlike 'tail'), and 'stamp' carries the
// release time written by the packet generator so the receiver can measure latency.
// Priority 0 is the most urgent value; the sixteen levels 0..15 correspond to the priority
// labels 1..16 used when describing traffic.
// Port indices follow the Hermes order: East, West, North, South, Local. The 'port request'
// and 'out port' registers hold one-hot port vectors, so zero means "no port".
package pfs_pkg;

  localparam int FLIT_W  = 32;
  localparam int PRIO_W  = 4;
  localparam int SIZE_W  = 11;
  localparam int COORD_W = 4;
  localparam int STAMP_W = 30;
  localparam int NPORT   = 5;
  localparam int NDIR    = 4;   // ports that lead to a neighbour router

  localparam int P_E = 0;
  localparam int P_W = 1;
  localparam int P_N = 2;
  localparam int P_S = 3;
  localparam int P_L = 4;

  typedef logic [FLIT_W-1:0]  flit_t;
  typedef logic [PRIO_W-1:0]  prio_t;
  typedef logic [SIZE_W-1:0]  size_t;
  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [NPORT-1:0]   port_vec_t;

  typedef struct packed {
    logic   tail;
    prio_t  prio;
    size_t  size;
    coord_t src_x;
    coord_t src_y;
    coord_t dst_x;
    coord_t dst_y;
  } header_t;

  typedef struct packed {
    logic               tail;
    logic               last;
    logic [STAMP_W-1:0] stamp;
  } payload_t;

  // Connection state machine of an input port (numbering follows the five states:
  // 1 arbitration request, 2 arbitration, 3 data transfer, 4 close, 5 split).
  typedef enum logic [2:0] {
    ST_REQ   = 3'd1,
    ST_ARB   = 3'd2,
    ST_XFER  = 3'd3,
    ST_CLOSE = 3'd4,
    ST_SPLIT = 3'd5
  } port_state_t;

  // How the remaining-flits (RF) split condition is measured.
  typedef enum logic [1:0] {
    RF_ABS  = 2'd0,   // at least cfg_rf flits must remain
    RF_3Q   = 2'd1,   // at least 3/4 of the packet size must remain
    RF_HALF = 2'd2    // at least 1/2 of the packet size must remain
  } rf_mode_t;

  // Packet generator setting.
  typedef struct packed {
    logic        enable;
    logic [31:0] start;    // cycle of the first release
    logic [31:0] period;   // cycles between releases, 0 = a single packet
    size_t       size;     // payload flits per packet (at least 1)
    prio_t       prio;
    coord_t      dst_x;
    coord_t      dst_y;
  } gen_cfg_t;

  // Report of a packet whose final flit reached its destination.
  typedef struct packed {
    coord_t      src_x;
    coord_t      src_y;
    prio_t       prio;
    logic [31:0] latency;  // cycles from release to arrival of the final flit
  } rx_info_t;

  // Index of the single set bit of a one-hot port vector (0 when none is set).
  function automatic logic [2:0] port_index(input port_vec_t v);
    logic [2:0] r;
    r = '0;
    for (int i = 0; i < NPORT; i++) if (v[i]) r = 3'(i);
    return r;
  endfunction

endpackage
