// noc_pkg: types and constants shared by the mesh router, its security
// triggers and the trace path.
//
// A flit carries source and destination mesh coordinates and a 32-bit
// payload (the payload width of the evaluated configuration). Packets are
// single flits. A link is a flit plus a valid bit and the number of the
// downstream virtual channel (VC) it is written into; flow control is by
// credits, one credit line per VC running the other way.
//
// Router ports are numbered LOCAL, EAST, NORTH, WEST, SOUTH. Going EAST
// increases x and going SOUTH increases y, so router R0 sits top-left and
// router id = y*NX + x.
//
// Trigger numbers 1..12 (T1..T12) are also the 4-bit trace ID written into
// trace packets. Every trigger hands the trace formatter a SIG_W-bit word
// of traced signals; the formatter keeps as many low bits as the trace
// width leaves after the header.
package noc_pkg;

  localparam int unsigned COORD_W   = 3;   // coordinates up to 8x8
  localparam int unsigned PAYLOAD_W = 32;
  localparam int unsigned NPORT     = 5;
  localparam int unsigned VC_W      = 2;   // link VC field, up to 4 VCs
  localparam int unsigned NTRIG     = 12;
  localparam int unsigned TID_W     = 4;
  localparam int unsigned SIG_W     = 64;

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_EAST  = 3'd1,
    P_NORTH = 3'd2,
    P_WEST  = 3'd3,
    P_SOUTH = 3'd4
  } port_e;

  typedef struct packed {
    logic [COORD_W-1:0]   src_x;
    logic [COORD_W-1:0]   src_y;
    logic [COORD_W-1:0]   dst_x;
    logic [COORD_W-1:0]   dst_y;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
    flit_t           flit;
  } link_t;

  function automatic logic [NPORT-1:0] port_onehot(port_e p);
    return NPORT'(1) << p;
  endfunction

  function automatic logic flit_parity(flit_t f);
    return ^f;
  endfunction

endpackage
