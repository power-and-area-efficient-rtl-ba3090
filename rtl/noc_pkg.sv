// noc_pkg: types and constants shared by the BiNoC virtual-channel router.
//
// The router sizes follow the evaluated configuration: 5 ports (4 mesh
// directions and the local processing element), 4 virtual channels per input
// port, 4 flit slots per VC (80 flit slots per router), 128-bit flits and
// 16-flit packets. The flit layout (type, VC id, destination coordinates,
// payload) and the coordinate width are this design's own choice.
package noc_pkg;

  parameter int unsigned P        = 5;    // physical ports
  parameter int unsigned V        = 4;    // virtual channels per port
  parameter int unsigned VC_DEPTH = 4;    // default flit slots per VC
  parameter int unsigned FLIT_W   = 128;  // flit width in bits
  parameter int unsigned PKT_LEN  = 16;   // flits per packet
  parameter int unsigned COORD_W  = 4;    // mesh coordinate width (16x16 max)

  localparam int unsigned VC_W      = $clog2(V);
  localparam int unsigned PORT_W    = $clog2(P);
  localparam int unsigned PAYLOAD_W = FLIT_W - 2 - VC_W - 2 * COORD_W;

  // Port numbering. The four mesh ports carry bidirectional channels.
  typedef enum logic [PORT_W-1:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FT_BODY   = 2'b00,
    FT_HEAD   = 2'b01,
    FT_TAIL   = 2'b10,
    FT_SINGLE = 2'b11   // one-flit packet: head and tail at once
  } flit_type_e;

  typedef struct packed {
    flit_type_e           ftype;
    logic [VC_W-1:0]      vc;      // VC at the receiving input port
    logic [COORD_W-1:0]   dst_x;
    logic [COORD_W-1:0]   dst_y;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  function automatic logic is_head(flit_type_e t);
    return t == FT_HEAD || t == FT_SINGLE;
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return t == FT_TAIL || t == FT_SINGLE;
  endfunction

endpackage
