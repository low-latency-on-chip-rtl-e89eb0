// noc_pkg: types and constants shared by the mesh, the routers and the bridges.
//
// A packet is one 16-bit frame, carried in a single flit:
//   bit 15      enable: the frame is live only when this bit is 1
//   bits 14:13  destination X coordinate (column)
//   bits 12:11  destination Y coordinate (row)
//   bits 10:8   free bits; routers ignore them, the bus bridge uses them
//               as the index of the target IP inside a sub-system
//   bits 7:0    payload byte
// The field layout and the 4x4 coordinate range follow the frame format of the
// design; the use of bits 10:8 as an IP index is this design's own choice.
package noc_pkg;

  localparam int unsigned DATA_W  = 8;
  localparam int unsigned COORD_W = 2;
  localparam int unsigned SUB_W   = 3;

  typedef struct packed {
    logic               en;
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    logic [SUB_W-1:0]   sub;
    logic [DATA_W-1:0]  data;
  } frame_t;

  // Router ports. XP/XN lead to the neighbour with the higher/lower X
  // coordinate, YP/YN to the neighbour with the higher/lower Y coordinate.
  typedef enum logic [2:0] {
    PORT_LOCAL = 3'd0,
    PORT_XP    = 3'd1,
    PORT_XN    = 3'd2,
    PORT_YP    = 3'd3,
    PORT_YN    = 3'd4
  } port_e;

  localparam int unsigned NPORTS = 5;

  // Dimension-ordered routing: correct X first, then Y, then deliver locally.
  function automatic port_e xy_route(frame_t f, logic [COORD_W-1:0] cx,
                                     logic [COORD_W-1:0] cy);
    if (f.x > cx)      return PORT_XP;
    else if (f.x < cx) return PORT_XN;
    else if (f.y > cy) return PORT_YP;
    else if (f.y < cy) return PORT_YN;
    else               return PORT_LOCAL;
  endfunction

  function automatic frame_t make_frame(logic [COORD_W-1:0] x, logic [COORD_W-1:0] y,
                                        logic [SUB_W-1:0] sub, logic [DATA_W-1:0] data);
    frame_t f;
    f.en   = 1'b1;
    f.x    = x;
    f.y    = y;
    f.sub  = sub;
    f.data = data;
    return f;
  endfunction

endpackage
