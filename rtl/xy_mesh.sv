// xy_mesh: MESH_X x MESH_Y mesh of X-Y routers (4 x 4 by default).
//
// Router (x, y) sits at column x and row y and serves node n = y*MESH_X + x;
// the first row holds (0,0) (1,0) (2,0) (3,0), the second (0,1) ... (3,1), and
// so on. Neighbouring routers are joined by one link in each direction: the XP
// port of (x, y) feeds the XN port of (x+1, y), and the YP port of (x, y) feeds
// the YN port of (x, y+1). Ports on the mesh edge are tied off (nothing enters,
// and X-Y routing never sends a frame out of the mesh when its destination
// lies inside it).
//
// Interface: per node, a LOCAL injection port (inj_*) and a LOCAL delivery
// port (ej_*), each a 16-bit frame with a valid/ready handshake. A frame
// injected at node s and addressed to node d is delivered after
// hops(s, d) + 1 cycles when the path is free (one cycle per router passed).
//
// The 4 x 4 size and the coordinate numbering follow the design description;
// the port numbering by node index is this design's own.
module xy_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned BUF_DEPTH = 2
) (
  input  logic                       clk,
  input  logic                       reset,
  input  frame_t [MESH_X*MESH_Y-1:0] inj_flit,
  input  logic   [MESH_X*MESH_Y-1:0] inj_valid,
  output logic   [MESH_X*MESH_Y-1:0] inj_ready,
  output frame_t [MESH_X*MESH_Y-1:0] ej_flit,
  output logic   [MESH_X*MESH_Y-1:0] ej_valid,
  input  logic   [MESH_X*MESH_Y-1:0] ej_ready
);

  localparam int unsigned N = MESH_X * MESH_Y;

  // Coordinates are carried in COORD_W-bit fields of the frame.
  if (MESH_X > (1 << COORD_W) || MESH_Y > (1 << COORD_W)) begin : g_size_error
    $error("xy_mesh: mesh larger than the frame's coordinate fields");
  end

  frame_t [NPORTS-1:0] r_in_flit   [N];
  logic   [NPORTS-1:0] r_in_valid  [N];
  logic   [NPORTS-1:0] r_in_ready  [N];
  frame_t [NPORTS-1:0] r_out_flit  [N];
  logic   [NPORTS-1:0] r_out_valid [N];
  logic   [NPORTS-1:0] r_out_ready [N];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned n = y * MESH_X + x;

      xy_router #(
        .X        (COORD_W'(x)),
        .Y        (COORD_W'(y)),
        .BUF_DEPTH(BUF_DEPTH)
      ) u_router (
        .clk      (clk),
        .reset    (reset),
        .in_flit  (r_in_flit[n]),
        .in_valid (r_in_valid[n]),
        .in_ready (r_in_ready[n]),
        .out_flit (r_out_flit[n]),
        .out_valid(r_out_valid[n]),
        .out_ready(r_out_ready[n])
      );

      // LOCAL port
      assign r_in_flit[n][PORT_LOCAL]   = inj_flit[n];
      assign r_in_valid[n][PORT_LOCAL]  = inj_valid[n];
      assign inj_ready[n]               = r_in_ready[n][PORT_LOCAL];
      assign ej_flit[n]                 = r_out_flit[n][PORT_LOCAL];
      assign ej_valid[n]                = r_out_valid[n][PORT_LOCAL];
      assign r_out_ready[n][PORT_LOCAL] = ej_ready[n];

      // Input from the lower-X neighbour arrives on XN; from the higher-X on XP.
      if (x > 0) begin : g_xn
        assign r_in_flit[n][PORT_XN]   = r_out_flit[n-1][PORT_XP];
        assign r_in_valid[n][PORT_XN]  = r_out_valid[n-1][PORT_XP];
        assign r_out_ready[n][PORT_XN] = r_in_ready[n-1][PORT_XP];
      end else begin : g_xn_edge
        assign r_in_flit[n][PORT_XN]   = '0;
        assign r_in_valid[n][PORT_XN]  = 1'b0;
        assign r_out_ready[n][PORT_XN] = 1'b1;
      end
      if (x < MESH_X - 1) begin : g_xp
        assign r_in_flit[n][PORT_XP]   = r_out_flit[n+1][PORT_XN];
        assign r_in_valid[n][PORT_XP]  = r_out_valid[n+1][PORT_XN];
        assign r_out_ready[n][PORT_XP] = r_in_ready[n+1][PORT_XN];
      end else begin : g_xp_edge
        assign r_in_flit[n][PORT_XP]   = '0;
        assign r_in_valid[n][PORT_XP]  = 1'b0;
        assign r_out_ready[n][PORT_XP] = 1'b1;
      end
      if (y > 0) begin : g_yn
        assign r_in_flit[n][PORT_YN]   = r_out_flit[n-MESH_X][PORT_YP];
        assign r_in_valid[n][PORT_YN]  = r_out_valid[n-MESH_X][PORT_YP];
        assign r_out_ready[n][PORT_YN] = r_in_ready[n-MESH_X][PORT_YP];
      end else begin : g_yn_edge
        assign r_in_flit[n][PORT_YN]   = '0;
        assign r_in_valid[n][PORT_YN]  = 1'b0;
        assign r_out_ready[n][PORT_YN] = 1'b1;
      end
      if (y < MESH_Y - 1) begin : g_yp
        assign r_in_flit[n][PORT_YP]   = r_out_flit[n+MESH_X][PORT_YN];
        assign r_in_valid[n][PORT_YP]  = r_out_valid[n+MESH_X][PORT_YN];
        assign r_out_ready[n][PORT_YP] = r_in_ready[n+MESH_X][PORT_YN];
      end else begin : g_yp_edge
        assign r_in_flit[n][PORT_YP]   = '0;
        assign r_in_valid[n][PORT_YP]  = 1'b0;
        assign r_out_ready[n][PORT_YP] = 1'b1;
      end
    end
  end

endmodule
