// hybrid_noc: bus/mesh hybrid on-chip network.
//
// A MESH_X x MESH_Y mesh of X-Y routers (xy_mesh) carries 16-bit frames
// between its nodes. Each node holds one of two kinds of client, chosen by
// SUBSYS_MASK (bit n for node n = y*MESH_X + x):
//   * a single IP core, whose frame ports are brought out directly
//     (core_* ports, numbered in node order over the core nodes), or
//   * a bus-based sub-system: N_IP IP cores on a shared bus (subsys_bus)
//     with a bridge (bus_noc_bridge) to the node's router. The IP cores are
//     outside this module; their bus master and slave ports are brought out
//     (ip_* ports, numbered in node order over the sub-system nodes).
// IP cores that talk to each other a lot are meant to share a sub-system, so
// their traffic stays on the bus and off the mesh.
//
// On a sub-system bus, masters 0..N_IP-1 and slaves 0..N_IP-1 are the IP
// cores and master/slave N_IP is the bridge. A bus address is
// {slave select (3 bits), offset (13 bits)}; a write to the bridge sends a
// frame, its offset giving destination X [6:5], Y [4:3] and target IP [2:0].
// A frame arriving at a sub-system is written by the bridge to IP
// frame[10:8], offset 0.
//
// Latency of an uncontended transfer, in cycles: core to core hops+1;
// a sub-system adds one cycle in its bridge on each side of the mesh, and the
// bus write itself completes in the cycle it is granted.
//
// The default placement follows the example layout of the design: sub-systems
// at nodes (2,0), (0,1), (1,1) and (2,2), single cores elsewhere; four IP
// cores per sub-system are likewise taken from that example.
module hybrid_noc
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X      = 4,
  parameter int unsigned MESH_Y      = 4,
  parameter logic [MESH_X*MESH_Y-1:0] SUBSYS_MASK = 16'h0434,
  parameter int unsigned N_IP        = 4,
  parameter int unsigned ADDR_W      = 16,
  parameter int unsigned SEL_W       = 3,
  parameter int unsigned BUF_DEPTH   = 2,
  localparam int unsigned N          = MESH_X * MESH_Y,
  localparam int unsigned N_SUB      = $countones(SUBSYS_MASK),
  localparam int unsigned N_CORE     = N - N_SUB
) (
  input  logic                                    clk,
  input  logic                                    reset,
  // single IP cores
  input  frame_t [N_CORE-1:0]                     core_inj_flit,
  input  logic   [N_CORE-1:0]                     core_inj_valid,
  output logic   [N_CORE-1:0]                     core_inj_ready,
  output frame_t [N_CORE-1:0]                     core_ej_flit,
  output logic   [N_CORE-1:0]                     core_ej_valid,
  input  logic   [N_CORE-1:0]                     core_ej_ready,
  // IP cores of the sub-systems, as bus masters
  input  logic   [N_SUB-1:0][N_IP-1:0]              ip_m_req,
  input  logic   [N_SUB-1:0][N_IP-1:0][ADDR_W-1:0]  ip_m_addr,
  input  logic   [N_SUB-1:0][N_IP-1:0][DATA_W-1:0]  ip_m_wdata,
  output logic   [N_SUB-1:0][N_IP-1:0]              ip_m_gnt,
  // IP cores of the sub-systems, as bus slaves
  output logic   [N_SUB-1:0][N_IP-1:0]              ip_s_valid,
  output logic   [N_SUB-1:0][ADDR_W-1:0]            ip_s_addr,
  output logic   [N_SUB-1:0][DATA_W-1:0]            ip_s_wdata,
  input  logic   [N_SUB-1:0][N_IP-1:0]              ip_s_ready
);

  // Position of node n among the sub-system nodes (or among the core nodes).
  function automatic int unsigned rank(int unsigned n, logic want);
    int unsigned r = 0;
    for (int unsigned k = 0; k < n; k++) if (SUBSYS_MASK[k] == want) r++;
    return r;
  endfunction

  frame_t [N-1:0] inj_flit, ej_flit;
  logic   [N-1:0] inj_valid, inj_ready, ej_valid, ej_ready;

  xy_mesh #(
    .MESH_X   (MESH_X),
    .MESH_Y   (MESH_Y),
    .BUF_DEPTH(BUF_DEPTH)
  ) u_mesh (
    .clk      (clk),
    .reset    (reset),
    .inj_flit (inj_flit),
    .inj_valid(inj_valid),
    .inj_ready(inj_ready),
    .ej_flit  (ej_flit),
    .ej_valid (ej_valid),
    .ej_ready (ej_ready)
  );

  for (genvar n = 0; n < N; n++) begin : g_node
    if (SUBSYS_MASK[n]) begin : g_sub
      localparam int unsigned s = rank(n, 1'b1);

      logic [N_IP:0]             m_req, m_gnt, s_valid, s_ready;
      logic [N_IP:0][ADDR_W-1:0] m_addr;
      logic [N_IP:0][DATA_W-1:0] m_wdata;
      logic [ADDR_W-1:0]         bus_addr;
      logic [DATA_W-1:0]         bus_wdata;

      subsys_bus #(
        .NM    (N_IP + 1),
        .NS    (N_IP + 1),
        .ADDR_W(ADDR_W),
        .DATA_W(DATA_W),
        .SEL_W (SEL_W)
      ) u_bus (
        .clk    (clk),
        .reset  (reset),
        .m_req  (m_req),
        .m_addr (m_addr),
        .m_wdata(m_wdata),
        .m_gnt  (m_gnt),
        .s_valid(s_valid),
        .s_addr (bus_addr),
        .s_wdata(bus_wdata),
        .s_ready(s_ready)
      );

      bus_noc_bridge #(
        .N_IP  (N_IP),
        .ADDR_W(ADDR_W),
        .SEL_W (SEL_W)
      ) u_bridge (
        .clk          (clk),
        .reset        (reset),
        .s_valid      (s_valid[N_IP]),
        .s_addr       (bus_addr),
        .s_wdata      (bus_wdata),
        .s_ready      (s_ready[N_IP]),
        .m_req        (m_req[N_IP]),
        .m_addr       (m_addr[N_IP]),
        .m_wdata      (m_wdata[N_IP]),
        .m_gnt        (m_gnt[N_IP]),
        .noc_out      (inj_flit[n]),
        .noc_out_valid(inj_valid[n]),
        .noc_out_ready(inj_ready[n]),
        .noc_in       (ej_flit[n]),
        .noc_in_valid (ej_valid[n]),
        .noc_in_ready (ej_ready[n])
      );

      assign m_req[N_IP-1:0]   = ip_m_req[s];
      assign m_addr[N_IP-1:0]  = ip_m_addr[s];
      assign m_wdata[N_IP-1:0] = ip_m_wdata[s];
      assign ip_m_gnt[s]       = m_gnt[N_IP-1:0];
      assign ip_s_valid[s]     = s_valid[N_IP-1:0];
      assign ip_s_addr[s]      = bus_addr;
      assign ip_s_wdata[s]     = bus_wdata;
      assign s_ready[N_IP-1:0] = ip_s_ready[s];
    end else begin : g_core
      localparam int unsigned c = rank(n, 1'b0);

      assign inj_flit[n]       = core_inj_flit[c];
      assign inj_valid[n]      = core_inj_valid[c];
      assign core_inj_ready[c] = inj_ready[n];
      assign core_ej_flit[c]   = ej_flit[n];
      assign core_ej_valid[c]  = ej_valid[n];
      assign ej_ready[n]       = core_ej_ready[c];
    end
  end

endmodule
