// bus_noc_bridge: bridge between a sub-system's shared bus and its mesh router.
//
// Bus to mesh (packetize): the bridge is a bus slave. A write to it carries
// the destination in its address and the payload byte in its data:
//   s_addr[6:5] destination X, s_addr[4:3] destination Y,
//   s_addr[2:0] index of the target IP in the destination sub-system.
// The bridge builds a 16-bit frame (enable bit set) in a one-entry register
// and offers it to the router on noc_out. While that register is full the
// write waits (s_ready low), unless the router takes the frame that cycle.
//
// Mesh to bus (depacketize): the bridge is a bus master. A frame from the
// router is held in a one-entry register; the bridge then writes its payload
// byte on the bus to the IP named by the frame's bits 10:8 (slave select
// field = that index, offset 0). Frames naming an index of N_IP or more have
// no IP to go to and are dropped.
//
// Timing: each direction adds one register stage (one cycle) to a transfer,
// the network-interface latency of encoding or decoding a packet. Neither
// ready depends combinationally on its own valid.
//
// Packetizing on the slave side and depacketizing on the master side follow
// the design description; the address layout, the use of frame bits 10:8 and
// the one-entry registers are this design's own choices.
module bus_noc_bridge
  import noc_pkg::*;
#(
  parameter int unsigned N_IP   = 4,
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned SEL_W  = 3
) (
  input  logic              clk,
  input  logic              reset,
  // bus slave side
  input  logic              s_valid,
  input  logic [ADDR_W-1:0] s_addr,
  input  logic [DATA_W-1:0] s_wdata,
  output logic              s_ready,
  // bus master side
  output logic              m_req,
  output logic [ADDR_W-1:0] m_addr,
  output logic [DATA_W-1:0] m_wdata,
  input  logic              m_gnt,
  // router LOCAL port
  output frame_t            noc_out,
  output logic              noc_out_valid,
  input  logic              noc_out_ready,
  input  frame_t            noc_in,
  input  logic              noc_in_valid,
  output logic              noc_in_ready
);

  // ---- packetize ----
  frame_t pk_q;
  logic   pk_full;

  assign s_ready       = !pk_full || noc_out_ready;
  assign noc_out       = pk_q;
  assign noc_out_valid = pk_full;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      pk_full <= 1'b0;
      pk_q    <= '0;
    end else begin
      if (s_valid && s_ready) begin
        pk_q    <= make_frame(s_addr[6:5], s_addr[4:3], s_addr[2:0], s_wdata);
        pk_full <= 1'b1;
      end else if (noc_out_ready) begin
        pk_full <= 1'b0;
      end
    end
  end

  // ---- depacketize ----
  frame_t dp_q;
  logic   dp_full;
  logic   m_done;

  assign m_done       = m_req && m_gnt;
  assign noc_in_ready = !dp_full || m_done;
  assign m_req        = dp_full;
  assign m_addr       = {SEL_W'(dp_q.sub), (ADDR_W-SEL_W)'(0)};
  assign m_wdata      = dp_q.data;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      dp_full <= 1'b0;
      dp_q    <= '0;
    end else begin
      if (noc_in_valid && noc_in_ready) begin
        dp_q    <= noc_in;
        dp_full <= noc_in.en && (int'(noc_in.sub) < int'(N_IP));
      end else if (m_done) begin
        dp_full <= 1'b0;
      end
    end
  end

  // A bus master holds its request until it is granted.
  assert property (@(posedge clk) disable iff (reset) m_req && !m_gnt |=> m_req && $stable(m_addr));

endmodule
