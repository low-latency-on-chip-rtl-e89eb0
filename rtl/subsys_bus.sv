// subsys_bus: shared write bus of a sub-system (the "AMBA bus" joining the IP
// cores of a sub-system and its bridge to the mesh).
//
// NM masters share one address/data path to NS slaves. A master raises m_req
// with m_addr and m_wdata and holds them until m_gnt, which marks the cycle the
// transfer completes. The top SEL_W address bits select the slave. A slave
// raises s_ready whenever it can take a write, independent of s_valid. Only
// masters whose addressed slave is ready (or whose address selects no slave)
// compete; a round-robin arbiter picks one, its slave sees s_valid with the
// shared s_addr/s_wdata, and the write completes in that cycle. A write to an
// unmapped slave select completes and is lost. One transfer completes per
// cycle; with several masters requesting, each waits its turn, which is where
// the latency of a shared single-layer bus grows with the number of masters.
//
// Because a master waiting for a busy slave never holds the bus, the bridge
// can always write frames arriving from the mesh out to the IP cores even
// while another master waits for the bridge to send into a congested mesh;
// a bus that kept its grant on a stalled transfer would deadlock there.
//
// The document names the bus (an AMBA bus) but not its protocol: this is a
// plain single-cycle write bus of this design's own, not an AHB or APB
// implementation. Reads and bursts are not modelled.
module subsys_bus #(
  parameter int unsigned NM     = 5,
  parameter int unsigned NS     = 5,
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned SEL_W  = 3
) (
  input  logic                          clk,
  input  logic                          reset,
  input  logic [NM-1:0]                 m_req,
  input  logic [NM-1:0][ADDR_W-1:0]     m_addr,
  input  logic [NM-1:0][DATA_W-1:0]     m_wdata,
  output logic [NM-1:0]                 m_gnt,
  output logic [NS-1:0]                 s_valid,
  output logic [ADDR_W-1:0]             s_addr,
  output logic [DATA_W-1:0]             s_wdata,
  input  logic [NS-1:0]                 s_ready
);

  logic [NM-1:0]    can_go;
  logic [NM-1:0]    win;
  logic [SEL_W-1:0] sel;
  logic             done;

  // Readiness of every slave select value; unmapped ones always complete.
  logic [(1 << SEL_W)-1:0] sel_ready;
  always_comb begin
    sel_ready = '1;
    sel_ready[NS-1:0] = s_ready;
  end

  // A master competes only when its transfer can complete this cycle.
  always_comb begin
    for (int i = 0; i < int'(NM); i++)
      can_go[i] = m_req[i] && sel_ready[m_addr[i][ADDR_W-1 -: SEL_W]];
  end

  rr_arbiter #(.N(NM)) u_arb (
    .clk    (clk),
    .reset  (reset),
    .req    (can_go),
    .advance(done),
    .gnt    (win)
  );

  always_comb begin
    s_addr  = '0;
    s_wdata = '0;
    for (int i = 0; i < int'(NM); i++) begin
      if (win[i]) begin
        s_addr  = m_addr[i];
        s_wdata = m_wdata[i];
      end
    end
  end

  assign sel = s_addr[ADDR_W-1 -: SEL_W];

  always_comb begin
    s_valid = '0;
    done    = 1'b0;
    if (|win) begin
      done = 1'b1;
      if (int'(sel) < int'(NS)) s_valid[sel] = 1'b1;
    end
  end

  assign m_gnt = done ? win : '0;

  assert property (@(posedge clk) disable iff (reset) $onehot0(s_valid));
  assert property (@(posedge clk) disable iff (reset) |s_valid |-> |(s_valid & s_ready));

endmodule
