// xy_router: five-port mesh router with X-Y (dimension-ordered) routing.
//
// Ports are LOCAL (the attached IP core or sub-system bridge) and the four
// mesh neighbours XP, XN, YP, YN (see noc_pkg). A frame first travels along X
// until its column matches the destination X, then along Y until its row
// matches, then leaves on LOCAL. It never moves diagonally and never turns from
// Y back to X, which keeps the mesh free of routing deadlock. The route is a
// pure function of the destination field and the router's own coordinates, so
// the output is chosen in the same cycle the frame reaches the head of its
// input buffer.
//
// Each input has a two-entry buffer (flit_fifo). Each output has a round-robin
// arbiter among the inputs whose head frame wants it; the winner's frame is
// presented with out_valid and leaves when out_ready is high. Frames whose
// enable bit (bit 15) is 0 are accepted and discarded.
//
// Timing: a frame accepted at a clock edge is offered on its output port in the
// next cycle, so an uncontended router adds one cycle per hop. in_ready depends
// only on buffer occupancy (registered), so routers can be chained without
// combinational paths between them.
//
// X-Y routing, the frame format and the enable bit follow the design
// description; the buffer depth, the handshake and the arbitration policy are
// this design's own choices.
module xy_router
  import noc_pkg::*;
#(
  parameter logic [COORD_W-1:0] X = '0,
  parameter logic [COORD_W-1:0] Y = '0,
  parameter int unsigned        BUF_DEPTH = 2
) (
  input  logic                clk,
  input  logic                reset,
  input  frame_t [NPORTS-1:0] in_flit,
  input  logic   [NPORTS-1:0] in_valid,
  output logic   [NPORTS-1:0] in_ready,
  output frame_t [NPORTS-1:0] out_flit,
  output logic   [NPORTS-1:0] out_valid,
  input  logic   [NPORTS-1:0] out_ready
);

  frame_t [NPORTS-1:0] head;
  logic   [NPORTS-1:0] head_valid;
  logic   [NPORTS-1:0] pop;
  logic   [NPORTS-1:0] buf_ready;
  port_e               dir [NPORTS];
  logic   [NPORTS-1:0] req [NPORTS];  // req[o][i]: input i wants output o
  logic   [NPORTS-1:0] gnt [NPORTS];  // gnt[o][i]: input i holds output o

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    flit_fifo #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk       (clk),
      .reset     (reset),
      .in_flit   (in_flit[i]),
      .in_valid  (in_valid[i] && in_flit[i].en),
      .in_ready  (buf_ready[i]),
      .head      (head[i]),
      .head_valid(head_valid[i]),
      .pop       (pop[i])
    );
    // A disabled frame is taken and dropped.
    assign in_ready[i] = buf_ready[i] || !in_flit[i].en;
    assign dir[i]      = xy_route(head[i], X, Y);
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    always_comb begin
      for (int i = 0; i < NPORTS; i++) req[o][i] = head_valid[i] && (dir[i] == port_e'(o));
    end

    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk    (clk),
      .reset  (reset),
      .req    (req[o]),
      .advance(out_ready[o]),
      .gnt    (gnt[o])
    );

    assign out_valid[o] = |req[o];
    always_comb begin
      out_flit[o] = '0;
      for (int i = 0; i < NPORTS; i++) if (gnt[o][i]) out_flit[o] = head[i];
    end
  end

  // An input is popped when its head frame holds an output that is ready.
  always_comb begin
    pop = '0;
    for (int o = 0; o < NPORTS; o++)
      for (int i = 0; i < NPORTS; i++)
        if (gnt[o][i] && out_ready[o]) pop[i] = 1'b1;
  end

  // Under X-Y routing a frame never leaves through the port it came in on.
  for (genvar i = 1; i < NPORTS; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (reset)
                     head_valid[i] |-> dir[i] != port_e'(i));
  end

endmodule
