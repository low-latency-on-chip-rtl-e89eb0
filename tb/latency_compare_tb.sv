// latency_compare_tb: average transfer latency of the hybrid network against a
// plain mesh, for clustered traffic.
//
// Sixteen IP cores form four clusters of four. Each core sends TRANSFERS
// one-byte transfers; a transfer goes to another core of its own cluster with
// probability 80 %, else to a random core of another cluster. The same
// traffic runs on:
//   * the conventional mesh: the 4 x 4 xy_mesh with one core per node, each
//     cluster placed on one 2 x 2 quadrant (the best placement for it);
//   * the hybrid network: hybrid_noc at its default size, each cluster being
//     one of its four bus sub-systems (the single-core nodes stay idle).
// Latency is counted from the cycle a core starts offering a transfer to the
// cycle it is delivered (ejected frame, or bus write into the target IP), so
// it includes waiting for the bus or the router. The experiment runs at two
// offered loads, 10 % and 30 % of a transfer per core per cycle. Every
// transfer must arrive at both loads. At 10 % the hybrid network's average
// must be the lower one, since intra-cluster traffic never enters the mesh;
// at 30 % the four cores of a cluster offer 1.2 writes per cycle to a bus
// that completes one, so the bus saturates and the averages are only
// reported.
module latency_compare_tb;
  import noc_pkg::*;

  localparam int NC = 16;          // IP cores in the experiment
  localparam int TRANSFERS = 200;  // per core
  localparam int AW = 16;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- conventional mesh ----------------
  frame_t [15:0] m_inj_flit, m_ej_flit;
  logic   [15:0] m_inj_valid, m_inj_ready, m_ej_valid, m_ej_ready;

  xy_mesh u_mesh (
    .clk(clk), .reset(reset),
    .inj_flit(m_inj_flit), .inj_valid(m_inj_valid), .inj_ready(m_inj_ready),
    .ej_flit(m_ej_flit), .ej_valid(m_ej_valid), .ej_ready(m_ej_ready)
  );

  // core c = 4k + j of cluster k sits in quadrant k
  function automatic int mesh_node(int c);
    automatic int k = c / 4, j = c % 4;
    return ((k / 2) * 2 + j / 2) * 4 + (k % 2) * 2 + j % 2;
  endfunction

  // ---------------- hybrid network ----------------
  frame_t [11:0]               h_core_inj_flit, h_core_ej_flit;
  logic   [11:0]               h_core_inj_valid, h_core_inj_ready, h_core_ej_valid, h_core_ej_ready;
  logic   [3:0][3:0]           ip_m_req, ip_m_gnt, ip_s_valid, ip_s_ready;
  logic   [3:0][3:0][AW-1:0]   ip_m_addr;
  logic   [3:0][3:0][7:0]      ip_m_wdata;
  logic   [3:0][AW-1:0]        ip_s_addr;
  logic   [3:0][7:0]           ip_s_wdata;

  hybrid_noc u_hyb (
    .clk(clk), .reset(reset),
    .core_inj_flit(h_core_inj_flit), .core_inj_valid(h_core_inj_valid), .core_inj_ready(h_core_inj_ready),
    .core_ej_flit(h_core_ej_flit), .core_ej_valid(h_core_ej_valid), .core_ej_ready(h_core_ej_ready),
    .ip_m_req(ip_m_req), .ip_m_addr(ip_m_addr), .ip_m_wdata(ip_m_wdata), .ip_m_gnt(ip_m_gnt),
    .ip_s_valid(ip_s_valid), .ip_s_addr(ip_s_addr), .ip_s_wdata(ip_s_wdata), .ip_s_ready(ip_s_ready)
  );

  // sub-system s of the hybrid network sits at these nodes (default placement)
  localparam int SUB_NODE [4] = '{2, 4, 5, 10};

  // ---------------- shared traffic and bookkeeping ----------------
  // Per network: the destination list of every core, drawn once and replayed.
  int dest [NC][TRANSFERS];
  // [net][src][dst]: start cycles of transfers in flight, oldest first
  int t_start [2][NC][NC][$];
  longint lat_sum [2];
  int     n_done [2];
  int     sent [2][NC];
  bit     offering [2][NC];

  task automatic deliver(int net, int src, int dst);
    check(t_start[net][src][dst].size() > 0, $sformatf("net %0d: unexpected %0d->%0d", net, src, dst));
    if (t_start[net][src][dst].size() > 0) begin
      lat_sum[net] += longint'(cycle - t_start[net][src][dst].pop_front());
      n_done[net]++;
    end
  endtask

  // deliveries and accepted offers, at the clock edge where they happen
  always @(posedge clk) begin
    if (!reset) begin
      for (int c = 0; c < NC; c++) begin
        // mesh
        if (m_ej_valid[mesh_node(c)] && m_ej_ready[mesh_node(c)])
          deliver(0, int'(m_ej_flit[mesh_node(c)].data), c);
        if (m_inj_valid[mesh_node(c)] && m_inj_ready[mesh_node(c)]) begin
          sent[0][c]++;
          offering[0][c] = 1'b0;
        end
        // hybrid
        if (ip_s_valid[c / 4][c % 4] && ip_s_ready[c / 4][c % 4])
          deliver(1, int'(ip_s_wdata[c / 4]), c);
        if (ip_m_req[c / 4][c % 4] && ip_m_gnt[c / 4][c % 4]) begin
          sent[1][c]++;
          offering[1][c] = 1'b0;
        end
      end
    end
  end

  // One experiment at an offered load of load_tenths/10 transfers per core
  // per cycle; returns the two average latencies.
  task automatic run(int load_tenths, output real avg_mesh, output real avg_hyb);
    automatic bit more = 1'b1;
    for (int c = 0; c < NC; c++) begin
      for (int t = 0; t < TRANSFERS; t++) begin
        automatic int d;
        if ($urandom_range(9) < 8) do d = (c / 4) * 4 + $urandom_range(3); while (d == c);
        else do d = $urandom_range(NC - 1); while (d / 4 == c / 4);
        dest[c][t] = d;
      end
      for (int net = 0; net < 2; net++) begin
        sent[net][c] = 0;
        offering[net][c] = 1'b0;
      end
    end
    lat_sum = '{0, 0};
    n_done  = '{0, 0};

    while (more) begin
      for (int c = 0; c < NC; c++) begin
        for (int net = 0; net < 2; net++) begin
          if (!offering[net][c] && sent[net][c] < TRANSFERS && $urandom_range(9) < load_tenths) begin
            automatic int d = dest[c][sent[net][c]];
            offering[net][c] = 1'b1;
            t_start[net][c][d].push_back(cycle);
            if (net == 0) begin
              m_inj_flit[mesh_node(c)] = make_frame(2'(mesh_node(d) % 4), 2'(mesh_node(d) / 4), 3'd0, 8'(c));
            end else if (d / 4 == c / 4) begin
              ip_m_addr[c / 4][c % 4] = {3'(d % 4), 13'd0};            // same bus
              ip_m_wdata[c / 4][c % 4] = 8'(c);
            end else begin
              ip_m_addr[c / 4][c % 4] = {3'd4, 6'd0, 2'(SUB_NODE[d / 4] % 4),
                                         2'(SUB_NODE[d / 4] / 4), 3'(d % 4)};  // via bridge
              ip_m_wdata[c / 4][c % 4] = 8'(c);
            end
          end
        end
        m_inj_valid[mesh_node(c)] = offering[0][c];
        ip_m_req[c / 4][c % 4]    = offering[1][c];
      end
      @(negedge clk);
      more = 1'b0;
      for (int c = 0; c < NC; c++)
        if (sent[0][c] < TRANSFERS || sent[1][c] < TRANSFERS || offering[0][c] || offering[1][c]) more = 1'b1;
    end
    m_inj_valid = '0;
    ip_m_req = '0;
    repeat (100) @(negedge clk);

    check(n_done[0] == NC * TRANSFERS, $sformatf("mesh delivered %0d of %0d", n_done[0], NC * TRANSFERS));
    check(n_done[1] == NC * TRANSFERS, $sformatf("hybrid delivered %0d of %0d", n_done[1], NC * TRANSFERS));
    check(h_core_ej_valid == '0, "no stray frame at an idle single core");
    avg_mesh = real'(lat_sum[0]) / real'(n_done[0] > 0 ? n_done[0] : 1);
    avg_hyb  = real'(lat_sum[1]) / real'(n_done[1] > 0 ? n_done[1] : 1);
    $display("offered load %0d%% per core: average latency mesh %0.2f cycles, hybrid %0.2f cycles (hybrid/mesh %0.2f)",
             10 * load_tenths, avg_mesh, avg_hyb, avg_hyb / avg_mesh);
  endtask

  initial begin
    real mesh_lo, hyb_lo, mesh_hi, hyb_hi;
    m_inj_flit = '0; m_inj_valid = '0; m_ej_ready = '1;
    h_core_inj_flit = '0; h_core_inj_valid = '0; h_core_ej_ready = '1;
    ip_m_req = '0; ip_m_addr = '0; ip_m_wdata = '0; ip_s_ready = '1;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;

    // Light load: each cluster offers 0.4 writes per cycle to its bus.
    run(1, mesh_lo, hyb_lo);
    check(hyb_lo < mesh_lo, "at light load the hybrid network has the lower average latency");
    // Heavy load: 1.2 writes per cycle per cluster exceed what one shared bus
    // completes (one per cycle); reported, and only delivery is checked.
    run(3, mesh_hi, hyb_hi);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
