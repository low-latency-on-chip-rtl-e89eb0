// hybrid_noc_tb: end-to-end test of the hybrid network at its default size:
// a 4 x 4 mesh with 12 single IP cores and 4 sub-systems of 4 bus IP cores
// each (sub-systems at nodes (2,0), (0,1), (1,1), (2,2)).
//
// The testbench models all 28 IP cores. Every transfer carries its source
// endpoint (5 bits) and a per-(source, destination) sequence number (3 bits)
// in its payload, so each delivery is checked for destination, duplication
// and order; at the end every sent transfer must have arrived.
//
// Directed part: uncontended latencies, checked against one cycle per router
// plus one cycle per bridge:
//   core (0,0) -> core (3,3): 7 routers            = 7 cycles
//   core (0,0) -> IP 1 of sub-system (0,1): 2 routers + bridge = 3 cycles
//   IP 0 of sub-system (2,0) -> core (3,3): bridge + 5 routers = 6 cycles
// Random part: all cores and IPs send to random endpoints, with random
// stalls at every delivery port. IPs reach IPs of their own sub-system either
// directly over the bus or through the bridge and back (fixed per pair, as
// order is only kept along one path).
// Mechanisms that must each happen at least once (counted, failure if never):
// X-then-Y turns, router output contention, mesh back-pressure, bus
// arbitration between several masters, packetizing, depacketizing, local
// bus-only transfers, frames dropped for a clear enable bit.
module hybrid_noc_tb;
  import noc_pkg::*;

  localparam int N = 16, N_SUB = 4, N_CORE = 12, N_IP = 4, AW = 16;
  localparam logic [N-1:0] MASK = 16'h0434;
  localparam int N_EP = N_CORE + N_SUB * N_IP;   // 28 endpoints
  localparam int SENDS_PER_EP = 300;

  logic clk = 1'b0, reset = 1'b1;
  frame_t [N_CORE-1:0]                  core_inj_flit, core_ej_flit;
  logic   [N_CORE-1:0]                  core_inj_valid, core_inj_ready, core_ej_valid, core_ej_ready;
  logic   [N_SUB-1:0][N_IP-1:0]         ip_m_req, ip_m_gnt, ip_s_valid, ip_s_ready;
  logic   [N_SUB-1:0][N_IP-1:0][AW-1:0] ip_m_addr;
  logic   [N_SUB-1:0][N_IP-1:0][7:0]    ip_m_wdata;
  logic   [N_SUB-1:0][AW-1:0]           ip_s_addr;
  logic   [N_SUB-1:0][7:0]              ip_s_wdata;

  hybrid_noc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- endpoint map ----------------
  // endpoints 0..11: cores in node order; 12..27: IP i of sub-system s = 12 + 4s + i
  int core_node [N_CORE];
  int sub_node  [N_SUB];
  initial begin
    automatic int c = 0, s = 0;
    for (int n = 0; n < N; n++) begin
      if (MASK[n]) sub_node[s++] = n;
      else         core_node[c++] = n;
    end
  end
  function automatic int ep_node(int ep);
    return (ep < N_CORE) ? core_node[ep] : sub_node[(ep - N_CORE) / N_IP];
  endfunction
  function automatic int ep_sub(int ep);    // -1 for a core
    return (ep < N_CORE) ? -1 : (ep - N_CORE) / N_IP;
  endfunction
  function automatic int ep_ip(int ep);
    return (ep < N_CORE) ? 0 : (ep - N_CORE) % N_IP;
  endfunction

  // ---------------- scoreboard ----------------
  int sent_seq [N_EP][N_EP];
  int recv_seq [N_EP][N_EP];
  int n_sent = 0, n_recv = 0;
  bit scoreboard_on = 1'b0;

  // mechanism counters
  int cnt_xy_turn = 0, cnt_contention = 0, cnt_backpressure = 0, cnt_bus_conflict = 0;
  int cnt_packetize = 0, cnt_depacketize = 0, cnt_local_bus = 0, cnt_dropped = 0;

  task automatic deliver(int dst, logic [7:0] data, int node_seen);
    automatic int src = int'(data[7:3]);
    automatic int seq = int'(data[2:0]);
    n_recv++;
    check(src < N_EP, $sformatf("source %0d out of range", src));
    if (src >= N_EP) return;
    check(ep_node(dst) == node_seen, "delivered at the right node");
    check(seq == recv_seq[src][dst] % 8,
          $sformatf("%0d->%0d seq %0d, expected %0d", src, dst, seq, recv_seq[src][dst] % 8));
    check(recv_seq[src][dst] < sent_seq[src][dst], $sformatf("%0d->%0d: more received than sent", src, dst));
    if (ep_node(src) % 4 != ep_node(dst) % 4 && ep_node(src) / 4 != ep_node(dst) / 4) cnt_xy_turn++;
    recv_seq[src][dst]++;
  endtask

  // deliveries, sampled at the clock edge where the handshake completes
  always @(posedge clk) begin
    if (scoreboard_on) begin
      for (int c = 0; c < N_CORE; c++) begin
        if (core_ej_valid[c] && core_ej_ready[c]) begin
          check(int'(core_ej_flit[c].y) * 4 + int'(core_ej_flit[c].x) == core_node[c], "frame address matches core node");
          deliver(c, core_ej_flit[c].data, core_node[c]);
        end
      end
      for (int s = 0; s < N_SUB; s++) begin
        for (int i = 0; i < N_IP; i++) begin
          if (ip_s_valid[s][i] && ip_s_ready[s][i]) begin
            check(int'(ip_s_addr[s][AW-1 -: 3]) == i, "bus write addressed to this IP");
            deliver(N_CORE + s * N_IP + i, ip_s_wdata[s], sub_node[s]);
          end
        end
      end
    end
  end

  // mechanism monitors inside the design
  for (genvar y = 0; y < 4; y++) begin : g_my
    for (genvar x = 0; x < 4; x++) begin : g_mx
      always @(posedge clk) begin
        for (int o = 0; o < NPORTS; o++) begin
          if ($countones(dut.u_mesh.g_y[y].g_x[x].u_router.req[o]) > 1) cnt_contention++;
          if (dut.u_mesh.g_y[y].g_x[x].u_router.out_valid[o] && !dut.u_mesh.g_y[y].g_x[x].u_router.out_ready[o])
            cnt_backpressure++;
        end
      end
    end
  end
  for (genvar n = 0; n < N; n++) begin : g_mn
    if (MASK[n]) begin : g_ms
      always @(posedge clk) begin
        if ($countones(dut.g_node[n].g_sub.m_req) > 1) cnt_bus_conflict++;
        if (dut.g_node[n].g_sub.u_bridge.noc_out_valid && dut.g_node[n].g_sub.u_bridge.noc_out_ready) cnt_packetize++;
        if (dut.g_node[n].g_sub.u_bridge.m_req && dut.g_node[n].g_sub.u_bridge.m_gnt) cnt_depacketize++;
      end
    end
  end

  // ---------------- sources ----------------
  int  cur_dst [N_EP];
  bit  busy    [N_EP];
  int  n_left  [N_EP];
  bit  random_on = 1'b0;

  function automatic frame_t frame_to(int src, int dst);
    return make_frame(2'(ep_node(dst) % 4), 2'(ep_node(dst) / 4), 3'(ep_ip(dst)),
                      {5'(src), 3'(sent_seq[src][dst] % 8)});
  endfunction

  // bus write for IP source src to destination dst: direct when dst is on the
  // same bus (unless via_mesh), else through the bridge (slave N_IP)
  function automatic logic [AW-1:0] addr_to(int src, int dst, bit via_mesh);
    if (ep_sub(dst) == ep_sub(src) && !via_mesh) return {3'(ep_ip(dst)), 13'(0)};
    return {3'(N_IP), 6'(0), 2'(ep_node(dst) % 4), 2'(ep_node(dst) / 4), 3'(ep_ip(dst))};
  endfunction

  // record the sources' handshakes at the clock edge
  always @(posedge clk) begin
    for (int c = 0; c < N_CORE; c++) begin
      if (core_inj_valid[c] && core_inj_ready[c]) begin
        if (core_inj_flit[c].en) begin
          sent_seq[c][cur_dst[c]]++;
          n_sent++;
          n_left[c]--;
        end else begin
          cnt_dropped++;
        end
        busy[c] = 1'b0;
      end
    end
    for (int s = 0; s < N_SUB; s++) begin
      for (int i = 0; i < N_IP; i++) begin
        automatic int ep = N_CORE + s * N_IP + i;
        if (ip_m_req[s][i] && ip_m_gnt[s][i]) begin
          if (ip_m_addr[s][i][AW-1 -: 3] != 3'(N_IP)) cnt_local_bus++;
          sent_seq[ep][cur_dst[ep]]++;
          n_sent++;
          n_left[ep]--;
          busy[ep] = 1'b0;
        end
      end
    end
  end

  task automatic idle_all();
    core_inj_valid = '0;
    core_inj_flit  = '0;
    core_ej_ready  = '1;
    ip_m_req       = '0;
    ip_m_addr      = '0;
    ip_m_wdata     = '0;
    ip_s_ready     = '1;
  endtask

  // one new offer per idle source, drawn at the falling edge
  task automatic drive_random();
    for (int ep = 0; ep < N_EP; ep++) begin
      if (!busy[ep] && n_left[ep] > 0 && $urandom_range(2) == 0) begin
        automatic int d;
        do d = $urandom_range(N_EP - 1); while (d == ep);
        cur_dst[ep] = d;
        busy[ep] = 1'b1;
        if (ep < N_CORE) begin
          core_inj_flit[ep] = frame_to(ep, d);
          // now and then a frame with its enable bit clear, which must vanish
          if ($urandom_range(19) == 0) core_inj_flit[ep].en = 1'b0;
        end else begin
          automatic int s = ep_sub(ep), i = ep_ip(ep);
          ip_m_addr[s][i]  = addr_to(ep, d, ((ep + d) % 2) == 1);  // fixed path per pair keeps order
          ip_m_wdata[s][i] = {5'(ep), 3'(sent_seq[ep][d] % 8)};
        end
      end
      if (ep < N_CORE) core_inj_valid[ep] = busy[ep];
      else             ip_m_req[ep_sub(ep)][ep_ip(ep)] = busy[ep];
    end
    for (int c = 0; c < N_CORE; c++) core_ej_ready[c] = ($urandom_range(3) != 0);
    ip_s_ready = (N_SUB * N_IP)'({$urandom, $urandom});
  endtask

  // ---------------- stimulus ----------------
  initial begin
    int t0;
    foreach (sent_seq[a, b]) begin
      sent_seq[a][b] = 0;
      recv_seq[a][b] = 0;
    end
    foreach (busy[e]) begin
      busy[e] = 1'b0;
      cur_dst[e] = 0;
      n_left[e] = 0;
    end
    idle_all();
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    scoreboard_on = 1'b1;

    // ---- directed: core (0,0) -> core (3,3) ----
    cur_dst[0] = 11;
    core_inj_flit[0] = frame_to(0, 11);
    core_inj_valid[0] = 1'b1;
    t0 = cycle;
    @(negedge clk);
    core_inj_valid[0] = 1'b0;
    while (!core_ej_valid[11] && cycle - t0 < 20) @(negedge clk);
    check(cycle - t0 == 7, $sformatf("core (0,0) -> core (3,3): %0d cycles, expected 7", cycle - t0));
    @(negedge clk);

    // ---- directed: core (0,0) -> IP 1 of the sub-system at (0,1) ----
    cur_dst[0] = N_CORE + 1 * N_IP + 1;
    core_inj_flit[0] = frame_to(0, cur_dst[0]);
    core_inj_valid[0] = 1'b1;
    t0 = cycle;
    @(negedge clk);
    core_inj_valid[0] = 1'b0;
    while (!ip_s_valid[1][1] && cycle - t0 < 20) @(negedge clk);
    check(cycle - t0 == 3, $sformatf("core (0,0) -> sub-system (0,1): %0d cycles, expected 3", cycle - t0));
    @(negedge clk);

    // ---- directed: IP 0 of the sub-system at (2,0) -> core (3,3) ----
    cur_dst[N_CORE] = 11;
    ip_m_addr[0][0]  = addr_to(N_CORE, 11, 1'b1);
    ip_m_wdata[0][0] = {5'(N_CORE), 3'(sent_seq[N_CORE][11] % 8)};
    ip_m_req[0][0]   = 1'b1;
    #1 check(ip_m_gnt[0][0], "bridge accepts the write at once");
    t0 = cycle;
    @(negedge clk);
    ip_m_req[0][0] = 1'b0;
    while (!core_ej_valid[11] && cycle - t0 < 20) @(negedge clk);
    check(cycle - t0 == 6, $sformatf("sub-system (2,0) -> core (3,3): %0d cycles, expected 6", cycle - t0));
    repeat (3) @(negedge clk);

    // ---- random traffic ----
    foreach (n_left[e]) n_left[e] = SENDS_PER_EP;
    random_on = 1'b1;
    begin
      automatic bit more = 1'b1;
      while (more) begin
        drive_random();
        @(negedge clk);
        more = 1'b0;
        foreach (n_left[e]) if (n_left[e] > 0 || busy[e]) more = 1'b1;
      end
    end
    idle_all();
    repeat (200) @(negedge clk);

    check(n_recv == n_sent, $sformatf("%0d transfers received of %0d sent", n_recv, n_sent));
    foreach (sent_seq[a, b])
      if (sent_seq[a][b] != recv_seq[a][b]) check(1'b0, $sformatf("pair %0d->%0d: %0d sent, %0d received", a, b, sent_seq[a][b], recv_seq[a][b]));

    $display("transfers %0d, x-then-y turns %0d, router contention %0d, mesh back-pressure %0d",
             n_sent, cnt_xy_turn, cnt_contention, cnt_backpressure);
    $display("bus arbitration conflicts %0d, packetized %0d, depacketized %0d, bus-only %0d, disabled frames dropped %0d",
             cnt_bus_conflict, cnt_packetize, cnt_depacketize, cnt_local_bus, cnt_dropped);
    check(cnt_xy_turn > 0, "an X-then-Y turn happened");
    check(cnt_contention > 0, "router output contention happened");
    check(cnt_backpressure > 0, "mesh back-pressure happened");
    check(cnt_bus_conflict > 0, "bus arbitration between masters happened");
    check(cnt_packetize > 0, "a bridge packetized a bus write");
    check(cnt_depacketize > 0, "a bridge depacketized a frame");
    check(cnt_local_bus > 0, "a bus-only transfer inside a sub-system happened");
    check(cnt_dropped > 0, "a disabled frame was dropped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
