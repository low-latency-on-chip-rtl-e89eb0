// xy_mesh_tb: self-checking test of the 4 x 4 X-Y mesh.
//
// 1. Single transfer from terminal R1 at node (0,0) to node (3,3) with frame
//    1111100011001100 (payload 11001100). The frame must reach (3,3) seven
//    cycles after injection (six hops, seven routers), pass through the
//    routers (1,0) (2,0) (3,0) and then (3,1) (3,2) (3,3) in that order, and
//    arrive unchanged.
// 2. The four corner terminals each send to the opposite corner at once; all
//    four frames must arrive with the uncontended latency.
// 3. Random traffic: every node sends frames to random nodes while the
//    delivery ports stall at random. Each frame carries its source and a
//    per-(source, destination) sequence number in its payload, so the test
//    checks that each frame arrives at the right node, exactly once and in
//    order.
module xy_mesh_tb;
  import noc_pkg::*;

  localparam int N = 16;
  localparam int FRAMES_PER_NODE = 60;

  logic            clk = 1'b0, reset = 1'b1;
  frame_t [N-1:0]  inj_flit, ej_flit;
  logic   [N-1:0]  inj_valid, inj_ready, ej_valid, ej_ready;
  logic   [N-1:0]  occ;   // routers holding a frame in any input buffer

  int checks = 0, failures = 0;
  int cycle = 0;

  xy_mesh dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar y = 0; y < 4; y++) begin : g_oy
    for (genvar x = 0; x < 4; x++) begin : g_ox
      assign occ[y*4+x] = |dut.g_y[y].g_x[x].u_router.head_valid;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard for part 3
  int next_seq [N][N];
  int sent_cnt, recv_cnt;
  bit random_phase = 1'b0;

  always @(posedge clk) begin
    if (random_phase) begin
      for (int n = 0; n < N; n++) begin
        if (ej_valid[n] && ej_ready[n]) begin
          automatic int src = int'(ej_flit[n].data[7:4]);
          automatic int seq = int'(ej_flit[n].data[3:0]);
          recv_cnt++;
          check(int'(ej_flit[n].y) * 4 + int'(ej_flit[n].x) == n,
                $sformatf("frame for (%0d,%0d) delivered at node %0d", ej_flit[n].x, ej_flit[n].y, n));
          check(seq == (next_seq[src][n] % 16),
                $sformatf("pair %0d->%0d: seq %0d, expected %0d", src, n, seq, next_seq[src][n] % 16));
          next_seq[src][n]++;
        end
      end
    end
  end

  initial begin
    static int path [7] = '{0, 1, 2, 3, 7, 11, 15};
    int t0, arrived;
    static int corner [4] = '{0, 3, 12, 15};
    int sent [N];
    int pair_seq [N][N];
    int dst [N];

    inj_flit  = '0;
    inj_valid = '0;
    ej_ready  = '1;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;

    // ---- 1. R1 at (0,0) to (3,3) ----
    @(negedge clk);
    inj_flit[0]  = frame_t'(16'b1111100011001100);
    inj_valid[0] = 1'b1;
    check(inj_ready[0], "terminal R1 ready");
    t0 = cycle;
    @(negedge clk);
    inj_valid[0] = 1'b0;
    arrived = 0;
    for (int k = 0; k < 7; k++) begin
      check(occ == N'(1) << path[k],
            $sformatf("hop %0d: occupancy %b, expected router %0d", k, occ, path[k]));
      if (k == 6) begin
        check(ej_valid[15] && ej_flit[15] == 16'b1111100011001100, "frame delivered at (3,3)");
        check(cycle - t0 == 7, $sformatf("latency %0d cycles, expected 7", cycle - t0));
      end else begin
        check(ej_valid == '0, "nothing delivered before the last hop");
      end
      @(negedge clk);
    end
    check(ej_valid == '0 && occ == '0, "mesh empty afterwards");

    // ---- 2. four corner terminals to the opposite corners ----
    for (int r = 0; r < 4; r++) begin
      automatic int s = corner[r], d = corner[3 - r];
      inj_flit[s]  = make_frame(2'(d % 4), 2'(d / 4), 3'(r), 8'(8'hC0 + r));
      inj_valid[s] = 1'b1;
    end
    t0 = cycle;
    @(negedge clk);
    inj_valid = '0;
    arrived = 0;
    for (int k = 1; k <= 10; k++) begin
      for (int r = 0; r < 4; r++) begin
        automatic int d = corner[3 - r];
        if (ej_valid[d]) begin
          arrived++;
          check(ej_flit[d].data == 8'(8'hC0 + r), "corner frame payload");
          check(cycle - t0 == 7, $sformatf("corner latency %0d, expected 7", cycle - t0));
        end
      end
      @(negedge clk);
    end
    check(arrived == 4, $sformatf("%0d of 4 corner frames arrived", arrived));

    // ---- 3. random traffic with back-pressure ----
    random_phase = 1'b1;
    sent_cnt = 0;
    recv_cnt = 0;
    foreach (sent[n]) begin
      sent[n] = 0;
      dst[n]  = $urandom_range(N - 1);
    end
    foreach (pair_seq[a, b]) begin
      pair_seq[a][b] = 0;
      next_seq[a][b] = 0;
    end
    while (sent_cnt < N * FRAMES_PER_NODE) begin
      // the previous cycle's offers that were taken
      @(posedge clk);
      for (int n = 0; n < N; n++) begin
        if (inj_valid[n] && inj_ready[n]) begin
          sent[n]++;
          sent_cnt++;
          pair_seq[n][dst[n]]++;
          dst[n] = $urandom_range(N - 1);
        end
      end
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        if (!inj_valid[n] || inj_ready[n]) begin
          inj_valid[n] = (sent[n] < FRAMES_PER_NODE) && ($urandom_range(3) != 0);
          inj_flit[n]  = make_frame(2'(dst[n] % 4), 2'(dst[n] / 4), 3'($urandom_range(7)),
                                    {4'(n), 4'(pair_seq[n][dst[n]] % 16)});
        end
        ej_ready[n] = ($urandom_range(4) != 0);
      end
    end
    @(negedge clk);
    inj_valid = '0;
    ej_ready  = '1;
    repeat (100) @(negedge clk);
    check(recv_cnt == sent_cnt, $sformatf("received %0d of %0d random frames", recv_cnt, sent_cnt));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
