// subsys_bus_tb: self-checking test of the shared sub-system bus (5 masters,
// 5 slaves).
//
// 1. Directed: one master writes to each slave in turn; the chosen slave alone
//    sees s_valid with the master's address and data, and the transfer
//    completes (m_gnt) in the same cycle when the slave is ready.
// 2. A write to a slave that is not ready waits, unseen by the slave, and
//    completes in the first cycle the slave is ready.
// 3. A write to an unmapped slave select completes and reaches no slave.
// 4. Fairness: all five masters request at once, continuously; each must
//    complete once in every five consecutive cycles.
// 5. Random: masters issue random writes, slaves stall at random; every
//    write must reach the addressed slave exactly once, in each master's
//    order, and the bus may idle only when no waiting write could complete.
module subsys_bus_tb;
  localparam int NM = 5, NS = 5, AW = 16, DW = 8;

  logic                      clk = 1'b0, reset = 1'b1;
  logic [NM-1:0]             m_req, m_gnt;
  logic [NM-1:0][AW-1:0]     m_addr;
  logic [NM-1:0][DW-1:0]     m_wdata;
  logic [NS-1:0]             s_valid, s_ready;
  logic [AW-1:0]             s_addr;
  logic [DW-1:0]             s_wdata;

  int checks = 0, failures = 0;

  subsys_bus dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] addr_of(int slave, int off);
    return {3'(slave), 13'(off)};
  endfunction

  initial begin
    int done_cnt [NM];
    int issued [NM], completed [NM];
    int total;
    logic [NM-1:0] taken;
    m_req = '0; m_addr = '0; m_wdata = '0; s_ready = '1;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;

    // ---- 1. each slave in turn, from master 2 ----
    for (int s = 0; s < NS; s++) begin
      m_req[2]   = 1'b1;
      m_addr[2]  = addr_of(s, 100 + s);
      m_wdata[2] = 8'(8'h50 + s);
      #1;
      check(s_valid == NS'(1) << s, $sformatf("slave %0d selected: s_valid=%b", s, s_valid));
      check(s_addr == addr_of(s, 100 + s) && s_wdata == 8'(8'h50 + s), "address and data routed to slaves");
      check(m_gnt == 5'b00100, "completes in the same cycle");
      @(negedge clk);
      m_req = '0;
    end

    // ---- 2. slave 1 stalls ----
    s_ready[1] = 1'b0;
    m_req[4] = 1'b1; m_addr[4] = addr_of(1, 7); m_wdata[4] = 8'h77;
    repeat (3) begin
      #1 check(s_valid == '0 && m_gnt == '0, "write to a busy slave waits");
      @(negedge clk);
    end
    s_ready[1] = 1'b1;
    #1 check(m_gnt == 5'b10000, "transfer completes once the slave is ready");
    @(negedge clk);
    m_req = '0;

    // ---- 3. unmapped slave select ----
    m_req[0] = 1'b1; m_addr[0] = addr_of(7, 0); m_wdata[0] = 8'h11;
    #1 check(s_valid == '0 && m_gnt == 5'b00001, "unmapped write completes, no slave selected");
    @(negedge clk);
    m_req = '0;

    // ---- 4. fairness under full load ----
    foreach (done_cnt[i]) done_cnt[i] = 0;
    m_req = '1;
    for (int i = 0; i < NM; i++) begin
      m_addr[i] = addr_of(i, i);
      m_wdata[i] = 8'(i);
    end
    for (int c = 0; c < 20; c++) begin
      #1;
      check($onehot(m_gnt), "exactly one completion per cycle under load");
      for (int i = 0; i < NM; i++) if (m_gnt[i]) done_cnt[i]++;
      if (c % 5 == 4) begin
        for (int i = 0; i < NM; i++)
          check(done_cnt[i] == (c + 1) / 5, $sformatf("master %0d served %0d times in %0d cycles", i, done_cnt[i], c + 1));
      end
      @(negedge clk);
    end
    m_req = '0;

    // ---- 5. random traffic ----
    foreach (issued[i]) begin
      issued[i] = 0;
      completed[i] = 0;
    end
    total = 0;
    while (total < 400) begin
      for (int i = 0; i < NM; i++) begin
        if (!m_req[i] && $urandom_range(1) == 1) begin
          m_req[i]   = 1'b1;
          m_addr[i]  = addr_of($urandom_range(NS - 1), (i << 8) | (issued[i] & 255));
          m_wdata[i] = 8'(issued[i]);
          issued[i]++;
        end
      end
      s_ready = NS'($urandom);
      #1;
      if (|s_valid) begin
        automatic int sl  = int'(s_addr[AW-1 -: 3]);
        automatic int mst = int'(s_addr[12:8]);
        check(s_valid == NS'(1) << sl, "random: addressed slave selected");
        check(s_ready[sl], "random: a write is only presented to a ready slave");
        check(m_gnt == NM'(1) << mst, "random: grant goes to the writing master");
        check(int'(s_wdata) == (completed[mst] & 255) && int'(s_addr[7:0]) == (completed[mst] & 255),
              $sformatf("random: master %0d write %0d in order: data %0d addr %h", mst, completed[mst], s_wdata, s_addr));
        completed[mst]++;
        total++;
      end else begin
        // idle bus: no master may be waiting for a ready slave
        for (int i = 0; i < NM; i++)
          check(!(m_req[i] && s_ready[m_addr[i][AW-1 -: 3]]), "random: bus idle although a write could complete");
      end
      taken = m_gnt;  // the transfer of this cycle happens at the next edge
      @(negedge clk);
      m_req &= ~taken;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
