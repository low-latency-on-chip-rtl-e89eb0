// bus_noc_bridge_tb: self-checking test of the bus/mesh bridge.
//
// 1. Packetize: a bus write with destination (3,2), IP 1 and payload 5A must
//    come out as frame {1, 11, 10, 001, 01011010} one cycle later.
// 2. Streaming: with the router ready, one write per cycle is accepted and
//    each becomes a frame one cycle later.
// 3. Back-pressure from the router: the bridge holds its frame and refuses
//    further writes until the router takes it.
// 4. Depacketize: a frame for IP 2 becomes a bus write to slave 2, offset 0,
//    one cycle later; it is held until granted, and the bridge refuses the
//    next frame meanwhile.
// 5. A frame naming IP 5 (no such IP) is dropped.
module bus_noc_bridge_tb;
  import noc_pkg::*;

  localparam int AW = 16;

  logic          clk = 1'b0, reset = 1'b1;
  logic          s_valid, s_ready, m_req, m_gnt;
  logic [AW-1:0] s_addr, m_addr;
  logic [7:0]    s_wdata, m_wdata;
  frame_t        noc_out, noc_in;
  logic          noc_out_valid, noc_out_ready, noc_in_valid, noc_in_ready;

  int checks = 0, failures = 0;

  bus_noc_bridge dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] bridge_addr(int x, int y, int ip);
    return {3'd4, 6'd0, 2'(x), 2'(y), 3'(ip)};
  endfunction

  initial begin
    s_valid = 0; s_addr = '0; s_wdata = '0; m_gnt = 0;
    noc_in = '0; noc_in_valid = 0; noc_out_ready = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;

    // ---- 1. packetize ----
    s_valid = 1; s_addr = bridge_addr(3, 2, 1); s_wdata = 8'h5A;
    #1 check(s_ready, "bridge slave ready when idle");
    check(!noc_out_valid, "no frame before the write");
    @(negedge clk);
    s_valid = 0;
    check(noc_out_valid && noc_out == 16'b1_11_10_001_01011010,
          $sformatf("packet frame %b", noc_out));
    @(negedge clk);
    check(!noc_out_valid, "frame leaves after one cycle");

    // ---- 2. streaming ----
    for (int k = 0; k < 6; k++) begin
      s_valid = 1; s_addr = bridge_addr(k % 4, (k + 1) % 4, k % 8); s_wdata = 8'(k);
      #1 check(s_ready, "write accepted every cycle");
      if (k > 0) check(noc_out_valid && noc_out.data == 8'(k - 1) && noc_out.x == 2'((k - 1) % 4),
                       "stream frame follows one cycle behind");
      @(negedge clk);
    end
    s_valid = 0;
    check(noc_out_valid && noc_out.data == 8'd5, "last stream frame");
    @(negedge clk);

    // ---- 3. back-pressure from the router ----
    noc_out_ready = 0;
    s_valid = 1; s_addr = bridge_addr(1, 1, 0); s_wdata = 8'hA1;
    @(negedge clk);
    s_addr = bridge_addr(2, 2, 0); s_wdata = 8'hA2;
    repeat (3) begin
      #1 check(!s_ready, "second write refused while the frame waits");
      check(noc_out_valid && noc_out.data == 8'hA1, "first frame held");
      @(negedge clk);
    end
    noc_out_ready = 1;
    #1 check(s_ready, "write accepted as the frame leaves");
    @(negedge clk);
    s_valid = 0;
    check(noc_out_valid && noc_out.data == 8'hA2 && noc_out.x == 2'd2, "second frame after release");
    @(negedge clk);

    // ---- 4. depacketize ----
    noc_in = make_frame(2'd0, 2'd0, 3'd2, 8'h3C);
    noc_in_valid = 1;
    #1 check(noc_in_ready, "bridge takes a frame when idle");
    check(!m_req, "no bus request before the frame");
    @(negedge clk);
    noc_in = make_frame(2'd0, 2'd0, 3'd3, 8'h3D);
    repeat (2) begin
      #1 check(m_req && m_addr == {3'd2, 13'd0} && m_wdata == 8'h3C, "bus write to IP 2, offset 0");
      check(!noc_in_ready, "next frame refused while the write waits");
      @(negedge clk);
    end
    m_gnt = 1;
    #1 check(noc_in_ready, "next frame taken as the write completes");
    @(negedge clk);
    noc_in_valid = 0;
    #1 check(m_req && m_addr == {3'd3, 13'd0} && m_wdata == 8'h3D, "second write to IP 3");
    @(negedge clk);
    #1 check(!m_req, "bus idle after two writes");
    m_gnt = 0;

    // ---- 5. frame for a missing IP ----
    @(negedge clk);
    noc_in = make_frame(2'd0, 2'd0, 3'd5, 8'h99);
    noc_in_valid = 1;
    @(negedge clk);
    noc_in_valid = 0;
    repeat (3) begin
      #1 check(!m_req, "frame for IP 5 dropped");
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
