// xy_router_tb: self-checking test of one X-Y router placed at (1,1).
//
// 1. Routing and latency: from every input, a single frame to each of the 16
//    destinations; the frame must appear on the port X-Y routing calls for
//    exactly one cycle after it was accepted, unchanged.
// 2. Contention: three inputs send to the same output at once; every frame
//    must come out, one per cycle, and the arbiter must serve all three
//    inputs.
// 3. Back-pressure: an output held not-ready fills the input buffer, which
//    must then refuse more; after release the frames leave in order.
// 4. A frame with the enable bit clear must be dropped.
module xy_router_tb;
  import noc_pkg::*;

  localparam logic [1:0] RX = 2'd1, RY = 2'd1;

  logic                clk = 1'b0, reset = 1'b1;
  frame_t [NPORTS-1:0] in_flit, out_flit;
  logic   [NPORTS-1:0] in_valid, in_ready, out_valid, out_ready;

  int checks = 0, failures = 0;

  xy_router #(.X(RX), .Y(RY)) dut (.*);

  always #5 clk = ~clk;

  // Reference: which port a destination leaves by, written out per case.
  function automatic int ref_port(int dx, int dy);
    if (dx == int'(RX) && dy == int'(RY)) return 0;   // local
    if (dx > int'(RX)) return 1;                       // +X
    if (dx < int'(RX)) return 2;                       // -X
    return (dy > int'(RY)) ? 3 : 4;                    // +Y / -Y
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic idle();
    in_valid  = '0;
    in_flit   = '0;
    out_ready = '1;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_t f;
    int exp_port;
    int seen;
    logic [NPORTS-1:0] served;
    idle();
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;

    // ---- 1. routing and one-cycle latency ----
    for (int i = 0; i < NPORTS; i++) begin
      for (int d = 0; d < 16; d++) begin
        exp_port = ref_port(d % 4, d / 4);
        if (exp_port == i) continue;   // would be a U-turn: not produced by X-Y routing
        f = make_frame(2'(d % 4), 2'(d / 4), 3'(i), 8'(16 * i + d));
        @(negedge clk);
        in_flit[i]  = f;
        in_valid[i] = 1'b1;
        check(in_ready[i] == 1'b1, "router input ready when empty");
        check(out_valid == '0, "no output in the cycle the frame is offered");
        @(negedge clk);
        idle();
        check(out_valid == NPORTS'(1) << exp_port,
              $sformatf("in %0d dest (%0d,%0d): out_valid=%b expected port %0d",
                        i, d % 4, d / 4, out_valid, exp_port));
        check(out_flit[exp_port] == f, "frame unchanged through the router");
        @(negedge clk);
        check(out_valid == '0, "frame leaves after one cycle");
      end
    end

    // ---- 2. contention: LOCAL, XN and YN all to (3,1) via +X ----
    @(negedge clk);
    in_flit[0] = make_frame(2'd3, 2'd1, 3'd0, 8'hA0);
    in_flit[2] = make_frame(2'd3, 2'd1, 3'd0, 8'hA2);
    in_flit[4] = make_frame(2'd3, 2'd1, 3'd0, 8'hA4);
    in_valid   = 5'b10101;
    @(negedge clk);
    idle();
    served = '0;
    seen   = 0;
    for (int c = 0; c < 3; c++) begin
      check(out_valid[1] == 1'b1, "contended output busy every cycle");
      if (out_valid[1]) begin
        seen++;
        case (out_flit[1].data)
          8'hA0: served[0] = 1'b1;
          8'hA2: served[2] = 1'b1;
          8'hA4: served[4] = 1'b1;
          default: check(1'b0, "unexpected frame on contended output");
        endcase
      end
      @(negedge clk);
    end
    check(served == 5'b10101, "arbiter served all three inputs");
    check(seen == 3 && out_valid == '0, "three frames, then idle");

    // ---- 3. back-pressure on +X ----
    out_ready[1] = 1'b0;
    for (int k = 0; k < 3; k++) begin
      in_flit[0]  = make_frame(2'd2, 2'd0, 3'd0, 8'(8'hB0 + k));
      in_valid[0] = 1'b1;
      check(in_ready[0] == (k < 2), $sformatf("buffer entry %0d ready=%b", k, in_ready[0]));
      @(negedge clk);
    end
    in_valid[0] = 1'b0;
    check(out_valid[1] && out_flit[1].data == 8'hB0, "stalled frame held on output");
    out_ready[1] = 1'b1;
    @(negedge clk);
    check(out_valid[1] && out_flit[1].data == 8'hB1, "second frame follows in order");
    @(negedge clk);
    check(out_valid == '0, "third frame was refused while full");

    // ---- 4. enable bit clear: dropped ----
    f = make_frame(2'd3, 2'd3, 3'd0, 8'hEE);
    f.en = 1'b0;
    in_flit[3]  = f;
    in_valid[3] = 1'b1;
    check(in_ready[3], "disabled frame is taken");
    @(negedge clk);
    idle();
    repeat (3) begin
      check(out_valid == '0, "disabled frame is not forwarded");
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
