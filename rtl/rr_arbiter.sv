// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters (one-hot gnt), searching from the requester after
// the one last served. The grant is combinational on req; the priority pointer
// moves only in a cycle where `advance` is high (the granted transfer took
// place), so a stalled winner keeps its grant. Round-robin is this design's
// own choice of fairness policy.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);

  logic [N-1:0] last;  // one-hot: requester served most recently

  always_comb begin
    gnt = '0;
    // Walk the requesters in order, starting just after `last`.
    for (int k = 1; k <= int'(N); k++) begin
      for (int i = 0; i < int'(N); i++) begin
        if (last[i] && gnt == '0 && req[(i + k) % N]) gnt[(i + k) % N] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset)                  last <= N'(1) << (N - 1);
    else if (advance && |gnt)   last <= gnt;
  end

  assert property (@(posedge clk) disable iff (reset) $onehot0(gnt));

endmodule
