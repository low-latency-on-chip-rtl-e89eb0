// flit_fifo: small first-in first-out buffer for frames at a router input.
//
// DEPTH entries in a circular array. `in_ready` depends only on the stored
// count, so no combinational path runs from a router's output back to the
// upstream router; with two entries a stream still moves one frame per cycle.
// A frame written in one cycle is visible at the head in the next.
// The buffer depth is this design's own choice.
module flit_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic   clk,
  input  logic   reset,
  input  frame_t in_flit,
  input  logic   in_valid,
  output logic   in_ready,
  output frame_t head,
  output logic   head_valid,
  input  logic   pop
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  frame_t          mem [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic [PW:0]     count;
  logic            push, do_pop;

  assign in_ready   = (count < (PW+1)'(DEPTH));
  assign head_valid = (count != '0);
  assign head       = mem[rd_ptr];
  assign push       = in_valid && in_ready;
  assign do_pop     = pop && head_valid;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop) rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_flit;
  end

endmodule
