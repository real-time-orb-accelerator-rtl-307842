// feat_fifo: synchronous first-in first-out queue for FAST features.
//
// FAST reports a corner a few lines after its pixel arrives, while the
// orientation of the same pixel is known only some 15 lines later; the queue
// holds (x, y, score) in the meantime. A push while full is discarded and
// flagged on `overflow` for one cycle (this design's choice; the depth is not
// specified).
//
// Interface: push/din, pop/dout (first-word fall-through: dout is the oldest
// entry whenever empty is low), empty, full, level.
// Timing: push and pop take effect on the clock edge; a pushed entry is visible
// on dout in the following cycle.
module feat_fifo #(
  parameter int unsigned DW    = 31,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [DW-1:0] din,
  input  logic          pop,
  output logic [DW-1:0] dout,
  output logic          empty,
  output logic          full,
  output logic [AW:0]   level,
  output logic          overflow
);
  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          do_push, do_pop;

  assign empty   = level == '0;
  assign full    = level == (AW+1)'(DEPTH);
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rd_ptr];

  always_ff @(posedge clk) if (do_push) mem[wr_ptr] <= din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0; wr_ptr <= '0; level <= '0; overflow <= 1'b0;
    end else begin
      overflow <= push && !do_push;
      if (do_push) wr_ptr <= wr_ptr + AW'(1);
      if (do_pop)  rd_ptr <= rd_ptr + AW'(1);
      level <= level + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH));
endmodule
