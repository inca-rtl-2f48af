// iau_instr_fifo: synchronous first-in first-out buffer for fetched
// instructions.  It serves as the Normal Instr FIFO of the IAU, and the
// Virtual Instr FIFO wraps one.  Each entry is an instruction together with its
// instruction address, so that the output side can put the two FIFOs back in
// program order and can record where a task was interrupted.
//
// Interface: push/pop with full/empty, a head that is valid whenever the
// FIFO is not empty (first-word fall-through), an occupancy count, and a
// synchronous flush that empties the FIFO when the IAU switches tasks.
// A push to a full FIFO or a pop from an empty one is ignored (and flagged by
// an assertion).  Flush has priority over push and pop.
// Timing: a pushed entry is visible at the head the cycle after the push.
// The depth is this implementation's choice; the design gives none.
module iau_instr_fifo
  import inca_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic                       push,
  input  fifo_entry_t                push_entry,
  input  logic                       pop,
  output fifo_entry_t                head,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH+1);

  fifo_entry_t      mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign head  = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] ptr_inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= ptr_inc(wr_ptr);
      if (do_pop)  rd_ptr <= ptr_inc(rd_ptr);
      count <= count + CNT_W'(do_push) - CNT_W'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push && !flush) mem[wr_ptr] <= push_entry;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !flush));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty && !flush));
endmodule
