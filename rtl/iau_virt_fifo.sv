// iau_virt_fifo: the Virtual Instr FIFO of the IAU.  It buffers the virtual
// instructions (Vir_SAVE, Vir_LOAD) of the running task and decides, from the
// running state, what to do with the one at its head.
//
// The compiler places a group of virtual instructions after each CALC_F or
// SAVE at which a task may be interrupted: first the Vir_SAVEs that back up
// unsaved final results, then the Vir_LOADs that restore the on-chip inputs.
// When the first instruction of a group reaches the head, the decision is
// taken once for the whole group, so that a request arriving half way cannot
// split a backup from its switch:
//   * restoring (the task was interrupted and has just been resumed):
//     Vir_LOAD is executed, Vir_SAVE discarded;
//   * no higher-priority request waiting: every virtual instruction is
//     discarded, so the accelerator sees the original sequence;
//   * a higher-priority request waiting: Vir_SAVEs are executed, and the
//     first Vir_LOAD is the point where the task is switched out.  If the
//     group has no Vir_LOAD, grp_backup tells the output control to switch at
//     the next normal instruction.
// The output control closes the group (grp_close) when it consumes a normal
// instruction.  Splitting the decision this way, and latching it per group,
// is this implementation's choice; the design states only that this FIFO
// decides from the running state.
// Interface and timing as iau_instr_fifo; action and grp_backup are
// combinational from the head and the registered group state.
module iau_virt_fifo
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
  input  logic                       restoring,    // running task was just resumed
  input  logic                       irq_pending,  // a higher-priority task waits
  input  logic                       grp_close,    // a normal instruction was consumed
  output fifo_entry_t                head,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output virt_action_e               action,
  output logic                       grp_backup    // current group decided to back up
);
  logic grp_open_q, grp_backup_q;
  logic decide;

  iau_instr_fifo #(.DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .flush, .push, .push_entry, .pop,
    .head, .empty, .full, .count
  );

  assign decide     = grp_open_q ? grp_backup_q : irq_pending;
  assign grp_backup = grp_open_q && grp_backup_q;

  always_comb begin
    if (restoring)
      action = (head.instr.op == VI_SAVE) ? VA_DISCARD : VA_EXEC;
    else if (!decide)
      action = VA_DISCARD;
    else if (head.instr.op == VI_SAVE)
      action = VA_EXEC;
    else
      action = VA_SWITCH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grp_open_q   <= 1'b0;
      grp_backup_q <= 1'b0;
    end else if (flush || grp_close) begin
      grp_open_q   <= 1'b0;
      grp_backup_q <= 1'b0;
    end else if (pop && !empty && !restoring && !grp_open_q) begin
      grp_open_q   <= 1'b1;
      grp_backup_q <= irq_pending;
    end
  end

  a_virt_only: assert property (@(posedge clk) disable iff (!rst_n)
                                push |-> push_entry.instr.virt);
endmodule
