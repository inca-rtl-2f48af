// inca_pkg: types and constants shared by the blocks of the Instruction
// Arrangement Unit (IAU) of the interruptible CNN accelerator.
//
// Two instruction formats are defined here.  The VI-ISA word is what the
// compiler stores in DDR: the five instruction classes of an instruction-driven
// CNN accelerator (LOAD_W, LOAD_D, CALC_I, CALC_F, SAVE), a "virtual" flag that
// turns a LOAD or SAVE into a Vir_LOAD / Vir_SAVE, an END marker closing a task,
// and an ID that ties a Vir_SAVE to the normal SAVE that would otherwise write
// the same results.  The original-ISA word is what the accelerator executes; it
// has no virtual flag and no ID.  The instruction classes, the virtual
// instructions and the SaveID come from the design; the field widths, the bit
// encodings and the END marker are this implementation's own choices.
package inca_pkg;

  parameter int unsigned NUM_TASKS = 3;   // priorities 0 (highest) .. 2
  parameter int unsigned TASK_W    = $clog2(NUM_TASKS);
  parameter int unsigned ADDR_W    = 32;  // DDR word address
  parameter int unsigned BUF_W     = 24;  // on-chip buffer word address
  parameter int unsigned LEN_W     = 24;  // transfer / calculation length in words
  parameter int unsigned ID_W      = 8;   // SaveID
  parameter int unsigned IADDR_W   = 32;  // instruction address, in instruction words

  // VI-ISA operation (with the virt flag this gives Vir_LOAD_W/D and Vir_SAVE)
  typedef enum logic [2:0] {
    VI_LOAD_W = 3'd0,
    VI_LOAD_D = 3'd1,
    VI_CALC_I = 3'd2,
    VI_CALC_F = 3'd3,
    VI_SAVE   = 3'd4,
    VI_END    = 3'd7
  } vi_op_e;

  typedef struct packed {
    vi_op_e               op;
    logic                 virt;      // 1: virtual instruction
    logic [ID_W-1:0]      id;        // SaveID of a SAVE / Vir_SAVE
    logic [BUF_W-1:0]     buf_addr;  // on-chip buffer address (CALC: output)
    logic [ADDR_W-1:0]    ddr_addr;  // DDR address (CALC: input buffer offset)
    logic [LEN_W-1:0]     len;       // words
  } vi_instr_t;

  // Original-ISA operation, as the accelerator decodes it
  typedef enum logic [2:0] {
    OP_LOAD_W = 3'd1,
    OP_LOAD_D = 3'd2,
    OP_CALC_I = 3'd3,
    OP_CALC_F = 3'd4,
    OP_SAVE   = 3'd5
  } orig_op_e;

  typedef struct packed {
    orig_op_e             op;
    logic [BUF_W-1:0]     buf_addr;
    logic [ADDR_W-1:0]    ddr_addr;
    logic [LEN_W-1:0]     len;
  } orig_instr_t;

  // Run State of a task in the Status Pool
  typedef enum logic [1:0] {
    RS_IDLE      = 2'd0,  // nothing to do
    RS_READY     = 2'd1,  // requested by the CPU, not started
    RS_RUNNING   = 2'd2,  // owns the accelerator (or restoring after an interrupt)
    RS_PREEMPTED = 2'd3   // interrupted; Instr Addr points at its restore point
  } run_state_e;

  // Entry of the virtual FIFO / normal FIFO: the instruction and its address
  typedef struct packed {
    logic [IADDR_W-1:0]   iaddr;
    vi_instr_t            instr;
  } fifo_entry_t;

  // What the virtual FIFO decides for the virtual instruction at its head
  typedef enum logic [1:0] {
    VA_DISCARD = 2'd0,  // no interrupt: skip it
    VA_EXEC    = 2'd1,  // execute it (backup or restore)
    VA_SWITCH  = 2'd2   // backup done: hand the accelerator to the waiting task here
  } virt_action_e;

  // VI-ISA LOAD/CALC to original ISA (SAVE is handled by the SAVE controller)
  function automatic orig_op_e map_op(vi_op_e op);
    case (op)
      VI_LOAD_W: return OP_LOAD_W;
      VI_LOAD_D: return OP_LOAD_D;
      VI_CALC_I: return OP_CALC_I;
      VI_CALC_F: return OP_CALC_F;
      default:   return OP_SAVE;
    endcase
  endfunction

endpackage
