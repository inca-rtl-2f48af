// iau_status_pool: the Status Pool of the IAU.  One entry per priority level
// (0 is the highest) holds the task's Run State and Instr Addr, the DDR
// address of its next VI-ISA instruction.  Entries of interruptible tasks
// (every priority but 0, which nothing can interrupt) also hold the record of
// the Vir_SAVEs executed when the task was interrupted: SaveID, Save Addr and
// Save Length.  The entry layout follows the design; the encodings are this
// implementation's.
//
// Write ports, all taking effect at the next clock edge:
//   * CPU start: a task request from software.  It is accepted only when the
//     task's entry is idle; the entry becomes READY at the given instruction
//     address and its save record is cleared.  start_ok reports acceptance in
//     the same cycle.
//   * state write from the output control (run state, and optionally the
//     instruction address at which a task was switched out).
//   * save-record write from the output control / SAVE controller.
// A controller write wins over a CPU start to the same entry.
// All entries are readable at all times; the CPU sees the run states.
module iau_status_pool
  import inca_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // CPU request
  input  logic                cpu_start,
  input  logic [TASK_W-1:0]   cpu_task,
  input  logic [IADDR_W-1:0]  cpu_addr,
  output logic                start_ok,
  // run-state write
  input  logic                st_we,
  input  logic [TASK_W-1:0]   st_task,
  input  run_state_e          st_state,
  input  logic                st_addr_we,
  input  logic [IADDR_W-1:0]  st_addr,
  // save-record write
  input  logic                sv_we,
  input  logic [TASK_W-1:0]   sv_task,
  input  logic                sv_valid,
  input  logic [ID_W-1:0]     sv_id,
  input  logic [ADDR_W-1:0]   sv_addr,
  input  logic [LEN_W-1:0]    sv_len,
  // read
  output run_state_e          run_state  [NUM_TASKS],
  output logic [IADDR_W-1:0]  instr_addr [NUM_TASKS],
  output logic                save_valid [NUM_TASKS],
  output logic [ID_W-1:0]     save_id    [NUM_TASKS],
  output logic [ADDR_W-1:0]   save_addr  [NUM_TASKS],
  output logic [LEN_W-1:0]    save_len   [NUM_TASKS]
);
  assign start_ok = cpu_start && (32'(cpu_task) < NUM_TASKS)
                    && (run_state[cpu_task] == RS_IDLE)
                    && !(st_we && st_task == cpu_task);

  for (genvar t = 0; t < NUM_TASKS; t++) begin : g_entry
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        run_state[t]  <= RS_IDLE;
        instr_addr[t] <= '0;
      end else if (st_we && st_task == TASK_W'(t)) begin
        run_state[t] <= st_state;
        if (st_addr_we) instr_addr[t] <= st_addr;
      end else if (start_ok && cpu_task == TASK_W'(t)) begin
        run_state[t]  <= RS_READY;
        instr_addr[t] <= cpu_addr;
      end
    end

    if (t == 0) begin : g_no_save
      // the highest priority is never interrupted: no save record
      assign save_valid[t] = 1'b0;
      assign save_id[t]    = '0;
      assign save_addr[t]  = '0;
      assign save_len[t]   = '0;
    end else begin : g_save
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          save_valid[t] <= 1'b0;
          save_id[t]    <= '0;
          save_addr[t]  <= '0;
          save_len[t]   <= '0;
        end else if (sv_we && sv_task == TASK_W'(t)) begin
          save_valid[t] <= sv_valid;
          save_id[t]    <= sv_id;
          save_addr[t]  <= sv_addr;
          save_len[t]   <= sv_len;
        end else if (start_ok && cpu_task == TASK_W'(t)) begin
          save_valid[t] <= 1'b0;
        end
      end
    end
  end
endmodule
