// inca_iau: the Instruction Arrangement Unit, the hardware half of the
// virtual-instruction (VI) interrupt method, and the top of this design.
//
// It sits between the CPU, the instruction space in DDR and an unmodified
// instruction-driven CNN accelerator.  Software starts a CNN task at one of
// NUM_TASKS priority levels (0 highest, never interrupted) by giving the DDR
// address of its compiled VI-ISA sequence.  The IAU fetches the running task's
// instructions, drops the virtual ones while nothing interrupts, and hands the
// accelerator an ordinary instruction stream.  When a higher-priority task is
// requested, the running task is stopped at its next interrupt position, the
// point after a CALC_F or SAVE where the compiler placed virtual instructions:
// the Vir_SAVEs there write the finished results not yet saved, the
// higher-priority task runs, and on return the Vir_LOADs reload the on-chip
// inputs and the normal SAVE that follows is shortened so no result is
// written twice.  The worst wait for an interrupt is thus one output-channel
// block (CalcBlob) instead of a whole layer.
//
// Blocks (as in the design's IAU diagram): Status Pool, Instr Fetcher,
// Virtual and Normal Instr FIFOs, SAVE Instr Controller, Other Instr
// Translator and Output Instr Control.
// Interfaces: CPU start request and per-task state/done; DDR instruction read
// (request valid/ready, in-order response); accelerator instruction output
// (valid/ready).  The port protocols are this implementation's choices.
// Timing: instructions issue at up to one per cycle once fetched; a switch
// costs two idle cycles plus the refetch of the new task's instructions.
module inca_iau
  import inca_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned MAX_OUT    = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // CPU
  input  logic                 cpu_start,
  input  logic [TASK_W-1:0]    cpu_task,
  input  logic [IADDR_W-1:0]   cpu_addr,
  output logic                 cpu_start_ok,
  output run_state_e           task_state [NUM_TASKS],
  output logic [NUM_TASKS-1:0] task_done,
  output logic                 busy,
  output logic [TASK_W-1:0]    cur_task,
  output logic                 switch_evt,
  // DDR instruction read
  output logic                 rd_req_valid,
  input  logic                 rd_req_ready,
  output logic [IADDR_W-1:0]   rd_req_addr,
  input  logic                 rd_resp_valid,
  input  vi_instr_t            rd_resp_data,
  // CNN accelerator
  output logic                 acc_valid,
  input  logic                 acc_ready,
  output orig_instr_t          acc_instr
);
  localparam int unsigned CNT_W = $clog2(FIFO_DEPTH + 1);

  // Status Pool
  run_state_e         run_state  [NUM_TASKS];
  logic [IADDR_W-1:0] instr_addr [NUM_TASKS];
  logic               save_valid [NUM_TASKS];
  logic [ID_W-1:0]    save_id    [NUM_TASKS];
  logic [ADDR_W-1:0]  save_addr  [NUM_TASKS];
  logic [LEN_W-1:0]   save_len   [NUM_TASKS];
  logic               st_we, st_addr_we, sv_we, sv_valid;
  logic [TASK_W-1:0]  st_task, sv_task;
  run_state_e         st_state;
  logic [IADDR_W-1:0] st_addr;
  logic [ID_W-1:0]    sv_id;
  logic [ADDR_W-1:0]  sv_addr;
  logic [LEN_W-1:0]   sv_len;

  // fetch path
  logic               fetch_start, fetch_stop, fifo_flush;
  logic [IADDR_W-1:0] fetch_addr;
  logic               push_norm, push_virt;
  fifo_entry_t        push_entry;
  fifo_entry_t        n_head, v_head;
  logic               n_empty, v_empty, n_full, v_full, n_pop, v_pop;
  logic [CNT_W-1:0]   n_count, v_count;
  virt_action_e       v_action;
  logic               v_grp_backup, v_grp_close, restoring, irq_pending;

  // translation
  vi_instr_t          cur_instr;
  orig_instr_t        tr_orig, sc_orig;
  logic               tr_is_save, tr_is_end;
  logic               sc_drop, sc_rec_we, sc_rec_valid;
  logic [ID_W-1:0]    sc_rec_id;
  logic [ADDR_W-1:0]  sc_rec_addr;
  logic [LEN_W-1:0]   sc_rec_len;
  logic               sc_cur_valid;
  logic [ID_W-1:0]    sc_cur_id;
  logic [ADDR_W-1:0]  sc_cur_addr;
  logic [LEN_W-1:0]   sc_cur_len;

  iau_status_pool u_pool (
    .clk, .rst_n,
    .cpu_start, .cpu_task, .cpu_addr, .start_ok(cpu_start_ok),
    .st_we, .st_task, .st_state, .st_addr_we, .st_addr,
    .sv_we, .sv_task, .sv_valid, .sv_id, .sv_addr, .sv_len,
    .run_state, .instr_addr, .save_valid, .save_id, .save_addr, .save_len
  );

  iau_instr_fetcher #(.DEPTH(FIFO_DEPTH), .MAX_OUT(MAX_OUT)) u_fetch (
    .clk, .rst_n,
    .start(fetch_start), .stop(fetch_stop), .start_addr(fetch_addr),
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .cnt_norm(n_count), .cnt_virt(v_count),
    .push_norm, .push_virt, .push_entry, .flush(fifo_flush)
  );

  iau_instr_fifo #(.DEPTH(FIFO_DEPTH)) u_norm_fifo (
    .clk, .rst_n, .flush(fifo_flush), .push(push_norm), .push_entry,
    .pop(n_pop), .head(n_head), .empty(n_empty), .full(n_full), .count(n_count)
  );

  iau_virt_fifo #(.DEPTH(FIFO_DEPTH)) u_virt_fifo (
    .clk, .rst_n, .flush(fifo_flush), .push(push_virt), .push_entry,
    .pop(v_pop), .restoring, .irq_pending, .grp_close(v_grp_close),
    .head(v_head), .empty(v_empty), .full(v_full), .count(v_count),
    .action(v_action), .grp_backup(v_grp_backup)
  );

  iau_translator u_trans (
    .vi(cur_instr), .orig(tr_orig), .is_save(tr_is_save), .is_end(tr_is_end)
  );

  iau_save_ctrl u_save (
    .vi(cur_instr),
    .rec_valid(sc_cur_valid), .rec_id(sc_cur_id), .rec_addr(sc_cur_addr), .rec_len(sc_cur_len),
    .orig(sc_orig), .drop(sc_drop), .rec_we(sc_rec_we), .rec_valid_n(sc_rec_valid),
    .rec_id_n(sc_rec_id), .rec_addr_n(sc_rec_addr), .rec_len_n(sc_rec_len)
  );

  iau_out_ctrl u_out (
    .clk, .rst_n,
    .run_state, .instr_addr, .save_valid, .save_id, .save_addr, .save_len,
    .st_we, .st_task, .st_state, .st_addr_we, .st_addr,
    .sv_we, .sv_task, .sv_valid, .sv_id, .sv_addr, .sv_len,
    .fetch_start, .fetch_stop, .fetch_addr,
    .n_head, .n_empty, .n_pop,
    .v_head, .v_empty, .v_action, .v_grp_backup, .v_pop, .v_grp_close,
    .restoring, .irq_pending,
    .cur_instr, .tr_orig, .tr_is_save, .tr_is_end,
    .sc_orig, .sc_drop, .sc_rec_we, .sc_rec_valid, .sc_rec_id, .sc_rec_addr, .sc_rec_len,
    .sc_cur_valid, .sc_cur_id, .sc_cur_addr, .sc_cur_len,
    .acc_valid, .acc_ready, .acc_instr,
    .busy, .cur_task, .task_done, .switch_evt
  );

  assign task_state = run_state;
endmodule
