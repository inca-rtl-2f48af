// iau_out_ctrl: the Output Instr Control of the IAU, which also runs the
// task switching of the virtual-instruction interrupt method.
//
// Program order.  The fetcher splits one instruction stream over two FIFOs;
// every entry carries its instruction address, and this block takes whichever
// FIFO head holds the next expected address.
//
// Issue.  A normal LOAD/CALC (and an executed Vir_LOAD) goes out through the
// Other Instr Translator, a SAVE or an executed Vir_SAVE through the SAVE
// Instr Controller, whose record update is written to the Status Pool when the
// instruction is issued.  Instructions leave through a one-entry output
// register with a valid/ready handshake to the accelerator; at most one per
// cycle.  Virtual instructions that are not executed are consumed without
// issuing anything.
//
// Tasks.  With no task running, the highest-priority task that is READY or
// PREEMPTED is started: the fetcher restarts at its Instr Addr; a PREEMPTED
// task starts in the restoring phase, in which its Vir_LOADs execute, until
// its first normal instruction.  While a task runs, irq_pending says that a
// task of higher priority is READY.  The Virtual Instr FIFO turns that into
// a switch point at an interrupt position (after the backup Vir_SAVEs); at a
// switch the running task becomes PREEMPTED with Instr Addr set to the
// instruction it stopped at, the FIFOs and fetch are flushed, and the next
// task is picked one cycle later.  An END instruction makes the task IDLE and
// pulses task_done.  The accelerator is never told about any of this.
// The restart and bubble timing, END and task_done are this implementation's
// choices.
module iau_out_ctrl
  import inca_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // Status Pool
  input  run_state_e          run_state  [NUM_TASKS],
  input  logic [IADDR_W-1:0]  instr_addr [NUM_TASKS],
  input  logic                save_valid [NUM_TASKS],
  input  logic [ID_W-1:0]     save_id    [NUM_TASKS],
  input  logic [ADDR_W-1:0]   save_addr  [NUM_TASKS],
  input  logic [LEN_W-1:0]    save_len   [NUM_TASKS],
  output logic                st_we,
  output logic [TASK_W-1:0]   st_task,
  output run_state_e          st_state,
  output logic                st_addr_we,
  output logic [IADDR_W-1:0]  st_addr,
  output logic                sv_we,
  output logic [TASK_W-1:0]   sv_task,
  output logic                sv_valid,
  output logic [ID_W-1:0]     sv_id,
  output logic [ADDR_W-1:0]   sv_addr,
  output logic [LEN_W-1:0]    sv_len,
  // fetcher
  output logic                fetch_start,
  output logic                fetch_stop,
  output logic [IADDR_W-1:0]  fetch_addr,
  // Normal Instr FIFO
  input  fifo_entry_t         n_head,
  input  logic                n_empty,
  output logic                n_pop,
  // Virtual Instr FIFO
  input  fifo_entry_t         v_head,
  input  logic                v_empty,
  input  virt_action_e        v_action,
  input  logic                v_grp_backup,
  output logic                v_pop,
  output logic                v_grp_close,
  output logic                restoring,
  output logic                irq_pending,
  // instruction selected for the translators, and their results
  output vi_instr_t           cur_instr,
  input  orig_instr_t         tr_orig,
  input  logic                tr_is_save,
  input  logic                tr_is_end,
  input  orig_instr_t         sc_orig,
  input  logic                sc_drop,
  input  logic                sc_rec_we,
  input  logic                sc_rec_valid,
  input  logic [ID_W-1:0]     sc_rec_id,
  input  logic [ADDR_W-1:0]   sc_rec_addr,
  input  logic [LEN_W-1:0]    sc_rec_len,
  output logic                sc_cur_valid,
  output logic [ID_W-1:0]     sc_cur_id,
  output logic [ADDR_W-1:0]   sc_cur_addr,
  output logic [LEN_W-1:0]    sc_cur_len,
  // accelerator
  output logic                acc_valid,
  input  logic                acc_ready,
  output orig_instr_t         acc_instr,
  // status
  output logic                busy,
  output logic [TASK_W-1:0]   cur_task,
  output logic [NUM_TASKS-1:0] task_done,
  output logic                switch_evt   // one cycle: a task was switched out
);
  logic               cur_valid_q;
  logic [TASK_W-1:0]  cur_task_q;
  logic               restoring_q;
  logic [IADDR_W-1:0] next_iaddr_q;
  logic               out_valid_q;
  orig_instr_t        out_q;

  logic               n_ok, v_ok, can_issue;
  logic               pick_valid;
  logic [TASK_W-1:0]  pick_task;

  // the issue stage is free, or drains this cycle
  assign can_issue = !out_valid_q || acc_ready;

  assign n_ok = cur_valid_q && !n_empty && (n_head.iaddr == next_iaddr_q);
  assign v_ok = cur_valid_q && !v_empty && (v_head.iaddr == next_iaddr_q);

  assign cur_instr = v_ok ? v_head.instr : n_head.instr;

  assign sc_cur_valid = save_valid[cur_task_q];
  assign sc_cur_id    = save_id[cur_task_q];
  assign sc_cur_addr  = save_addr[cur_task_q];
  assign sc_cur_len   = save_len[cur_task_q];

  // highest-priority task waiting to run, and whether it outranks the running one
  always_comb begin
    pick_valid  = 1'b0;
    pick_task   = '0;
    irq_pending = 1'b0;
    for (int t = NUM_TASKS - 1; t >= 0; t--) begin
      if (run_state[t] == RS_READY || run_state[t] == RS_PREEMPTED) begin
        pick_valid = 1'b1;
        pick_task  = TASK_W'(t);
      end
      if (run_state[t] == RS_READY && cur_valid_q && TASK_W'(t) < cur_task_q)
        irq_pending = 1'b1;
    end
  end

  assign restoring = restoring_q;
  assign busy      = cur_valid_q;
  assign cur_task  = cur_task_q;
  assign acc_valid = out_valid_q;
  assign acc_instr = out_q;

  // ---------------------------------------------------------------- decisions
  logic        do_switch, do_end, do_issue, do_start;
  orig_instr_t issue_instr;

  always_comb begin
    do_switch   = 1'b0;
    do_end      = 1'b0;
    do_issue    = 1'b0;
    do_start    = 1'b0;
    issue_instr = tr_orig;
    n_pop       = 1'b0;
    v_pop       = 1'b0;
    v_grp_close = 1'b0;
    sv_we       = 1'b0;

    if (!cur_valid_q) begin
      do_start = pick_valid;
    end else if (v_ok) begin
      unique case (v_action)
        VA_DISCARD: v_pop = 1'b1;
        VA_SWITCH:  do_switch = 1'b1;
        default: begin  // VA_EXEC
          if (can_issue) begin
            v_pop = 1'b1;
            if (tr_is_save) begin
              sv_we       = sc_rec_we;
              do_issue    = !sc_drop;
              issue_instr = sc_orig;
            end else begin
              do_issue = 1'b1;
            end
          end
        end
      endcase
    end else if (n_ok) begin
      if (v_grp_backup) begin
        do_switch = 1'b1;
      end else if (tr_is_end) begin
        do_end      = 1'b1;
        n_pop       = 1'b1;
        v_grp_close = 1'b1;
      end else if (can_issue) begin
        n_pop       = 1'b1;
        v_grp_close = 1'b1;
        if (tr_is_save) begin
          sv_we       = sc_rec_we;
          do_issue    = !sc_drop;
          issue_instr = sc_orig;
        end else begin
          do_issue = 1'b1;
        end
      end
    end
  end

  assign sv_task  = cur_task_q;
  assign sv_valid = sc_rec_valid;
  assign sv_id    = sc_rec_id;
  assign sv_addr  = sc_rec_addr;
  assign sv_len   = sc_rec_len;

  // Status Pool run-state writes
  always_comb begin
    st_we      = 1'b0;
    st_task    = cur_task_q;
    st_state   = RS_RUNNING;
    st_addr_we = 1'b0;
    st_addr    = next_iaddr_q;
    if (do_start) begin
      st_we    = 1'b1;
      st_task  = pick_task;
      st_state = RS_RUNNING;
    end else if (do_switch) begin
      st_we      = 1'b1;
      st_state   = RS_PREEMPTED;
      st_addr_we = 1'b1;
    end else if (do_end) begin
      st_we      = 1'b1;
      st_state   = RS_IDLE;
      st_addr_we = 1'b1;
    end
  end

  assign fetch_start = do_start;
  assign fetch_addr  = instr_addr[pick_task];
  assign fetch_stop  = do_switch || do_end;
  assign switch_evt  = do_switch;

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_valid_q  <= 1'b0;
      cur_task_q   <= '0;
      restoring_q  <= 1'b0;
      next_iaddr_q <= '0;
      out_valid_q  <= 1'b0;
      out_q        <= '0;
      task_done    <= '0;
    end else begin
      task_done <= '0;
      if (do_start) begin
        cur_valid_q  <= 1'b1;
        cur_task_q   <= pick_task;
        restoring_q  <= (run_state[pick_task] == RS_PREEMPTED);
        next_iaddr_q <= instr_addr[pick_task];
      end else if (do_switch || do_end) begin
        cur_valid_q <= 1'b0;
        restoring_q <= 1'b0;
        if (do_end) task_done[cur_task_q] <= 1'b1;
      end else if (n_pop || v_pop) begin
        next_iaddr_q <= next_iaddr_q + 1'b1;
        if (n_pop) restoring_q <= 1'b0;
      end

      if (do_issue) begin
        out_valid_q <= 1'b1;
        out_q       <= issue_instr;
      end else if (acc_ready) begin
        out_valid_q <= 1'b0;
      end
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 acc_valid && !acc_ready |=> acc_valid && $stable(acc_instr));
  a_one_fifo:   assert property (@(posedge clk) disable iff (!rst_n) !(n_ok && v_ok));
endmodule
