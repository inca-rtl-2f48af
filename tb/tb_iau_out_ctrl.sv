// tb_iau_out_ctrl: the Output Instr Control with the Status Pool, the Other
// Instr Translator and the SAVE Instr Controller around it; the two FIFOs are
// modelled here as queues filled from a small instruction memory whenever the
// block restarts the fetch, and the Virtual Instr FIFO's decision is scripted
// per instruction.  The accelerator port stalls at random.
//   A: task 2 alone; its virtual instructions are discarded; the accelerator
//      receives LOAD_D, CALC_F, CALC_F, SAVE; task_done pulses and the task is idle.
//   B: task 2 again with task 1 requested: irq_pending rises; the Vir_SAVE
//      goes out as a SAVE and is recorded; at the Vir_LOAD the task is switched
//      out (PREEMPTED, Instr Addr = the Vir_LOAD); task 1 runs to its END; task
//      2 resumes in the restoring phase, its Vir_LOAD goes out as a LOAD_D, and
//      its normal SAVE goes out cut to the second half.
//   C: as B, but the group holds only a Vir_SAVE: the switch happens at the
//      next normal instruction (grp_backup), where the task later resumes.
// The expected accelerator sequence is written out by hand.
module tb_iau_out_ctrl;
  import inca_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // pool
  logic               cpu_start, start_ok;
  logic [TASK_W-1:0]  cpu_task;
  logic [IADDR_W-1:0] cpu_addr;
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
  // out ctrl
  logic               fetch_start, fetch_stop;
  logic [IADDR_W-1:0] fetch_addr;
  fifo_entry_t        n_head, v_head;
  logic               n_empty, v_empty, n_pop, v_pop, v_grp_backup, v_grp_close;
  virt_action_e       v_action;
  logic               restoring, irq_pending;
  vi_instr_t          cur_instr;
  orig_instr_t        tr_orig, sc_orig;
  logic               tr_is_save, tr_is_end;
  logic               sc_drop, sc_rec_we, sc_rec_valid, sc_cur_valid;
  logic [ID_W-1:0]    sc_rec_id, sc_cur_id;
  logic [ADDR_W-1:0]  sc_rec_addr, sc_cur_addr;
  logic [LEN_W-1:0]   sc_rec_len, sc_cur_len;
  logic               acc_valid, acc_ready, busy, switch_evt;
  orig_instr_t        acc_instr;
  logic [TASK_W-1:0]  cur_task;
  logic [NUM_TASKS-1:0] task_done;

  iau_status_pool u_pool (.clk, .rst_n, .cpu_start, .cpu_task, .cpu_addr, .start_ok,
    .st_we, .st_task, .st_state, .st_addr_we, .st_addr,
    .sv_we, .sv_task, .sv_valid, .sv_id, .sv_addr, .sv_len,
    .run_state, .instr_addr, .save_valid, .save_id, .save_addr, .save_len);
  iau_translator u_tr (.vi(cur_instr), .orig(tr_orig), .is_save(tr_is_save), .is_end(tr_is_end));
  iau_save_ctrl u_sc (.vi(cur_instr), .rec_valid(sc_cur_valid), .rec_id(sc_cur_id),
    .rec_addr(sc_cur_addr), .rec_len(sc_cur_len), .orig(sc_orig), .drop(sc_drop),
    .rec_we(sc_rec_we), .rec_valid_n(sc_rec_valid), .rec_id_n(sc_rec_id),
    .rec_addr_n(sc_rec_addr), .rec_len_n(sc_rec_len));
  iau_out_ctrl dut (.*);

  // ---------------------------------------------------------------- instruction memory
  vi_instr_t    mem [512];
  virt_action_e act [512];   // scripted decision for a virtual instruction (not restoring)

  function automatic vi_instr_t mk(vi_op_e op, logic v, int id, int bufa, int ddra, int len);
    vi_instr_t x;
    x.op = op; x.virt = v; x.id = ID_W'(id); x.buf_addr = BUF_W'(bufa);
    x.ddr_addr = ADDR_W'(ddra); x.len = LEN_W'(len);
    return x;
  endfunction

  fifo_entry_t qn[$], qv[$];
  assign n_empty = (qn.size() == 0);
  assign v_empty = (qv.size() == 0);
  assign n_head  = n_empty ? '0 : qn[0];
  assign v_head  = v_empty ? '0 : qv[0];
  always_comb begin
    v_action = VA_DISCARD;
    if (!v_empty) begin
      if (restoring) v_action = (v_head.instr.op == VI_SAVE) ? VA_DISCARD : VA_EXEC;
      else           v_action = act[v_head.iaddr[8:0]];
    end
  end
  // group state as the Virtual Instr FIFO keeps it: set when an executed
  // Vir_SAVE is popped outside the restoring phase, cleared when the group is
  // closed or the FIFOs are flushed
  logic bk_q;
  always @(posedge clk)
    if (!rst_n || fetch_start || fetch_stop || v_grp_close) bk_q <= 1'b0;
    else if (v_pop && !restoring && act[v_head.iaddr[8:0]] == VA_EXEC) bk_q <= 1'b1;
  assign v_grp_backup = bk_q;

  int n_fetch_start = 0, n_fetch_stop = 0;
  always @(posedge clk) if (rst_n) begin
    if (fetch_start || fetch_stop) begin
      qn.delete(); qv.delete();
      if (fetch_start) begin
        n_fetch_start++;
        for (int a = int'(fetch_addr); a < 512; a++) begin
          fifo_entry_t e;
          e.iaddr = IADDR_W'(a); e.instr = mem[a];
          if (mem[a].virt) qv.push_back(e); else qn.push_back(e);
          if (mem[a].op == VI_END) break;
        end
      end else n_fetch_stop++;
    end else begin
      if (n_pop) void'(qn.pop_front());
      if (v_pop) void'(qv.pop_front());
    end
  end

  // ---------------------------------------------------------------- accelerator side
  orig_instr_t got[$];
  always @(negedge clk) acc_ready = ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n && acc_valid && acc_ready) got.push_back(acc_instr);

  int checks = 0, failures = 0;
  int done_cnt [NUM_TASKS];
  int n_switch = 0, n_irq = 0;
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NUM_TASKS; t++) if (task_done[t]) done_cnt[t]++;
    if (switch_evt) n_switch++;
    if (irq_pending) n_irq++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic expect_instr(int k, orig_op_e op, int bufa, int ddra, int len);
    if (k >= got.size()) begin check(0, $sformatf("instruction %0d missing", k)); return; end
    check(got[k].op == op && int'(got[k].buf_addr) == bufa && int'(got[k].ddr_addr) == ddra
          && int'(got[k].len) == len,
          $sformatf("instruction %0d: got %s buf %0d ddr %0d len %0d", k, got[k].op.name(),
                    got[k].buf_addr, got[k].ddr_addr, got[k].len));
  endtask

  task automatic request(int t, int a);
    @(negedge clk);
    cpu_start = 1'b1; cpu_task = TASK_W'(t); cpu_addr = IADDR_W'(a);
    @(negedge clk);
    cpu_start = 1'b0;
  endtask

  initial begin
    cpu_start = 0; cpu_task = '0; cpu_addr = '0; acc_ready = 1'b1;
    foreach (done_cnt[t]) done_cnt[t] = 0;
    foreach (act[a]) act[a] = VA_DISCARD;
    foreach (mem[a]) mem[a] = mk(VI_END, 0, 0, 0, 0, 0);
    // task 2 at 200
    mem[200] = mk(VI_LOAD_D, 0, 0, 0, 1000, 12);
    mem[201] = mk(VI_CALC_F, 0, 0, 0, 0, 4);
    mem[202] = mk(VI_SAVE,   1, 3, 0, 3000, 4);
    mem[203] = mk(VI_LOAD_D, 1, 0, 0, 1000, 12);
    mem[204] = mk(VI_CALC_F, 0, 0, 4, 0, 4);
    mem[205] = mk(VI_SAVE,   0, 3, 0, 3000, 8);
    mem[206] = mk(VI_END,    0, 0, 0, 0, 0);
    // task 2 at 300: a Vir_SAVE without a Vir_LOAD behind it
    mem[300] = mk(VI_LOAD_D, 0, 0, 0, 1000, 12);
    mem[301] = mk(VI_CALC_F, 0, 0, 0, 0, 4);
    mem[302] = mk(VI_SAVE,   1, 5, 0, 3100, 4);
    mem[303] = mk(VI_CALC_F, 0, 0, 4, 0, 4);
    mem[304] = mk(VI_SAVE,   0, 5, 0, 3100, 8);
    mem[305] = mk(VI_END,    0, 0, 0, 0, 0);
    // task 1 at 100
    mem[100] = mk(VI_LOAD_W, 0, 0, 0, 2000, 12);
    mem[101] = mk(VI_END,    0, 0, 0, 0, 0);

    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- A
    request(2, 200);
    wait (done_cnt[2] == 1);
    repeat (10) @(negedge clk);
    check(got.size() == 4, $sformatf("A: %0d instructions", got.size()));
    expect_instr(0, OP_LOAD_D, 0, 1000, 12);
    expect_instr(1, OP_CALC_F, 0, 0, 4);
    expect_instr(2, OP_CALC_F, 4, 0, 4);
    expect_instr(3, OP_SAVE, 0, 3000, 8);
    check(run_state[2] == RS_IDLE && !busy, "A: idle");
    check(n_switch == 0 && n_irq == 0, "A: no interrupt");
    got.delete();

    // ---- B: the scripted decision is "back up and switch"
    act[202] = VA_EXEC;
    act[203] = VA_SWITCH;
    acc_ready = 1'b0;
    request(2, 200);
    request(1, 100);
    wait (n_switch == 1);
    @(negedge clk);
    check(n_irq > 0, "B: irq_pending seen");
    check(run_state[2] == RS_PREEMPTED && instr_addr[2] == 203,
          $sformatf("B: task 2 preempted at its Vir_LOAD: %s %0d", run_state[2].name(), instr_addr[2]));
    check(save_valid[2] && save_id[2] == 3 && save_addr[2] == 3000 && save_len[2] == 4,
          "B: Vir_SAVE recorded");
    wait (done_cnt[2] == 2);
    repeat (10) @(negedge clk);
    check(done_cnt[1] == 1, "B: task 1 done");
    check(got.size() == 7, $sformatf("B: %0d instructions", got.size()));
    expect_instr(0, OP_LOAD_D, 0, 1000, 12);
    expect_instr(1, OP_CALC_F, 0, 0, 4);
    expect_instr(2, OP_SAVE, 0, 3000, 4);       // Vir_SAVE
    expect_instr(3, OP_LOAD_W, 0, 2000, 12);    // task 1
    expect_instr(4, OP_LOAD_D, 0, 1000, 12);    // Vir_LOAD_D on return
    expect_instr(5, OP_CALC_F, 4, 0, 4);
    expect_instr(6, OP_SAVE, 4, 3004, 4);       // modified SAVE
    check(!save_valid[2], "B: record cleared");
    check(n_switch == 1, "B: one switch");
    check(run_state[1] == RS_IDLE && run_state[2] == RS_IDLE && !busy, "B: all idle");
    got.delete();

    // ---- C: a group with a Vir_SAVE and no Vir_LOAD; the switch happens at
    // the next normal instruction, which is where task 2 resumes
    act[302] = VA_EXEC;
    acc_ready = 1'b0;
    request(2, 300);
    request(1, 100);
    wait (n_switch == 2);
    @(negedge clk);
    check(run_state[2] == RS_PREEMPTED && instr_addr[2] == 303,
          $sformatf("C: task 2 preempted at its next CALC_F: %s %0d", run_state[2].name(), instr_addr[2]));
    check(save_valid[2] && save_id[2] == 5 && save_addr[2] == 3100 && save_len[2] == 4,
          "C: Vir_SAVE recorded");
    wait (done_cnt[2] == 3);
    repeat (10) @(negedge clk);
    check(done_cnt[1] == 2, "C: task 1 done");
    check(got.size() == 6, $sformatf("C: %0d instructions", got.size()));
    expect_instr(0, OP_LOAD_D, 0, 1000, 12);
    expect_instr(1, OP_CALC_F, 0, 0, 4);
    expect_instr(2, OP_SAVE, 0, 3100, 4);       // Vir_SAVE
    expect_instr(3, OP_LOAD_W, 0, 2000, 12);    // task 1
    expect_instr(4, OP_CALC_F, 4, 0, 4);
    expect_instr(5, OP_SAVE, 4, 3104, 4);       // modified SAVE
    check(!save_valid[2] && n_switch == 2, "C: record cleared, one more switch");
    check(run_state[1] == RS_IDLE && run_state[2] == RS_IDLE && !busy, "C: all idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
