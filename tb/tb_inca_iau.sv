// tb_inca_iau: end-to-end test of the Instruction Arrangement Unit at its
// default parameters, with a behavioural instruction DDR and a behavioural
// accelerator (inca_acc_model).
//
// Three tasks (priority 0 highest) each run a small convolution-like layer
// compiled into the VI-ISA the way the design prescribes: per row band a
// LOAD_D; per pair of CalcBlobs a LOAD_W and NIN CALCs (CALC_I..., CALC_F) for
// each blob; after the first blob of a pair a Vir_SAVE of that blob and a
// Vir_LOAD_D; one SAVE for the pair; a Vir_LOAD_D after a SAVE that is
// followed by more work on the same band; END.  Trial 0 runs the lowest task
// alone; the other trials request the three tasks at random times, so that
// tasks interrupt each other at both kinds of interrupt position and nest.
//
// Checked per trial: every task completes; every output word in DDR equals the
// value computed here from the input pattern; the accelerator saved exactly
// the output size (no result written twice); no switch ever happens while
// priority 0 runs; and each interrupt's response time, from the request to the
// accelerator taking the first instruction of the new task, stays within the
// longest stretch between two interrupt positions (about two CalcBlobs here)
// instead of a whole layer.  Trial 0 also
// checks that no virtual instruction reaches the accelerator.  Each mechanism
// (skip, backup, restore, SAVE modification, switch after CALC_F, switch after
// SAVE, nested interrupt, request blocked by priority 0, accelerator and DDR
// stalls, stale fetch discarded) must occur at least once.
module tb_inca_iau;
  import inca_pkg::*;

  localparam int P      = 4;    // words per CALC (stands for Para_out x Para_height)
  localparam int NIN    = 3;    // CALCs per CalcBlob (stands for Ch_in / Para_in)
  localparam int TRIALS = 24;
  localparam int RD_LAT = 3;    // instruction DDR latency

  int nb [NUM_TASKS] = '{1, 2, 3};  // row bands per task
  int ng [NUM_TASKS] = '{2, 2, 3};  // SAVE groups per band

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- DUT
  logic                 cpu_start, cpu_start_ok;
  logic [TASK_W-1:0]    cpu_task;
  logic [IADDR_W-1:0]   cpu_addr;
  run_state_e           task_state [NUM_TASKS];
  logic [NUM_TASKS-1:0] task_done;
  logic                 busy, switch_evt;
  logic [TASK_W-1:0]    cur_task;
  logic                 rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [IADDR_W-1:0]   rd_req_addr;
  vi_instr_t            rd_resp_data;
  logic                 acc_valid, acc_ready;
  orig_instr_t          acc_instr;

  inca_iau dut (.*);
  inca_acc_model u_acc (.clk, .rst_n, .valid(acc_valid), .ready(acc_ready), .instr(acc_instr));

  // ---------------------------------------------------------------- instruction DDR
  vi_instr_t imem [4096];
  logic              pipe_v [RD_LAT];
  logic [IADDR_W-1:0] pipe_a [RD_LAT];
  logic [3:0]        lfsr;

  assign rd_req_ready  = lfsr[0] | lfsr[1];
  assign rd_resp_valid = pipe_v[RD_LAT-1];
  assign rd_resp_data  = imem[pipe_a[RD_LAT-1][11:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= 4'h9;
      for (int i = 0; i < RD_LAT; i++) begin pipe_v[i] <= 1'b0; pipe_a[i] <= '0; end
    end else begin
      lfsr      <= {lfsr[2:0], lfsr[3] ^ lfsr[2]};
      pipe_v[0] <= rd_req_valid && rd_req_ready;
      pipe_a[0] <= rd_req_addr;
      for (int i = 1; i < RD_LAT; i++) begin pipe_v[i] <= pipe_v[i-1]; pipe_a[i] <= pipe_a[i-1]; end
    end
  end

  // ---------------------------------------------------------------- programs
  function automatic int prog_base(int t); return 1024 * t;                endfunction
  function automatic int in_base(int t);   return 16384 * t;               endfunction
  function automatic int w_base(int t);    return 16384 * t + 4096;        endfunction
  function automatic int out_base(int t);  return 16384 * t + 8192;        endfunction
  function automatic int out_addr(int t, int r, int g, int b);
    return out_base(t) + ((r * ng[t] + g) * 2 + b) * P;
  endfunction
  function automatic logic [31:0] pat(int a);
    return 32'(((a * 37) ^ (a >> 3)) & 8'hff);
  endfunction

  int prog_len [NUM_TASKS];

  function automatic vi_instr_t mk(vi_op_e op, logic v, int id, int bufa, int ddra, int len);
    vi_instr_t x;
    x.op = op; x.virt = v; x.id = ID_W'(id); x.buf_addr = BUF_W'(bufa);
    x.ddr_addr = ADDR_W'(ddra); x.len = LEN_W'(len);
    return x;
  endfunction

  task automatic compile(int t);
    int pc = prog_base(t);
    int sid = 0;
    for (int r = 0; r < nb[t]; r++) begin
      imem[pc++] = mk(VI_LOAD_D, 0, 0, 0, in_base(t) + r * NIN * P, NIN * P);
      for (int g = 0; g < ng[t]; g++) begin
        for (int b = 0; b < 2; b++) begin
          imem[pc++] = mk(VI_LOAD_W, 0, 0, 0, w_base(t) + (g * 2 + b) * NIN * P, NIN * P);
          for (int k = 0; k < NIN; k++)
            imem[pc++] = mk(k == NIN - 1 ? VI_CALC_F : VI_CALC_I, 0, 0, b * P, k * P, P);
          if (b == 0) begin
            imem[pc++] = mk(VI_SAVE, 1, sid, 0, out_addr(t, r, g, 0), P);
            imem[pc++] = mk(VI_LOAD_D, 1, 0, 0, in_base(t) + r * NIN * P, NIN * P);
          end
        end
        imem[pc++] = mk(VI_SAVE, 0, sid, 0, out_addr(t, r, g, 0), 2 * P);
        sid++;
        if (g < ng[t] - 1)
          imem[pc++] = mk(VI_LOAD_D, 1, 0, 0, in_base(t) + r * NIN * P, NIN * P);
      end
    end
    imem[pc++] = mk(VI_END, 0, 0, 0, 0, 0);
    prog_len[t] = pc - prog_base(t);
  endtask

  function automatic logic [31:0] expected(int t, int r, int g, int b, int i);
    logic [31:0] s = '0;
    for (int k = 0; k < NIN; k++)
      s += pat(in_base(t) + r * NIN * P + k * P + i)
         * pat(w_base(t) + (g * 2 + b) * NIN * P + k * P + i);
    return s;
  endfunction

  // accelerator cycles, as the model spends them
  function automatic int c_xfer(int len); return 4 + len;     endfunction
  function automatic int c_calc(int len); return 2 + 2 * len; endfunction

  // ---------------------------------------------------------------- bookkeeping
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // mechanism counters
  int n_skip, n_vsave, n_vload, n_modsave, n_sw_calc, n_sw_save, n_nested,
      n_blocked, n_acc_stall, n_ddr_stall, n_stale, n_switch, n_resume;
  vi_op_e last_norm_op;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_out.v_pop && dut.u_out.v_action == VA_DISCARD) n_skip++;
    if (dut.u_out.v_pop && dut.u_out.v_action == VA_EXEC) begin
      if (dut.cur_instr.op == VI_SAVE) n_vsave++; else n_vload++;
    end
    if (dut.u_out.n_pop) begin
      last_norm_op = dut.cur_instr.op;
      if (dut.tr_is_save && dut.sc_rec_we) n_modsave++;
    end
    if (dut.u_out.fetch_start && task_state[dut.u_out.pick_task] == RS_PREEMPTED) n_resume++;
    if (switch_evt) begin
      n_switch++;
      if (last_norm_op == VI_CALC_F) n_sw_calc++;
      if (last_norm_op == VI_SAVE)   n_sw_save++;
      for (int t = 0; t < NUM_TASKS; t++)
        if (task_state[t] == RS_PREEMPTED) n_nested++;
      check(cur_task != 0, "priority 0 task was switched out");
    end
    if (busy && cur_task == 0 && (task_state[1] == RS_READY || task_state[2] == RS_READY)) n_blocked++;
    if (acc_valid && !acc_ready) n_acc_stall++;
    if (rd_req_valid && !rd_req_ready) n_ddr_stall++;
    if (rd_resp_valid && (dut.u_fetch.drop_q != 0 || dut.u_fetch.end_seen_q)) n_stale++;
  end

  // ---------------------------------------------------------------- response latency
  longint req_cyc [NUM_TASKS];
  bit     lat_armed [NUM_TASKS];
  int     max_lat = 0, worst_bound, layer_cyc;

  always @(posedge clk) if (rst_n) begin
    if (acc_valid && acc_ready && acc_instr.op == OP_LOAD_D) begin
      for (int t = 0; t < NUM_TASKS; t++)
        if (lat_armed[t] && acc_instr.ddr_addr == ADDR_W'(in_base(t))) begin
          lat_armed[t] = 1'b0;
          if (int'(cyc - req_cyc[t]) > max_lat) max_lat = int'(cyc - req_cyc[t]);
          check(cyc - req_cyc[t] <= longint'(worst_bound), "interrupt response latency");
        end
    end
  end

  // ---------------------------------------------------------------- trials
  task automatic request(int t);
    @(negedge clk);
    cpu_start = 1'b1; cpu_task = TASK_W'(t); cpu_addr = IADDR_W'(prog_base(t));
    @(posedge clk);
    check(cpu_start_ok, "start request accepted");
    // an interrupt: a lower-priority task owns the accelerator.  A request of
    // higher priority makes a waiting lower one wait for a whole task: no
    // longer a measure of the interrupt response.
    lat_armed[t] = busy && cur_task > TASK_W'(t);
    for (int u = t + 1; u < NUM_TASKS; u++) lat_armed[u] = 1'b0;
    req_cyc[t]   = cyc;
    @(negedge clk);
    cpu_start = 1'b0;
  endtask

  task automatic run_trial(int trial);
    int delay [NUM_TASKS];
    bit used [NUM_TASKS];
    int done_cnt, n_used, words, cnt_save0;
    bit done_seen [NUM_TASKS];

    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NUM_TASKS; t++) begin
      used[t] = (trial == 0) ? (t == 2) : 1'b1;
      delay[t] = (trial == 0 || t == 2) ? 0 : int'($urandom_range(0, 1200));
      done_seen[t] = 1'b0;
      lat_armed[t] = 1'b0;
    end
    if (trial % 4 == 3) delay[2] = int'($urandom_range(0, 300));  // priority 0 may start first
    n_used = 0;
    foreach (used[t]) if (used[t]) n_used++;

    fork
      begin
        for (int step = 0; step <= 1500; step++) begin
          for (int t = 0; t < NUM_TASKS; t++)
            if (used[t] && delay[t] == step) request(t);
          @(negedge clk);
        end
      end
      begin
        done_cnt = 0;
        while (done_cnt < n_used) begin
          @(posedge clk);
          for (int t = 0; t < NUM_TASKS; t++)
            if (task_done[t] && !done_seen[t]) begin done_seen[t] = 1'b1; done_cnt++; end
        end
      end
    join

    // let the accelerator finish the last instruction
    while (busy || acc_valid || !acc_ready) @(posedge clk);
    repeat (2) @(posedge clk);

    words = 0;
    for (int t = 0; t < NUM_TASKS; t++) begin
      check(task_state[t] == RS_IDLE, "task back to idle");
      if (!used[t]) continue;
      words += nb[t] * ng[t] * 2 * P;
      for (int r = 0; r < nb[t]; r++)
        for (int g = 0; g < ng[t]; g++)
          for (int b = 0; b < 2; b++)
            for (int i = 0; i < P; i++) begin
              logic [31:0] got, exp;
              got = u_acc.ddr[out_addr(t, r, g, b) + i];
              exp = expected(t, r, g, b, i);
              check(got == exp, $sformatf("trial %0d task %0d out[%0d][%0d][%0d][%0d] got %0d exp %0d",
                                          trial, t, r, g, b, i, got, exp));
            end
    end
    check(u_acc.save_words == words,
          $sformatf("saved words %0d, output size %0d", u_acc.save_words, words));
    if (trial == 0) begin
      cnt_save0 = nb[2] * ng[2];
      check(u_acc.n_exec[OP_SAVE] == cnt_save0, "no virtual SAVE without interrupt");
      check(u_acc.n_exec[OP_LOAD_D] == nb[2], "no virtual LOAD without interrupt");
      check(u_acc.n_exec[OP_CALC_F] == nb[2] * ng[2] * 2, "CALC_F count");
      check(u_acc.n_exec[OP_CALC_I] == nb[2] * ng[2] * 2 * (NIN - 1), "CALC_I count");
      check(u_acc.n_exec[OP_LOAD_W] == nb[2] * ng[2] * 2, "LOAD_W count");
    end
  endtask

  initial begin
    cpu_start = 1'b0; cpu_task = '0; cpu_addr = '0;
    {n_skip, n_vsave, n_vload, n_modsave, n_sw_calc, n_sw_save, n_nested} = '0;
    {n_blocked, n_acc_stall, n_ddr_stall, n_stale, n_switch, n_resume} = '0;
    last_norm_op = VI_END;
    for (int t = 0; t < NUM_TASKS; t++) compile(t);
    // worst stretch between two interrupt positions: from just after the
    // position behind a band's last first blob, over the second blob, the
    // SAVE, the next band's LOAD_D and its first blob; then the backup SAVE,
    // refetch and slack; plus the CALC and LOAD_W the IAU may have issued
    // ahead of the accelerator when it passed the position before
    worst_bound = c_calc(P) + c_xfer(NIN * P)
                + c_xfer(NIN * P) + NIN * c_calc(P) + c_xfer(2 * P)
                + c_xfer(NIN * P) + c_xfer(NIN * P) + NIN * c_calc(P)
                + c_xfer(P) + 40;
    layer_cyc = 0;
    for (int r = 0; r < nb[2]; r++)
      layer_cyc += c_xfer(NIN * P) + ng[2] * (2 * (c_xfer(NIN * P) + NIN * c_calc(P)) + c_xfer(2 * P));

    for (int trial = 0; trial < TRIALS; trial++) run_trial(trial);

    $display("latency: worst measured %0d cycles, bound %0d, whole low-priority layer %0d",
             max_lat, worst_bound, layer_cyc);
    $display("mechanisms: skip=%0d vir_save=%0d vir_load=%0d modified_save=%0d switch=%0d",
             n_skip, n_vsave, n_vload, n_modsave, n_switch);
    $display("            after_calc_f=%0d after_save=%0d nested=%0d resume=%0d blocked_by_p0=%0d",
             n_sw_calc, n_sw_save, n_nested, n_resume, n_blocked);
    $display("            acc_stall=%0d ddr_stall=%0d stale_fetch=%0d",
             n_acc_stall, n_ddr_stall, n_stale);
    check(n_skip > 0, "virtual instructions skipped");
    check(n_vsave > 0, "Vir_SAVE executed");
    check(n_vload > 0, "Vir_LOAD executed");
    check(n_modsave > 0, "normal SAVE modified");
    check(n_sw_calc > 0, "switch after CALC_F");
    check(n_sw_save > 0, "switch after SAVE");
    check(n_nested > 0, "nested interrupt");
    check(n_resume > 0, "preempted task resumed");
    check(n_blocked > 0, "lower request waits behind priority 0");
    check(n_acc_stall > 0, "accelerator back-pressure");
    check(n_ddr_stall > 0, "DDR request stall");
    check(n_stale > 0, "fetch responses discarded (stale or past END)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
