// tb_iau_status_pool: CPU requests accepted only for idle entries (and not
// for a nonexistent priority), controller writes of run state and instruction
// address, controller priority over a CPU request in the same cycle, save
// records kept for priorities 1 and 2 only, and a record cleared by a new
// request; then random requests and writes every cycle against a model.
module tb_iau_status_pool;
  import inca_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               cpu_start, start_ok, st_we, st_addr_we, sv_we, sv_valid;
  logic [TASK_W-1:0]  cpu_task, st_task, sv_task;
  logic [IADDR_W-1:0] cpu_addr, st_addr;
  run_state_e         st_state;
  logic [ID_W-1:0]    sv_id;
  logic [ADDR_W-1:0]  sv_addr;
  logic [LEN_W-1:0]   sv_len;
  run_state_e         run_state  [NUM_TASKS];
  logic [IADDR_W-1:0] instr_addr [NUM_TASKS];
  logic               save_valid [NUM_TASKS];
  logic [ID_W-1:0]    save_id    [NUM_TASKS];
  logic [ADDR_W-1:0]  save_addr  [NUM_TASKS];
  logic [LEN_W-1:0]   save_len   [NUM_TASKS];

  iau_status_pool dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle_inputs();
    {cpu_start, st_we, st_addr_we, sv_we, sv_valid} = '0;
    cpu_task = '0; st_task = '0; sv_task = '0; cpu_addr = '0; st_addr = '0;
    st_state = RS_IDLE; sv_id = '0; sv_addr = '0; sv_len = '0;
  endtask

  task automatic cpu(int t, int addr, bit exp_ok, string what);
    @(negedge clk);
    cpu_start = 1'b1; cpu_task = TASK_W'(t); cpu_addr = IADDR_W'(addr);
    #1 check(start_ok == exp_ok, {what, ": start_ok"});
    @(negedge clk);
    cpu_start = 1'b0;
  endtask

  task automatic state_wr(int t, run_state_e s, bit we_addr, int addr);
    @(negedge clk);
    st_we = 1'b1; st_task = TASK_W'(t); st_state = s; st_addr_we = we_addr; st_addr = IADDR_W'(addr);
    @(negedge clk);
    st_we = 1'b0; st_addr_we = 1'b0;
  endtask

  task automatic save_wr(int t, bit v, int id, int a, int l);
    @(negedge clk);
    sv_we = 1'b1; sv_task = TASK_W'(t); sv_valid = v; sv_id = ID_W'(id);
    sv_addr = ADDR_W'(a); sv_len = LEN_W'(l);
    @(negedge clk);
    sv_we = 1'b0;
  endtask

  initial begin
    idle_inputs();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < NUM_TASKS; t++) check(run_state[t] == RS_IDLE && !save_valid[t], "reset");

    cpu(2, 4096, 1, "start task 2");
    check(run_state[2] == RS_READY && instr_addr[2] == 4096, "task 2 ready");
    cpu(2, 8, 0, "second start of busy task 2");
    check(instr_addr[2] == 4096, "address kept");
    cpu(3, 8, 0, "nonexistent priority");

    state_wr(2, RS_RUNNING, 0, 0);
    check(run_state[2] == RS_RUNNING && instr_addr[2] == 4096, "task 2 running");
    save_wr(2, 1, 5, 1234, 16);
    check(save_valid[2] && save_id[2] == 5 && save_addr[2] == 1234 && save_len[2] == 16, "record task 2");
    state_wr(2, RS_PREEMPTED, 1, 4123);
    check(run_state[2] == RS_PREEMPTED && instr_addr[2] == 4123, "task 2 preempted");

    // task 0: no save record
    save_wr(0, 1, 5, 99, 9);
    check(!save_valid[0] && save_len[0] == 0, "no record for priority 0");

    // controller write and CPU start to the same idle entry: controller wins
    @(negedge clk);
    cpu_start = 1'b1; cpu_task = 1; cpu_addr = 777;
    st_we = 1'b1; st_task = 1; st_state = RS_RUNNING; st_addr_we = 1'b1; st_addr = 555;
    #1 check(!start_ok, "conflict: start refused");
    @(negedge clk);
    idle_inputs();
    check(run_state[1] == RS_RUNNING && instr_addr[1] == 555, "conflict: controller wins");

    // a finished task restarts with its record cleared
    save_wr(1, 1, 2, 10, 4);
    state_wr(1, RS_IDLE, 0, 0);
    check(save_valid[1], "record survives until restart");
    cpu(1, 2048, 1, "restart task 1");
    check(run_state[1] == RS_READY && instr_addr[1] == 2048 && !save_valid[1], "restart clears record");
    check(run_state[2] == RS_PREEMPTED && save_valid[2], "task 2 untouched");

    random_traffic();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random CPU requests and controller writes every cycle, against a model
  // of the entries kept in the testbench.
  task automatic random_traffic();
    run_state_e         m_state [NUM_TASKS];
    logic [IADDR_W-1:0] m_addr  [NUM_TASKS];
    logic               m_valid [NUM_TASKS];
    logic [ID_W-1:0]    m_id    [NUM_TASKS];
    logic [ADDR_W-1:0]  m_saddr [NUM_TASKS];
    logic [LEN_W-1:0]   m_len   [NUM_TASKS];
    for (int t = 0; t < NUM_TASKS; t++) begin
      m_state[t] = run_state[t]; m_addr[t] = instr_addr[t]; m_valid[t] = save_valid[t];
      m_id[t] = save_id[t]; m_saddr[t] = save_addr[t]; m_len[t] = save_len[t];
    end
    for (int c = 0; c < 2000; c++) begin
      bit exp_ok;
      @(negedge clk);
      cpu_start  = ($urandom_range(2) == 0);
      cpu_task   = TASK_W'($urandom_range(NUM_TASKS));  // sometimes out of range
      cpu_addr   = IADDR_W'($urandom());
      st_we      = ($urandom_range(2) == 0);
      st_task    = TASK_W'($urandom_range(NUM_TASKS - 1));
      st_state   = run_state_e'($urandom_range(3));
      st_addr_we = ($urandom_range(1) == 1);
      st_addr    = IADDR_W'($urandom());
      sv_we      = ($urandom_range(2) == 0);
      sv_task    = TASK_W'($urandom_range(NUM_TASKS - 1));
      sv_valid   = ($urandom_range(1) == 1);
      sv_id      = ID_W'($urandom());
      sv_addr    = ADDR_W'($urandom());
      sv_len     = LEN_W'($urandom());
      #1;
      exp_ok = cpu_start && int'(cpu_task) < NUM_TASKS && m_state[cpu_task] == RS_IDLE
               && !(st_we && st_task == cpu_task);
      check(start_ok == exp_ok, $sformatf("random cycle %0d: start_ok", c));
      for (int t = 0; t < NUM_TASKS; t++) begin
        if (st_we && int'(st_task) == t) begin
          m_state[t] = st_state;
          if (st_addr_we) m_addr[t] = st_addr;
        end else if (exp_ok && int'(cpu_task) == t) begin
          m_state[t] = RS_READY;
          m_addr[t]  = cpu_addr;
        end
        if (t == 0) continue;
        if (sv_we && int'(sv_task) == t) begin
          m_valid[t] = sv_valid; m_id[t] = sv_id; m_saddr[t] = sv_addr; m_len[t] = sv_len;
        end else if (exp_ok && int'(cpu_task) == t) begin
          m_valid[t] = 1'b0;
        end
      end
      @(posedge clk);
      #1;
      for (int t = 0; t < NUM_TASKS; t++) begin
        check(run_state[t] == m_state[t] && instr_addr[t] == m_addr[t],
              $sformatf("random cycle %0d: entry %0d state/address", c, t));
        check(save_valid[t] == m_valid[t] && (!m_valid[t] ||
              (save_id[t] == m_id[t] && save_addr[t] == m_saddr[t] && save_len[t] == m_len[t])),
              $sformatf("random cycle %0d: entry %0d record", c, t));
      end
    end
    idle_inputs();
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
