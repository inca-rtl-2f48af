// tb_inca_layers: interrupt response on the layer shapes used to evaluate the
// design (ResNet101, VGG and MobileNet layers A-I, W x H and Ch_in x Ch_out as
// listed with the latency comparison), on the "big" accelerator parallelism
// Para_height = 8, Para_in = 16, Para_out = 16 and on the "small" one 4 / 8 / 8.
//
// For each layer the low-priority task (priority 2) is the layer compiled to
// VI-ISA: per band of Para_height rows a LOAD_D; per output-channel block
// (CalcBlob) a LOAD_W and ceil(Ch_in/Para_in) CALCs; CalcBlobs paired under one
// SAVE with a Vir_SAVE/Vir_LOAD_D after the first, a Vir_LOAD_D after a SAVE
// followed by more blobs of the same band.  The accelerator model is used for
// timing only: a CALC costs time proportional to W, standing for t_instr(W).
// The layer is run once alone to obtain its time (what a layer-by-layer
// interrupt may have to wait), then interrupted at random times by a tiny
// priority-0 task.  Checked: every task finishes; the response latency (request
// to the accelerator taking the priority-0 task's first instruction) is within
// the longest stretch between two interrupt positions (plus the two
// instructions the IAU may be ahead of the accelerator); it is below a
// quarter of the layer time; and the extra time an interrupt adds to the two
// tasks is no more than the restoring LOAD_D plus small fixed costs, since the
// backup SAVE only moves work the later SAVE would have done.  The measured ratio is printed next to the
// reduction ratio Para_out*Para_height/(Ch_out*H) that the analysis predicts.
// Layers whose instruction stream does not fit the instruction memory model
// here are skipped and reported.
module tb_inca_layers;
  import inca_pkg::*;

  localparam int NLAYER = 9;
  localparam int IMEM   = 65536;
  localparam int RUNS   = 3;
  localparam int P0_ADDR = 60000;  // DDR address marking the priority-0 task

  //                       A     B    C    D    E    F    G    H    I
  int lw   [NLAYER] = '{  41, 160, 640,   7,  56, 224,  14,  56, 112};
  int lh   [NLAYER] = '{  31, 120, 480,   7,  56, 224,  14,  56, 112};
  int lcin [NLAYER] = '{1024, 128,   3, 512, 256,  64, 512, 256,  32};
  int lcout[NLAYER] = '{ 256, 128,  64, 512, 256, 128, 512, 256,  32};
  string lname [NLAYER] = '{"A ResNet Conv80", "B ResNet Conv15", "C ResNet Conv1",
                            "D VGG Conv19", "E VGG Conv9", "F VGG Conv2",
                            "G MobileNet Conv21", "H MobileNet Conv7", "I MobileNet Conv2"};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

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
  inca_acc_model #(.CALC_CYC(2), .XFER_CYC(1)) u_acc (.clk, .rst_n, .valid(acc_valid),
                                                     .ready(acc_ready), .instr(acc_instr));

  // instruction memory, fixed latency 3
  vi_instr_t imem [IMEM];
  logic              pv [3];
  logic [IADDR_W-1:0] pa [3];
  assign rd_req_ready  = 1'b1;
  assign rd_resp_valid = pv[2];
  assign rd_resp_data  = imem[pa[2][15:0]];
  always_ff @(posedge clk) begin
    pv[0] <= rst_n && rd_req_valid;
    pa[0] <= rd_req_addr;
    pv[1] <= pv[0]; pa[1] <= pa[0];
    pv[2] <= pv[1]; pa[2] <= pa[1];
  end

  function automatic vi_instr_t mk(vi_op_e op, logic v, int id, int len, int ddra);
    vi_instr_t x = '0;
    x.op = op; x.virt = v; x.id = ID_W'(id); x.len = LEN_W'(len); x.ddr_addr = ADDR_W'(ddra);
    return x;
  endfunction

  function automatic int cdiv(int a, int b); return (a + b - 1) / b; endfunction
  function automatic int c_xfer(int len); return 4 + len;     endfunction
  function automatic int c_calc(int len); return 2 + 2 * len; endfunction

  // compile layer l for parallelism (ph, pi, po) at address 1024; returns length or -1
  function automatic int compile(int l, int ph, int pi, int po);
    int pc = 1024, sid = 0;
    int nin = cdiv(lcin[l], pi), nblob = cdiv(lcout[l], po), nband = cdiv(lh[l], ph);
    int ngrp = cdiv(nblob, 2);
    int w = lw[l];
    if (1024 + nband * (1 + ngrp * (2 * (1 + nin) + 4)) + 8 > IMEM) return -1;
    for (int r = 0; r < nband; r++) begin
      imem[pc++] = mk(VI_LOAD_D, 0, 0, w, 0);
      for (int g = 0; g < ngrp; g++) begin
        int nb = (2 * g + 1 < nblob) ? 2 : 1;
        for (int b = 0; b < nb; b++) begin
          imem[pc++] = mk(VI_LOAD_W, 0, 0, 16, 0);
          for (int k = 0; k < nin; k++)
            imem[pc++] = mk(k == nin - 1 ? VI_CALC_F : VI_CALC_I, 0, 0, w, 0);
          if (b == 0 && nb == 2) begin
            imem[pc++] = mk(VI_SAVE, 1, sid, w, 0);
            imem[pc++] = mk(VI_LOAD_D, 1, 0, w, 0);
          end
        end
        imem[pc++] = mk(VI_SAVE, 0, sid, nb * w, 0);
        sid++;
        if (g < ngrp - 1) imem[pc++] = mk(VI_LOAD_D, 1, 0, w, 0);
      end
    end
    imem[pc++] = mk(VI_END, 0, 0, 0, 0);
    // priority-0 task at 0
    imem[0] = mk(VI_LOAD_D, 0, 0, 8, P0_ADDR);
    imem[1] = mk(VI_LOAD_W, 0, 0, 8, 0);
    imem[2] = mk(VI_CALC_F, 0, 0, 8, 0);
    imem[3] = mk(VI_SAVE,   0, 0, 8, P0_ADDR);
    imem[4] = mk(VI_END,    0, 0, 0, 0);
    return pc - 1024;
  endfunction

  int checks = 0, failures = 0, n_skipped = 0, n_run = 0, n_int = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic request(int t, int a);
    @(negedge clk);
    cpu_start = 1'b1; cpu_task = TASK_W'(t); cpu_addr = IADDR_W'(a);
    @(negedge clk);
    cpu_start = 1'b0;
  endtask

  task automatic reset_dut();
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  endtask

  // run the layer, with a priority-0 request at 'at' (-1: none); returns layer
  // time and the response latency
  task automatic run(int at, output longint t_layer, output longint lat);
    longint t0, treq;
    bit seen0, done2, done0;
    reset_dut();
    t0 = cyc; lat = -1; seen0 = 0; done2 = 0; done0 = (at < 0); treq = 0;
    request(2, 1024);
    fork
      begin
        if (at >= 0) begin
          repeat (at) @(negedge clk);
          request(0, 0);
          treq = cyc - 1;
        end
      end
      begin
        while (!(done2 && done0)) begin
          @(posedge clk);
          if (task_done[2]) done2 = 1;
          if (task_done[0]) done0 = 1;
          if (at >= 0 && !seen0 && acc_valid && acc_ready && acc_instr.op == OP_LOAD_D
              && acc_instr.ddr_addr == ADDR_W'(P0_ADDR)) begin
            seen0 = 1; lat = cyc - treq;
          end
        end
      end
    join
    // until the accelerator has executed the last instruction
    while (acc_valid || !acc_ready) @(posedge clk);
    t_layer = cyc - t0;
    check(task_state[0] == RS_IDLE && task_state[2] == RS_IDLE, "both tasks finished");
  endtask

  // the priority-0 task alone: its share of an interrupted run's time
  task automatic run_p0(output longint t_p0);
    longint t0;
    reset_dut();
    t0 = cyc;
    request(0, 0);
    while (!task_done[0]) @(posedge clk);
    while (acc_valid || !acc_ready) @(posedge clk);
    t_p0 = cyc - t0;
  endtask

  initial begin
    int ph [2] = '{8, 4};
    int pi [2] = '{16, 8};
    int po [2] = '{16, 8};
    string cfg [2] = '{"big", "small"};
    cpu_start = 0; cpu_task = '0; cpu_addr = '0;
    for (int c = 0; c < 2; c++)
      for (int l = 0; l < NLAYER; l++) begin
        int len, nin, bound;
        longint t_layer, t_dummy, lat, max_lat, t_p0, cost, max_cost, cost_bound;
        real r_eq, r_meas;
        len = compile(l, ph[c], pi[c], po[c]);
        if (len < 0) begin
          $display("%-5s %-20s skipped: instruction stream too long for this memory model", cfg[c], lname[l]);
          n_skipped++;
          continue;
        end
        n_run++;
        nin = cdiv(lcin[l], pi[c]);
        // the IAU decides at an interrupt position up to two instructions ahead
        // of the accelerator (one executing, one in the output register): a
        // CALC and a LOAD_W, then the stretch to the next position
        bound = c_calc(lw[l]) + c_xfer(16)
              + c_xfer(16) + nin * c_calc(lw[l]) + c_xfer(2 * lw[l]) + c_xfer(lw[l])
              + c_xfer(16) + nin * c_calc(lw[l]) + c_xfer(lw[l]) + 60;
        run(-1, t_layer, lat);
        run_p0(t_p0);
        // extra time of an interrupted run beyond the layer and the urgent task
        // (both measured until the accelerator is idle): the restoring LOAD_D,
        // the fixed cost of splitting one SAVE in two, and the two switches
        // (refetch of the first instructions)
        cost_bound = c_xfer(lw[l]) + c_xfer(0) + 60;
        max_lat = 0; max_cost = 0;
        for (int k = 0; k < RUNS; k++) begin
          int at;
          at = 10 + int'($urandom() % 32'(t_layer - 20));
          run(at, t_dummy, lat);
          n_int++;
          check(lat > 0, $sformatf("%s %s: priority-0 task started", cfg[c], lname[l]));
          check(lat <= bound, $sformatf("%s %s: latency %0d above bound %0d", cfg[c], lname[l], lat, bound));
          if (lat > max_lat) max_lat = lat;
          cost = t_dummy - t_layer - t_p0;
          check(cost <= cost_bound, $sformatf("%s %s: interrupt cost %0d above bound %0d",
                                             cfg[c], lname[l], cost, cost_bound));
          if (cost > max_cost) max_cost = cost;
        end
        check(max_lat * 4 < t_layer, $sformatf("%s %s: latency %0d not well below layer time %0d",
                                              cfg[c], lname[l], max_lat, t_layer));
        r_eq   = real'(po[c] * ph[c]) / real'(lcout[l] * lh[l]);
        r_meas = real'(max_lat) / real'(t_layer);
        $display("%-5s %-20s instr %6d  layer %8d cyc  worst VI latency %6d cyc (bound %6d)  ratio %.4f  Eq.(1) %.4f  worst extra cost %4d cyc (restore LOAD_D %4d)",
                 cfg[c], lname[l], len, t_layer, max_lat, bound, r_meas, r_eq, max_cost, c_xfer(lw[l]));
      end
    $display("layers run %0d, skipped %0d, interrupts %0d", n_run, n_skipped, n_int);
    check(n_run > 0 && n_int > 0, "workloads exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
