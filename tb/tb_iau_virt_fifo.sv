// tb_iau_virt_fifo: directed scenarios for the virtual-instruction decision.
//   1. no request: a Vir_SAVE/Vir_LOAD group is discarded;
//   2. a request arriving after the group started does not change it;
//   3. request present at the group start: Vir_SAVE executes, Vir_LOAD is the
//      switch point, grp_backup is raised;
//   4. a group holding only a Vir_LOAD (after a SAVE) switches at once;
//   5. restoring: Vir_SAVE discarded, Vir_LOAD executed;
// plus in-order delivery with the instruction address, and flush; then random
// groups against the decision table with the request changing every cycle.
module tb_iau_virt_fifo;
  import inca_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         flush, push, pop, restoring, irq_pending, grp_close, empty, full, grp_backup;
  fifo_entry_t  push_entry, head;
  logic [3:0]   count;
  virt_action_e action;

  iau_virt_fifo #(.DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(vi_op_e op, int addr);
    @(negedge clk);
    push = 1'b1;
    push_entry = '0;
    push_entry.iaddr = IADDR_W'(addr);
    push_entry.instr.op = op;
    push_entry.instr.virt = 1'b1;
    @(negedge clk);
    push = 1'b0;
  endtask

  // look at the head, compare, then pop it (or not, for a switch)
  task automatic take(virt_action_e exp, int addr, bit do_pop, string what);
    @(negedge clk);
    check(!empty, {what, ": not empty"});
    check(int'(head.iaddr) == addr, $sformatf("%s: address %0d", what, head.iaddr));
    check(action == exp, $sformatf("%s: action %s", what, action.name()));
    pop = do_pop;
    @(negedge clk);
    pop = 1'b0;
  endtask

  task automatic close_group();
    @(negedge clk); grp_close = 1'b1; @(negedge clk); grp_close = 1'b0;
  endtask

  // Random groups of 0-2 Vir_SAVEs and 0-2 Vir_LOADs with the request line
  // changing every cycle, some of them while restoring.  Expected action from
  // the decision table, with the request sampled when the group's first
  // instruction is popped; a switch ends the group with a flush.
  task automatic random_groups();
    for (int g = 0; g < 300; g++) begin
      int nsave = int'($urandom_range(2)), nload = int'($urandom_range(2));
      bit rest = ($urandom_range(5) == 0), first = 1'b1, latched = 1'b0, switched = 1'b0;
      string what;
      if (nsave + nload == 0) nload = 1;
      for (int i = 0; i < nsave; i++) put(VI_SAVE, 1000 + 8 * g + i);
      for (int i = 0; i < nload; i++) put(i == 0 ? VI_LOAD_D : VI_LOAD_W, 1000 + 8 * g + nsave + i);
      restoring = rest;
      for (int i = 0; i < nsave + nload && !switched; i++) begin
        bit is_save = (i < nsave), d;
        virt_action_e exp;
        @(negedge clk);
        pop = 1'b0;
        irq_pending = ($urandom_range(1) == 1);
        #1;
        d = first ? irq_pending : latched;
        if (rest)     exp = is_save ? VA_DISCARD : VA_EXEC;
        else if (!d)  exp = VA_DISCARD;
        else          exp = is_save ? VA_EXEC : VA_SWITCH;
        what = $sformatf("group %0d (%0d saves, %0d loads%s) entry %0d", g, nsave, nload,
                         rest ? ", restoring" : "", i);
        check(!empty && int'(head.iaddr) == 1000 + 8 * g + i, {what, ": order"});
        check(action == exp, $sformatf("%s: action %s, expected %s", what, action.name(), exp.name()));
        check(grp_backup == (!rest && !first && latched), {what, ": grp_backup"});
        if (exp == VA_SWITCH) begin
          switched = 1'b1;
        end else begin
          pop = 1'b1;
          if (first && !rest) latched = irq_pending;
          first = 1'b0;
        end
      end
      @(negedge clk);
      pop = 1'b0;
      #1;
      if (switched) begin
        flush = 1'b1; @(negedge clk); flush = 1'b0;
      end else begin
        check(empty, $sformatf("group %0d: drained", g));
        check(grp_backup == (!rest && latched),
              $sformatf("group %0d: switch pending at the next normal instruction", g));
        close_group();
      end
      restoring = 1'b0;
      #1;
      check(empty && !grp_backup, $sformatf("group %0d: closed", g));
    end
  endtask

  initial begin
    {flush, push, pop, restoring, irq_pending, grp_close} = '0;
    push_entry = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1
    put(VI_SAVE, 10); put(VI_LOAD_D, 11);
    take(VA_DISCARD, 10, 1, "1 vir_save");
    take(VA_DISCARD, 11, 1, "1 vir_load");
    check(!grp_backup, "1 no backup");
    close_group();

    // 2
    put(VI_SAVE, 20); put(VI_LOAD_D, 21);
    take(VA_DISCARD, 20, 1, "2 vir_save");
    irq_pending = 1'b1;
    take(VA_DISCARD, 21, 1, "2 late request");
    close_group();

    // 3
    put(VI_SAVE, 30); put(VI_LOAD_D, 31);
    take(VA_EXEC, 30, 1, "3 vir_save");
    irq_pending = 1'b0;  // decision is held for the group
    @(negedge clk);
    check(grp_backup, "3 grp_backup");
    take(VA_SWITCH, 31, 0, "3 vir_load switch");
    @(negedge clk); flush = 1'b1; @(negedge clk); flush = 1'b0;
    check(empty && !grp_backup, "3 flush");

    // 4
    irq_pending = 1'b1;
    put(VI_LOAD_D, 40);
    take(VA_SWITCH, 40, 0, "4 after-SAVE switch");
    @(negedge clk); flush = 1'b1; @(negedge clk); flush = 1'b0;

    // 5
    restoring = 1'b1; irq_pending = 1'b0;
    put(VI_SAVE, 50); put(VI_LOAD_D, 51); put(VI_LOAD_W, 52);
    take(VA_DISCARD, 50, 1, "5 vir_save");
    take(VA_EXEC, 51, 1, "5 vir_load_d");
    take(VA_EXEC, 52, 1, "5 vir_load_w");
    check(empty && !grp_backup, "5 drained");
    restoring = 1'b0;

    random_groups();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
