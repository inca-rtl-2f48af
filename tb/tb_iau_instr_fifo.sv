// tb_iau_instr_fifo: random push/pop/flush traffic against a queue reference.
// Checks head, empty, full and count every cycle, that an entry pushed is at
// the head one cycle later when the FIFO was empty, and that flush empties it.
module tb_iau_instr_fifo;
  import inca_pkg::*;
  localparam int DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        flush, push, pop, empty, full;
  fifo_entry_t push_entry, head;
  logic [$clog2(DEPTH+1)-1:0] count;

  iau_instr_fifo #(.DEPTH(DEPTH)) dut (.*);

  fifo_entry_t q[$];
  int checks = 0, failures = 0;
  int n_full = 0, n_flush = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    flush = 0; push = 0; pop = 0; push_entry = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // compare state
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      check(int'(count) == q.size(), "count");
      if (q.size() != 0) check(head == q[0], "head");
      if (full) n_full++;
      // drive
      flush = ($urandom_range(0, 99) == 0);
      push  = ($urandom_range(0, 2) != 0) && (q.size() < DEPTH);
      pop   = ($urandom_range(0, 2) == 0) && (q.size() != 0);
      push_entry.iaddr = $urandom();
      push_entry.instr = {$urandom(), $urandom(), $urandom()};
      @(posedge clk);
      #1;
      if (flush) begin q.delete(); n_flush++; end
      else begin
        if (pop) void'(q.pop_front());
        if (push) q.push_back(push_entry);
      end
    end
    check(n_full > 0 && n_flush > 0, "full and flush both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
