// tb_iau_instr_fetcher: the fetcher against an instruction memory with
// latency and random request stalls, and two FIFOs modelled here as queues
// drained at random.  Checks that every instruction arrives once, in order,
// with its address, in the FIFO its virtual flag selects; that it never
// pushes into a full FIFO; that fetching ends after END; and that a restart in
// the middle of a stream drops every response of the old stream.
module tb_iau_instr_fetcher;
  import inca_pkg::*;
  localparam int DEPTH = 8;
  localparam int LAT   = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               start, stop, rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [IADDR_W-1:0] start_addr, rd_req_addr;
  vi_instr_t          rd_resp_data;
  logic [3:0]         cnt_norm, cnt_virt;
  logic               push_norm, push_virt, flush;
  fifo_entry_t        push_entry;

  iau_instr_fetcher #(.DEPTH(DEPTH), .MAX_OUT(4)) dut (.*);

  // memory: instruction at address a has ddr_addr a, virt on every third, END at 150 and 400
  function automatic vi_instr_t word(int a);
    vi_instr_t x = '0;
    x.op = (a == 150 || a == 400) ? VI_END : VI_CALC_I;
    x.virt = (a % 3 == 1) && (a != 150) && (a != 400);
    if (x.virt) x.op = VI_LOAD_D;
    x.ddr_addr = ADDR_W'(a);
    return x;
  endfunction

  logic              pv [LAT];
  logic [IADDR_W-1:0] pa [LAT];
  assign rd_resp_valid = pv[LAT-1];
  assign rd_resp_data  = word(int'(pa[LAT-1]));
  always_ff @(posedge clk) begin
    pv[0] <= rst_n && rd_req_valid && rd_req_ready;
    pa[0] <= rd_req_addr;
    for (int i = 1; i < LAT; i++) begin pv[i] <= pv[i-1]; pa[i] <= pa[i-1]; end
  end

  fifo_entry_t qn[$], qv[$];
  assign cnt_norm = 4'(qn.size());
  assign cnt_virt = 4'(qv.size());

  int checks = 0, failures = 0;
  int expect_addr, n_got;
  bit ended;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // consume pushes: check order and routing
  always @(posedge clk) if (rst_n) begin
    if (push_norm || push_virt) begin
      check(!(push_norm && push_virt), "one FIFO per instruction");
      check(!ended, "nothing after END");
      check(int'(push_entry.iaddr) == expect_addr && int'(push_entry.instr.ddr_addr) == expect_addr,
            $sformatf("order: got %0d expected %0d", push_entry.iaddr, expect_addr));
      check(push_virt == push_entry.instr.virt, "routing by virtual flag");
      check(push_norm ? qn.size() < DEPTH : qv.size() < DEPTH, "no overflow");
      check(qn.size() + qv.size() < DEPTH, "credit rule");
      if (push_entry.instr.op == VI_END) ended = 1'b1;
      expect_addr++;
      n_got++;
    end
  end
  // drain, and empty the queues on flush (as the real FIFOs do)
  always @(posedge clk) if (rst_n) begin
    if (flush) begin qn.delete(); qv.delete(); end
    else begin
      if (push_norm) qn.push_back(push_entry);
      if (push_virt) qv.push_back(push_entry);
      if (qn.size() != 0 && $urandom_range(0, 3) == 0) void'(qn.pop_front());
      if (qv.size() != 0 && $urandom_range(0, 3) == 0) void'(qv.pop_front());
    end
  end
  always @(negedge clk) rd_req_ready = ($urandom_range(0, 3) != 0);

  task automatic go(int a);
    @(negedge clk);
    start = 1'b1; start_addr = IADDR_W'(a);
    expect_addr = a; ended = 1'b0;
    @(negedge clk);
    start = 1'b0;
  endtask

  initial begin
    start = 0; stop = 0; start_addr = '0; rd_req_ready = 0;
    expect_addr = 0; n_got = 0; ended = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // whole stream 100..150
    go(100);
    repeat (2000) @(negedge clk);
    check(ended && expect_addr == 151, $sformatf("stream ended at %0d", expect_addr));
    check(!rd_req_valid, "idle after END");
    // restart in the middle of a stream, many times
    for (int k = 0; k < 20; k++) begin
      go(300 + 7 * k);
      repeat ($urandom_range(3, 30)) @(negedge clk);
    end
    go(380);
    repeat (2000) @(negedge clk);
    check(ended && expect_addr == 401, $sformatf("second stream ended at %0d", expect_addr));
    // stop idles the fetcher
    go(200);
    repeat (10) @(negedge clk);
    stop = 1'b1; @(negedge clk); stop = 1'b0;
    n_got = 0;
    repeat (50) @(negedge clk);
    check(n_got == 0 && !rd_req_valid, "stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
