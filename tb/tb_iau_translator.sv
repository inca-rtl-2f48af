// tb_iau_translator: every VI-ISA operation, virtual or not, with random
// fields.  The original-ISA opcode is checked against a table written here,
// the address and length fields must pass unchanged, and is_save/is_end must
// flag exactly SAVE and END.
module tb_iau_translator;
  import inca_pkg::*;

  vi_instr_t   vi;
  orig_instr_t orig;
  logic        is_save, is_end;

  iau_translator dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    vi_op_e ops [6] = '{VI_LOAD_W, VI_LOAD_D, VI_CALC_I, VI_CALC_F, VI_SAVE, VI_END};
    logic [2:0] exp_code [6] = '{3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd5};
    for (int n = 0; n < 200; n++) begin
      int k = n % 6;
      vi.op = ops[k];
      vi.virt = 1'($urandom());
      vi.id = ID_W'($urandom());
      vi.buf_addr = BUF_W'($urandom());
      vi.ddr_addr = $urandom();
      vi.len = LEN_W'($urandom());
      #1;
      if (k < 4) check(3'(orig.op) == exp_code[k], $sformatf("opcode of %s", vi.op.name()));
      check(orig.buf_addr == vi.buf_addr && orig.ddr_addr == vi.ddr_addr && orig.len == vi.len,
            "fields carried");
      check(is_save == (k == 4), "is_save");
      check(is_end == (k == 5), "is_end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
