// inca_acc_model: behavioural model of an instruction-driven CNN accelerator
// and of the featuremap/weight DDR it works on, for the testbenches only.
// It is not synthesizable logic and not part of the design.
//
// It accepts one original-ISA instruction at a time (valid/ready) and is then
// busy for a number of cycles that grows with the instruction's length.  The
// arithmetic is a stand-in that keeps the data flow of a real accelerator:
//   LOAD_D   ibuf[buf+i] = ddr[addr+i]
//   LOAD_W   wbuf[buf+i] = ddr[addr+i]
//   CALC_I   acc[buf+i] += ibuf[addr+i] * wbuf[addr+i]      (addr: buffer offset)
//   CALC_F   obuf[buf+i] = acc[buf+i] + ibuf[addr+i]*wbuf[addr+i]; acc cleared
//   SAVE     ddr[addr+i] = obuf[buf+i]
// for i < len.  All tasks share the on-chip buffers, so a task that runs in
// between destroys the inputs and unsaved outputs of an interrupted one.
// DDR starts with the pattern ddr_init(address).  Counters of executed
// instructions and saved words are public.
module inca_acc_model
  import inca_pkg::*;
#(
  parameter int unsigned DDR_WORDS = 65536,
  parameter int unsigned BUF_WORDS = 4096,
  parameter int unsigned CALC_CYC  = 2,     // cycles per CALC word
  parameter int unsigned XFER_CYC  = 1      // cycles per LOAD/SAVE word
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  output logic        ready,
  input  orig_instr_t instr
);
  logic [31:0] ddr  [DDR_WORDS];
  logic [31:0] ibuf [BUF_WORDS];
  logic [31:0] wbuf [BUF_WORDS];
  logic [31:0] obuf [BUF_WORDS];
  logic [31:0] acc  [BUF_WORDS];

  int unsigned busy_cnt;
  int unsigned n_exec [8];
  int unsigned save_words;
  longint unsigned cycle;

  assign ready = (busy_cnt == 0);

  // initial DDR contents, also used by the testbenches to compute results
  function automatic logic [31:0] ddr_init(int unsigned a);
    return 32'(((a * 37) ^ (a >> 3)) & 8'hff);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_cnt   <= 0;
      cycle      <= 0;
      save_words <= 0;
      for (int i = 0; i < 8; i++) n_exec[i] <= 0;
      for (int i = 0; i < int'(DDR_WORDS); i++) ddr[i] <= ddr_init(i);
      for (int i = 0; i < int'(BUF_WORDS); i++) begin
        ibuf[i] <= '0; wbuf[i] <= '0; obuf[i] <= '0; acc[i] <= '0;
      end
    end else begin
      cycle <= cycle + 1;
      if (valid && ready) begin
        n_exec[instr.op] <= n_exec[instr.op] + 1;
        case (instr.op)
          OP_LOAD_D: for (int i = 0; i < int'(instr.len); i++)
                       ibuf[int'(instr.buf_addr) + i] <= ddr[int'(instr.ddr_addr) + i];
          OP_LOAD_W: for (int i = 0; i < int'(instr.len); i++)
                       wbuf[int'(instr.buf_addr) + i] <= ddr[int'(instr.ddr_addr) + i];
          OP_CALC_I: for (int i = 0; i < int'(instr.len); i++)
                       acc[int'(instr.buf_addr) + i] <= acc[int'(instr.buf_addr) + i]
                         + ibuf[int'(instr.ddr_addr) + i] * wbuf[int'(instr.ddr_addr) + i];
          OP_CALC_F: for (int i = 0; i < int'(instr.len); i++) begin
                       obuf[int'(instr.buf_addr) + i] <= acc[int'(instr.buf_addr) + i]
                         + ibuf[int'(instr.ddr_addr) + i] * wbuf[int'(instr.ddr_addr) + i];
                       acc[int'(instr.buf_addr) + i] <= '0;
                     end
          OP_SAVE: begin
                       for (int i = 0; i < int'(instr.len); i++)
                         ddr[int'(instr.ddr_addr) + i] <= obuf[int'(instr.buf_addr) + i];
                       save_words <= save_words + int'(instr.len);
                     end
          default: ;
        endcase
        if (instr.op == OP_CALC_I || instr.op == OP_CALC_F)
          busy_cnt <= 2 + CALC_CYC * int'(instr.len);
        else
          busy_cnt <= 4 + XFER_CYC * int'(instr.len);
      end else if (busy_cnt != 0) begin
        busy_cnt <= busy_cnt - 1;
      end
    end
  end
endmodule
