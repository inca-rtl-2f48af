// iau_translator: the Other Instr Translator of the IAU.  It turns a VI-ISA
// LOAD_W, LOAD_D, CALC_I or CALC_F, normal or virtual, into the original-ISA
// word the CNN accelerator executes: the opcode is re-encoded, the virtual
// flag and the SaveID are dropped, and the address and length fields are
// carried over.  A Vir_LOAD thus becomes an ordinary LOAD, which is why the
// accelerator needs no knowledge of interrupts.  SAVE instructions go to the
// SAVE controller instead; is_save tells the output control so, and is_end
// marks the END instruction that closes a task (never sent to the
// accelerator).
// Purely combinational.  The two encodings are this implementation's own.
module iau_translator
  import inca_pkg::*;
(
  input  vi_instr_t   vi,
  output orig_instr_t orig,
  output logic        is_save,
  output logic        is_end
);
  always_comb begin
    orig          = '0;
    orig.op       = map_op(vi.op);
    orig.buf_addr = vi.buf_addr;
    orig.ddr_addr = vi.ddr_addr;
    orig.len      = vi.len;
  end

  assign is_save = (vi.op == VI_SAVE);
  assign is_end  = (vi.op == VI_END);
endmodule
