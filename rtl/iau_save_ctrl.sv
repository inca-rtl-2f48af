// iau_save_ctrl: the SAVE Instr Controller of the IAU.  It handles every SAVE,
// normal or virtual, of the running task and keeps the task's save record in
// the Status Pool (SaveID, Save Addr, Save Length).
//
// * Vir_SAVE (executed only when an interrupt is taken): it is sent to the
//   accelerator as an ordinary SAVE of the results already final on chip, and
//   its DDR address and length are recorded under the SaveID of the normal SAVE
//   that would otherwise write them.  A second Vir_SAVE with the same SaveID
//   whose region follows the recorded one extends the record.
// * Normal SAVE whose ID matches a valid record: the backed-up part is cut off
//   so that no result is written twice.  If the record is a prefix of the SAVE
//   region, address, buffer address and length are advanced past it; if it is
//   a suffix, the length is shortened; if it covers the whole region the SAVE
//   is dropped.  The record is then cleared.  A record that is neither (not
//   produced by the compiler's layout) leaves the SAVE unchanged, which is
//   still correct, only slower.
// * Normal SAVE without a matching record passes unchanged.
// Recording and modifying follow the design; the prefix/suffix rule, the
// extension of a record and dropping a fully covered SAVE are this
// implementation's reading of "modify the address and workload".
// Purely combinational: the output control applies rec_we when it issues.
module iau_save_ctrl
  import inca_pkg::*;
(
  input  vi_instr_t          vi,         // a SAVE (vi.virt: Vir_SAVE)
  input  logic               rec_valid,  // current record of the running task
  input  logic [ID_W-1:0]    rec_id,
  input  logic [ADDR_W-1:0]  rec_addr,
  input  logic [LEN_W-1:0]   rec_len,
  output orig_instr_t        orig,       // SAVE to issue
  output logic               drop,       // nothing left to save: issue nothing
  output logic               rec_we,     // update the record
  output logic               rec_valid_n,
  output logic [ID_W-1:0]    rec_id_n,
  output logic [ADDR_W-1:0]  rec_addr_n,
  output logic [LEN_W-1:0]   rec_len_n
);
  logic              match;
  logic [ADDR_W-1:0] rec_end, vi_end;

  assign match   = rec_valid && (rec_id == vi.id);
  assign rec_end = rec_addr + ADDR_W'(rec_len);
  assign vi_end  = vi.ddr_addr + ADDR_W'(vi.len);

  always_comb begin
    orig          = '0;
    orig.op       = OP_SAVE;
    orig.buf_addr = vi.buf_addr;
    orig.ddr_addr = vi.ddr_addr;
    orig.len      = vi.len;
    drop          = 1'b0;
    rec_we        = 1'b0;
    rec_valid_n   = rec_valid;
    rec_id_n      = rec_id;
    rec_addr_n    = rec_addr;
    rec_len_n     = rec_len;

    if (vi.virt) begin
      rec_we      = 1'b1;
      rec_valid_n = 1'b1;
      if (match && (vi.ddr_addr == rec_end)) begin
        rec_len_n = rec_len + vi.len;
      end else begin
        rec_id_n   = vi.id;
        rec_addr_n = vi.ddr_addr;
        rec_len_n  = vi.len;
      end
    end else if (match) begin
      rec_we      = 1'b1;
      rec_valid_n = 1'b0;
      if (rec_addr == vi.ddr_addr) begin
        if (rec_len >= vi.len) begin
          drop = 1'b1;
        end else begin
          orig.ddr_addr = vi.ddr_addr + ADDR_W'(rec_len);
          orig.buf_addr = vi.buf_addr + BUF_W'(rec_len);
          orig.len      = vi.len - rec_len;
        end
      end else if ((rec_end == vi_end) && (rec_addr > vi.ddr_addr)) begin
        orig.len = vi.len - rec_len;
      end
    end
  end
endmodule
