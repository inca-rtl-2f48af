// tb_iau_save_ctrl: directed cases of the SAVE controller, following the
// two-CalcBlob example of the design (one SAVE for two blobs, a Vir_SAVE for
// the first one): a Vir_SAVE is recorded, a second contiguous one extends the
// record, the matching SAVE is cut to the part not yet saved (prefix and
// suffix cases) or dropped when all of it was saved, and a SAVE with another
// ID or without a record passes unchanged.  Expected words are written out by
// hand from the addresses.  Then random regions and splits check that the
// backup and the shortened SAVE together write every word exactly once.
module tb_iau_save_ctrl;
  import inca_pkg::*;

  vi_instr_t         vi;
  logic              rec_valid;
  logic [ID_W-1:0]   rec_id;
  logic [ADDR_W-1:0] rec_addr;
  logic [LEN_W-1:0]  rec_len;
  orig_instr_t       orig;
  logic              drop, rec_we, rec_valid_n;
  logic [ID_W-1:0]   rec_id_n;
  logic [ADDR_W-1:0] rec_addr_n;
  logic [LEN_W-1:0]  rec_len_n;

  iau_save_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apply(logic v, int id, int bufa, int ddra, int len,
                       logic rv, int rid, int ra, int rl);
    vi = '0; vi.op = VI_SAVE; vi.virt = v; vi.id = ID_W'(id);
    vi.buf_addr = BUF_W'(bufa); vi.ddr_addr = ADDR_W'(ddra); vi.len = LEN_W'(len);
    rec_valid = rv; rec_id = ID_W'(rid); rec_addr = ADDR_W'(ra); rec_len = LEN_W'(rl);
    #1;
  endtask

  task automatic expect_out(int bufa, int ddra, int len, logic dr, string what);
    check(orig.op == OP_SAVE, {what, ": opcode"});
    check(drop == dr, {what, ": drop"});
    if (!dr) check(int'(orig.buf_addr) == bufa && int'(orig.ddr_addr) == ddra && int'(orig.len) == len,
                   $sformatf("%s: got buf %0d ddr %0d len %0d", what, orig.buf_addr, orig.ddr_addr, orig.len));
  endtask

  task automatic expect_rec(logic we, logic v, int id, int a, int l, string what);
    check(rec_we == we, {what, ": rec_we"});
    if (we) check(rec_valid_n == v && (!v || (int'(rec_id_n) == id && int'(rec_addr_n) == a && int'(rec_len_n) == l)),
                  $sformatf("%s: record %0d %0d %0d %0d", what, rec_valid_n, rec_id_n, rec_addr_n, rec_len_n));
  endtask

  initial begin
    // Vir_SAVE of blob 1 (words 5000..5015 from buffer 0), no record yet
    apply(1, 7, 0, 5000, 16, 0, 0, 0, 0);
    expect_out(0, 5000, 16, 0, "vir_save new");
    expect_rec(1, 1, 7, 5000, 16, "vir_save new");
    // a stale record of another SAVE is replaced
    apply(1, 7, 0, 5000, 16, 1, 3, 100, 4);
    expect_rec(1, 1, 7, 5000, 16, "vir_save replaces");
    // a second Vir_SAVE right behind it extends the record
    apply(1, 7, 16, 5016, 16, 1, 7, 5000, 16);
    expect_out(16, 5016, 16, 0, "vir_save extend");
    expect_rec(1, 1, 7, 5000, 32, "vir_save extend");
    // normal SAVE for both blobs: only blob 2 remains
    apply(0, 7, 0, 5000, 32, 1, 7, 5000, 16);
    expect_out(16, 5016, 16, 0, "save prefix cut");
    expect_rec(1, 0, 0, 0, 0, "save prefix cut");
    // everything already saved: dropped
    apply(0, 7, 0, 5000, 32, 1, 7, 5000, 32);
    expect_out(0, 0, 0, 1, "save dropped");
    expect_rec(1, 0, 0, 0, 0, "save dropped");
    // backed-up part at the end of the region
    apply(0, 9, 0, 6000, 48, 1, 9, 6032, 16);
    expect_out(0, 6000, 32, 0, "save suffix cut");
    expect_rec(1, 0, 0, 0, 0, "save suffix cut");
    // other ID: unchanged, record kept
    apply(0, 8, 4, 7000, 32, 1, 7, 7000, 16);
    expect_out(4, 7000, 32, 0, "save other id");
    expect_rec(0, 1, 7, 7000, 16, "save other id");
    // no record: unchanged
    apply(0, 7, 4, 7000, 32, 0, 7, 7000, 16);
    expect_out(4, 7000, 32, 0, "save no record");
    expect_rec(0, 0, 0, 0, 0, "save no record");
    random_splits();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random SAVE regions with a backed-up prefix (written by one or two
  // Vir_SAVEs) or suffix.  The record is carried from one instruction to the
  // next as the Status Pool would.  Every word of the region must be written
  // exactly once over the Vir_SAVEs and the normal SAVE, and each SAVE must
  // keep buffer and DDR addresses in step.
  int unsigned hits [];
  task automatic issue(int bufb, int ddrb, int len, string what);
    if (drop) return;
    check(int'(orig.buf_addr) - bufb == int'(orig.ddr_addr) - ddrb,
          $sformatf("%s: buffer/DDR offsets differ", what));
    for (int w = 0; w < int'(orig.len); w++) begin
      int o = int'(orig.ddr_addr) - ddrb + w;
      if (o >= 0 && o < len) hits[o]++;
      else check(0, $sformatf("%s: word %0d outside the region", what, o));
    end
  endtask

  task automatic random_splits();
    for (int t = 0; t < 300; t++) begin
      int len  = 2 + int'($urandom_range(2000));
      int ddrb = int'($urandom_range(1000000));
      int bufb = int'($urandom_range(100000));
      int id   = int'($urandom_range(255));
      int cut  = 1 + int'($urandom_range(len - 1));    // 1..len
      bit suffix = ($urandom_range(1) == 1) && (cut < len);
      bit two    = !suffix && (cut > 1) && ($urandom_range(1) == 1);
      int lo = suffix ? cut : 0, hi = suffix ? len : cut;
      int mid = two ? 1 + int'($urandom_range(hi - 2)) : hi;
      logic rv = 0; int rid = 0, ra = 0, rl = 0;
      string what = $sformatf("split %0d (len %0d, %0d..%0d, %s)", t, len, lo, hi,
                              suffix ? "suffix" : two ? "two vir_saves" : "prefix");
      hits = new[len];
      // Vir_SAVE(s); a stale record of another ID may be present at first
      if ($urandom_range(1) == 1) begin rv = 1; rid = (id + 1) % 256; ra = 12; rl = 3; end
      apply(1, id, bufb + lo, ddrb + lo, mid - lo, rv, rid, ra, rl);
      issue(bufb, ddrb, len, what);
      rv = rec_valid_n; rid = int'(rec_id_n); ra = int'(rec_addr_n); rl = int'(rec_len_n);
      if (two) begin
        apply(1, id, bufb + mid, ddrb + mid, hi - mid, rv, rid, ra, rl);
        issue(bufb, ddrb, len, what);
        rv = rec_valid_n; rid = int'(rec_id_n); ra = int'(rec_addr_n); rl = int'(rec_len_n);
      end
      // the normal SAVE of the whole region
      apply(0, id, bufb, ddrb, len, rv, rid, ra, rl);
      issue(bufb, ddrb, len, what);
      check(rec_we && !rec_valid_n, {what, ": record cleared"});
      check(drop == (lo == 0 && hi == len), {what, ": dropped exactly when all was saved"});
      begin
        int bad = 0;
        foreach (hits[i]) if (hits[i] != 1) bad++;
        check(bad == 0, $sformatf("%s: %0d words not written exactly once", what, bad));
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
