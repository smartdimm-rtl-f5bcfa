// End-to-end test of the SmartDIMM buffer device at its default sizes.
//
// The testbench plays the host memory controller and the DRAM: it opens rows
// with ACT/PRE (bank = bank field xor row[3:0], the map Addr Remap inverts),
// issues one CAS at a time in slot 0, returns DRAM read data
// (from a sparse DRAM model) two cycles after a rdCAS, and supplies host
// write data two cycles after a wrCAS; whatever the device sends towards the
// DRAM is written into the model. On top of that it runs the CompCpy flow:
//   1. REGISTER and CONTEXT writes to the MMIO page,
//   2. reads of the source page (the copy), in order for one record and in
//      reverse order for a second, 63-line record,
//   3. early reads of the destination page (retried through ALERT_N),
//      early write-backs (ignored), repeated source reads (dropped),
//   4. reads of finished lines and of the tag (served from the Scratchpad),
//   5. write-backs of every destination line (self-recycling), after which
//      DRAM must hold the ciphertext and tag and the page must be free.
// Expected ciphertext and tag come from a separate AES model and a
// sequential GHASH. Every flowchart outcome, the DSA stall and the refused
// registration are counted and must each occur at least once.
`timescale 1ns/1ps
module tb_smartdimm_top;
  import smartdimm_pkg::*;
  import tb_gcm_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  ddr_slot_t   slot [SLOTS];
  ddr_slot_t   slot_o [SLOTS];
  logic        hw_valid = 1'b0, dr_valid = 1'b0;
  line_t       hw_data = '0, dr_data = '0;
  logic        dram_wvalid, host_rvalid, alert_n, ready, tt_err, multi_cas;
  line_t       dram_wdata, host_rdata;
  logic [31:0] act_count [9];
  logic [31:0] pages_freed, dsa_stall, reg_reject, err_ovf, tt_disp;
  logic [PIDX_W:0] free_pages;

  smartdimm_top dut (
    .clk, .rst_n, .slot_i(slot), .slot_o,
    .hw_valid_i(hw_valid), .hw_data_i(hw_data), .dr_valid_i(dr_valid), .dr_data_i(dr_data),
    .dram_wvalid_o(dram_wvalid), .dram_wdata_o(dram_wdata),
    .host_rvalid_o(host_rvalid), .host_rdata_o(host_rdata), .alert_n_o(alert_n),
    .ready_o(ready), .act_count_o(act_count), .pages_freed_o(pages_freed),
    .dsa_stall_o(dsa_stall), .reg_reject_o(reg_reject), .err_dsa_overflow_o(err_ovf),
    .tt_displacements_o(tt_disp), .tt_err_o(tt_err), .multi_cas_o(multi_cas),
    .free_pages_o(free_pages));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- DRAM model and host command helpers ----------------
  line_t        dram [logic [CLA_W-1:0]];
  row_t         open_row [NBANKS];
  bit           is_open  [NBANKS];

  function automatic ddr_slot_t nop();
    ddr_slot_t s;
    s = '0;
    s.cs_n = 1'b1;
    s.act_n = 1'b1;
    return s;
  endfunction

  task automatic cycle_cmd(input ddr_slot_t s0);
    @(negedge clk);
    slot[0] = s0;
    for (int i = 1; i < SLOTS; i++) slot[i] = nop();
    @(negedge clk);
    for (int i = 0; i < SLOTS; i++) slot[i] = nop();
  endtask

  task automatic open_line(input logic [CLA_W-1:0] cla);
    bank_t b;
    row_t  r;
    ddr_slot_t s;
    r = cla[CLA_W-1 -: ROW_W];
    b = cla[LINE_OFS_W+1+BANK_W-1 -: BANK_W] ^ cla[CLA_W-ROW_W +: BANK_W];  // row-XOR bank hash
    if (is_open[b] && open_row[b] == r) return;
    if (is_open[b]) begin
      s = '0; s.act_n = 1'b1; s.bg = b[3:2]; s.ba = b[1:0];
      s.a = 17'b010_0000000000000;             // PRE, A10 = 0
      cycle_cmd(s);
    end
    s = '0; s.act_n = 1'b0; s.bg = b[3:2]; s.ba = b[1:0]; s.a = r;
    cycle_cmd(s);
    open_row[b] = r;
    is_open[b]  = 1'b1;
  endtask

  // one CAS with its data beat; returns the host-side read data and ALERT_N
  task automatic cas(input bit wr, input logic [CLA_W-1:0] cla, input line_t wd,
                     output line_t rd, output bit alerted);
    ddr_slot_t s;
    bank_t b;
    open_line(cla);
    b = cla[LINE_OFS_W+1+BANK_W-1 -: BANK_W] ^ cla[CLA_W-ROW_W +: BANK_W];  // row-XOR bank hash
    s = '0; s.act_n = 1'b1; s.bg = b[3:2]; s.ba = b[1:0];
    s.a = {wr ? 3'b100 : 3'b101, 4'b0, cla[LINE_OFS_W:0], 3'b000};
    @(negedge clk);
    slot[0] = s;
    @(negedge clk);
    slot[0] = nop();
    @(negedge clk);                            // data two cycles after the CAS
    if (wr) begin hw_valid = 1'b1; hw_data = wd; end
    else    begin dr_valid = 1'b1; dr_data = dram.exists(cla) ? dram[cla] : '0; end
    @(negedge clk);
    hw_valid = 1'b0; dr_valid = 1'b0;
    rd = host_rdata;
    alerted = !alert_n && host_rvalid;
    if (wr) begin
      check(dram_wvalid, "write beat forwarded to DRAM");
      dram[cla] = dram_wdata;
    end else begin
      check(host_rvalid, "read beat forwarded to host");
    end
  endtask

  function automatic logic [CLA_W-1:0] cla_of(input ppn_t p, input int line);
    return {p, lofs_t'(line)};
  endfunction

  localparam ppn_t MMIO = ppn_t'(22'h3FFFFC);

  // ---------------- one CompCpy record ----------------
  typedef struct {
    ppn_t  src, dst;
    int    lines;
    b128_t key;
    logic [95:0] iv;
    line_t ct [64];
    b128_t tag;
  } rec_t;

  task automatic make_record(inout rec_t r);
    b128_t h, eiv, x;
    h   = ref_aes(r.key, '0);
    eiv = ref_aes(r.key, {r.iv, 32'd1});
    x   = '0;
    for (int j = 0; j < r.lines; j++) begin
      line_t p;
      p = dram[cla_of(r.src, j)];
      r.ct[j] = p;
      for (int b = 0; b < 4; b++) begin
        b128_t c;
        c = ref_blk(p, b) ^ ref_aes(r.key, {r.iv, 32'(4*j + b + 2)});
        r.ct[j] = ref_put(r.ct[j], b, c);
        x = ref_gfmul(x ^ c, h);               // Horner GHASH
      end
    end
    x = ref_gfmul(x ^ {64'd0, 64'(r.lines * 512)}, h);
    r.tag = x ^ eiv;
  endtask

  task automatic register(input rec_t r, input bit ok_expected);
    mmio_register_t m;
    mmio_context_t  c;
    b128_t h, eiv;
    line_t rd;
    bit    al;
    m = '0;
    m.op = MMIO_REGISTER; m.src = r.src; m.dst = r.dst;
    m.key = r.key; m.iv = r.iv; m.lines = 7'(r.lines);
    cas(1'b1, cla_of(MMIO, 0), line_t'(m), rd, al);
    if (!ok_expected) return;
    h   = ref_aes(r.key, '0);
    eiv = ref_aes(r.key, {r.iv, 32'd1});
    c = '0;
    c.op = MMIO_CONTEXT; c.src = r.src; c.h = h;
    c.tag_init = eiv ^ ref_gfmul({64'd0, 64'(r.lines * 512)}, h);
    cas(1'b1, cla_of(MMIO, 1), line_t'(c), rd, al);
  endtask

  // read a destination line, retrying while ALERT_N is raised
  int retries = 0;
  task automatic read_result(input ppn_t dst, input int line, output line_t rd);
    bit al;
    for (int n = 0; n < 100; n++) begin
      cas(1'b0, cla_of(dst, line), '0, rd, al);
      if (!al) return;
      retries++;
    end
    check(1'b0, "read never completed");
  endtask

  rec_t  r1, r2;
  line_t rd, plain [64];
  bit    al;
  int    cnt0 [9];

  initial begin
    for (int i = 0; i < SLOTS; i++) slot[i] = nop();
    for (int b = 0; b < NBANKS; b++) is_open[b] = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    wait (ready);
    $display("initialised after %0t", $time);

    // sanity of the reference model (FIPS-197 C.1)
    check(ref_aes(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
          == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference AES");

    // status page: all pages free
    cas(1'b0, cla_of(MMIO, 0), '0, rd, al);
    check(rd[15:0] == 16'(SP_PAGES), "free pages after reset");

    // plain DRAM traffic is untouched
    cas(1'b1, 28'h0ABCDE0, {16{32'hA5A55A5A}}, rd, al);
    check(dram[28'h0ABCDE0] == {16{32'hA5A55A5A}}, "regular write reaches DRAM");
    cas(1'b0, 28'h0ABCDE0, '0, rd, al);
    check(rd == {16{32'hA5A55A5A}} && !al, "regular read from DRAM");

    // ---------------- record 1: 8 lines, copied in order ----------------
    r1.src = 22'h001234; r1.dst = 22'h002345; r1.lines = 8;
    r1.key = 128'hfeffe9928665731c6d6a8f9467308308;
    r1.iv  = 96'hcafebabefacedbaddecaf888;
    for (int j = 0; j < r1.lines; j++) begin
      for (int w = 0; w < 16; w++) plain[j][32*w +: 32] = $urandom;
      dram[cla_of(r1.src, j)] = plain[j];
    end
    make_record(r1);

    // registration with zero lines is refused
    begin
      rec_t bad;
      bad = r1; bad.lines = 0; bad.src = 22'h000777;
      register(bad, 1'b0);
      check(reg_reject == 1, "zero-line registration refused");
    end

    register(r1, 1'b1);
    cas(1'b0, cla_of(MMIO, 0), '0, rd, al);
    check(rd[15:0] == 16'(SP_PAGES - 1), "one page in use");

    // destination read cnt0 any computation: plain DRAM data
    dram[cla_of(r1.dst, 0)] = '1;
    cas(1'b0, cla_of(r1.dst, 0), '0, rd, al);
    check(rd == '1 && !al, "destination read cnt0 compute is a DRAM read");
    // destination write-back cnt0 computation: ignored (not recycled)
    cas(1'b1, cla_of(r1.dst, 1), '0, rd, al);

    // the copy: source reads pass plaintext to the host and feed the DSA
    for (int j = 0; j < r1.lines; j++) begin
      cas(1'b0, cla_of(r1.src, j), '0, rd, al);
      check(rd == plain[j], $sformatf("source line %0d to host", j));
    end
    // a second read of a source line is not sent again, nor is a write
    cas(1'b0, cla_of(r1.src, 0), '0, rd, al);
    check(rd == plain[0], "repeated source read still served");
    cas(1'b1, cla_of(r1.src, 2), plain[2], rd, al);
    // write-back of a line whose result is still pending: ignored
    cas(1'b1, cla_of(r1.dst, 3), '0, rd, al);

    // results (the first read is early enough to be retried)
    for (int j = 0; j < r1.lines; j++) begin
      read_result(r1.dst, j, rd);
      check(rd == r1.ct[j], $sformatf("ciphertext line %0d", j));
    end
    read_result(r1.dst, r1.lines, rd);
    check(ref_blk(rd, 0) == r1.tag, "GCM tag of record 1");
    check(retries > 0, "early destination read was retried");

    // pending list shows the page
    cas(1'b0, cla_of(MMIO, 2), '0, rd, al);
    check(rd[31] && rd[PPN_W-1:0] == r1.dst, "pending list entry");

    // write-backs recycle the Scratchpad into DRAM
    for (int j = 0; j <= r1.lines; j++)
      cas(1'b1, cla_of(r1.dst, j), plain[j % 8], rd, al);
    for (int j = 0; j < r1.lines; j++)
      check(dram[cla_of(r1.dst, j)] == r1.ct[j], $sformatf("recycled line %0d in DRAM", j));
    check(ref_blk(dram[cla_of(r1.dst, r1.lines)], 0) == r1.tag, "recycled tag in DRAM");
    repeat (20) @(negedge clk);
    check(pages_freed == 1, "page freed after the last write-back");
    cas(1'b0, cla_of(MMIO, 0), '0, rd, al);
    check(rd[15:0] == 16'(SP_PAGES), "all pages free again");
    cas(1'b0, cla_of(MMIO, 2), '0, rd, al);
    check(!rd[31], "pending list entry cleared");
    // after recycling the destination is an ordinary page again
    for (int a = 0; a < 9; a++) cnt0[a] = act_count[a];
    cas(1'b0, cla_of(r1.dst, 0), '0, rd, al);
    cas(1'b0, cla_of(r1.src, 0), '0, rd, al);
    @(negedge clk);
    check(act_count[ACT_REGULAR] == cnt0[ACT_REGULAR] + 2, "translations removed");
    check(rd == plain[0], "source still readable");

    // ---------------- record 2: 63 lines, copied in reverse order ----------------
    r2.src = 22'h0A0001; r2.dst = 22'h0B0002; r2.lines = 63;
    r2.key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    r2.iv  = 96'h000102030405060708090a0b;
    for (int j = 0; j < r2.lines; j++) begin
      line_t p;
      for (int w = 0; w < 16; w++) p[32*w +: 32] = $urandom;
      dram[cla_of(r2.src, j)] = p;
    end
    make_record(r2);
    register(r2, 1'b1);
    for (int j = r2.lines - 1; j >= 0; j--) cas(1'b0, cla_of(r2.src, j), '0, rd, al);
    for (int j = 0; j < r2.lines; j += 7) begin
      read_result(r2.dst, j, rd);
      check(rd == r2.ct[j], $sformatf("record 2 ciphertext line %0d", j));
    end
    read_result(r2.dst, r2.lines, rd);
    check(ref_blk(rd, 0) == r2.tag, "GCM tag of record 2 (out-of-order copy)");
    for (int j = r2.lines; j >= 0; j--) cas(1'b1, cla_of(r2.dst, j), '0, rd, al);
    check(dram[cla_of(r2.dst, 62)] == r2.ct[62], "record 2 recycled");
    repeat (20) @(negedge clk);
    check(pages_freed == 2, "second page freed");

    // ---------------- every mechanism happened ----------------
    for (int a = 0; a < 9; a++) begin
      check(act_count[a] > 0, $sformatf("flowchart outcome %s seen (%0d)",
                                          cas_action_e'(a), act_count[a]));
      $display("outcome %-14s : %0d", cas_action_e'(a), act_count[a]);
    end
    check(dsa_stall > 0, "DSA waited for its powers of H");
    check(retries > 0, "ALERT_N retry");
    check(err_ovf == 0 && !tt_err && !multi_cas, "no error flags");
    $display("stall cycles %0d, retries %0d, refused %0d, freed %0d",
             dsa_stall, retries, reg_reject, pages_freed);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
