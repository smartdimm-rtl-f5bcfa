// Unit test of the Scratchpad: random result-line writes and reads on both
// read ports against a reference array, plus the per-page tag: initial
// values, XOR accumulation (also in the same cycle as an init of another
// page) and the tag read format (tag as the first 16 bytes, rest zero).
module tb_scratchpad;
  import smartdimm_pkg::*;
  localparam int P = 4;
  logic clk = 0;
  always #1 clk = ~clk;
  logic we = 0, ti = 0, tx = 0;
  logic [PIDX_W-1:0] wp = '0, tip = '0, txp = '0;
  lofs_t wl = '0;
  line_t wd = '0;
  blk_t tiv = '0, txv = '0;
  logic [PIDX_W-1:0] rp [2];
  lofs_t rl [2];
  logic  rt [2];
  line_t rd [2];
  line_t ref_mem [P*64];
  blk_t  ref_tag [P];
  line_t exp_r [2];
  int checks = 0, failures = 0;
  scratchpad #(.PAGES(P)) dut (.clk, .we_i(we), .wpage_i(wp), .wline_i(wl), .wdata_i(wd),
      .tag_init_i(ti), .tag_init_page_i(tip), .tag_init_val_i(tiv),
      .tag_xor_i(tx), .tag_xor_page_i(txp), .tag_xor_val_i(txv),
      .rpage_i(rp), .rline_i(rl), .rtag_i(rt), .rdata_o(rd));
  function automatic line_t rnd_line();
    line_t l;
    for (int w = 0; w < 16; w++) l[32*w +: 32] = $urandom;
    return l;
  endfunction
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int r = 0; r < 2; r++) begin rp[r] = '0; rl[r] = '0; rt[r] = 0; end
    for (int a = 0; a < P*64; a++) begin
      @(negedge clk);
      we = 1; wp = PIDX_W'(a/64); wl = lofs_t'(a%64); wd = rnd_line(); ref_mem[a] = wd;
      ti = (a < P); tip = PIDX_W'(a); tiv = {$urandom, $urandom, $urandom, $urandom};
      if (a < P) ref_tag[a] = tiv;
    end
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      if (it > 0) for (int r = 0; r < 2; r++) begin
        checks++;
        if (rd[r] !== exp_r[r]) begin failures++; $display("FAIL port %0d it %0d tag=%0d", r, it, rt[r]); end
      end
      for (int r = 0; r < 2; r++) begin
        int a;
        a = $urandom_range(0, P*64-1);
        rp[r] = PIDX_W'(a/64); rl[r] = lofs_t'(a%64); rt[r] = ($urandom_range(0, 3) == 0);
        exp_r[r] = rt[r] ? blks_to_line(ref_tag[a/64], '0, '0, '0) : ref_mem[a];
      end
      we = ($urandom_range(0, 1) == 1);
      begin
        int a;
        a = $urandom_range(0, P*64-1);
        wp = PIDX_W'(a/64); wl = lofs_t'(a%64); wd = rnd_line();
      end
      tx = ($urandom_range(0, 1) == 1); txp = PIDX_W'($urandom_range(0, P-1));
      txv = {$urandom, $urandom, $urandom, $urandom};
      ti = ($urandom_range(0, 7) == 0); tip = PIDX_W'($urandom_range(0, P-1));
      tiv = {$urandom, $urandom, $urandom, $urandom};
      if (ti && tx && tip == txp) tx = 0;      // the Arbiter never does both to one page
      @(posedge clk);
      if (we) ref_mem[{wp[1:0], wl}] = wd;
      if (tx) ref_tag[txp] ^= txv;
      if (ti) ref_tag[tip] = tiv;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
