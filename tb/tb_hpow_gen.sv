// Unit test of the H-power generator: three random hash subkeys are queued
// back to back; every Config Memory write is checked against powers of H
// computed with the reference GF(2^128) multiply, the writes must cover
// lines 1..17 of the right page, and done_o must name each page in order,
// 67 cycles after the previous one finished.
module tb_hpow_gen;
  import smartdimm_pkg::*;
  import tb_gcm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic start = 0, full, we, done, busy;
  logic [PIDX_W-1:0] page_in = '0, wpage, dpage;
  blk_t h_in = '0;
  lofs_t wline;
  line_t wdata;
  int checks = 0, failures = 0;
  hpow_gen dut (.clk, .rst_n, .start_i(start), .page_i(page_in), .h_i(h_in), .req_full_o(full),
                .cfg_we_o(we), .cfg_page_o(wpage), .cfg_line_o(wline), .cfg_wdata_o(wdata),
                .done_o(done), .done_page_o(dpage), .busy_o(busy));

  blk_t hs [3];
  logic [PIDX_W-1:0] pages [3];
  int cur = 0, nwrites = 0, cyc = 0, last_done = -1;

  function automatic blk_t hpow(input blk_t h, input int n);
    blk_t r;
    r = {1'b1, 127'b0};
    for (int i = 0; i < n; i++) r = ref_gfmul(r, h);
    return r;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n) begin
    if (we) begin
      line_t e;
      if (wline == lofs_t'(CFG_LINE_HLOW))
        e = {hpow(hs[cur], 5), hpow(hs[cur], 4), hpow(hs[cur], 3), hpow(hs[cur], 2)};
      else begin
        int q;
        q = int'(wline) - CFG_LINE_POW0;
        e = {hpow(hs[cur], 4*(4*q+3)), hpow(hs[cur], 4*(4*q+2)),
             hpow(hs[cur], 4*(4*q+1)), hpow(hs[cur], 4*(4*q))};
      end
      checks++;
      if (wpage != pages[cur] || wdata !== e || wline != lofs_t'(1 + nwrites % 17)) begin
        failures++;
        $display("FAIL write page %0d line %0d", wpage, wline);
      end
      nwrites++;
    end
    if (done) begin
      checks++;
      if (dpage != pages[cur] || (last_done >= 0 && cyc - last_done != 68)) begin
        failures++;
        $display("FAIL done page %0d (exp %0d) after %0d cycles", dpage, pages[cur], cyc - last_done);
      end
      last_done = cyc;
      cur++;
    end
  end

  initial begin
    for (int i = 0; i < 3; i++) begin
      hs[i] = {$urandom, $urandom, $urandom, $urandom};
      pages[i] = PIDX_W'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      start = 1; page_in = pages[i]; h_in = hs[i];
    end
    @(negedge clk);
    start = 0;
    wait (!busy);
    repeat (3) @(negedge clk);
    checks++;
    if (cur != 3 || nwrites != 3*17) begin
      failures++;
      $display("FAIL %0d pages done, %0d writes", cur, nwrites);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
