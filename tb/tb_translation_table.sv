// Unit test of the Translation Table on a small table (ENTRIES = 48, so 16
// entries per way) to force cuckoo displacements. A reference map tracks
// the live entries; random insertions (up to about 70% load), removals
// (cookies checked) and lookups run concurrently, and every lookup is
// compared one cycle later with the map (pages under removal are skipped
// until the end). It checks that displacements happen, that no entry is
// lost (err_o stays low), that removed pages miss and live pages still hit.
module tb_translation_table;
  import smartdimm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic lkv = 0, hit, insv = 0, insr, remv = 0, remr, remd, err, busy;
  ppn_t lkp = '0, insp = '0, remp = '0;
  tt_data_t insd = '0, lkd;
  logic [PIDX_W-1:0] remc = '0, remco;
  logic [3:0] camu;
  logic [31:0] disp;
  int checks = 0, failures = 0;
  translation_table #(.ENTRIES(48)) dut (.clk, .rst_n, .lk_valid_i(lkv), .lk_ppn_i(lkp), .lk_hit_o(hit),
      .lk_data_o(lkd), .ins_valid_i(insv), .ins_ppn_i(insp), .ins_data_i(insd), .ins_ready_o(insr),
      .rem_valid_i(remv), .rem_ppn_i(remp), .rem_cookie_i(remc), .rem_ready_o(remr), .rem_done_o(remd),
      .rem_cookie_o(remco), .err_o(err), .busy_o(busy), .cam_used_o(camu), .displacements_o(disp));

  tt_data_t live [ppn_t];     // entries visible to lookups
  ppn_t     keys [$];
  int       pending_rem [int];  // cookie -> page being removed
  bit       removed [ppn_t];    // pages handed to remove (result undefined until done)
  int       nins = 0, nrem = 0, ndone = 0, nhit = 0;
  logic     exp_hit;
  tt_data_t exp_d;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (remd) begin
    checks++;
    if (!pending_rem.exists(int'(remco))) begin failures++; $display("FAIL unexpected cookie %0d", remco); end
    else pending_rem.delete(int'(remco));
    ndone++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    wait (!busy);
    for (int it = 0; it < 6000; it++) begin
      @(negedge clk);
      // check last cycle's lookup
      if (lkv) begin
        checks++;
        if (!removed.exists(lkp) && (hit !== exp_hit || (exp_hit && lkd !== exp_d))) begin
          failures++;
          $display("FAIL lookup %h: hit %0d exp %0d", lkp, hit, exp_hit);
        end
        if (exp_hit && !removed.exists(lkp)) nhit++;
      end
      // new lookup: a live key, a key under removal or a random one
      lkv = 1;
      if (keys.size() > 0 && $urandom_range(0, 2) != 0) lkp = keys[$urandom_range(0, keys.size()-1)];
      else lkp = ppn_t'($urandom);
      exp_hit = live.exists(lkp);
      exp_d   = exp_hit ? live[lkp] : '0;
      // insert or remove
      insv = 0; remv = 0;
      if (keys.size() < 32 && $urandom_range(0, 2) == 0 && insr) begin
        ppn_t k;
        do k = ppn_t'($urandom); while (live.exists(k));
        insv = 1; insp = k; insd = tt_data_t'($urandom);
      end else if (keys.size() > 8 && $urandom_range(0, 4) == 0 && remr) begin
        int i;
        i = $urandom_range(0, keys.size()-1);
        remv = 1; remp = keys[i]; remc = PIDX_W'(nrem);
        pending_rem[nrem] = 1;
        removed[keys[i]] = 1;
        keys.delete(i);
      end
      @(posedge clk);
      // the table reflects changes from the cycle after they are accepted
      if (insv) begin live[insp] = insd; keys.push_back(insp); nins++; end
      if (remv) begin nrem++; end
    end
    @(negedge clk);
    lkv = 0; insv = 0; remv = 0;
    repeat (300) @(negedge clk);
    // every removed page must now miss, every live page hit
    foreach (removed[k]) begin
      lkv = 1; lkp = k;
      @(negedge clk);
      checks++;
      if (hit) begin failures++; $display("FAIL removed page %h still hits", k); end
    end
    foreach (keys[i]) begin
      lkv = 1; lkp = keys[i];
      @(negedge clk);
      checks++;
      if (!hit || lkd !== live[keys[i]]) begin failures++; $display("FAIL live page %h lost", keys[i]); end
    end
    lkv = 0;
    checks++;
    if (err || ndone != nrem || nins < 100 || disp == 0) begin
      failures++;
      $display("FAIL err=%0d done=%0d/%0d ins=%0d disp=%0d", err, ndone, nrem, nins, disp);
    end
    $display("tt: inserts=%0d removes=%0d displacements=%0d hits=%0d", nins, nrem, disp, nhit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
