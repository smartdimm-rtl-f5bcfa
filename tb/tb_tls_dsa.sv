// Unit test of the TLS DSA together with the Config Memory and H-power
// generator that feed it. Record 1 is GCM test case 3 (one 64-byte line);
// records 2 and 3 use random keys, IVs and payloads of 63 and 17 lines,
// sent in a random order. Ciphertext lines are compared with a reference
// AES-CTR, and the XOR of the initial tag and all tag shares must equal the
// GCM tag computed sequentially. Output latency must be 14 cycles.
module tb_tls_dsa;
  import smartdimm_pkg::*;
  import tb_gcm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  // Config Memory with two writers (testbench, H-power generator)
  logic              we    [2];
  logic [PIDX_W-1:0] wpage [2];
  lofs_t             wline [2];
  line_t             wdata [2];
  logic [PIDX_W-1:0] rpage [3];
  lofs_t             rline [3];
  line_t             rdata [3];
  config_memory #(.PAGES(8), .NWR(2), .NRD(3)) u_cfg (.clk, .we_i(we), .wpage_i(wpage),
      .wline_i(wline), .wdata_i(wdata), .rpage_i(rpage), .rline_i(rline), .rdata_o(rdata));

  logic hstart = 0, hfull, hdone, hbusy, hwe;
  logic [PIDX_W-1:0] hpage = '0, hdpage;
  blk_t hh = '0;
  hpow_gen u_h (.clk, .rst_n, .start_i(hstart), .page_i(hpage), .h_i(hh), .req_full_o(hfull),
                .cfg_we_o(hwe), .cfg_page_o(wpage[1]), .cfg_line_o(wline[1]), .cfg_wdata_o(wdata[1]),
                .done_o(hdone), .done_page_o(hdpage), .busy_o(hbusy));
  assign we[1] = hwe;
  logic              twe = 0;
  logic [PIDX_W-1:0] twpage = '0;
  line_t             twdata = '0;
  assign we[0] = twe;
  assign wpage[0] = twpage;
  assign wline[0] = '0;
  assign wdata[0] = twdata;

  logic vi = 0, vo;
  logic [PIDX_W-1:0] pi = '0, po;
  lofs_t li = '0, lo, ki = '0;
  line_t di = '0, cto;
  blk_t  tago;
  tls_dsa dut (.clk, .rst_n, .valid_i(vi), .page_i(pi), .line_i(li), .pow_i(ki), .data_i(di),
               .cfg_rpage_o(rpage), .cfg_rline_o(rline), .cfg_rdata_i(rdata),
               .valid_o(vo), .page_o(po), .line_o(lo), .ct_o(cto), .tag_o(tago));

  // per-record reference state
  line_t exp_ct  [3][64];
  blk_t  acc_tag [3];
  blk_t  exp_tag [3];
  int    t_in    [3][64];
  int    nout = 0, cyc = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (vo) begin
    checks++;
    if (cto !== exp_ct[po][lo] || cyc - t_in[po][lo] != 14) begin
      failures++;
      $display("FAIL page %0d line %0d latency %0d", po, lo, cyc - t_in[po][lo]);
    end
    acc_tag[po] ^= tago;
    nout++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t key [3], h [3], eiv [3];
    logic [95:0] iv [3];
    int nl [3];
    line_t pt [3][64];
    nl[0] = 1; nl[1] = 63; nl[2] = 17;
    key[0] = 128'hfeffe9928665731c6d6a8f9467308308;
    iv[0]  = 96'hcafebabefacedbaddecaf888;
    pt[0][0] = blks_to_line(128'hd9313225f88406e5a55909c5aff5269a, 128'h86a7a9531534f7da2e4c303d8a318a72,
                            128'h1c3c0c95956809532fcf0e2449a6b525, 128'hb16aedf5aa0de657ba637b391aafd255);
    for (int r = 1; r < 3; r++) begin
      key[r] = {$urandom, $urandom, $urandom, $urandom};
      iv[r]  = {$urandom, $urandom, $urandom};
      for (int j = 0; j < nl[r]; j++)
        for (int w = 0; w < 16; w++) pt[r][j][32*w +: 32] = $urandom;
    end
    // references: ciphertext, GHASH in order, tag
    for (int r = 0; r < 3; r++) begin
      blk_t g;
      h[r]   = ref_aes(key[r], '0);
      eiv[r] = ref_aes(key[r], {iv[r], 32'd1});
      g = '0;
      for (int j = 0; j < nl[r]; j++) begin
        blk_t c [4];
        for (int b = 0; b < 4; b++) begin
          c[b] = ref_blk(pt[r][j], b) ^ ref_aes(key[r], {iv[r], 32'(4*j + b + 2)});
          g = ref_gfmul(g ^ c[b], h[r]);
        end
        exp_ct[r][j] = blks_to_line(c[0], c[1], c[2], c[3]);
      end
      g = ref_gfmul(g ^ {64'd0, 64'(nl[r] * 512)}, h[r]);
      exp_tag[r] = g ^ eiv[r];
      acc_tag[r] = eiv[r] ^ ref_gfmul({64'd0, 64'(nl[r] * 512)}, h[r]);
    end
    checks++;
    if (exp_ct[0][0] != blks_to_line(128'h42831ec2217774244b7221b784d0d49c, 128'he3aa212f2c02a4e035c17e2329aca12e,
                                     128'h21d514b25466931c7d8f6a5aac84aa05, 128'h1ba30b396a0aac973d58e091473f5985)
        || exp_tag[0] != 128'h4d5c2af327cd64a62cf35abd2ba6fab4) begin
      failures++;
      $display("FAIL reference model disagrees with GCM test case 3");
    end

    repeat (2) @(negedge clk);
    rst_n = 1;
    // contexts: line 0 by the testbench, powers of H by the generator
    for (int r = 0; r < 3; r++) begin
      cfg_line0_t c0;
      c0 = '0; c0.iv = iv[r]; c0.key = key[r]; c0.lines = 7'(nl[r]);
      c0.tag_init = acc_tag[r];
      @(negedge clk);
      twe = 1; twpage = PIDX_W'(r); twdata = line_t'(c0);
      hstart = 1; hpage = PIDX_W'(r); hh = h[r];
    end
    @(negedge clk);
    twe = 0; hstart = 0;
    wait (!hbusy);
    // send all lines in a random order, with random idle cycles
    begin
      int order [$];
      for (int r = 0; r < 3; r++) for (int j = 0; j < nl[r]; j++) order.push_back(64*r + j);
      order.shuffle();
      foreach (order[i]) begin
        int r, j;
        r = order[i] / 64; j = order[i] % 64;
        @(negedge clk);
        vi = 1; pi = PIDX_W'(r); li = lofs_t'(j); ki = lofs_t'(nl[r] - 1 - j); di = pt[r][j];
        t_in[r][j] = cyc;
        if ($urandom_range(0, 3) == 0) begin @(negedge clk); vi = 0; end
      end
    end
    @(negedge clk);
    vi = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (nout != 81) begin failures++; $display("FAIL %0d outputs", nout); end
    for (int r = 0; r < 3; r++) begin
      checks++;
      if (acc_tag[r] !== exp_tag[r]) begin
        failures++;
        $display("FAIL record %0d tag %h exp %h", r, acc_tag[r], exp_tag[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
