// Unit test of the AES-128 pipeline: FIPS-197 appendix C.1, the hash subkey
// and pre-counter block encryption of GCM test case 3, and a stream of
// random blocks (one set per cycle) against a plain AES model; the latency
// must be 11 cycles and the sideband tag must follow its blocks.
module tb_aes128_pipe;
  import smartdimm_pkg::*;
  import tb_gcm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic vi = 0, vo;
  blk_t key, bi [4], bo [4];
  logic [7:0] ti, to;
  int checks = 0, failures = 0;
  aes128_pipe #(.NBLK(4), .TAG_W(8)) dut (.clk, .rst_n, .valid_i(vi), .key_i(key), .blk_i(bi),
                                           .tag_i(ti), .valid_o(vo), .blk_o(bo), .tag_o(to));
  blk_t exp_q [$];
  int   t_in [int];
  int   cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  int seen = 0;
  always @(negedge clk) if (vo) begin
    for (int b = 0; b < 4; b++) begin
      blk_t e;
      e = exp_q.pop_front();
      checks++;
      if (bo[b] !== e) begin failures++; $display("FAIL tag %0d blk %0d: %h exp %h", to, b, bo[b], e); end
    end
    checks++;
    if (cyc - t_in[to] != 11) begin failures++; $display("FAIL latency %0d", cyc - t_in[to]); end
    seen++;
  end

  task automatic send(input blk_t k, input blk_t b0, input blk_t b1, input blk_t b2, input blk_t b3,
                      input blk_t e0, input blk_t e1, input blk_t e2, input blk_t e3, input int tag);
    @(negedge clk);
    vi = 1; key = k; bi[0] = b0; bi[1] = b1; bi[2] = b2; bi[3] = b3; ti = 8'(tag);
    exp_q.push_back(e0); exp_q.push_back(e1); exp_q.push_back(e2); exp_q.push_back(e3);
    t_in[tag] = cyc;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    send(128'h000102030405060708090a0b0c0d0e0f,
         128'h00112233445566778899aabbccddeeff, '0, '0, '0,
         128'h69c4e0d86a7b0430d8cdb78070b4c55a,
         ref_aes(128'h000102030405060708090a0b0c0d0e0f, '0),
         ref_aes(128'h000102030405060708090a0b0c0d0e0f, '0),
         ref_aes(128'h000102030405060708090a0b0c0d0e0f, '0), 0);
    send(128'hfeffe9928665731c6d6a8f9467308308, '0, {96'hcafebabefacedbaddecaf888, 32'd1}, '0, '0,
         128'hb83b533708bf535d0aa6e52980d53b78, 128'h3247184b3c4f69a44dbcd22887bbb418,
         128'hb83b533708bf535d0aa6e52980d53b78, 128'hb83b533708bf535d0aa6e52980d53b78, 1);
    for (int it = 2; it < 40; it++) begin
      blk_t k, b [4];
      k = {$urandom, $urandom, $urandom, $urandom};
      for (int j = 0; j < 4; j++) b[j] = {$urandom, $urandom, $urandom, $urandom};
      send(k, b[0], b[1], b[2], b[3], ref_aes(k, b[0]), ref_aes(k, b[1]), ref_aes(k, b[2]),
           ref_aes(k, b[3]), it);
    end
    @(negedge clk);
    vi = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (seen != 40) begin failures++; $display("FAIL only %0d results", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
