// TLS DSA: AES-GCM encryption of one 64-byte source line per cycle.
//
// For line j of a record of L lines held in source page P it produces
//   ciphertext  C_b = P_b xor AES_K(IV || (4j+b+2)),   b = 0..3
//   tag share   T   = (C_0*H^5 + C_1*H^4 + C_2*H^3 + C_3*H^2) * H^(4(L-1-j))
// so that XOR-ing the shares of all L lines into an initial value of
// EIV xor len*H gives the GCM tag whatever order the lines arrive in.
// The key, IV and powers of H are read from the page's Config Memory
// context (three synchronous read ports driven by this unit).
// Pipeline: 1 cycle Config Memory read, 11 cycles AES (the plaintext and
// context ride along as sideband), 1 cycle for the four block products,
// 1 cycle for the stride power: LATENCY = 14, one line per cycle.
// Counter-mode AES, GHASH over ordered powers of H and the partial tag XOR
// follow the document; the split of the power exponent into H^2..H^5 and
// H^(4k) and the folding of the length block are this design's own.
module tls_dsa
  import smartdimm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_i,
  input  logic [PIDX_W-1:0] page_i,
  input  lofs_t             line_i,
  input  lofs_t             pow_i,      // k = L-1-j
  input  line_t             data_i,
  // Config Memory read ports (0: key line, 1: H^2..H^5, 2: H^(4k) line)
  output logic [PIDX_W-1:0] cfg_rpage_o [3],
  output lofs_t             cfg_rline_o [3],
  input  line_t             cfg_rdata_i [3],
  // results
  output logic              valid_o,
  output logic [PIDX_W-1:0] page_o,
  output lofs_t             line_o,
  output line_t             ct_o,
  output blk_t              tag_o
);
  // ---- stage 0: Config Memory read ----
  always_comb begin
    for (int r = 0; r < 3; r++) cfg_rpage_o[r] = page_i;
    cfg_rline_o[0] = lofs_t'(CFG_LINE_KEY);
    cfg_rline_o[1] = lofs_t'(CFG_LINE_HLOW);
    cfg_rline_o[2] = lofs_t'(CFG_LINE_POW0) + lofs_t'(pow_i[5:2]);
  end

  logic              s1_v;
  logic [PIDX_W-1:0] s1_page;
  lofs_t             s1_line;
  logic [1:0]        s1_lane;
  line_t             s1_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_v <= 1'b0;
    else        s1_v <= valid_i;
  end
  always_ff @(posedge clk) begin
    s1_page <= page_i;
    s1_line <= line_i;
    s1_lane <= pow_i[1:0];
    s1_data <= data_i;
  end

  // ---- stage 1..11: AES of the four counter blocks ----
  typedef struct packed {
    logic [PIDX_W-1:0] page;
    lofs_t             line;
    line_t             data;
    line_t             hlow;
    blk_t              hpow;
  } side_t;

  cfg_line0_t c0;
  blk_t       ctr [BLKS_PER_LINE];
  side_t      side_in, side_out;
  blk_t       ks  [BLKS_PER_LINE];
  logic       a_v;

  always_comb begin
    c0 = cfg_line0_t'(cfg_rdata_i[0]);
    for (int b = 0; b < BLKS_PER_LINE; b++)
      ctr[b] = gcm_ctr(c0.iv, 32'(BLKS_PER_LINE * s1_line + b));
    side_in.page = s1_page;
    side_in.line = s1_line;
    side_in.data = s1_data;
    side_in.hlow = cfg_rdata_i[1];
    side_in.hpow = cfg_rdata_i[2][BLK_W*s1_lane +: BLK_W];
  end

  aes128_pipe #(.NBLK(BLKS_PER_LINE), .TAG_W($bits(side_t))) u_aes (
    .clk, .rst_n,
    .valid_i (s1_v),
    .key_i   (c0.key),
    .blk_i   (ctr),
    .tag_i   (side_in),
    .valid_o (a_v),
    .blk_o   (ks),
    .tag_o   (side_out)
  );

  // ---- stage 12: ciphertext and per-block GHASH products ----
  blk_t ct  [BLKS_PER_LINE];
  blk_t hp  [BLKS_PER_LINE];
  blk_t prd [BLKS_PER_LINE];

  for (genvar b = 0; b < BLKS_PER_LINE; b++) begin : g_blk
    assign ct[b] = line_blk(side_out.data, b) ^ ks[b];
    // block b is weighted by H^(5-b): lane 3-b of the H^2..H^5 line
    assign hp[b] = side_out.hlow[BLK_W*(3-b) +: BLK_W];
    gf128_mul u_mul (.x_i(ct[b]), .y_i(hp[b]), .z_o(prd[b]));
  end

  logic              s12_v;
  logic [PIDX_W-1:0] s12_page;
  lofs_t             s12_line;
  line_t             s12_ct;
  blk_t              s12_sum, s12_hpow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s12_v <= 1'b0;
    else        s12_v <= a_v;
  end
  always_ff @(posedge clk) begin
    s12_page <= side_out.page;
    s12_line <= side_out.line;
    s12_ct   <= blks_to_line(ct[0], ct[1], ct[2], ct[3]);
    s12_sum  <= prd[0] ^ prd[1] ^ prd[2] ^ prd[3];
    s12_hpow <= side_out.hpow;
  end

  // ---- stage 13: weight by H^(4k) ----
  blk_t share;
  gf128_mul u_mul_pow (.x_i(s12_sum), .y_i(s12_hpow), .z_o(share));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_o <= 1'b0;
    else        valid_o <= s12_v;
  end
  always_ff @(posedge clk) begin
    page_o <= s12_page;
    line_o <= s12_line;
    ct_o   <= s12_ct;
    tag_o  <= share;
  end

endmodule
