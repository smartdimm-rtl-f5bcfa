// Pipelined AES-128 encryption of NBLK blocks under one key.
//
// Used by the TLS DSA to turn GCM counter blocks into key stream. Every
// cycle a new set of NBLK blocks (and a sideband tag) can enter; results
// leave LATENCY = 11 cycles later in the same order: one stage for the first
// AddRoundKey and one per round, the round key being expanded alongside the
// data in the same pipeline stage. The S-box is a 256-entry table computed
// at elaboration from its definition (multiplicative inverse in GF(2^8)
// followed by the affine map), so no table is typed in.
// Blocks are big-endian: byte 0 of the AES state is bits [127:120].
// The document names AES in counter mode feeding an XOR with the read data;
// the pipeline organisation and the 128-bit key are this design's choices.
module aes128_pipe
  import smartdimm_pkg::*;
#(
  parameter int unsigned NBLK  = 4,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_i,
  input  blk_t             key_i,
  input  blk_t             blk_i  [NBLK],
  input  logic [TAG_W-1:0] tag_i,
  output logic             valid_o,
  output blk_t             blk_o  [NBLK],
  output logic [TAG_W-1:0] tag_o
);
  localparam int unsigned NR = 10;

  // S-box from its definition: inverse through exp/log tables of the
  // generator 3, then the affine map.
  function automatic logic [2047:0] gen_sbox();
    logic [2047:0] t;
    logic [7:0]    ex [256];
    logic [7:0]    lg [256];
    logic [7:0]    v, c;
    c = 8'h63;
    v = 8'h01;
    for (int i = 0; i < 256; i++) lg[i] = 8'h00;
    for (int i = 0; i < 255; i++) begin
      ex[i] = v;
      lg[v] = 8'(i);
      v = v ^ (v[7] ? ((v << 1) ^ 8'h1B) : (v << 1));   // v * 3
    end
    ex[255] = 8'h01;
    for (int x = 0; x < 256; x++) begin
      logic [7:0] b, s;
      b = (x == 0) ? 8'h00 : ex[(255 - int'(lg[x])) % 255];
      for (int i = 0; i < 8; i++)
        s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ c[i];
      t[8*x +: 8] = s;
    end
    return t;
  endfunction

  localparam logic [2047:0] SBOX = gen_sbox();

  function automatic logic [7:0] sb(input logic [7:0] x);
    return SBOX[8*x +: 8];
  endfunction

  function automatic logic [7:0] xt(input logic [7:0] a);
    return a[7] ? ((a << 1) ^ 8'h1B) : (a << 1);
  endfunction

  function automatic blk_t next_key(input blk_t k, input logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t  = {sb(w3[23:16]) ^ rcon, sb(w3[15:8]), sb(w3[7:0]), sb(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // byte i of the state (column-major: row = i%4, column = i/4)
  function automatic blk_t round(input blk_t s, input blk_t rk, input logic last);
    logic [7:0] a [16];
    logic [7:0] b [16];
    blk_t r;
    for (int i = 0; i < 16; i++) a[i] = sb(s[127-8*i -: 8]);
    // ShiftRows
    for (int c = 0; c < 4; c++)
      for (int rr = 0; rr < 4; rr++) b[rr + 4*c] = a[rr + 4*((c + rr) % 4)];
    // MixColumns
    if (!last) begin
      for (int c = 0; c < 4; c++) begin
        logic [7:0] a0, a1, a2, a3;
        a0 = b[4*c]; a1 = b[4*c+1]; a2 = b[4*c+2]; a3 = b[4*c+3];
        b[4*c]   = xt(a0) ^ xt(a1) ^ a1 ^ a2 ^ a3;
        b[4*c+1] = a0 ^ xt(a1) ^ xt(a2) ^ a2 ^ a3;
        b[4*c+2] = a0 ^ a1 ^ xt(a2) ^ xt(a3) ^ a3;
        b[4*c+3] = xt(a0) ^ a0 ^ a1 ^ a2 ^ xt(a3);
      end
    end
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = b[i];
    return r ^ rk;
  endfunction

  localparam logic [7:0] RCON [NR] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10,
                                       8'h20, 8'h40, 8'h80, 8'h1B, 8'h36};

  // stage 0 = after initial AddRoundKey, stage r = after round r
  logic             v_q   [NR+1];
  blk_t             k_q   [NR+1];
  blk_t             s_q   [NR+1][NBLK];
  logic [TAG_W-1:0] t_q   [NR+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r <= NR; r++) v_q[r] <= 1'b0;
    end else begin
      v_q[0] <= valid_i;
      for (int r = 1; r <= NR; r++) v_q[r] <= v_q[r-1];
    end
  end

  always_ff @(posedge clk) begin
    k_q[0] <= key_i;
    t_q[0] <= tag_i;
    for (int b = 0; b < NBLK; b++) s_q[0][b] <= blk_i[b] ^ key_i;
    for (int r = 1; r <= NR; r++) begin
      blk_t rk;
      rk = next_key(k_q[r-1], RCON[r-1]);
      k_q[r] <= rk;
      t_q[r] <= t_q[r-1];
      for (int b = 0; b < NBLK; b++) s_q[r][b] <= round(s_q[r-1][b], rk, r == NR);
    end
  end

  assign valid_o = v_q[NR];
  assign tag_o   = t_q[NR];
  always_comb for (int b = 0; b < NBLK; b++) blk_o[b] = s_q[NR][b];

endmodule
