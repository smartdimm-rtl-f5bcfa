// Shared types and constants of the SmartDIMM buffer-device logic.
//
// The buffer device runs at one quarter of the DRAM clock, so each of its
// clock cycles carries four DDR4 command slots (slot 0 goes to the DRAM
// first). One 64-byte cacheline (a BL8 burst on the 64-bit channel) moves per
// buffer-device cycle as a 512-bit word. Pages are 4 KB (64 cachelines).
// Scratchpad and Config Memory are both 2048 pages; the Translation Table
// is a 3-ary cuckoo hash of 12288 entries with an 8-entry CAM in front.
//
// The DDR4 field widths (17-bit row, 10-bit column, 2-bit bank group and
// bank) follow the DDR4 standard for a 16 GB rank; the document gives the
// sizes of the Scratchpad, Config Memory, Translation Table, page and line,
// while the field widths, the MMIO command layout and the config-page layout
// are this design's own choices.
package smartdimm_pkg;

  // ---------------- DDR4 geometry ----------------
  localparam int unsigned SLOTS      = 4;    // DDR commands per buffer clock
  localparam int unsigned ROW_W      = 17;
  localparam int unsigned COL_W      = 10;
  localparam int unsigned BG_W       = 2;
  localparam int unsigned BA_W       = 2;
  localparam int unsigned BANK_W     = BG_W + BA_W;
  localparam int unsigned NBANKS     = 1 << BANK_W;  // banks per rank

  // ---------------- Address space ----------------
  localparam int unsigned LINE_W     = 512;  // one cacheline = 64 bytes
  localparam int unsigned LINE_OFS_W = 6;    // 64 lines per 4 KB page
  localparam int unsigned PAGE_LINES = 1 << LINE_OFS_W;
  // cacheline address = {row, bank field, col[9:3]} : 28 bits (16 GB); see addr_remap
  localparam int unsigned CLA_W      = ROW_W + BANK_W + COL_W - 3;
  localparam int unsigned PPN_W      = CLA_W - LINE_OFS_W;     // 22

  // ---------------- On-chip memories ----------------
  localparam int unsigned SP_PAGES   = 2048;   // Scratchpad = Config Memory = 2048 pages (8 MB)
  localparam int unsigned PIDX_W     = 11;     // page index width
  localparam int unsigned TT_ENTRIES = 12288;  // 3-ary cuckoo table, 3x the 4096 live entries
  localparam int unsigned TT_CAM     = 8;      // CAM entries for immediate insertion

  // ---------------- AES-GCM ----------------
  localparam int unsigned BLK_W      = 128;
  localparam int unsigned BLKS_PER_LINE = LINE_W / BLK_W;      // 4

  typedef logic [ROW_W-1:0]      row_t;
  typedef logic [COL_W-1:0]      col_t;
  typedef logic [BANK_W-1:0]     bank_t;   // {bg, ba}
  typedef logic [PPN_W-1:0]      ppn_t;
  typedef logic [LINE_OFS_W-1:0] lofs_t;
  typedef logic [LINE_W-1:0]     line_t;
  typedef logic [BLK_W-1:0]      blk_t;

  // One DDR4 command slot as delivered by the DDR PHY (active-low pins).
  typedef struct packed {
    logic              cs_n;
    logic              act_n;
    logic [BG_W-1:0]   bg;
    logic [BA_W-1:0]   ba;
    logic [ROW_W-1:0]  a;      // A16=RAS_n, A15=CAS_n, A14=WE_n when act_n=1
  } ddr_slot_t;

  typedef enum logic [2:0] {
    CMD_NOP, CMD_ACT, CMD_PRE, CMD_PREA, CMD_RD, CMD_WR
  } ddr_cmd_e;

  typedef struct packed {
    ddr_cmd_e cmd;
    bank_t    bank;
    row_t     row;   // valid for ACT
    col_t     col;   // valid for RD/WR
  } dec_slot_t;

  // Translation Table payload: which on-chip page a physical page maps to.
  typedef struct packed {
    logic        is_cfg;   // 1: Config Memory (source page), 0: Scratchpad (destination page)
    logic [PIDX_W-1:0] idx;      // page index in Config Memory / Scratchpad
  } tt_data_t;

  // Fig. 6 outcome of a CAS command.
  typedef enum logic [3:0] {
    ACT_REGULAR,     // S2: no match, plain DRAM access
    ACT_MMIO_WR,     // S17: MMIO write of registration / context
    ACT_MMIO_RD,     // read of the MMIO status / pending-page list
    ACT_TO_DSA,      // S16: intercept source data and send it to the DSA
    ACT_DROP,        // S18: source line already taken by an offload
    ACT_SP_READ,     // S10: serve the read from the Scratchpad
    ACT_RECYCLE,     // S11: replace write data with Scratchpad data
    ACT_IGNORE_WR,   // S7: write arrives before the result, not recycled
    ACT_RETRY_RD     // S13: result pending, ALERT_N asks for a retry
  } cas_action_e;

  // MMIO command written as one 64-byte line to line 0 of the MMIO page.
  typedef enum logic [1:0] {
    MMIO_NOP      = 2'd0,
    MMIO_REGISTER = 2'd1,   // src page, dst page, lines, key, IV
    MMIO_CONTEXT  = 2'd2    // src page, H, initial tag
  } mmio_op_e;

  // Layout of the two MMIO commands (one 64-byte line each).
  typedef struct packed {
    logic [512-2-2*PPN_W-128-96-7-1:0] pad;
    logic [6:0]   lines;     // cachelines of record payload in the page (1..63)
    logic [95:0]  iv;        // GCM IV (96 bits)
    logic [127:0] key;       // AES-128 key
    ppn_t         dst;       // destination page number (dbuff)
    ppn_t         src;       // source page number (sbuff)
    mmio_op_e     op;
  } mmio_register_t;

  typedef struct packed {
    logic [512-2-PPN_W-256-1:0] pad;
    logic [127:0] tag_init;  // EIV with the length (and AAD) terms folded in by the CPU
    logic [127:0] h;         // hash subkey H = AES_K(0^128), computed by the CPU
    ppn_t         src;
    mmio_op_e     op;
  } mmio_context_t;

  // Config line 0 of a source page.
  typedef struct packed {
    logic [512-7-128-128-96-1:0] pad;
    logic [6:0]   lines;
    logic [127:0] tag_init;
    logic [127:0] key;
    logic [95:0]  iv;
  } cfg_line0_t;

  // Config-page layout (TLS): line 0 = {iv, key, tag_init, lines}
  // line 1 = {H^5, H^4, H^3, H^2}, lines 2..17 = H^(4k), k = 0..63, four per line.
  localparam int unsigned CFG_LINE_KEY  = 0;
  localparam int unsigned CFG_LINE_HLOW = 1;
  localparam int unsigned CFG_LINE_POW0 = 2;

  // GCM counter block for block number n of the record (counter 1 is EIV's).
  function automatic blk_t gcm_ctr(input logic [95:0] iv, input logic [31:0] n);
    return {iv, n + 32'd2};
  endfunction

  // Byte order: byte 0 of a cacheline sits in bits [7:0]; GCM blocks are
  // big-endian, so block b of a line is bytes 16b..16b+15 with byte 16b as MSB.
  function automatic blk_t line_blk(input line_t l, input int unsigned b);
    blk_t r;
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = l[128*b + 8*i +: 8];
    return r;
  endfunction

  function automatic line_t blks_to_line(input blk_t b0, input blk_t b1,
                                         input blk_t b2, input blk_t b3);
    line_t l;
    for (int i = 0; i < 16; i++) begin
      l[  0 + 8*i +: 8] = b0[127-8*i -: 8];
      l[128 + 8*i +: 8] = b1[127-8*i -: 8];
      l[256 + 8*i +: 8] = b2[127-8*i -: 8];
      l[384 + 8*i +: 8] = b3[127-8*i -: 8];
    end
    return l;
  endfunction

endpackage
