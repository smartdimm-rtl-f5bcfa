// Scratchpad: on-chip staging memory for DSA results.
//
// PAGES pages of 64 lines of 64 bytes (8 MB at the default 2048 pages),
// allocated per 4 KB destination page. The DSA writes result lines through
// the write port; the Arbiter reads them back through two read ports, one to
// answer host reads (S10) and one to replace the data of write-backs (S11).
// Alongside the lines, each page keeps a 128-bit partial authentication tag
// for TLS: it is set to its initial value when the page's context arrives,
// and every processed line XORs its GHASH contribution into it. A read with
// rtag_i set returns the tag as the first 16 bytes of a line (big-endian,
// as a GCM block), the other 48 bytes being zero.
// Reads are synchronous (one cycle); a read of a line written in the same
// cycle returns the old contents.
// Page organisation and the tag kept in the Scratchpad follow the document;
// keeping the tag in its own small array is this design's own choice.
module scratchpad
  import smartdimm_pkg::*;
#(
  parameter int unsigned PAGES = SP_PAGES
) (
  input  logic              clk,
  // result lines
  input  logic              we_i,
  input  logic [PIDX_W-1:0] wpage_i,
  input  lofs_t             wline_i,
  input  line_t             wdata_i,
  // partial tag
  input  logic              tag_init_i,
  input  logic [PIDX_W-1:0] tag_init_page_i,
  input  blk_t              tag_init_val_i,
  input  logic              tag_xor_i,
  input  logic [PIDX_W-1:0] tag_xor_page_i,
  input  blk_t              tag_xor_val_i,
  // read ports (0: host reads, 1: recycling write-backs)
  input  logic [PIDX_W-1:0] rpage_i [2],
  input  lofs_t             rline_i [2],
  input  logic              rtag_i  [2],
  output line_t             rdata_o [2]
);
  localparam int unsigned AW = $clog2(PAGES) + LINE_OFS_W;
  localparam int unsigned PW = $clog2(PAGES);

  line_t mem [PAGES*PAGE_LINES];
  blk_t  tag [PAGES];

  always_ff @(posedge clk) begin
    if (we_i) mem[AW'({wpage_i, wline_i})] <= wdata_i;
    if (tag_init_i) tag[PW'(tag_init_page_i)] <= tag_init_val_i;
    if (tag_xor_i)  tag[PW'(tag_xor_page_i)]  <= tag[PW'(tag_xor_page_i)] ^ tag_xor_val_i;
    for (int r = 0; r < 2; r++)
      rdata_o[r] <= rtag_i[r] ? blks_to_line(tag[PW'(rpage_i[r])], '0, '0, '0)
                              : mem[AW'({rpage_i[r], rline_i[r]})];
  end
endmodule
