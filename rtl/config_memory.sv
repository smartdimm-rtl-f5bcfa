// Config Memory: per-source-page context store.
//
// A 64-byte addressable memory of PAGES pages of 64 lines (8 MB at the
// default 2048 pages). Each registered source page owns the page with the
// same index; for TLS it holds the key, IV, initial tag, line count and the
// powers of H (see smartdimm_pkg for the layout). The memory has NWR write
// ports and NRD read ports; reads are synchronous (data one cycle after the
// address). Write port order gives priority: a higher-numbered port wins a
// same-address collision. Multiple read ports model a replicated block RAM.
// Size and 64-byte addressing follow the document; the port counts are this
// design's own.
module config_memory
  import smartdimm_pkg::*;
#(
  parameter int unsigned PAGES = SP_PAGES,
  parameter int unsigned NWR   = 2,
  parameter int unsigned NRD   = 3
) (
  input  logic              clk,
  input  logic              we_i    [NWR],
  input  logic [PIDX_W-1:0] wpage_i [NWR],
  input  lofs_t             wline_i [NWR],
  input  line_t             wdata_i [NWR],
  input  logic [PIDX_W-1:0] rpage_i [NRD],
  input  lofs_t             rline_i [NRD],
  output line_t             rdata_o [NRD]
);
  localparam int unsigned AW = $clog2(PAGES) + LINE_OFS_W;

  line_t mem [PAGES*PAGE_LINES];

  function automatic logic [AW-1:0] addr(input logic [PIDX_W-1:0] p, input lofs_t l);
    return AW'({p, l});
  endfunction

  always_ff @(posedge clk) begin
    for (int w = 0; w < NWR; w++)
      if (we_i[w]) mem[addr(wpage_i[w], wline_i[w])] <= wdata_i[w];
    for (int r = 0; r < NRD; r++)
      rdata_o[r] <= mem[addr(rpage_i[r], rline_i[r])];
  end
endmodule
