// Addr Remap: rebuilds the physical cacheline address of a CAS command.
//
// A CAS only carries bank group, bank and column; the row comes from the
// Bank Table. The physical address is needed because a 4 KB OS page cannot
// be recognised from DRAM coordinates alone, so this unit inverts the host
// memory controller's address map. The map assumed here is the common
// row-XOR bank hash: the physical address is
//   cacheline address = {row, bank field, col[9:3]}
// and the controller sends the command to DRAM bank  bank field ^ row[3:0]
// (spreading consecutive rows over all banks to avoid row conflicts).
// The inverse is therefore  bank field = {bg, ba} ^ row[3:0].  With
// BANK_XOR = 0 the map is the plain linear one. col[2:0] is the burst order
// and is 0 for a full BL8 line. A 4 KB page is 64 consecutive columns of
// one row in one bank either way.
// Output: page number (PPN) and line offset within the page.
// Purely combinational.
// Regenerating the address from Bank Table row, BG, BA and column follows
// the document; the address map itself is this design's assumption, and a
// different host map only changes this module.
module addr_remap
  import smartdimm_pkg::*;
#(
  parameter bit BANK_XOR = 1'b1
) (
  input  row_t   row_i,
  input  bank_t  bank_i,
  input  col_t   col_i,
  output ppn_t   ppn_o,
  output lofs_t  line_o
);
  bank_t            bank_field;
  logic [CLA_W-1:0] cla;
  assign bank_field = BANK_XOR ? (bank_i ^ row_i[BANK_W-1:0]) : bank_i;
  assign cla        = {row_i, bank_field, col_i[COL_W-1:3]};
  assign ppn_o      = cla[CLA_W-1:LINE_OFS_W];
  assign line_o     = cla[LINE_OFS_W-1:0];

  // col[2:0] selects the burst start; a cacheline access starts at 0
  logic unused;
  assign unused = ^col_i[2:0];
endmodule
