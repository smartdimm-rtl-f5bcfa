// GF(2^128) multiplier of AES-GCM (GHASH field).
//
// Computes Z = X * Y in GF(2^128) with the GCM bit order (bit 0 of the field
// element is the MSB of the 128-bit word) and the reduction polynomial
// x^128 + x^7 + x^2 + x + 1. It is the shift-and-add algorithm of the GCM
// specification unrolled into one combinational block: for each bit of X,
// starting at the MSB, add the running multiple V of Y, then multiply V by x
// (shift right, folding the carried bit back with R = 0xE1 || 0^120).
// Purely combinational; callers register around it.
module gf128_mul
  import smartdimm_pkg::*;
(
  input  blk_t x_i,
  input  blk_t y_i,
  output blk_t z_o
);
  localparam blk_t R = {8'hE1, 120'h0};

  always_comb begin
    blk_t v;
    z_o = '0;
    v   = y_i;
    for (int i = 127; i >= 0; i--) begin
      if (x_i[i]) z_o = z_o ^ v;
      v = v[0] ? ((v >> 1) ^ R) : (v >> 1);
    end
  end
endmodule
