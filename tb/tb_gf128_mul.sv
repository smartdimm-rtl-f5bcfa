// Unit test of the GF(2^128) multiplier: the first GHASH step of GCM test
// case 2 (C1 * H), the identity element, and random products against the
// bit-serial reference of the GCM specification.
module tb_gf128_mul;
  import smartdimm_pkg::*;
  import tb_gcm_ref_pkg::*;
  blk_t x, y, z;
  int checks = 0, failures = 0;
  gf128_mul dut (.x_i(x), .y_i(y), .z_o(z));
  task automatic expect_z(input blk_t e, input string what);
    #1;
    checks++;
    if (z !== e) begin failures++; $display("FAIL %s: %h exp %h", what, z, e); end
  endtask
  initial begin
    x = 128'h0388dace60b6a392f328c2b971b2fe78; y = 128'h66e94bd4ef8a2c3b884cfa59ca342b2e;
    expect_z(128'h5e2ec746917062882c85b0685353deb7, "GCM test case 2, X1");
    x = {1'b1, 127'b0}; y = 128'h0123456789abcdef0123456789abcdef;
    expect_z(y, "multiplicative identity");
    for (int it = 0; it < 300; it++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom, $urandom};
      expect_z(ref_gfmul(x, y), "random product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
