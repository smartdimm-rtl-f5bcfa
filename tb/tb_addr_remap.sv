// Unit test of the Addr Remap: random row/bank/column triples against the
// address arithmetic written out: the host sends physical bank field f to
// DRAM bank f xor (row mod 16), so f = bank xor (row mod 16), and the line
// address is row * 2^11 + f * 2^7 + column / 8.
module tb_addr_remap;
  import smartdimm_pkg::*;
  row_t r; bank_t b; col_t c; ppn_t p; lofs_t l;
  int checks = 0, failures = 0;
  addr_remap dut (.row_i(r), .bank_i(b), .col_i(c), .ppn_o(p), .line_o(l));
  initial begin
    for (int it = 0; it < 5000; it++) begin
      longint unsigned byte_addr, exp_ppn, exp_line;
      r = row_t'($urandom); b = bank_t'($urandom); c = col_t'($urandom) & 10'h3F8;
      #1;
      byte_addr = (longint'(r) * 2048 + longint'((int'(b) ^ (int'(r) % 16))) * 128 + longint'(c) / 8) * 64;
      exp_ppn  = byte_addr / 4096;
      exp_line = (byte_addr % 4096) / 64;
      checks++;
      if (p != ppn_t'(exp_ppn) || l != lofs_t'(exp_line)) begin
        failures++;
        $display("FAIL r=%h b=%h c=%h -> %h/%h exp %h/%h", r, b, c, p, l, exp_ppn, exp_line);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
