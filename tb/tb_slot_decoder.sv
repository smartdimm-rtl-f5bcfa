// Unit test of the Slot Decoder: random DDR4 command slots are encoded by
// the testbench from the DDR4 truth table and the decoded command, bank,
// row and column, and the CAS selection of the cycle, are compared.
module tb_slot_decoder;
  import smartdimm_pkg::*;
  ddr_slot_t slot [SLOTS];
  dec_slot_t dec  [SLOTS];
  logic cas_v, cas_wr, multi;
  bank_t cas_bank;
  col_t  cas_col;
  int checks = 0, failures = 0;

  slot_decoder dut (.slot_i(slot), .dec_o(dec), .cas_valid_o(cas_v), .cas_is_wr_o(cas_wr),
                    .cas_bank_o(cas_bank), .cas_col_o(cas_col), .multi_cas_o(multi));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      ddr_cmd_e exp_cmd [SLOTS];
      int ncas, first;
      ncas = 0; first = -1;
      for (int s = 0; s < SLOTS; s++) begin
        int kind;
        kind = $urandom_range(0, 6);
        slot[s].bg = 2'($urandom); slot[s].ba = 2'($urandom); slot[s].a = 17'($urandom);
        slot[s].cs_n = 1'b0; slot[s].act_n = 1'b1;
        case (kind)
          0: begin slot[s].cs_n = 1'b1; exp_cmd[s] = CMD_NOP; end
          1: begin slot[s].act_n = 1'b0; exp_cmd[s] = CMD_ACT; end
          2: begin slot[s].a[16:14] = 3'b010; slot[s].a[10] = 1'b0; exp_cmd[s] = CMD_PRE; end
          3: begin slot[s].a[16:14] = 3'b010; slot[s].a[10] = 1'b1; exp_cmd[s] = CMD_PREA; end
          4: begin slot[s].a[16:14] = 3'b101; exp_cmd[s] = CMD_RD; end
          5: begin slot[s].a[16:14] = 3'b100; exp_cmd[s] = CMD_WR; end
          default: begin slot[s].a[16:14] = 3'b000; exp_cmd[s] = CMD_NOP; end  // MRS
        endcase
        if (kind == 4 || kind == 5) begin
          if (first < 0) first = s;
          ncas++;
        end
      end
      #1;
      for (int s = 0; s < SLOTS; s++) begin
        checks++;
        if (dec[s].cmd != exp_cmd[s] || dec[s].bank != {slot[s].bg, slot[s].ba}
            || (exp_cmd[s] == CMD_ACT && dec[s].row != slot[s].a)
            || ((exp_cmd[s] == CMD_RD || exp_cmd[s] == CMD_WR) && dec[s].col != slot[s].a[9:0])) begin
          failures++;
          $display("FAIL slot %0d: got %s exp %s", s, dec[s].cmd.name(), exp_cmd[s].name());
        end
      end
      checks++;
      if (cas_v != (ncas > 0) || multi != (ncas > 1) ||
          (ncas > 0 && (cas_wr != (exp_cmd[first] == CMD_WR) ||
                        cas_bank != {slot[first].bg, slot[first].ba} ||
                        cas_col != slot[first].a[9:0]))) begin
        failures++;
        $display("FAIL CAS selection");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
