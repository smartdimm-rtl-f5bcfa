// Slot Decoder: turns the four DDR4 command slots of one buffer-device clock
// into decoded commands.
//
// The buffer device runs at a quarter of the DRAM clock, so the DDR PHY hands
// over four command slots per cycle; slot 0 is the first one issued to the
// DRAM chips. Each slot is decoded with the DDR4 truth table:
//   CS_n=1                     -> NOP (deselect)
//   ACT_n=0                    -> ACT, row = A[16:0]
//   A16..A14 (RAS/CAS/WE) = 010 -> PRE (A10=1: all banks)
//   101 -> RD,  100 -> WR, column = A[9:0]
// The output is combinational. Besides the per-slot commands, the decoder
// picks out the CAS command of the cycle (there is at most one, since DDR4
// tCCD is at least four DRAM clocks) and reports whether it is a read or a
// write together with its bank and column.
// The slot structure and the ACT/PRE/CAS split come from the document; the
// DDR4 encoding is the standard's.
module slot_decoder
  import smartdimm_pkg::*;
(
  input  ddr_slot_t  slot_i  [SLOTS],
  output dec_slot_t  dec_o   [SLOTS],
  output logic       cas_valid_o,
  output logic       cas_is_wr_o,
  output bank_t      cas_bank_o,
  output col_t       cas_col_o,
  output logic       multi_cas_o     // more than one CAS in a cycle (protocol error)
);

  function automatic dec_slot_t decode(input ddr_slot_t s);
    dec_slot_t d;
    d.cmd  = CMD_NOP;
    d.bank = {s.bg, s.ba};
    d.row  = s.a;
    d.col  = s.a[COL_W-1:0];
    if (!s.cs_n) begin
      if (!s.act_n) d.cmd = CMD_ACT;
      else begin
        unique case (s.a[16:14])
          3'b010:  d.cmd = s.a[10] ? CMD_PREA : CMD_PRE;
          3'b101:  d.cmd = CMD_RD;
          3'b100:  d.cmd = CMD_WR;
          default: d.cmd = CMD_NOP;   // MRS, REF, ZQ, NOP ...
        endcase
      end
    end
    return d;
  endfunction

  always_comb begin
    int unsigned n;
    n           = 0;
    cas_valid_o = 1'b0;
    cas_is_wr_o = 1'b0;
    cas_bank_o  = '0;
    cas_col_o   = '0;
    for (int s = 0; s < SLOTS; s++) begin
      dec_o[s] = decode(slot_i[s]);
      if (dec_o[s].cmd == CMD_RD || dec_o[s].cmd == CMD_WR) begin
        n++;
        if (!cas_valid_o) begin
          cas_valid_o = 1'b1;
          cas_is_wr_o = (dec_o[s].cmd == CMD_WR);
          cas_bank_o  = dec_o[s].bank;
          cas_col_o   = dec_o[s].col;
        end
      end
    end
    multi_cas_o = (n > 1);
  end

endmodule
