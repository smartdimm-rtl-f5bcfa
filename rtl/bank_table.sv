// Bank Table: remembers the open row of every bank of the rank.
//
// One entry per bank (16 for a DDR4 x4/x8 rank: 4 bank groups x 4 banks).
// An ACT records its row in the entry of its bank, a PRE closes the bank and
// PREA closes all banks. The four decoded slots of a cycle are applied in
// slot order at the clock edge. The read port is combinational and shows the
// table as it was before this cycle's slots; a CAS never needs a row opened
// in the same cycle because tRCD spans several buffer-device clocks.
// Reset closes every bank. Entries and update rule follow the document; the
// open bit and the reset behaviour are this design's own.
module bank_table
  import smartdimm_pkg::*;
#(
  parameter int unsigned N = NBANKS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  dec_slot_t  dec_i   [SLOTS],
  input  bank_t      rd_bank_i,
  output row_t       rd_row_o,
  output logic       rd_open_o
);

  row_t rows  [N];
  logic open_q[N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < N; b++) begin
        rows[b]   <= '0;
        open_q[b] <= 1'b0;
      end
    end else begin
      for (int s = 0; s < SLOTS; s++) begin
        unique case (dec_i[s].cmd)
          CMD_ACT: begin
            rows[dec_i[s].bank]   <= dec_i[s].row;
            open_q[dec_i[s].bank] <= 1'b1;
          end
          CMD_PRE:  open_q[dec_i[s].bank] <= 1'b0;
          CMD_PREA: for (int b = 0; b < N; b++) open_q[b] <= 1'b0;
          default: ;
        endcase
      end
    end
  end

  assign rd_row_o  = rows[rd_bank_i];
  assign rd_open_o = open_q[rd_bank_i];

endmodule
