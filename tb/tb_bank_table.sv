// Unit test of the Bank Table: random ACT/PRE/PREA slots, four per cycle,
// against a reference array updated in slot order; every bank's row and
// open state are read back after each cycle.
module tb_bank_table;
  import smartdimm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  dec_slot_t dec [SLOTS];
  bank_t rd_bank;
  row_t  rd_row;
  logic  rd_open;
  row_t  ref_row [NBANKS];
  bit    ref_open [NBANKS];
  int checks = 0, failures = 0;

  bank_table dut (.clk, .rst_n, .dec_i(dec), .rd_bank_i(rd_bank), .rd_row_o(rd_row), .rd_open_o(rd_open));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < SLOTS; s++) dec[s] = '0;
    for (int b = 0; b < NBANKS; b++) begin ref_open[b] = 0; ref_row[b] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      for (int s = 0; s < SLOTS; s++) begin
        int k;
        k = $urandom_range(0, 9);
        dec[s].bank = bank_t'($urandom);
        dec[s].row  = row_t'($urandom);
        dec[s].col  = '0;
        dec[s].cmd  = (k < 5) ? CMD_ACT : (k < 8) ? CMD_PRE : (k == 8) ? CMD_PREA : CMD_RD;
        case (dec[s].cmd)
          CMD_ACT:  begin ref_row[dec[s].bank] = dec[s].row; ref_open[dec[s].bank] = 1; end
          CMD_PRE:  ref_open[dec[s].bank] = 0;
          CMD_PREA: for (int b = 0; b < NBANKS; b++) ref_open[b] = 0;
          default: ;
        endcase
      end
      @(negedge clk);
      for (int s = 0; s < SLOTS; s++) dec[s].cmd = CMD_NOP;
      for (int b = 0; b < NBANKS; b++) begin
        rd_bank = bank_t'(b);
        #0.1;
        checks++;
        if (rd_open != ref_open[b] || (ref_open[b] && rd_row != ref_row[b])) begin
          failures++;
          $display("FAIL bank %0d: open %0d/%0d row %h/%h", b, rd_open, ref_open[b], rd_row, ref_row[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
