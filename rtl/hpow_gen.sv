// H-power generator of the TLS DSA ("GF multiplier" of the TLS data path).
//
// When a source page's context arrives, the hash subkey H is known and this
// engine fills the page's Config Memory with the powers of H that the GHASH
// unit needs, so that 64-byte lines of a record can be hashed in any order:
//   config line 1      : H^2, H^3, H^4, H^5       (128-bit lane i = H^(i+2))
//   config lines 2..17 : H^(4k), k = 0..63        (lane j of line 2+q = H^(4(4q+j)))
// One GF(2^128) multiplication per cycle: four cycles for H^2..H^5, then
// 63 cycles for the stride-4 powers, each written as soon as its line is
// complete; a page's powers are ready 67 cycles after it starts. Requests
// queue in a small FIFO (depth REQ_DEPTH) and are served in order;
// done_o pulses with the page index when that page's powers are all written.
// Precomputing powers in strides of 4 up to H^252 follows the document; the
// extra H^2..H^5 line and the sequencing are this design's own.
module hpow_gen
  import smartdimm_pkg::*;
#(
  parameter int unsigned REQ_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [PIDX_W-1:0] page_i,
  input  blk_t              h_i,
  output logic              req_full_o,
  // Config Memory write port
  output logic              cfg_we_o,
  output logic [PIDX_W-1:0] cfg_page_o,
  output lofs_t             cfg_line_o,
  output line_t             cfg_wdata_o,
  output logic              done_o,
  output logic [PIDX_W-1:0] done_page_o,
  output logic              busy_o
);
  localparam blk_t GF_ONE = {1'b1, 127'b0};
  localparam int unsigned QW = $clog2(REQ_DEPTH);

  // request FIFO
  logic [PIDX_W-1:0] q_page [REQ_DEPTH];
  blk_t              q_h    [REQ_DEPTH];
  logic [QW-1:0]     q_rd, q_wr;
  logic [QW:0]       q_cnt;

  logic              active;
  logic [6:0]        step;        // 0..3: H^2..H^5, 4..66: H^(4k) for k=1..63
  logic [PIDX_W-1:0] page;
  blk_t              h, h4, acc;
  blk_t              lane [4];
  blk_t              x, y, prod;

  gf128_mul u_mul (.x_i(x), .y_i(y), .z_o(prod));

  always_comb begin
    x = acc;                           // running power
    y = (step < 7'd4) ? h : h4;
  end

  logic pop;
  assign pop        = !active && (q_cnt != 0);
  assign req_full_o = (q_cnt == (QW+1)'(REQ_DEPTH));
  assign busy_o     = active || (q_cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_rd <= '0; q_wr <= '0; q_cnt <= '0;
      active <= 1'b0; step <= '0; done_o <= 1'b0; cfg_we_o <= 1'b0;
      page <= '0; done_page_o <= '0;
    end else begin
      done_o   <= 1'b0;
      cfg_we_o <= 1'b0;
      if (start_i && !req_full_o) begin
        q_page[q_wr] <= page_i;
        q_h[q_wr]    <= h_i;
        q_wr         <= q_wr + 1'b1;
      end
      q_cnt <= q_cnt + (QW+1)'(start_i && !req_full_o) - (QW+1)'(pop);
      if (pop) begin
        q_rd   <= q_rd + 1'b1;
        page   <= q_page[q_rd];
        h      <= q_h[q_rd];
        acc    <= q_h[q_rd];
        active <= 1'b1;
        step   <= '0;
      end else if (active) begin
        step <= step + 1'b1;
        if (step < 7'd4) begin
          lane[step[1:0]] <= prod;                     // H^(step+2)
          if (step == 7'd2) h4 <= prod;                // H^4
          if (step == 7'd3) begin
            cfg_we_o    <= 1'b1;
            cfg_page_o  <= page;
            cfg_line_o  <= lofs_t'(CFG_LINE_HLOW);
            cfg_wdata_o <= {prod, lane[2], lane[1], lane[0]};
            acc         <= GF_ONE;
            lane[0]     <= GF_ONE;                     // H^0
          end else begin
            acc <= prod;
          end
        end else begin
          // k = step-3 ; prod = H^(4k)
          logic [5:0] k;
          k   = 6'(step - 7'd3);
          acc <= prod;
          lane[k[1:0]] <= prod;
          if (k[1:0] == 2'd3) begin
            cfg_we_o    <= 1'b1;
            cfg_page_o  <= page;
            cfg_line_o  <= lofs_t'(CFG_LINE_POW0) + lofs_t'(k[5:2]);
            cfg_wdata_o <= {prod, lane[2], lane[1], lane[0]};
          end
          if (k == 6'd63) begin
            active      <= 1'b0;
            done_o      <= 1'b1;
            done_page_o <= page;
          end
        end
      end
    end
  end

endmodule
