// Translation Table: maps physical page numbers to on-chip pages.
//
// Every CAS looks up its physical page number here to learn whether it
// falls in an acceleration range and, if so, which Config Memory page
// (source page) or Scratchpad page (destination page) it maps to.
// Organisation:
//  * a 3-ary cuckoo hash table: three ways of DEPTH = ENTRIES/3 entries,
//    each indexed by its own multiplicative hash of the page number; a lookup
//    reads all three ways at once;
//  * an 8-entry CAM that takes new insertions immediately, so registration
//    never waits for the hash table;
//  * a background engine that moves CAM entries into the hash table
//    (placing into an empty way, or displacing a resident entry that is then
//    re-inserted, at most MAX_KICKS times), and removes entries on request.
// Lookup timing: the page number presented in cycle t is answered in cycle
// t+1 (lk_hit_o / lk_data_o). The ways are read-first RAMs and the CAM and
// in-flight displaced entry are sampled in cycle t as well, so every lookup
// sees one consistent table even while an entry is being moved.
// After reset the engine spends DEPTH cycles clearing the ways (busy_o);
// lookups are not valid before that ends, insertions wait in the CAM.
// Insert: ins_valid_i with ins_ready_o (a free CAM slot). Remove:
// rem_valid_i with rem_ready_o; rem_done_o echoes the cookie once the
// entry is gone from CAM and hash table. err_o latches an insertion that
// ran out of displacements (the entry is then lost).
// Cuckoo organisation, 12288 entries, three hash functions and the 8-entry
// CAM follow the document; the hash functions, the displacement policy and
// the removal interface are this design's own.
module translation_table
  import smartdimm_pkg::*;
#(
  parameter int unsigned ENTRIES   = TT_ENTRIES,
  parameter int unsigned CAM_N     = TT_CAM,
  parameter int unsigned MAX_KICKS = 16,
  parameter int unsigned REM_DEPTH = 8,
  parameter int unsigned CK_W      = PIDX_W
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup
  input  logic            lk_valid_i,
  input  ppn_t            lk_ppn_i,
  output logic            lk_hit_o,
  output tt_data_t        lk_data_o,
  // insert
  input  logic            ins_valid_i,
  input  ppn_t            ins_ppn_i,
  input  tt_data_t        ins_data_i,
  output logic            ins_ready_o,
  // remove
  input  logic            rem_valid_i,
  input  ppn_t            rem_ppn_i,
  input  logic [CK_W-1:0] rem_cookie_i,
  output logic            rem_ready_o,
  output logic            rem_done_o,
  output logic [CK_W-1:0] rem_cookie_o,
  // status
  output logic            err_o,
  output logic            busy_o,
  output logic [$clog2(CAM_N+1)-1:0] cam_used_o,
  output logic [31:0]     displacements_o
);
  localparam int unsigned DEPTH = ENTRIES / 3;
  localparam int unsigned IW    = $clog2(DEPTH);

  typedef struct packed {
    logic     v;
    ppn_t     key;
    tt_data_t data;
  } ent_t;

  localparam logic [31:0] HC [3] = '{32'h9E3779B1, 32'h85EBCA77, 32'hC2B2AE3D};

  function automatic logic [IW-1:0] hsh(input int unsigned w, input ppn_t k);
    logic [31:0] p;
    p = 32'(k) * HC[w];
    return IW'(p[31 -: IW] % DEPTH);
  endfunction

  // ---------------- storage ----------------
  ent_t way_mem [3][DEPTH];
  ent_t cam     [CAM_N];

  // ---------------- lookup path ----------------
  ent_t     lk_rd [3];
  ppn_t     lk_key_q;
  logic     lk_v_q;
  logic     lk_side_hit_q;
  tt_data_t lk_side_data_q;

  logic     lk_side_hit_n;
  tt_data_t lk_side_data_n;

  // in-flight entry of the background engine (displaced, or taken from the CAM)
  ent_t     cur;
  logic     cur_from_cam;
  logic [$clog2(CAM_N)-1:0] cur_slot;

  always_comb begin
    logic     h;
    tt_data_t d;
    h = 1'b0;
    d = '0;
    for (int i = 0; i < CAM_N; i++)
      if (cam[i].v && cam[i].key == lk_ppn_i) begin h = 1'b1; d = cam[i].data; end
    if (cur.v && cur.key == lk_ppn_i) begin h = 1'b1; d = cur.data; end
    lk_side_hit_n  = h;
    lk_side_data_n = d;
  end

  always_ff @(posedge clk) begin
    lk_key_q       <= lk_ppn_i;
    lk_side_hit_q  <= lk_side_hit_n;
    lk_side_data_q <= lk_side_data_n;
    for (int w = 0; w < 3; w++) lk_rd[w] <= way_mem[w][hsh(w, lk_ppn_i)];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lk_v_q <= 1'b0;
    else        lk_v_q <= lk_valid_i;
  end

  always_comb begin
    lk_hit_o  = 1'b0;
    lk_data_o = '0;
    if (lk_side_hit_q) begin
      lk_hit_o  = 1'b1;
      lk_data_o = lk_side_data_q;
    end
    for (int w = 0; w < 3; w++)
      if (lk_rd[w].v && lk_rd[w].key == lk_key_q) begin
        lk_hit_o  = 1'b1;
        lk_data_o = lk_rd[w].data;
      end
    lk_hit_o = lk_hit_o && lk_v_q;
  end

  // ---------------- CAM free slot ----------------
  logic                     cam_free;
  logic [$clog2(CAM_N)-1:0] cam_free_idx;
  always_comb begin
    cam_free     = 1'b0;
    cam_free_idx = '0;
    cam_used_o   = '0;
    for (int i = CAM_N-1; i >= 0; i--)
      if (!cam[i].v) begin cam_free = 1'b1; cam_free_idx = ($clog2(CAM_N))'(i); end
    for (int i = 0; i < CAM_N; i++) cam_used_o += cam[i].v;
  end
  assign ins_ready_o = cam_free;

  // ---------------- remove request FIFO ----------------
  localparam int unsigned RW = $clog2(REM_DEPTH);
  ppn_t            rq_key [REM_DEPTH];
  logic [CK_W-1:0] rq_ck  [REM_DEPTH];
  logic [RW-1:0]   rq_rd, rq_wr;
  logic [RW:0]     rq_cnt;
  assign rem_ready_o = (rq_cnt != (RW+1)'(REM_DEPTH));

  // ---------------- background engine ----------------
  typedef enum logic [2:0] {M_CLEAR, M_IDLE, M_INS_RD, M_INS_CHK, M_REM_RD, M_REM_CHK} mstate_e;
  mstate_e              ms;
  logic [IW-1:0]        clr_idx;
  assign busy_o = (ms == M_CLEAR);
  ent_t                 m_rd [3];
  logic [IW-1:0]        m_idx [3];
  logic [$clog2(MAX_KICKS+1)-1:0] kicks;
  logic [1:0]           victim;
  ppn_t                 rem_key;
  logic [CK_W-1:0]      rem_ck;

  // pick the oldest-looking CAM entry: lowest valid index not being moved
  logic                     cam_pend;
  logic [$clog2(CAM_N)-1:0] cam_pend_idx;
  always_comb begin
    cam_pend     = 1'b0;
    cam_pend_idx = '0;
    for (int i = CAM_N-1; i >= 0; i--)
      if (cam[i].v) begin cam_pend = 1'b1; cam_pend_idx = ($clog2(CAM_N))'(i); end
  end

  always_comb
    for (int w = 0; w < 3; w++)
      m_idx[w] = hsh(w, (ms == M_REM_RD || ms == M_REM_CHK) ? rem_key : cur.key);

  logic rq_pop;
  assign rq_pop = (ms == M_IDLE) && (rq_cnt != 0);

  always_ff @(posedge clk) begin
    for (int w = 0; w < 3; w++) m_rd[w] <= way_mem[w][m_idx[w]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CAM_N; i++) cam[i] <= '0;
      ms <= M_CLEAR;
      clr_idx <= '0;
      cur <= '0; cur_from_cam <= 1'b0; cur_slot <= '0;
      kicks <= '0; victim <= '0;
      rq_rd <= '0; rq_wr <= '0; rq_cnt <= '0;
      rem_done_o <= 1'b0; rem_cookie_o <= '0; err_o <= 1'b0;
      rem_key <= '0; rem_ck <= '0; displacements_o <= '0;
    end else begin
      rem_done_o <= 1'b0;
      // new insertion goes straight into the CAM
      if (ins_valid_i && cam_free) begin
        cam[cam_free_idx].v    <= 1'b1;
        cam[cam_free_idx].key  <= ins_ppn_i;
        cam[cam_free_idx].data <= ins_data_i;
      end
      if (rem_valid_i && rem_ready_o) begin
        rq_key[rq_wr] <= rem_ppn_i;
        rq_ck[rq_wr]  <= rem_cookie_i;
        rq_wr         <= rq_wr + 1'b1;
      end
      rq_cnt <= rq_cnt + (RW+1)'(rem_valid_i && rem_ready_o) - (RW+1)'(rq_pop);

      unique case (ms)
        M_CLEAR: begin   // after reset, sweep the ways empty
          for (int w = 0; w < 3; w++) way_mem[w][clr_idx] <= '0;
          clr_idx <= clr_idx + 1'b1;
          if (32'(clr_idx) == DEPTH - 1) ms <= M_IDLE;
        end
        M_IDLE: begin
          if (rq_pop) begin
            rem_key <= rq_key[rq_rd];
            rem_ck  <= rq_ck[rq_rd];
            rq_rd   <= rq_rd + 1'b1;
            ms      <= M_REM_RD;
          end else if (cam_pend) begin
            cur          <= cam[cam_pend_idx];
            cur_from_cam <= 1'b1;
            cur_slot     <= cam_pend_idx;
            kicks        <= '0;
            ms           <= M_INS_RD;
          end
        end
        M_INS_RD: ms <= M_INS_CHK;   // ways are being read at the hashes of cur
        M_INS_CHK: begin
          logic       placed;
          logic [1:0] slot;
          placed = 1'b0;
          slot   = 2'd0;
          // same key already resident: overwrite it
          for (int w = 2; w >= 0; w--)
            if (m_rd[w].v && m_rd[w].key == cur.key) begin placed = 1'b1; slot = 2'(w); end
          if (!placed)
            for (int w = 2; w >= 0; w--)
              if (!m_rd[w].v) begin placed = 1'b1; slot = 2'(w); end
          if (cur_from_cam) cam[cur_slot].v <= 1'b0;
          if (placed) begin
            way_mem[slot][m_idx[slot]] <= cur;
            cur.v        <= 1'b0;
            cur_from_cam <= 1'b0;
            ms           <= M_IDLE;
          end else begin
            // all three candidate slots taken: displace one and re-insert it
            way_mem[victim][m_idx[victim]] <= cur;
            displacements_o <= displacements_o + 1;
            victim       <= (victim == 2'd2) ? 2'd0 : victim + 2'd1;
            cur_from_cam <= 1'b0;
            if (32'(kicks) + 1 >= MAX_KICKS) begin
              err_o <= 1'b1;            // give up: displaced entry is lost
              cur.v <= 1'b0;
              ms    <= M_IDLE;
            end else begin
              cur   <= m_rd[victim];
              kicks <= kicks + 1'b1;
              ms    <= M_INS_RD;
            end
          end
        end
        M_REM_RD: begin
          for (int i = 0; i < CAM_N; i++)
            if (cam[i].v && cam[i].key == rem_key) cam[i].v <= 1'b0;
          ms <= M_REM_CHK;
        end
        M_REM_CHK: begin
          for (int w = 0; w < 3; w++)
            if (m_rd[w].v && m_rd[w].key == rem_key) way_mem[w][m_idx[w]].v <= 1'b0;
          rem_done_o   <= 1'b1;
          rem_cookie_o <= rem_ck;
          ms           <= M_IDLE;
        end
        default: ms <= M_IDLE;
      endcase
    end
  end

  // an insertion and a CAM clear never target the same slot
  assert property (@(posedge clk) disable iff (!rst_n)
    (ins_valid_i && cam_free && ms == M_INS_CHK && cur_from_cam) |-> cam_free_idx != cur_slot);

endmodule
