// Arbiter controller: the decision logic of the SmartDIMM buffer device.
//
// Every CAS command seen on the DDR channel is classified as in the
// Arbiter flowchart of the design (state numbers in brackets):
//   no Translation Table match                  -> plain DRAM access   [S2]
//   MMIO region, write                          -> registration / context [S17]
//   MMIO region, read                           -> status or pending-page list
//   source page, read, line not yet taken       -> data also sent to DSA [S16]
//   source page, line already taken or a write  -> ignored / dropped [S18]
//   destination page, result ready, read        -> served from Scratchpad [S10]
//   destination page, result ready, write-back  -> write data replaced by the
//                                                  Scratchpad line, line freed [S11]
//   destination page, result pending, write     -> write ignored, line kept [S7]
//   destination page, result pending, read      -> ALERT_N, host retries [S13]
//   destination page, DSA not started, read     -> plain DRAM read [S5/S6]
// A destination page is freed when all of its record lines and its tag line
// have been recycled; its two Translation Table entries are then removed and
// its index returns to the free list (self-recycling).
//
// Timing: the CAS (with its physical page/line from the Address Remap) is
// presented in cycle t together with the Translation Table lookup, whose
// answer arrives in t+1, when the decision is taken and queued. Data beats
// come later and in command order: hw_valid_i carries the host's write data
// of the oldest undecided-on-data wrCAS, dr_valid_i the DRAM read data of the
// oldest rdCAS. Each beat leaves one cycle later, on dram_w*/host_r*, muxed
// between the pass-through data and Scratchpad (or MMIO) data (selectWr /
// selectRd of the block diagram). ALERT_N is pulled low in the cycle a
// retried read's data leaves.
//
// MMIO region: MMIO_PAGES pages starting at MMIO_BASE (physical page number).
// Line 0 write = REGISTER {src, dst, lines, key, IV}; line 1 write = CONTEXT
// {src, H, initial tag}; line 0 read = status (free page count, counters);
// lines 2.. read = pending-page list, 16 32-bit entries {valid, dst page} per
// line, read by software when it must force-recycle.
//
// Source data for the DSA waits in a FIFO (DSA_Q deep, one page) until its page's
// powers of H are ready; a beat that finds the FIFO full is lost and counted
// in err_dsa_overflow. REGISTER is refused (counted) when no page is free or
// the Translation Table CAM lacks room.
//
// The flowchart, registration through a 64-byte MMIO write, self-recycling,
// the pending list and ALERT_N retry follow the document; the command
// formats, queue depths, the separate CONTEXT write and the in-order data
// queues are this design's own.
module arbiter_ctrl
  import smartdimm_pkg::*;
#(
  parameter int unsigned PAGES      = SP_PAGES,
  parameter ppn_t        MMIO_BASE  = ppn_t'(22'h3FFFFC),
  parameter int unsigned MMIO_PAGES = 4,
  parameter int unsigned CAS_Q      = 16,
  parameter int unsigned DSA_Q      = PAGE_LINES,
  parameter int unsigned AWAIT_N    = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // CAS of this cycle (from Slot Decoder + Bank Table + Addr Remap)
  input  logic              cas_valid_i,
  input  logic              cas_is_wr_i,
  input  ppn_t              cas_ppn_i,
  input  lofs_t             cas_line_i,
  // Translation Table
  input  logic              tt_hit_i,
  input  tt_data_t          tt_data_i,
  output logic              tt_ins_valid_o,
  output ppn_t              tt_ins_ppn_o,
  output tt_data_t          tt_ins_data_o,
  input  logic              tt_ins_ready_i,
  input  logic [$clog2(TT_CAM+1)-1:0] tt_cam_used_i,
  output logic              tt_rem_valid_o,
  output ppn_t              tt_rem_ppn_o,
  output logic [PIDX_W:0]   tt_rem_cookie_o,
  input  logic              tt_rem_ready_i,
  input  logic              tt_rem_done_i,
  input  logic [PIDX_W:0]   tt_rem_done_cookie_i,
  // data beats
  input  logic              hw_valid_i,
  input  line_t             hw_data_i,
  input  logic              dr_valid_i,
  input  line_t             dr_data_i,
  output logic              dram_wvalid_o,
  output line_t             dram_wdata_o,
  output logic              host_rvalid_o,
  output line_t             host_rdata_o,
  output logic              alert_n_o,
  // Config Memory write port (line 0 of a registered page)
  output logic              cfg_we_o,
  output logic [PIDX_W-1:0] cfg_wpage_o,
  output lofs_t             cfg_wline_o,
  output line_t             cfg_wdata_o,
  // Scratchpad read ports and tag initialisation
  output logic [PIDX_W-1:0] sp_rpage_o [2],
  output lofs_t             sp_rline_o [2],
  output logic              sp_rtag_o  [2],
  input  line_t             sp_rdata_i [2],
  output logic              sp_tag_init_o,
  output logic [PIDX_W-1:0] sp_tag_init_page_o,
  output blk_t              sp_tag_init_val_o,
  // H-power generator
  output logic              hp_start_o,
  output logic [PIDX_W-1:0] hp_page_o,
  output blk_t              hp_h_o,
  input  logic              hp_full_i,
  input  logic              hp_done_i,
  input  logic [PIDX_W-1:0] hp_done_page_i,
  // DSA
  output logic              dsa_valid_o,
  output logic [PIDX_W-1:0] dsa_page_o,
  output lofs_t             dsa_line_o,
  output lofs_t             dsa_pow_o,
  output line_t             dsa_data_o,
  input  logic              dsa_done_i,
  input  logic [PIDX_W-1:0] dsa_done_page_i,
  input  lofs_t             dsa_done_line_i,
  // statistics: one counter per flowchart outcome, plus events
  output logic [31:0]       act_count_o [9],
  output logic [31:0]       pages_freed_o,
  output logic [31:0]       dsa_stall_o,
  output logic [31:0]       reg_reject_o,
  output logic [31:0]       err_dsa_overflow_o,
  output logic [PIDX_W:0]   free_pages_o
);
  localparam int unsigned PW = $clog2(PAGES);
  localparam int unsigned MMIO_W = $clog2(MMIO_PAGES) + LINE_OFS_W;

  function automatic logic [PW-1:0] pi(input logic [PIDX_W-1:0] p);
    return PW'(p);
  endfunction

  // ---------------- per-page state ----------------
  logic        pg_valid  [PAGES];
  logic        pg_ctx    [PAGES];       // powers of H ready
  ppn_t        pg_src    [PAGES];
  ppn_t        pg_dst    [PAGES];
  logic [6:0]  pg_lines  [PAGES];
  logic [63:0] pg_start  [PAGES];
  logic [63:0] pg_done   [PAGES];
  logic [63:0] pg_recyc  [PAGES];
  logic [6:0]  pg_nstart [PAGES];
  logic [6:0]  pg_ndone  [PAGES];
  logic [6:0]  pg_nrecyc [PAGES];

  // ---------------- free page list ----------------
  logic [PIDX_W:0]   alloc_ptr;             // pages never used yet: alloc_ptr..PAGES-1
  logic [PIDX_W-1:0] fl_mem [PAGES];
  logic [PW-1:0]     fl_rd, fl_wr;
  logic [PIDX_W:0]   fl_cnt;
  assign free_pages_o = (PIDX_W+1)'(PAGES) - alloc_ptr + fl_cnt;

  // ---------------- decision stage ----------------
  logic        d_v, d_wr;
  ppn_t        d_ppn;
  lofs_t       d_line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_v <= 1'b0;
    else        d_v <= cas_valid_i;
  end
  always_ff @(posedge clk) begin
    d_wr   <= cas_is_wr_i;
    d_ppn  <= cas_ppn_i;
    d_line <= cas_line_i;
  end

  logic              in_mmio;
  logic [MMIO_W-1:0] mmio_idx;
  ppn_t              mmio_off;
  assign mmio_off = d_ppn - MMIO_BASE;            // wraps for pages below the base
  assign in_mmio  = 32'(mmio_off) < MMIO_PAGES;
  assign mmio_idx = MMIO_W'({mmio_off, d_line});

  cas_action_e       d_act;
  logic [PIDX_W-1:0] d_page;
  logic [PW-1:0]     dp;
  assign d_page = tt_data_i.idx;
  assign dp     = pi(tt_data_i.idx);

  always_comb begin
    logic started, done;
    d_act   = ACT_REGULAR;
    started = 1'b0;
    done    = 1'b0;
    if (in_mmio) begin
      d_act = d_wr ? ACT_MMIO_WR : ACT_MMIO_RD;
    end else if (tt_hit_i && pg_valid[dp]) begin
      if (tt_data_i.is_cfg) begin
        // source page
        if (7'(d_line) < pg_lines[dp]) begin
          if (d_wr || pg_start[dp][d_line]) d_act = ACT_DROP;
          else                              d_act = ACT_TO_DSA;
        end
      end else if (7'(d_line) <= pg_lines[dp] && !pg_recyc[dp][d_line]) begin
        // destination page: record lines, then the tag line
        if (7'(d_line) == pg_lines[dp]) begin
          started = pg_nstart[dp] != 0;
          done    = pg_ndone[dp] == pg_lines[dp];
        end else begin
          started = pg_start[dp][d_line];
          done    = pg_done[dp][d_line];
        end
        if (done)         d_act = d_wr ? ACT_RECYCLE : ACT_SP_READ;
        else if (started) d_act = d_wr ? ACT_IGNORE_WR : ACT_RETRY_RD;
        else              d_act = d_wr ? ACT_IGNORE_WR : ACT_REGULAR;
      end
    end
  end

  // ---------------- in-order action queues ----------------
  typedef struct packed {
    cas_action_e       act;
    logic [PIDX_W-1:0] page;
    lofs_t             line;
    logic [MMIO_W-1:0] midx;
  } qent_t;

  localparam int unsigned QW = $clog2(CAS_Q);
  qent_t          rq [CAS_Q];
  qent_t          wq [CAS_Q];
  logic [QW-1:0]  rq_rd, rq_wr, wq_rd, wq_wr;
  logic [QW:0]    rq_cnt, wq_cnt;
  qent_t          d_ent, rq_head, wq_head;

  assign d_ent   = '{act: d_act, page: d_page, line: d_line, midx: mmio_idx};
  assign rq_head = rq[rq_rd];
  assign wq_head = wq[wq_rd];

  // ---------------- DSA input FIFO ----------------
  typedef struct packed {
    logic [PIDX_W-1:0] page;
    lofs_t             line;
    lofs_t             pow;
    line_t             data;
  } dsa_ent_t;
  localparam int unsigned DW = $clog2(DSA_Q);
  dsa_ent_t      dq [DSA_Q];
  logic [DW-1:0] dq_rd, dq_wr;
  logic [DW:0]   dq_cnt;
  dsa_ent_t      dq_head;
  logic          dq_push, dq_pop;
  assign dq_head = dq[dq_rd];
  assign dq_pop  = (dq_cnt != 0) && pg_ctx[pi(dq_head.page)];
  assign dq_push = dr_valid_i && rq_head.act == ACT_TO_DSA && dq_cnt != (DW+1)'(DSA_Q);

  assign dsa_valid_o = dq_pop;
  assign dsa_page_o  = dq_head.page;
  assign dsa_line_o  = dq_head.line;
  assign dsa_pow_o   = dq_head.pow;
  assign dsa_data_o  = dq_head.data;

  // ---------------- registrations waiting for their CONTEXT ----------------
  logic              aw_v   [AWAIT_N];
  ppn_t              aw_src [AWAIT_N];
  logic [PIDX_W-1:0] aw_idx [AWAIT_N];

  // ---------------- MMIO decode of the write beat ----------------
  mmio_register_t    m_reg;
  mmio_context_t     m_ctx;
  assign m_reg = mmio_register_t'(hw_data_i);
  assign m_ctx = mmio_context_t'(hw_data_i);

  logic              w_beat_reg, w_beat_ctx, w_beat_recyc;
  assign w_beat_reg   = hw_valid_i && wq_head.act == ACT_MMIO_WR && wq_head.midx == '0
                        && m_reg.op == MMIO_REGISTER;
  assign w_beat_ctx   = hw_valid_i && wq_head.act == ACT_MMIO_WR && wq_head.midx == MMIO_W'(1)
                        && m_ctx.op == MMIO_CONTEXT;
  assign w_beat_recyc = hw_valid_i && wq_head.act == ACT_RECYCLE;

  // page allocation for REGISTER
  logic              can_reg;
  logic [PIDX_W-1:0] new_idx;
  logic              aw_free;
  logic [$clog2(AWAIT_N)-1:0] aw_free_idx;
  logic              ins2_pend;           // destination entry still to insert
  ppn_t              ins2_ppn;
  logic [PIDX_W-1:0] ins2_idx;

  always_comb begin
    aw_free = 1'b0; aw_free_idx = '0;
    for (int i = AWAIT_N-1; i >= 0; i--)
      if (!aw_v[i]) begin aw_free = 1'b1; aw_free_idx = ($clog2(AWAIT_N))'(i); end
    new_idx = (alloc_ptr < (PIDX_W+1)'(PAGES)) ? PIDX_W'(alloc_ptr) : fl_mem[fl_rd];
    can_reg = (free_pages_o != 0) && aw_free && !ins2_pend
              && (32'(tt_cam_used_i) + 2 <= TT_CAM)
              && m_reg.lines != 0 && m_reg.lines < 7'(PAGE_LINES);
  end

  // CONTEXT lookup
  logic                       ctx_hit;
  logic [$clog2(AWAIT_N)-1:0] ctx_slot;
  always_comb begin
    ctx_hit = 1'b0; ctx_slot = '0;
    for (int i = 0; i < AWAIT_N; i++)
      if (aw_v[i] && aw_src[i] == m_ctx.src) begin ctx_hit = 1'b1; ctx_slot = ($clog2(AWAIT_N))'(i); end
  end

  // ---------------- Translation Table insert / remove sequencing ----------------
  always_comb begin
    tt_ins_valid_o = 1'b0;
    tt_ins_ppn_o   = '0;
    tt_ins_data_o  = '0;
    if (w_beat_reg && can_reg) begin
      tt_ins_valid_o = 1'b1;
      tt_ins_ppn_o   = m_reg.src;
      tt_ins_data_o  = '{is_cfg: 1'b1, idx: new_idx};
    end else if (ins2_pend) begin
      tt_ins_valid_o = 1'b1;
      tt_ins_ppn_o   = ins2_ppn;
      tt_ins_data_o  = '{is_cfg: 1'b0, idx: ins2_idx};
    end
  end

  // pages waiting for their entries to be removed
  logic [PIDX_W-1:0] rmq [PAGES];
  logic [PW-1:0]     rmq_rd, rmq_wr;
  logic [PIDX_W:0]   rmq_cnt;
  logic              rm_second;            // source entry sent, destination next
  logic              page_free_now;
  logic [PIDX_W-1:0] rmq_head;
  assign rmq_head = rmq[rmq_rd];
  assign page_free_now = w_beat_recyc && (pg_nrecyc[pi(wq_head.page)] + 7'd1 == pg_lines[pi(wq_head.page)] + 7'd1);

  always_comb begin
    tt_rem_valid_o  = rmq_cnt != 0;
    tt_rem_ppn_o    = rm_second ? pg_dst[pi(rmq_head)] : pg_src[pi(rmq_head)];
    tt_rem_cookie_o = {rm_second, rmq_head};
  end

  // ---------------- data paths ----------------
  // scratchpad reads: port 0 for host reads, port 1 for recycling write-backs
  always_comb begin
    sp_rpage_o[0] = rq_head.page;
    sp_rline_o[0] = rq_head.line;
    sp_rtag_o[0]  = 7'(rq_head.line) == pg_lines[pi(rq_head.page)];
    sp_rpage_o[1] = wq_head.page;
    sp_rline_o[1] = wq_head.line;
    sp_rtag_o[1]  = 7'(wq_head.line) == pg_lines[pi(wq_head.page)];
  end

  // MMIO read data
  line_t mmio_rdata;
  always_comb begin
    int unsigned p;
    p = 0;
    mmio_rdata = '0;
    if (rq_head.midx == '0) begin
      mmio_rdata[15:0]   = 16'(free_pages_o);
      mmio_rdata[47:16]  = pages_freed_o;
      mmio_rdata[79:48]  = reg_reject_o;
      mmio_rdata[111:80] = err_dsa_overflow_o;
    end else if (rq_head.midx >= MMIO_W'(2)) begin
      for (int e = 0; e < 16; e++) begin
        p = 16 * (int'(rq_head.midx) - 2) + e;
        if (p < PAGES)
          mmio_rdata[32*e +: 32] = {pg_valid[p], 9'b0, pg_dst[p]};
      end
    end
  end

  logic      r_sel_sp, w_sel_sp, r_alert;
  line_t     r_pass, w_pass;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_rvalid_o <= 1'b0;
      dram_wvalid_o <= 1'b0;
      r_alert       <= 1'b0;
      r_sel_sp      <= 1'b0;
      w_sel_sp      <= 1'b0;
    end else begin
      host_rvalid_o <= dr_valid_i;
      dram_wvalid_o <= hw_valid_i;
      r_alert       <= dr_valid_i && rq_head.act == ACT_RETRY_RD;
      r_sel_sp      <= rq_head.act == ACT_SP_READ;
      w_sel_sp      <= wq_head.act == ACT_RECYCLE;
    end
  end
  always_ff @(posedge clk) begin
    r_pass <= (rq_head.act == ACT_MMIO_RD) ? mmio_rdata : dr_data_i;
    w_pass <= hw_data_i;
  end
  assign host_rdata_o = r_sel_sp ? sp_rdata_i[0] : r_pass;   // selectRd
  assign dram_wdata_o = w_sel_sp ? sp_rdata_i[1] : w_pass;   // selectWr
  assign alert_n_o    = !r_alert;

  // config line 0 and tag / H-power kick-off
  cfg_line0_t c0;
  always_comb begin
    c0          = '0;
    c0.iv       = m_reg.iv;
    c0.key      = m_reg.key;
    c0.lines    = m_reg.lines;
    cfg_we_o    = w_beat_reg && can_reg;
    cfg_wpage_o = new_idx;
    cfg_wline_o = lofs_t'(CFG_LINE_KEY);
    cfg_wdata_o = line_t'(c0);
    sp_tag_init_o      = w_beat_ctx && ctx_hit && !hp_full_i;
    sp_tag_init_page_o = aw_idx[ctx_slot];
    sp_tag_init_val_o  = m_ctx.tag_init;
    hp_start_o         = sp_tag_init_o;
    hp_page_o          = aw_idx[ctx_slot];
    hp_h_o             = m_ctx.h;
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < PAGES; p++) begin
        pg_valid[p] <= 1'b0;
        pg_ctx[p]   <= 1'b0;
      end
      for (int i = 0; i < AWAIT_N; i++) aw_v[i] <= 1'b0;
      for (int a = 0; a < 9; a++) act_count_o[a] <= '0;
      alloc_ptr <= '0;
      fl_rd <= '0; fl_wr <= '0; fl_cnt <= '0;
      rq_rd <= '0; rq_wr <= '0; rq_cnt <= '0;
      wq_rd <= '0; wq_wr <= '0; wq_cnt <= '0;
      dq_rd <= '0; dq_wr <= '0; dq_cnt <= '0;
      rmq_rd <= '0; rmq_wr <= '0; rmq_cnt <= '0; rm_second <= 1'b0;
      ins2_pend <= 1'b0; ins2_ppn <= '0; ins2_idx <= '0;
      pages_freed_o <= '0; dsa_stall_o <= '0; reg_reject_o <= '0;
      err_dsa_overflow_o <= '0;
    end else begin
      // ---- decision: classify and queue ----
      if (d_v) begin
        act_count_o[d_act] <= act_count_o[d_act] + 1;
        if (d_wr) begin
          wq[wq_wr] <= d_ent;
          wq_wr     <= wq_wr + 1'b1;
        end else begin
          rq[rq_wr] <= d_ent;
          rq_wr     <= rq_wr + 1'b1;
        end
        if (d_act == ACT_TO_DSA) begin
          pg_start[dp][d_line] <= 1'b1;
          pg_nstart[dp]        <= pg_nstart[dp] + 7'd1;
        end
        if (d_act == ACT_RECYCLE) pg_recyc[dp][d_line] <= 1'b1;
      end
      rq_cnt <= rq_cnt + (QW+1)'(d_v && !d_wr) - (QW+1)'(dr_valid_i);
      wq_cnt <= wq_cnt + (QW+1)'(d_v &&  d_wr) - (QW+1)'(hw_valid_i);
      if (dr_valid_i) rq_rd <= rq_rd + 1'b1;
      if (hw_valid_i) wq_rd <= wq_rd + 1'b1;

      // ---- read beat: source data to the DSA queue ----
      if (dq_push) begin
        dq[dq_wr] <= '{page: rq_head.page, line: rq_head.line,
                       pow: lofs_t'(pg_lines[pi(rq_head.page)] - 7'd1 - 7'(rq_head.line)),
                       data: dr_data_i};
        dq_wr <= dq_wr + 1'b1;
      end else if (dr_valid_i && rq_head.act == ACT_TO_DSA) begin
        err_dsa_overflow_o <= err_dsa_overflow_o + 1;
      end
      if (dq_pop) dq_rd <= dq_rd + 1'b1;
      dq_cnt <= dq_cnt + (DW+1)'(dq_push) - (DW+1)'(dq_pop);
      if (dq_cnt != 0 && !dq_pop) dsa_stall_o <= dsa_stall_o + 1;

      // ---- DSA results ----
      if (dsa_done_i) begin
        pg_done[pi(dsa_done_page_i)][dsa_done_line_i] <= 1'b1;
        pg_ndone[pi(dsa_done_page_i)] <= pg_ndone[pi(dsa_done_page_i)] + 7'd1;
      end
      if (hp_done_i) pg_ctx[pi(hp_done_page_i)] <= 1'b1;

      // ---- write beat: REGISTER ----
      if (w_beat_reg) begin
        if (can_reg) begin
          pg_valid[pi(new_idx)]  <= 1'b1;
          pg_ctx[pi(new_idx)]    <= 1'b0;
          pg_src[pi(new_idx)]    <= m_reg.src;
          pg_dst[pi(new_idx)]    <= m_reg.dst;
          pg_lines[pi(new_idx)]  <= m_reg.lines;
          pg_start[pi(new_idx)]  <= '0;
          pg_done[pi(new_idx)]   <= '0;
          pg_recyc[pi(new_idx)]  <= '0;
          pg_nstart[pi(new_idx)] <= '0;
          pg_ndone[pi(new_idx)]  <= '0;
          pg_nrecyc[pi(new_idx)] <= '0;
          if (alloc_ptr < (PIDX_W+1)'(PAGES)) alloc_ptr <= alloc_ptr + 1'b1;
          else                                fl_rd     <= fl_rd + 1'b1;
          aw_v[aw_free_idx]   <= 1'b1;
          aw_src[aw_free_idx] <= m_reg.src;
          aw_idx[aw_free_idx] <= new_idx;
          ins2_pend <= 1'b1;
          ins2_ppn  <= m_reg.dst;
          ins2_idx  <= new_idx;
        end else begin
          reg_reject_o <= reg_reject_o + 1;
        end
      end else if (ins2_pend && tt_ins_ready_i) begin
        ins2_pend <= 1'b0;
      end

      // ---- write beat: CONTEXT ----
      if (sp_tag_init_o) aw_v[ctx_slot] <= 1'b0;

      // ---- write beat: recycle accounting ----
      if (w_beat_recyc)
        pg_nrecyc[pi(wq_head.page)] <= pg_nrecyc[pi(wq_head.page)] + 7'd1;
      if (page_free_now) begin
        pg_valid[pi(wq_head.page)] <= 1'b0;
        pg_ctx[pi(wq_head.page)]   <= 1'b0;
        rmq[rmq_wr]   <= wq_head.page;
        rmq_wr        <= rmq_wr + 1'b1;
        pages_freed_o <= pages_freed_o + 1;
      end

      // ---- Translation Table removal, then back to the free list ----
      if (tt_rem_valid_o && tt_rem_ready_i) begin
        if (rm_second) begin
          rmq_rd    <= rmq_rd + 1'b1;
          rm_second <= 1'b0;
        end else begin
          rm_second <= 1'b1;
        end
      end
      rmq_cnt <= rmq_cnt + (PIDX_W+1)'(page_free_now)
                         - (PIDX_W+1)'(tt_rem_valid_o && tt_rem_ready_i && rm_second);
      if (tt_rem_done_i && tt_rem_done_cookie_i[PIDX_W]) begin
        fl_mem[fl_wr] <= tt_rem_done_cookie_i[PIDX_W-1:0];
        fl_wr         <= fl_wr + 1'b1;
      end
      fl_cnt <= fl_cnt + (PIDX_W+1)'(tt_rem_done_i && tt_rem_done_cookie_i[PIDX_W])
                       - (PIDX_W+1)'(w_beat_reg && can_reg && alloc_ptr >= (PIDX_W+1)'(PAGES));
    end
  end

  // data beats always belong to an outstanding command
  assert property (@(posedge clk) disable iff (!rst_n) dr_valid_i |-> rq_cnt != 0);
  assert property (@(posedge clk) disable iff (!rst_n) hw_valid_i |-> wq_cnt != 0);

endmodule
