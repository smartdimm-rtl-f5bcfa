// SmartDIMM buffer-device logic: inline ULP (TLS/AES-GCM) offload on a DIMM.
//
// Sits between the DDR PHY (host side) and the MIG PHY (DRAM side) of the
// DIMM's buffer device and watches every DDR4 command. The host memory
// controller keeps full control of the DRAM; the buffer device only
// * decodes the four command slots of each cycle (Slot Decoder) and tracks
//   open rows (Bank Table) to rebuild the physical address of every CAS
//   (Addr Remap),
// * looks the page up in the Translation Table (3-ary cuckoo hash + CAM),
// * lets the controller (arbiter_ctrl) decide per the offload flowchart:
//   copy source-page read data into the TLS DSA, answer reads of finished
//   destination lines from the Scratchpad, replace write-back data of
//   finished lines with the Scratchpad copy (self-recycling), and ask the
//   host to retry reads of lines still being computed (ALERT_N).
// Context (key, IV, powers of H) lives in Config Memory; results and partial
// tags live in the Scratchpad.
//
// Interface: slot_i carries the four decoded-pin slots per buffer clock
// (slot 0 first); slot_o relays them unchanged to the MIG PHY. Data beats
// are 512-bit (one cacheline): hw_* is host write data in wrCAS order,
// dr_* is DRAM read data in rdCAS order, at least two cycles after their CAS.
// dram_w* and host_r* leave one cycle after the matching beat.
// All sizes default to the document's configuration: 2048-page (8 MB)
// Scratchpad and Config Memory, 12288-entry Translation Table, 8-entry CAM.
module smartdimm_top
  import smartdimm_pkg::*;
#(
  parameter int unsigned PAGES      = SP_PAGES,
  parameter int unsigned TT_N       = TT_ENTRIES,
  parameter ppn_t        MMIO_BASE  = ppn_t'(22'h3FFFFC)
) (
  input  logic        clk,
  input  logic        rst_n,
  // DDR PHY command slots, relayed to the MIG PHY
  input  ddr_slot_t   slot_i [SLOTS],
  output ddr_slot_t   slot_o [SLOTS],
  // data beats
  input  logic        hw_valid_i,
  input  line_t       hw_data_i,
  input  logic        dr_valid_i,
  input  line_t       dr_data_i,
  output logic        dram_wvalid_o,
  output line_t       dram_wdata_o,
  output logic        host_rvalid_o,
  output line_t       host_rdata_o,
  output logic        alert_n_o,
  // status
  output logic        ready_o,          // Translation Table initialised
  output logic [31:0] act_count_o [9],
  output logic [31:0] pages_freed_o,
  output logic [31:0] dsa_stall_o,
  output logic [31:0] reg_reject_o,
  output logic [31:0] err_dsa_overflow_o,
  output logic [31:0] tt_displacements_o,
  output logic        tt_err_o,
  output logic        multi_cas_o,
  output logic [PIDX_W:0] free_pages_o
);

  always_comb for (int s = 0; s < SLOTS; s++) slot_o[s] = slot_i[s];

  // ---------------- Slot Decoder / Bank Table / Addr Remap ----------------
  dec_slot_t dec [SLOTS];
  logic      cas_valid, cas_is_wr;
  bank_t     cas_bank;
  col_t      cas_col;
  row_t      cas_row;
  logic      cas_open;
  ppn_t      cas_ppn;
  lofs_t     cas_line;

  slot_decoder u_slot (
    .slot_i(slot_i), .dec_o(dec), .cas_valid_o(cas_valid), .cas_is_wr_o(cas_is_wr),
    .cas_bank_o(cas_bank), .cas_col_o(cas_col), .multi_cas_o(multi_cas_o));

  bank_table u_bank (
    .clk, .rst_n, .dec_i(dec), .rd_bank_i(cas_bank), .rd_row_o(cas_row), .rd_open_o(cas_open));

  addr_remap u_remap (
    .row_i(cas_row), .bank_i(cas_bank), .col_i(cas_col), .ppn_o(cas_ppn), .line_o(cas_line));

  // a CAS to a closed bank is a protocol error; it is still looked up
  logic unused_open;
  assign unused_open = cas_open;

  // ---------------- Translation Table ----------------
  logic        tt_hit, tt_ins_v, tt_ins_rdy, tt_rem_v, tt_rem_rdy, tt_rem_done, tt_busy;
  tt_data_t    tt_data, tt_ins_d;
  ppn_t        tt_ins_ppn, tt_rem_ppn;
  logic [PIDX_W:0] tt_rem_ck, tt_rem_done_ck;
  logic [$clog2(TT_CAM+1)-1:0] tt_cam_used;

  translation_table #(.ENTRIES(TT_N), .CK_W(PIDX_W+1)) u_tt (
    .clk, .rst_n,
    .lk_valid_i(cas_valid), .lk_ppn_i(cas_ppn), .lk_hit_o(tt_hit), .lk_data_o(tt_data),
    .ins_valid_i(tt_ins_v), .ins_ppn_i(tt_ins_ppn), .ins_data_i(tt_ins_d), .ins_ready_o(tt_ins_rdy),
    .rem_valid_i(tt_rem_v), .rem_ppn_i(tt_rem_ppn), .rem_cookie_i(tt_rem_ck), .rem_ready_o(tt_rem_rdy),
    .rem_done_o(tt_rem_done), .rem_cookie_o(tt_rem_done_ck),
    .err_o(tt_err_o), .busy_o(tt_busy), .cam_used_o(tt_cam_used),
    .displacements_o(tt_displacements_o));
  assign ready_o = !tt_busy;

  // ---------------- Config Memory ----------------
  logic              cfg_we   [2];
  logic [PIDX_W-1:0] cfg_wpg  [2];
  lofs_t             cfg_wln  [2];
  line_t             cfg_wd   [2];
  logic [PIDX_W-1:0] cfg_rpg  [3];
  lofs_t             cfg_rln  [3];
  line_t             cfg_rd   [3];

  config_memory #(.PAGES(PAGES), .NWR(2), .NRD(3)) u_cfg (
    .clk, .we_i(cfg_we), .wpage_i(cfg_wpg), .wline_i(cfg_wln), .wdata_i(cfg_wd),
    .rpage_i(cfg_rpg), .rline_i(cfg_rln), .rdata_o(cfg_rd));

  // ---------------- Scratchpad ----------------
  logic              sp_tag_init;
  logic [PIDX_W-1:0] sp_tag_init_pg;
  blk_t              sp_tag_init_val;
  logic [PIDX_W-1:0] sp_rpg [2];
  lofs_t             sp_rln [2];
  logic              sp_rtag [2];
  line_t             sp_rd  [2];

  // ---------------- TLS DSA and H-power generator ----------------
  logic              dsa_v, dsa_ov;
  logic [PIDX_W-1:0] dsa_pg, dsa_opg;
  lofs_t             dsa_ln, dsa_pow, dsa_oln;
  line_t             dsa_d, dsa_ct;
  blk_t              dsa_tag;

  logic              hp_start, hp_full, hp_done, hp_busy;
  logic [PIDX_W-1:0] hp_pg, hp_done_pg;
  blk_t              hp_h;

  scratchpad #(.PAGES(PAGES)) u_sp (
    .clk,
    .we_i(dsa_ov), .wpage_i(dsa_opg), .wline_i(dsa_oln), .wdata_i(dsa_ct),
    .tag_init_i(sp_tag_init), .tag_init_page_i(sp_tag_init_pg), .tag_init_val_i(sp_tag_init_val),
    .tag_xor_i(dsa_ov), .tag_xor_page_i(dsa_opg), .tag_xor_val_i(dsa_tag),
    .rpage_i(sp_rpg), .rline_i(sp_rln), .rtag_i(sp_rtag), .rdata_o(sp_rd));

  hpow_gen u_hpow (
    .clk, .rst_n, .start_i(hp_start), .page_i(hp_pg), .h_i(hp_h), .req_full_o(hp_full),
    .cfg_we_o(cfg_we[1]), .cfg_page_o(cfg_wpg[1]), .cfg_line_o(cfg_wln[1]), .cfg_wdata_o(cfg_wd[1]),
    .done_o(hp_done), .done_page_o(hp_done_pg), .busy_o(hp_busy));

  tls_dsa u_dsa (
    .clk, .rst_n,
    .valid_i(dsa_v), .page_i(dsa_pg), .line_i(dsa_ln), .pow_i(dsa_pow), .data_i(dsa_d),
    .cfg_rpage_o(cfg_rpg), .cfg_rline_o(cfg_rln), .cfg_rdata_i(cfg_rd),
    .valid_o(dsa_ov), .page_o(dsa_opg), .line_o(dsa_oln), .ct_o(dsa_ct), .tag_o(dsa_tag));

  logic unused_hp_busy;
  assign unused_hp_busy = hp_busy;

  // ---------------- Arbiter controller ----------------
  arbiter_ctrl #(.PAGES(PAGES), .MMIO_BASE(MMIO_BASE)) u_ctrl (
    .clk, .rst_n,
    .cas_valid_i(cas_valid), .cas_is_wr_i(cas_is_wr), .cas_ppn_i(cas_ppn), .cas_line_i(cas_line),
    .tt_hit_i(tt_hit), .tt_data_i(tt_data),
    .tt_ins_valid_o(tt_ins_v), .tt_ins_ppn_o(tt_ins_ppn), .tt_ins_data_o(tt_ins_d),
    .tt_ins_ready_i(tt_ins_rdy), .tt_cam_used_i(tt_cam_used),
    .tt_rem_valid_o(tt_rem_v), .tt_rem_ppn_o(tt_rem_ppn), .tt_rem_cookie_o(tt_rem_ck),
    .tt_rem_ready_i(tt_rem_rdy), .tt_rem_done_i(tt_rem_done), .tt_rem_done_cookie_i(tt_rem_done_ck),
    .hw_valid_i, .hw_data_i, .dr_valid_i, .dr_data_i,
    .dram_wvalid_o, .dram_wdata_o, .host_rvalid_o, .host_rdata_o, .alert_n_o,
    .cfg_we_o(cfg_we[0]), .cfg_wpage_o(cfg_wpg[0]), .cfg_wline_o(cfg_wln[0]), .cfg_wdata_o(cfg_wd[0]),
    .sp_rpage_o(sp_rpg), .sp_rline_o(sp_rln), .sp_rtag_o(sp_rtag), .sp_rdata_i(sp_rd),
    .sp_tag_init_o(sp_tag_init), .sp_tag_init_page_o(sp_tag_init_pg), .sp_tag_init_val_o(sp_tag_init_val),
    .hp_start_o(hp_start), .hp_page_o(hp_pg), .hp_h_o(hp_h), .hp_full_i(hp_full),
    .hp_done_i(hp_done), .hp_done_page_i(hp_done_pg),
    .dsa_valid_o(dsa_v), .dsa_page_o(dsa_pg), .dsa_line_o(dsa_ln), .dsa_pow_o(dsa_pow), .dsa_data_o(dsa_d),
    .dsa_done_i(dsa_ov), .dsa_done_page_i(dsa_opg), .dsa_done_line_i(dsa_oln),
    .act_count_o, .pages_freed_o, .dsa_stall_o, .reg_reject_o, .err_dsa_overflow_o, .free_pages_o);

endmodule
