// rmt_cmp: error-tolerance support for one lead core and NUM_CHK checker cores.
//
// A lead core runs the program at full speed; NUM_CHK checker cores, running at
// a lower voltage and frequency, re-execute it in chunks, several chunks in
// parallel, and compare every store and the final register state with the
// lead's. This module holds everything that makes that work except the cores
// themselves and the shared L2 cache, whose interfaces are its ports:
//
//   chunk_ctrl   chunking, checkpoints, checker assignment, results, roll-back
//   ckpt_buf     register checkpoints (create, load, compare)
//   pcb          post-commit buffer of unverified lead stores (+ write-back)
//   pcb_filter   membership hash table that skips hopeless PCB searches
//   pcb_arb      shares the PCB's single search port
//   eiq          branch outcomes/targets and miss addresses for the checkers
//   qinv_gen     quasi-invalidations on the lead's first write to a line
//   l1_dcache    one per core (index 0 = lead, c+1 = checker c)
//   line_fill    one per core: L1 miss handling and L2/PCB merge
//
// Core ports are arrays indexed by core (0 = lead, c+1 = checker c) where every
// core has them, and lead_*/chk_* where only one kind does. Per core:
//   ld_*    L1 load (2-cycle response). On a miss the core issues miss_* and
//           receives the word on crit_*; the L1 is filled behind it.
//   st_*    committed stores. The lead's go to its L1, the PCB and the
//           quasi-invalidation generator; a checker's go to its L1 and to the
//           PCB for verification.
//   l2_*    line reads from the shared L2 (valid/ready request, pulse reply).
// The PCB writes verified stores to L2 on wb_*.
// Lead core: it retires at most lead_room_* more instructions/stores in the
// current chunk, stops while lead_freeze, supplies registers for checkpoint
// beat lead_ckpt_beat on lead_ckpt_regs/lead_pc (beat 0 carries the PC), and
// on lead_rollback flushes and reloads the registers delivered on
// lead_rst_* until lead_restore_done. lead_ei_* appends assistance entries.
// Checker c: chk_start/chk_skip announce a chunk, its starting registers arrive
// on chk_ld_*, chk_go starts it for chk_len instructions, chk_ei_* deliver the
// lead's branch and miss information, chk_end reports the end, after which the
// checker supplies the registers of beat chk_cmp_beat while chk_cmp_req.
// chk_abort cancels its chunk; chk_idle marks a checker that could sleep.
module rmt_cmp
  import rmt_pkg::*;
#(
  parameter int NUM_CHK      = 2,
  parameter int NUM_SEC      = 8,
  parameter int SEC_ENTRIES  = 128,
  parameter int CHUNK_INSTS  = 2048,
  parameter int EIQ_ENTRIES  = 512,
  parameter int FILTER_SIZE  = 257,
  parameter int L1_SETS      = 512,
  parameter int L1_WAYS      = 2,
  localparam int NC     = NUM_CHK + 1,
  localparam int NREGB  = 4,
  localparam int BEATS  = 16,
  localparam int SLOT_W = $clog2(NUM_SEC + 1),
  localparam int BEAT_W = $clog2(BEATS),
  localparam int INS_W  = $clog2(CHUNK_INSTS + 1),
  localparam int STC_W  = $clog2(SEC_ENTRIES + 1),
  localparam int SEQ_W  = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // ---------------- per-core memory ports
  input  logic [NC-1:0]    ld_valid,
  input  waddr_t           ld_addr      [NC],
  output logic [NC-1:0]    ld_rsp_valid,
  output logic [NC-1:0]    ld_hit,
  output word_t            ld_data      [NC],
  input  logic [NC-1:0]    miss_valid,
  input  waddr_t           miss_addr    [NC],
  output logic [NC-1:0]    miss_ready,
  output logic [NC-1:0]    crit_valid,
  output word_t            crit_data    [NC],
  input  logic [NC-1:0]    st_valid,
  input  waddr_t           st_addr      [NC],
  input  word_t            st_data      [NC],
  output logic [NC-1:0]    l2_req_valid,
  output laddr_t           l2_req_line  [NC],
  input  logic [NC-1:0]    l2_req_ready,
  input  logic [NC-1:0]    l2_rsp_valid,
  input  line_t            l2_rsp_data  [NC],
  output logic             wb_valid,
  output waddr_t           wb_addr,
  output word_t            wb_data,
  input  logic             wb_ready,
  // ---------------- lead core
  input  logic [4:0]       lead_ret_cnt,
  output logic [INS_W-1:0] lead_room_insts,
  output logic [STC_W-1:0] lead_room_stores,
  output logic             lead_freeze,
  output logic [SEQ_W-1:0] lead_seq,
  output logic             lead_ckpt_req,
  output logic [BEAT_W-1:0] lead_ckpt_beat,
  input  word_t            lead_ckpt_regs [NREGB],
  input  word_t            lead_pc,
  output logic             lead_rollback,
  output logic             lead_rst_valid,
  output word_t            lead_rst_regs  [NREGB],
  output word_t            lead_rst_pc,
  output logic             lead_restore_done,
  input  logic             lead_ei_valid,
  input  ei_entry_t        lead_ei_entry,
  // ---------------- checker cores
  output logic [NUM_CHK-1:0] chk_start,
  output logic [NUM_CHK-1:0] chk_skip,
  output logic [SEQ_W-1:0]   chk_seq      [NUM_CHK],
  output logic [NUM_CHK-1:0] chk_ld_valid,
  output word_t              chk_ld_regs  [NUM_CHK][NREGB],
  output word_t              chk_ld_pc    [NUM_CHK],
  output logic [NUM_CHK-1:0] chk_go,
  output logic [INS_W-1:0]   chk_len      [NUM_CHK],
  output logic [NUM_CHK-1:0] chk_ei_valid,
  output ei_entry_t          chk_ei_entry [NUM_CHK],
  input  logic [NUM_CHK-1:0] chk_ei_pop,
  input  logic [NUM_CHK-1:0] chk_end,
  output logic [NUM_CHK-1:0] chk_cmp_req,
  output logic [BEAT_W-1:0]  chk_cmp_beat [NUM_CHK],
  input  word_t              chk_cmp_regs [NUM_CHK][NREGB],
  input  word_t              chk_cmp_pc   [NUM_CHK],
  output logic [NUM_CHK-1:0] chk_abort,
  output logic [NUM_CHK-1:0] chk_idle,
  // ---------------- status
  output logic             chunk_verified,
  output logic             chunk_failed
);
  localparam int SEC_W = $clog2(NUM_SEC);
  localparam int CHK_W = (NUM_CHK > 1) ? $clog2(NUM_CHK) : 1;
  localparam int REQ_W = $clog2(NC);

  // ---------------------------------------------------------------- controller
  logic               ckw_valid;
  logic [SLOT_W-1:0]  ckw_slot;
  logic [NC-1:0]      ckr_valid, ckr_rvalid;
  logic [SLOT_W-1:0]  ckr_slot [NC];
  logic [BEAT_W-1:0]  ckr_beat [NC];
  word_t              ckr_regs [NC][NREGB];
  word_t              ckr_pc   [NC];
  logic [NUM_CHK-1:0] cmp_valid, cmp_done, cmp_ok;
  logic [SLOT_W-1:0]  cmp_slot [NUM_CHK];
  logic               sec_open, sec_assign, sec_squash;
  logic [CHK_W-1:0]   sec_assign_chk;
  logic [SEC_W-1:0]   sec_assign_sec, sec_squash_sec;
  logic               pcb_full, pcb_empty, drain_req, drain_done, squash_busy;
  logic [NUM_CHK-1:0] vfy_err;
  logic [STC_W-1:0]   sec_cnt [NUM_SEC];
  logic [STC_W-1:0]   chk_cnt [NUM_CHK];
  logic               eiq_full, qinv_clr, l1_inv_all;
  logic [NUM_CHK-1:0] chk_inv_volatile;

  chunk_ctrl #(
    .CHUNK_INSTS (CHUNK_INSTS),
    .CHUNK_STORES(SEC_ENTRIES),
    .NUM_CHK     (NUM_CHK),
    .NUM_SEC     (NUM_SEC),
    .CKPT_BEATS  (BEATS),
    .SEQ_W       (SEQ_W),
    .CNT_W       (STC_W)
  ) u_ctrl (
    .clk, .rst_n,
    .lead_ret_cnt, .lead_st_commit(st_valid[0]),
    .lead_room_insts, .lead_room_stores, .lead_freeze,
    .lead_rollback, .lead_restore_done, .lead_seq,
    .ckw_valid, .ckw_slot, .ckw_beat(lead_ckpt_beat),
    .ckr_valid, .ckr_slot, .ckr_beat,
    .cmp_valid, .cmp_slot, .cmp_beat(chk_cmp_beat), .cmp_done, .cmp_ok,
    .sec_open, .pcb_full, .sec_assign, .sec_assign_chk, .sec_assign_sec,
    .pcb_drain_req(drain_req), .pcb_drain_done(drain_done),
    .sec_squash, .sec_squash_sec, .pcb_squash_busy(squash_busy),
    .vfy_err, .pcb_sec_cnt(sec_cnt), .pcb_chk_cnt(chk_cnt),
    .eiq_full, .qinv_clr, .l1_inv_all, .chk_inv_volatile,
    .chk_start, .chk_skip, .chk_go, .chk_len, .chk_seq, .chk_end,
    .chk_abort, .chk_idle, .chunk_verified, .chunk_failed
  );
  assign lead_ckpt_req = ckw_valid;
  assign chk_cmp_req   = cmp_valid;

  // ---------------------------------------------------------------- checkpoints
  ckpt_buf #(
    .NUM_SLOTS    (NUM_SEC + 1),
    .NUM_REGS     (BEATS * NREGB),
    .REGS_PER_BEAT(NREGB),
    .NUM_RD       (NC),
    .NUM_CMP      (NUM_CHK)
  ) u_ckpt (
    .clk, .rst_n,
    .wr_valid(ckw_valid), .wr_slot(ckw_slot), .wr_beat(lead_ckpt_beat),
    .wr_regs(lead_ckpt_regs), .wr_pc(lead_pc),
    .rd_valid(ckr_valid), .rd_slot(ckr_slot), .rd_beat(ckr_beat),
    .rd_rvalid(ckr_rvalid), .rd_regs(ckr_regs), .rd_pc(ckr_pc),
    .cmp_valid, .cmp_slot, .cmp_beat(chk_cmp_beat), .cmp_regs(chk_cmp_regs),
    .cmp_pc(chk_cmp_pc), .cmp_done, .cmp_ok
  );
  assign lead_rst_valid = ckr_rvalid[0];
  assign lead_rst_regs  = ckr_regs[0];
  assign lead_rst_pc    = ckr_pc[0];
  always_comb begin
    for (int c = 0; c < NUM_CHK; c++) begin
      chk_ld_valid[c] = ckr_rvalid[c+1];
      chk_ld_regs[c]  = ckr_regs[c+1];
      chk_ld_pc[c]    = ckr_pc[c+1];
    end
  end

  // ---------------------------------------------------------------- post-commit buffer
  logic               srch_valid, srch_ready, rsp_valid, rsp_hit, rsp_fwd;
  logic [REQ_W-1:0]   srch_req, rsp_req;
  waddr_t             srch_addr;
  word_t              rsp_data;
  logic [LINE_WORDS-1:0] rsp_mask;
  logic               rm_valid;
  waddr_t             rm_addr;
  waddr_t             vfy_addr [NUM_CHK];
  word_t              vfy_data [NUM_CHK];

  always_comb begin
    for (int c = 0; c < NUM_CHK; c++) begin
      vfy_addr[c] = st_addr[c+1];
      vfy_data[c] = st_data[c+1];
    end
  end

  pcb #(
    .NUM_SEC    (NUM_SEC),
    .SEC_ENTRIES(SEC_ENTRIES),
    .NUM_CHK    (NUM_CHK)
  ) u_pcb (
    .clk, .rst_n,
    .app_valid(st_valid[0]), .app_addr(st_addr[0]), .app_data(st_data[0]),
    .open_valid(sec_open), .full(pcb_full), .empty(pcb_empty),
    .head_sec(), .tail_sec(), .sec_cnt,
    .assign_valid(sec_assign), .assign_chk(sec_assign_chk), .assign_sec(sec_assign_sec),
    .vfy_valid(st_valid[NC-1:1]), .vfy_addr, .vfy_data, .vfy_err, .chk_cnt,
    .drain_req, .drain_done, .wb_valid, .wb_addr, .wb_data, .wb_ready,
    .squash_req(sec_squash), .squash_sec(sec_squash_sec), .squash_busy,
    .rm_valid, .rm_addr,
    .srch_valid, .srch_req, .srch_addr, .srch_ready,
    .rsp_valid, .rsp_req, .rsp_hit, .rsp_data, .rsp_line_mask(rsp_mask), .rsp_fwd
  );

  // ---------------------------------------------------------------- membership filter
  laddr_t flt_line  [NC];
  logic   flt_maybe [NC];

  pcb_filter #(
    .ENTRIES(FILTER_SIZE),
    .CNT_W  (8),
    .NUM_Q  (NC)
  ) u_filter (
    .clk, .rst_n,
    .clr(pcb_empty),
    .ins_valid(st_valid[0]), .ins_line(line_of(st_addr[0])),
    .rm_valid, .rm_line(line_of(rm_addr)),
    .q_line(flt_line), .q_maybe(flt_maybe)
  );

  // ---------------------------------------------------------------- search arbiter
  logic [NC-1:0] ps_valid, ps_ready, pr_valid;
  waddr_t        ps_addr [NC];

  pcb_arb #(.NUM_REQ(NC)) u_arb (
    .clk, .rst_n,
    .ps_valid, .ps_addr, .ps_ready, .pr_valid,
    .srch_valid, .srch_req, .srch_addr, .srch_ready, .rsp_valid, .rsp_req
  );

  // ---------------------------------------------------------------- execution information queue
  eiq #(
    .NUM_SEC    (NUM_SEC),
    .SEC_ENTRIES(EIQ_ENTRIES),
    .NUM_CHK    (NUM_CHK)
  ) u_eiq (
    .clk, .rst_n,
    .open_valid(sec_open), .squash_valid(sec_squash), .squash_sec(sec_squash_sec),
    .app_valid(lead_ei_valid), .app_entry(lead_ei_entry), .head_full(eiq_full),
    .assign_valid(sec_assign), .assign_chk(sec_assign_chk), .assign_sec(sec_assign_sec),
    .rd_valid(chk_ei_valid), .rd_entry(chk_ei_entry), .rd_pop(chk_ei_pop)
  );

  // ---------------------------------------------------------------- quasi-invalidation
  logic   qinv_valid;
  laddr_t qinv_line;

  qinv_gen #(.DEPTH(SEC_ENTRIES)) u_qinv (
    .clk, .rst_n, .clr(qinv_clr),
    .st_valid(st_valid[0]), .st_line(line_of(st_addr[0])),
    .qinv_valid, .qinv_line
  );

  // ---------------------------------------------------------------- per-core L1 and miss handling
  for (genvar c = 0; c < NC; c++) begin : g_core
    logic   fill_valid, fill_volatile;
    laddr_t fill_line;
    line_t  fill_data;

    line_fill u_fill (
      .clk, .rst_n,
      .flush     (l1_inv_all),
      .st_valid(st_valid[c]), .st_addr(st_addr[c]), .st_data(st_data[c]),
      .qinv_valid((c == 0) ? 1'b0 : qinv_valid),
      .qinv_line,
      .miss_valid(miss_valid[c]), .miss_addr(miss_addr[c]), .miss_ready(miss_ready[c]),
      .crit_valid(crit_valid[c]), .crit_data(crit_data[c]),
      .l2_req_valid(l2_req_valid[c]), .l2_req_line(l2_req_line[c]), .l2_req_ready(l2_req_ready[c]),
      .l2_rsp_valid(l2_rsp_valid[c]), .l2_rsp_data(l2_rsp_data[c]),
      .flt_line(flt_line[c]), .flt_maybe(flt_maybe[c]),
      .ps_valid(ps_valid[c]), .ps_addr(ps_addr[c]), .ps_ready(ps_ready[c]),
      .pr_valid(pr_valid[c]), .pr_hit(rsp_hit), .pr_data(rsp_data), .pr_mask(rsp_mask),
      .pr_fwd(rsp_fwd),
      .fill_valid, .fill_line, .fill_data, .fill_volatile
    );

    l1_dcache #(.SETS(L1_SETS), .WAYS(L1_WAYS)) u_l1 (
      .clk, .rst_n,
      .ld_valid(ld_valid[c]), .ld_addr(ld_addr[c]),
      .ld_rsp_valid(ld_rsp_valid[c]), .ld_hit(ld_hit[c]), .ld_data(ld_data[c]),
      .st_valid(st_valid[c]), .st_addr(st_addr[c]), .st_data(st_data[c]),
      .fill_valid, .fill_line, .fill_data, .fill_volatile,
      // the lead sends quasi-invalidations; only checkers receive them
      .qinv_valid  ((c == 0) ? 1'b0 : qinv_valid),
      .qinv_line,
      .inv_volatile((c == 0) ? 1'b0 : chk_inv_volatile[(c == 0) ? 0 : c - 1]),
      .inv_all     (l1_inv_all)
    );
  end
endmodule
