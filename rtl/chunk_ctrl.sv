// chunk_ctrl: chunk, checkpoint and verification controller.
//
// The lead core's dynamic instruction stream is cut into chunks of at most
// CHUNK_INSTS instructions or CHUNK_STORES stores, whichever comes first (a
// chunk also ends early when its execution-information queue section fills).
// Each chunk owns one PCB/EIQ section and is verified by one checker core,
// several chunks in parallel. This block sequences that work:
//
// Lead side (one state machine):
//  * RUN: lead_room_insts / lead_room_stores tell the core how much more it may
//    retire in the chunk (it must not retire past them); lead_ret_cnt and
//    lead_st_commit count what it retires. The core may retire at most one
//    store and append at most one EIQ entry per cycle. lead_freeze rises in the
//    same cycle the chunk's limit is reached.
//  * END_CK: at the chunk end retirement is frozen (lead_freeze) and the
//    checkpoint is written, REGS_PER_BEAT registers per cycle for CKPT_BEATS
//    cycles (ckw_*; the core supplies the registers of beat ckw_beat).
//  * OPEN: the next section is opened in the PCB and EIQ. If all NUM_SEC
//    sections hold unverified chunks the lead stays frozen here: the PCB-full
//    stall.
//  * Roll-back: RB_WAIT waits for the PCB to discard the squashed sections,
//    RB_LOAD streams the failed chunk's starting checkpoint back into the lead
//    (ckr_*[0]), and lead_restore_done lets it resume.
// Checker side (one state machine per checker):
//  * IDLE: the oldest closed chunk is given to an idle checker (chk_start with
//    chk_skip = 1 if this is not the chunk after the one it verified last, so
//    the checker drops its volatile lines: chk_inv_volatile). An idle checker
//    with nothing to do shows chk_idle, when it may be put to sleep.
//  * LOAD: the chunk's starting checkpoint is streamed into the checker
//    (ckr_*[c+1]); chk_go then starts it with chk_len instructions to run.
//  * RUN: its stores are verified by the PCB; an error (vfy_err) is remembered.
//  * CMP/WAIT: at chk_end its registers are streamed into the checkpoint
//    buffer's compare port against the chunk's ending checkpoint (cmp_*). The
//    chunk is verified if the registers match, no store differed and the
//    checker committed exactly as many stores as the lead did.
// Verified chunks are written back in order: when the oldest section is
// verified it is drained from the PCB to L2 and freed. A failed chunk causes a
// roll-back: that chunk and all younger ones are squashed in PCB and EIQ,
// checkers working on them are aborted (chk_abort), all L1 caches are
// flushed (l1_inv_all), and the lead restarts from the failed chunk's first
// checkpoint. Checkpoint slots are used round-robin; NUM_SLOTS = NUM_SEC+1.
//
// Following the document: chunk size, checkpoint creation and loading at 4
// registers per cycle (16 cycles), parallel verification by several checkers,
// store and register comparison, write-back only of verified chunks,
// roll-back to the chunk's starting checkpoint, volatile-line invalidation when
// chunks are skipped. This design's own choices: assigning the oldest waiting
// chunk to the lowest-numbered idle checker, starting a checker only on a
// closed chunk, the store-count check, flushing all L1 caches on roll-back and
// the handshakes. NUM_SEC must be a power of two.
module chunk_ctrl
  import rmt_pkg::*;
#(
  parameter int CHUNK_INSTS   = 2048,
  parameter int CHUNK_STORES  = 128,
  parameter int NUM_CHK       = 2,
  parameter int NUM_SEC       = 8,
  parameter int CKPT_BEATS    = 16,
  parameter int SEQ_W         = 16,
  parameter int CNT_W         = $clog2(CHUNK_STORES + 1),
  localparam int NUM_SLOTS = NUM_SEC + 1,
  localparam int SEC_W  = $clog2(NUM_SEC),
  localparam int SLOT_W = $clog2(NUM_SLOTS),
  localparam int BEAT_W = $clog2(CKPT_BEATS),
  localparam int INS_W  = $clog2(CHUNK_INSTS + 1),
  localparam int STC_W  = $clog2(CHUNK_STORES + 1),
  localparam int CHK_W  = (NUM_CHK > 1) ? $clog2(NUM_CHK) : 1,
  localparam int RET_W  = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  // lead core
  input  logic [RET_W-1:0]   lead_ret_cnt,
  input  logic               lead_st_commit,
  output logic [INS_W-1:0]   lead_room_insts,
  output logic [STC_W-1:0]   lead_room_stores,
  output logic               lead_freeze,
  output logic               lead_rollback,
  output logic               lead_restore_done,
  output logic [SEQ_W-1:0]   lead_seq,
  // checkpoint buffer
  output logic               ckw_valid,
  output logic [SLOT_W-1:0]  ckw_slot,
  output logic [BEAT_W-1:0]  ckw_beat,
  output logic [NUM_CHK:0]   ckr_valid,
  output logic [SLOT_W-1:0]  ckr_slot [NUM_CHK+1],
  output logic [BEAT_W-1:0]  ckr_beat [NUM_CHK+1],
  output logic [NUM_CHK-1:0] cmp_valid,
  output logic [SLOT_W-1:0]  cmp_slot [NUM_CHK],
  output logic [BEAT_W-1:0]  cmp_beat [NUM_CHK],
  input  logic [NUM_CHK-1:0] cmp_done,
  input  logic [NUM_CHK-1:0] cmp_ok,
  // PCB
  output logic               sec_open,
  input  logic               pcb_full,
  output logic               sec_assign,
  output logic [CHK_W-1:0]   sec_assign_chk,
  output logic [SEC_W-1:0]   sec_assign_sec,
  output logic               pcb_drain_req,
  input  logic               pcb_drain_done,
  output logic               sec_squash,
  output logic [SEC_W-1:0]   sec_squash_sec,
  input  logic               pcb_squash_busy,
  input  logic [NUM_CHK-1:0] vfy_err,
  input  logic [CNT_W-1:0]   pcb_sec_cnt [NUM_SEC],
  input  logic [CNT_W-1:0]   pcb_chk_cnt [NUM_CHK],
  // EIQ
  input  logic               eiq_full,
  // caches and quasi-invalidation
  output logic               qinv_clr,
  output logic               l1_inv_all,
  output logic [NUM_CHK-1:0] chk_inv_volatile,
  // checkers
  output logic [NUM_CHK-1:0] chk_start,
  output logic [NUM_CHK-1:0] chk_skip,
  output logic [NUM_CHK-1:0] chk_go,
  output logic [INS_W-1:0]   chk_len [NUM_CHK],
  output logic [SEQ_W-1:0]   chk_seq [NUM_CHK],
  input  logic [NUM_CHK-1:0] chk_end,
  output logic [NUM_CHK-1:0] chk_abort,
  output logic [NUM_CHK-1:0] chk_idle,
  // chunk results
  output logic               chunk_verified,
  output logic               chunk_failed
);
  typedef enum logic [2:0] {L_INIT_CK, L_OPEN, L_RUN, L_END_CK, L_RB_WAIT, L_RB_LOAD} lead_e;
  typedef enum logic [2:0] {C_IDLE, C_LOAD, C_RUN, C_CMP, C_WAIT} chk_e;
  typedef enum logic [2:0] {S_FREE, S_OPEN, S_CLOSED, S_CHECKING, S_VERIFIED} sec_e;

  lead_e              lst;
  chk_e               cst   [NUM_CHK];
  sec_e               sst   [NUM_SEC];
  logic [SEQ_W-1:0]   sseq  [NUM_SEC];
  logic [SLOT_W-1:0]  sslot [NUM_SEC];    // slot of the chunk's starting checkpoint
  logic [INS_W-1:0]   sins  [NUM_SEC];

  logic [SEC_W-1:0]   head, tail;
  logic [SEQ_W-1:0]   seq;                // sequence number of the lead's chunk
  logic [SLOT_W-1:0]  cur_slot;           // its starting checkpoint
  logic [INS_W-1:0]   insts;
  logic [STC_W-1:0]   stores;
  logic [BEAT_W-1:0]  lbeat;
  logic               draining;
  logic [SEC_W-1:0]   rb_sec;

  logic [SEC_W-1:0]   c_sec   [NUM_CHK];
  logic [BEAT_W-1:0]  c_beat  [NUM_CHK];
  logic [NUM_CHK-1:0] c_fail;
  logic [NUM_CHK-1:0] c_hasprev;
  logic [SEQ_W-1:0]   c_prev  [NUM_CHK];

  function automatic logic [SLOT_W-1:0] slot_inc(logic [SLOT_W-1:0] s);
    return (s == SLOT_W'(NUM_SLOTS - 1)) ? '0 : s + 1'b1;
  endfunction
  function automatic logic [SEC_W-1:0] age(logic [SEC_W-1:0] s, logic [SEC_W-1:0] t);
    return s - t;
  endfunction

  // ------------------------------------------------------------ lead outputs
  logic chunk_end;
  assign lead_freeze      = (lst != L_RUN) || chunk_end;
  assign lead_room_insts  = lead_freeze ? '0 : INS_W'(CHUNK_INSTS) - insts;
  assign lead_room_stores = lead_freeze ? '0 : STC_W'(CHUNK_STORES) - stores;
  assign lead_seq         = seq;
  assign ckw_valid        = (lst == L_INIT_CK) || (lst == L_END_CK);
  assign ckw_slot         = (lst == L_INIT_CK) ? cur_slot : slot_inc(cur_slot);
  assign ckw_beat         = lbeat;
  assign sec_open         = (lst == L_OPEN) && !pcb_full && !pcb_squash_busy;

  assign chunk_end = (lst == L_RUN) &&
                     ((insts == INS_W'(CHUNK_INSTS)) || (stores == STC_W'(CHUNK_STORES)) || eiq_full);

  // ------------------------------------------------------------ checker assignment
  // oldest closed chunk, lowest-numbered idle checker
  logic             a_any, c_any;
  logic [SEC_W-1:0] a_sec;
  logic [CHK_W-1:0] a_chk;
  always_comb begin
    a_any = 1'b0;
    a_sec = '0;
    for (int k = NUM_SEC - 1; k >= 0; k--)
      if (sst[SEC_W'(int'(tail) + k)] == S_CLOSED) begin
        a_any = 1'b1;
        a_sec = SEC_W'(int'(tail) + k);
      end
    c_any = 1'b0;
    a_chk = '0;
    for (int c = NUM_CHK - 1; c >= 0; c--)
      if (cst[c] == C_IDLE) begin
        c_any = 1'b1;
        a_chk = CHK_W'(c);
      end
  end

  logic             do_assign;
  logic             rb_go;
  logic [SEC_W-1:0] rb_target;
  assign do_assign      = a_any && c_any && !rb_go && (lst != L_RB_WAIT) && (lst != L_RB_LOAD);
  assign sec_assign     = do_assign;
  assign sec_assign_chk = a_chk;
  assign sec_assign_sec = a_sec;

  // ------------------------------------------------------------ checker results
  // a finished checker: pass/fail decided when its compare completes
  logic [NUM_CHK-1:0] c_pass, c_failnow;
  always_comb begin
    for (int c = 0; c < NUM_CHK; c++) begin
      logic ok;
      ok = cmp_ok[c] && !c_fail[c] && !vfy_err[c] &&
           (pcb_chk_cnt[c] == pcb_sec_cnt[c_sec[c]]);
      c_pass[c]    = (cst[c] == C_WAIT) && cmp_done[c] && ok;
      c_failnow[c] = (cst[c] == C_WAIT) && cmp_done[c] && !ok;
    end
  end

  // the oldest failing chunk this cycle starts a roll-back (not during one)
  always_comb begin
    rb_go     = 1'b0;
    rb_target = '0;
    if ((lst != L_RB_WAIT) && (lst != L_RB_LOAD)) begin
      for (int c = 0; c < NUM_CHK; c++)
        if (c_failnow[c] && (!rb_go || (age(c_sec[c], tail) < age(rb_target, tail)))) begin
          rb_go     = 1'b1;
          rb_target = c_sec[c];
        end
    end
  end

  assign sec_squash     = rb_go;
  assign sec_squash_sec = rb_target;
  assign l1_inv_all     = rb_go;
  assign lead_rollback  = rb_go;
  assign qinv_clr       = rb_go || sec_open;
  assign chunk_failed   = rb_go;
  assign chunk_verified = |c_pass;

  // squashed checkers: working on the failed chunk or a younger one
  always_comb begin
    for (int c = 0; c < NUM_CHK; c++)
      chk_abort[c] = rb_go && (cst[c] != C_IDLE) && (age(c_sec[c], tail) >= age(rb_target, tail));
  end

  // ------------------------------------------------------------ checker streams
  always_comb begin
    ckr_valid   = '0;
    ckr_slot[0] = sslot[rb_sec];
    ckr_beat[0] = lbeat;
    if (lst == L_RB_LOAD) ckr_valid[0] = 1'b1;
    for (int c = 0; c < NUM_CHK; c++) begin
      ckr_slot[c+1]  = sslot[c_sec[c]];
      ckr_beat[c+1]  = c_beat[c];
      ckr_valid[c+1] = (cst[c] == C_LOAD);
      cmp_valid[c]   = (cst[c] == C_CMP);
      cmp_slot[c]    = slot_inc(sslot[c_sec[c]]);
      cmp_beat[c]    = c_beat[c];
      chk_idle[c]    = (cst[c] == C_IDLE) && !(do_assign && (a_chk == CHK_W'(c)));
      chk_len[c]     = sins[c_sec[c]];
      chk_seq[c]     = sseq[c_sec[c]];
    end
  end

  assign pcb_drain_req = !draining && (sst[tail] == S_VERIFIED);

  // ------------------------------------------------------------ state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lst       <= L_INIT_CK;
      head      <= SEC_W'(NUM_SEC - 1);
      tail      <= '0;
      seq       <= '0;
      cur_slot  <= '0;
      insts     <= '0;
      stores    <= '0;
      lbeat     <= '0;
      draining  <= 1'b0;
      rb_sec    <= '0;
      c_fail    <= '0;
      c_hasprev <= '0;
      lead_restore_done <= 1'b0;
      chk_start <= '0;
      chk_skip  <= '0;
      chk_go    <= '0;
      chk_inv_volatile <= '0;
      for (int s = 0; s < NUM_SEC; s++) begin
        sst[s]   <= S_FREE;
        sseq[s]  <= '0;
        sslot[s] <= '0;
        sins[s]  <= '0;
      end
      for (int c = 0; c < NUM_CHK; c++) begin
        cst[c]    <= C_IDLE;
        c_sec[c]  <= '0;
        c_beat[c] <= '0;
        c_prev[c] <= '0;
      end
    end else begin
      lead_restore_done <= 1'b0;
      chk_start         <= '0;
      chk_skip          <= '0;
      chk_go            <= '0;
      chk_inv_volatile  <= '0;

      // ---------------- lead
      unique case (lst)
        L_INIT_CK: begin
          lbeat <= lbeat + 1'b1;
          if (lbeat == BEAT_W'(CKPT_BEATS - 1)) lst <= L_OPEN;
        end
        L_OPEN: if (sec_open) begin
          head        <= head + 1'b1;
          sst[head + 1'b1]   <= S_OPEN;
          sseq[head + 1'b1]  <= seq;
          sslot[head + 1'b1] <= cur_slot;
          insts  <= '0;
          stores <= '0;
          lst    <= L_RUN;
        end
        L_RUN: begin
          insts  <= insts + INS_W'(lead_ret_cnt);
          stores <= stores + STC_W'(lead_st_commit);
          if (chunk_end) begin
            lst   <= L_END_CK;
            lbeat <= '0;
          end
        end
        L_END_CK: begin
          lbeat <= lbeat + 1'b1;
          if (lbeat == BEAT_W'(CKPT_BEATS - 1)) begin
            sst[head]  <= S_CLOSED;
            sins[head] <= insts;
            seq        <= seq + 1'b1;
            cur_slot   <= slot_inc(cur_slot);
            lst        <= L_OPEN;
          end
        end
        L_RB_WAIT: if (!pcb_squash_busy) begin
          lst   <= L_RB_LOAD;
          lbeat <= '0;
        end
        L_RB_LOAD: begin
          lbeat <= lbeat + 1'b1;
          if (lbeat == BEAT_W'(CKPT_BEATS - 1)) begin
            lead_restore_done <= 1'b1;
            insts  <= '0;
            stores <= '0;
            lst    <= L_RUN;
          end
        end
        default: lst <= L_INIT_CK;
      endcase

      // ---------------- in-order write-back of verified chunks
      if (pcb_drain_req) draining <= 1'b1;
      if (pcb_drain_done) begin
        draining  <= 1'b0;
        sst[tail] <= S_FREE;
        tail      <= tail + 1'b1;
      end

      // ---------------- checkers
      for (int c = 0; c < NUM_CHK; c++) begin
        if (vfy_err[c]) c_fail[c] <= 1'b1;
        unique case (cst[c])
          C_IDLE: ;
          C_LOAD: begin
            c_beat[c] <= c_beat[c] + 1'b1;
            if (c_beat[c] == BEAT_W'(CKPT_BEATS - 1)) begin
              chk_go[c] <= 1'b1;
              cst[c]    <= C_RUN;
            end
          end
          C_RUN: if (chk_end[c]) begin
            cst[c]    <= C_CMP;
            c_beat[c] <= '0;
          end
          C_CMP: begin
            c_beat[c] <= c_beat[c] + 1'b1;
            if (c_beat[c] == BEAT_W'(CKPT_BEATS - 1)) cst[c] <= C_WAIT;
          end
          C_WAIT: begin
            if (c_pass[c]) begin
              sst[c_sec[c]] <= S_VERIFIED;
              cst[c]        <= C_IDLE;
            end
            // a failure is acted on by the roll-back below; while another
            // roll-back runs the checker keeps waiting and compares again
            if (c_failnow[c] && !rb_go) begin
              cst[c]    <= C_CMP;
              c_beat[c] <= '0;
            end
          end
          default: cst[c] <= C_IDLE;
        endcase
      end

      if (do_assign) begin
        cst[a_chk]    <= C_LOAD;
        c_sec[a_chk]  <= a_sec;
        c_beat[a_chk] <= '0;
        c_fail[a_chk] <= 1'b0;
        sst[a_sec]    <= S_CHECKING;
        chk_start[a_chk] <= 1'b1;
        c_hasprev[a_chk] <= 1'b1;
        c_prev[a_chk]    <= sseq[a_sec];
        if (!c_hasprev[a_chk] || (sseq[a_sec] != c_prev[a_chk] + 1'b1)) begin
          chk_skip[a_chk]         <= 1'b1;
          chk_inv_volatile[a_chk] <= 1'b1;
        end
      end

      // ---------------- roll-back
      if (rb_go) begin
        for (int s = 0; s < NUM_SEC; s++)
          if (sst[s] != S_FREE && (age(SEC_W'(s), tail) > age(rb_target, tail)))
            sst[s] <= S_FREE;
        sst[rb_target] <= S_OPEN;
        head     <= rb_target;
        rb_sec   <= rb_target;
        seq      <= sseq[rb_target];
        cur_slot <= sslot[rb_target];
        lst      <= L_RB_WAIT;
        for (int c = 0; c < NUM_CHK; c++)
          if (chk_abort[c]) begin
            cst[c]    <= C_IDLE;
            c_fail[c] <= 1'b0;
          end
      end
    end
  end

  // A checker's result only counts for a chunk that is still being checked.
  a_wait_checking: assert property (@(posedge clk) disable iff (!rst_n)
    (cst[0] == C_WAIT) |-> (sst[c_sec[0]] == S_CHECKING));
endmodule
