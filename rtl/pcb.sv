// pcb: post-commit buffer.
//
// The lead core writes every committed store here (and into its L1) in program
// order. Stores stay until the chunk they belong to has been verified by a
// checker; then the section is written back to L2. The buffer is organised as
// NUM_SEC sections of SEC_ENTRIES entries, one section per chunk, used as a
// circular queue: tail is the oldest unverified chunk, head the chunk the lead
// is executing.
//
// Functions:
//  * append     - app_valid writes {word address, data} at the end of the head section.
//  * open       - open_valid starts a new (empty) head section for the next chunk.
//  * verify     - each checker c is bound to a section by assign_*; every store it
//                 commits (vfy_valid[c]) is compared with the next entry of that
//                 section. A differing address or data, or a store beyond the
//                 section's end, raises vfy_err[c] one cycle later. chk_cnt[c] is the
//                 number of stores the checker has verified so far, which is also the
//                 checker's "logical time now" inside its section.
//  * search     - one search port. A search by the lead covers every entry; a search
//                 by checker c covers only the entries older than its logical time
//                 (backward search) and returns the youngest matching word, a mask of
//                 the words of the same line present in that range (so the caller can
//                 probe them one at a time), and whether any younger entry writes the
//                 line (forward search, used to set the volatile bit).
//                 The search scans one section per cycle, oldest first, so it occupies
//                 the port for NUM_SEC cycles; the response is registered and appears
//                 NUM_SEC+1 cycles after the request cycle. A new request can be taken
//                 in the last scan cycle of the previous one.
//  * drain      - drain_req writes the tail section back to L2 one word per wb
//                 handshake, then frees it (drain_done). The section is freed only
//                 when no search is in flight, so a search never loses data.
//  * squash     - squash_req discards sections squash_sec..head (roll-back). The
//                 entries are walked one per cycle so that the membership filter can
//                 remove them (rm_*); afterwards squash_sec is the open head section.
//                 Searches are held off while a squash is pending or running.
// Every entry leaving the buffer (written back or squashed) is reported on rm_*.
//
// Follows the document: the sectioned organisation, eight sections of 128
// entries, a single search port taking 8 cycles, backward/forward search and
// one-word-per-probe results. This design's own choices: whole-word entries, one
// section scanned per cycle, the walk used for squash, and the handshakes.
module pcb
  import rmt_pkg::*;
#(
  parameter int NUM_SEC     = 8,
  parameter int SEC_ENTRIES = 128,
  parameter int NUM_CHK     = 2,
  localparam int SEC_W = $clog2(NUM_SEC),
  localparam int CNT_W = $clog2(SEC_ENTRIES + 1),
  localparam int CHK_W = (NUM_CHK > 1) ? $clog2(NUM_CHK) : 1,
  localparam int REQ_W = $clog2(NUM_CHK + 1),
  localparam int IDX_W = $clog2(SEC_ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // lead store append
  input  logic               app_valid,
  input  waddr_t             app_addr,
  input  word_t              app_data,
  // section control
  input  logic               open_valid,
  output logic               full,
  output logic               empty,
  output logic [SEC_W-1:0]   head_sec,
  output logic [SEC_W-1:0]   tail_sec,
  output logic [CNT_W-1:0]   sec_cnt [NUM_SEC],
  // checker binding and store verification
  input  logic               assign_valid,
  input  logic [CHK_W-1:0]   assign_chk,
  input  logic [SEC_W-1:0]   assign_sec,
  input  logic [NUM_CHK-1:0] vfy_valid,
  input  waddr_t             vfy_addr [NUM_CHK],
  input  word_t              vfy_data [NUM_CHK],
  output logic [NUM_CHK-1:0] vfy_err,
  output logic [CNT_W-1:0]   chk_cnt [NUM_CHK],
  // drain of the verified tail section to L2
  input  logic               drain_req,
  output logic               drain_done,
  output logic               wb_valid,
  output waddr_t             wb_addr,
  output word_t              wb_data,
  input  logic               wb_ready,
  // roll-back
  input  logic               squash_req,
  input  logic [SEC_W-1:0]   squash_sec,
  output logic               squash_busy,
  // entries leaving the buffer
  output logic               rm_valid,
  output waddr_t             rm_addr,
  // search port (requester 0 = lead, c+1 = checker c)
  input  logic               srch_valid,
  input  logic [REQ_W-1:0]   srch_req,
  input  waddr_t             srch_addr,
  output logic               srch_ready,
  output logic               rsp_valid,
  output logic [REQ_W-1:0]   rsp_req,
  output logic               rsp_hit,
  output word_t              rsp_data,
  output logic [LINE_WORDS-1:0] rsp_line_mask,
  output logic               rsp_fwd
);

  // ---------------------------------------------------------------- storage
  waddr_t             e_addr [NUM_SEC][SEC_ENTRIES];
  word_t              e_data [NUM_SEC][SEC_ENTRIES];
  logic [CNT_W-1:0]   cnt    [NUM_SEC];
  logic [SEC_W-1:0]   head, tail;
  logic [SEC_W:0]     used;
  logic [SEC_W-1:0]   c_sec  [NUM_CHK];
  logic [CNT_W-1:0]   c_idx  [NUM_CHK];

  assign full     = (used == (SEC_W+1)'(NUM_SEC));
  assign empty    = (used == '0);
  assign head_sec = head;
  assign tail_sec = tail;
  assign sec_cnt  = cnt;
  assign chk_cnt  = c_idx;

  // age position of a section relative to the tail (0 = oldest)
  function automatic logic [SEC_W-1:0] pos_of(logic [SEC_W-1:0] s, logic [SEC_W-1:0] t);
    return SEC_W'((int'(s) - int'(t) + NUM_SEC) % NUM_SEC);
  endfunction

  function automatic logic [SEC_W-1:0] sec_add(logic [SEC_W-1:0] s, int d);
    return SEC_W'((int'(s) + d + NUM_SEC) % NUM_SEC);
  endfunction

  // ---------------------------------------------------------------- walker (drain / squash)
  typedef enum logic [1:0] {W_IDLE, W_DRAIN, W_SQUASH} walk_e;
  walk_e            wst;
  logic             drain_pend, squash_pend;
  logic [SEC_W-1:0] sq_target;
  logic [SEC_W-1:0] w_sec;
  logic [CNT_W-1:0] w_idx;

  // ---------------------------------------------------------------- search state
  logic             sbusy;
  logic [SEC_W-1:0] scnt;
  logic [REQ_W-1:0] s_req;
  waddr_t           s_addr;
  logic             a_hit, a_fwd;
  word_t            a_data;
  logic [LINE_WORDS-1:0] a_mask;

  logic last_scan;
  assign last_scan  = sbusy && (scnt == SEC_W'(NUM_SEC - 1));
  assign srch_ready = (!sbusy || last_scan) && !squash_pend && (wst != W_SQUASH);

  // combinational scan of one section
  logic [SEC_W-1:0] scan_sec;
  logic             scan_inuse;
  logic             sc_hit, sc_fwd;
  word_t            sc_data;
  logic [LINE_WORDS-1:0] sc_mask;
  logic [SEC_W-1:0] now_pos;
  logic [CNT_W-1:0] now_idx;
  logic             s_is_lead;
  logic [CHK_W-1:0] s_chk;

  always_comb begin
    logic bwd;
    logic [SEC_W-1:0] p;
    bwd        = 1'b0;
    s_is_lead  = (s_req == '0);
    s_chk      = s_is_lead ? '0 : CHK_W'(s_req - REQ_W'(1));
    scan_sec   = sec_add(tail, int'(scnt));
    scan_inuse = ({1'b0, scnt} < used);
    now_pos    = pos_of(c_sec[s_chk], tail);
    now_idx    = c_idx[s_chk];
    p          = scnt;   // position of the scanned section
    sc_hit  = 1'b0;
    sc_fwd  = 1'b0;
    sc_data = '0;
    sc_mask = '0;
    for (int i = 0; i < SEC_ENTRIES; i++) begin
      if (scan_inuse && (CNT_W'(i) < cnt[scan_sec])) begin
        bwd = s_is_lead || (p < now_pos) || ((p == now_pos) && (CNT_W'(i) < now_idx));
        if (line_of(e_addr[scan_sec][i]) == line_of(s_addr)) begin
          if (bwd) begin
            sc_mask[e_addr[scan_sec][i][LW_W-1:0]] = 1'b1;
            if (e_addr[scan_sec][i] == s_addr) begin
              sc_hit  = 1'b1;             // later entries overwrite: youngest wins
              sc_data = e_data[scan_sec][i];
            end
          end else begin
            sc_fwd = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sbusy     <= 1'b0;
      scnt      <= '0;
      s_req     <= '0;
      s_addr    <= '0;
      a_hit     <= 1'b0;
      a_fwd     <= 1'b0;
      a_data    <= '0;
      a_mask    <= '0;
      rsp_valid <= 1'b0;
      rsp_req   <= '0;
      rsp_hit   <= 1'b0;
      rsp_data  <= '0;
      rsp_line_mask <= '0;
      rsp_fwd   <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      if (sbusy) begin
        if (last_scan) begin
          rsp_valid     <= 1'b1;
          rsp_req       <= s_req;
          rsp_hit       <= a_hit | sc_hit;
          rsp_data      <= sc_hit ? sc_data : a_data;
          rsp_line_mask <= a_mask | sc_mask;
          rsp_fwd       <= a_fwd | sc_fwd;
          sbusy         <= 1'b0;
        end else begin
          scnt   <= scnt + 1'b1;
          a_hit  <= a_hit | sc_hit;
          if (sc_hit) a_data <= sc_data;
          a_mask <= a_mask | sc_mask;
          a_fwd  <= a_fwd | sc_fwd;
        end
      end
      if (srch_valid && srch_ready) begin
        sbusy  <= 1'b1;
        scnt   <= '0;
        s_req  <= srch_req;
        s_addr <= srch_addr;
        a_hit  <= 1'b0;
        a_fwd  <= 1'b0;
        a_data <= '0;
        a_mask <= '0;
      end
    end
  end

  // ---------------------------------------------------------------- sections, entries, verify, walker
  assign drain_done  = (wst == W_DRAIN) && (w_idx == cnt[tail]) && !sbusy;
  assign wb_valid    = (wst == W_DRAIN) && (w_idx < cnt[tail]);
  assign wb_addr     = e_addr[tail][IDX_W'(w_idx)];
  assign wb_data     = e_data[tail][IDX_W'(w_idx)];
  assign squash_busy = squash_pend || (wst == W_SQUASH);

  logic sq_emit;
  assign sq_emit  = (wst == W_SQUASH) && (w_idx != '0);
  assign rm_valid = (wb_valid && wb_ready) || sq_emit;
  assign rm_addr  = sq_emit ? e_addr[w_sec][IDX_W'((w_idx - 1'b1))] : wb_addr;

  always_ff @(posedge clk) begin
    if (app_valid && (cnt[head] < CNT_W'(SEC_ENTRIES))) begin
      e_addr[head][IDX_W'(cnt[head])] <= app_addr;
      e_data[head][IDX_W'(cnt[head])] <= app_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head        <= SEC_W'(NUM_SEC - 1);   // first open makes section 0 the head
      tail        <= '0;
      used        <= '0;
      wst         <= W_IDLE;
      drain_pend  <= 1'b0;
      squash_pend <= 1'b0;
      sq_target   <= '0;
      w_sec       <= '0;
      w_idx       <= '0;
      vfy_err     <= '0;
      for (int s = 0; s < NUM_SEC; s++) cnt[s] <= '0;
      for (int c = 0; c < NUM_CHK; c++) begin
        c_sec[c] <= '0;
        c_idx[c] <= '0;
      end
    end else begin
      if (app_valid && (cnt[head] < CNT_W'(SEC_ENTRIES)))
        cnt[head] <= cnt[head] + 1'b1;
      if (open_valid && !full) begin
        head                   <= sec_add(head, 1);
        cnt[sec_add(head, 1)]  <= '0;
        used                   <= used + 1'b1;
      end

      // checker verification
      for (int c = 0; c < NUM_CHK; c++) begin
        vfy_err[c] <= 1'b0;
        if (vfy_valid[c]) begin
          if ((c_idx[c] >= cnt[c_sec[c]]) ||
              (e_addr[c_sec[c]][IDX_W'(c_idx[c])] != vfy_addr[c]) ||
              (e_data[c_sec[c]][IDX_W'(c_idx[c])] != vfy_data[c]))
            vfy_err[c] <= 1'b1;
          if (c_idx[c] < CNT_W'(SEC_ENTRIES)) c_idx[c] <= c_idx[c] + 1'b1;
        end
      end
      if (assign_valid) begin
        c_sec[assign_chk] <= assign_sec;
        c_idx[assign_chk] <= '0;
      end

      // walker
      if (drain_req)  drain_pend <= 1'b1;
      if (squash_req) begin
        squash_pend <= 1'b1;
        sq_target   <= squash_sec;
      end
      unique case (wst)
        W_IDLE: begin
          if (drain_pend || drain_req) begin
            wst        <= W_DRAIN;
            drain_pend <= 1'b0;
            w_idx      <= '0;
          end else if (squash_pend && !sbusy) begin
            wst         <= W_SQUASH;
            squash_pend <= 1'b0;
            w_sec       <= head;
            w_idx       <= cnt[head];
          end
        end
        W_DRAIN: begin
          if (wb_valid && wb_ready) w_idx <= w_idx + 1'b1;
          if (drain_done) begin
            tail      <= sec_add(tail, 1);
            cnt[tail] <= '0;
            used      <= used - 1'b1;
            wst       <= W_IDLE;
          end
        end
        W_SQUASH: begin
          if (w_idx != '0) begin
            w_idx <= w_idx - 1'b1;
          end else if (w_sec == sq_target) begin
            cnt[sq_target] <= '0;
            head           <= sq_target;
            used           <= {1'b0, pos_of(sq_target, tail)} + 1'b1;
            wst            <= W_IDLE;
          end else begin
            w_sec <= sec_add(w_sec, -1);
            w_idx <= cnt[sec_add(w_sec, -1)];
          end
        end
        default: wst <= W_IDLE;
      endcase
    end
  end


  // The controller only appends to a section that has room and opens when not full.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  app_valid |-> (cnt[head] < CNT_W'(SEC_ENTRIES)));
  a_no_open_full: assert property (@(posedge clk) disable iff (!rst_n) open_valid |-> !full);

endmodule
