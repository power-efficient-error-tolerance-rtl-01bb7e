// tb_rmt_cmp: end-to-end testbench of the error-tolerance support, at the
// design's default sizes (8 x 128-entry PCB, 2048-instruction chunks, two
// checkers, 257-entry filter, 32 KB L1s).
//
// The cores and the shared L2 are behavioural stand-ins. The "program" is a
// pure function of the dynamic instruction index n: whether instruction n is a
// store, branch or load, its address and data, and the architectural
// registers after n instructions (regs(n)); the PC is 4n. This lets every
// value be predicted independently of the hardware:
//  * the lead retires up to 12 instructions per cycle (at most one store and
//    one branch), stops at loads until they complete, appends branch outcomes
//    and miss addresses to the EIQ, and supplies regs(n) for checkpoints;
//  * each checker, at half speed (a step every other cycle, up to 4
//    instructions), loads its chunk's starting checkpoint (checked against
//    regs(n)), re-executes the chunk, checks every EIQ branch entry against
//    the program, sends its stores for verification and supplies regs(n) at
//    the end;
//  * every load of every core is checked against the memory image at that
//    core's logical time: the last store of the program before it, else the
//    initial memory content;
//  * every L2 write-back must be the next committed lead store, in order.
// Two faults are injected once each: a corrupted store data word in chunk
// FAULT_ST_SEQ and a corrupted register in chunk FAULT_REG_SEQ. Both must be
// caught and rolled back, and the lead must be restored to the chunk's start.
// The program has three regions so that chunks end on the instruction limit,
// on the store limit and on a full EIQ section. Every mechanism is counted and
// must have happened at least once.
module tb_rmt_cmp;
  import rmt_pkg::*;
  localparam int NUM_CHK = 2, NC = 3, NREGB = 4;
  localparam int RUN_CHUNKS    = 40;
  localparam int FAULT_ST_SEQ  = 5;
  localparam int FAULT_REG_SEQ = 12;
  localparam logic [63:0] BASE = 64'h0010_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- DUT signals
  logic [NC-1:0] ld_valid, ld_rsp_valid, ld_hit, miss_valid, miss_ready, crit_valid, st_valid;
  waddr_t ld_addr [NC], miss_addr [NC], st_addr [NC];
  word_t  ld_data [NC], crit_data [NC], st_data [NC];
  logic [NC-1:0] l2_req_valid, l2_req_ready, l2_rsp_valid;
  laddr_t l2_req_line [NC];
  line_t  l2_rsp_data [NC];
  logic wb_valid, wb_ready; waddr_t wb_addr; word_t wb_data;
  logic [4:0] lead_ret_cnt;
  logic [11:0] lead_room_insts; logic [7:0] lead_room_stores;
  logic lead_freeze, lead_ckpt_req, lead_rollback, lead_rst_valid, lead_restore_done;
  logic [15:0] lead_seq; logic [3:0] lead_ckpt_beat;
  word_t lead_ckpt_regs [NREGB], lead_pc, lead_rst_regs [NREGB], lead_rst_pc;
  logic lead_ei_valid; ei_entry_t lead_ei_entry;
  logic [NUM_CHK-1:0] chk_start, chk_skip, chk_ld_valid, chk_go, chk_ei_valid, chk_ei_pop,
                      chk_end, chk_cmp_req, chk_abort, chk_idle;
  logic [15:0] chk_seq [NUM_CHK];
  word_t chk_ld_regs [NUM_CHK][NREGB], chk_ld_pc [NUM_CHK];
  logic [11:0] chk_len [NUM_CHK];
  ei_entry_t chk_ei_entry [NUM_CHK];
  logic [3:0] chk_cmp_beat [NUM_CHK];
  word_t chk_cmp_regs [NUM_CHK][NREGB], chk_cmp_pc [NUM_CHK];
  logic chunk_verified, chunk_failed;

  rmt_cmp dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------------------------------------------------------- the program
  function automatic logic [63:0] h(longint n, int salt);
    logic [63:0] x;
    x = 64'(n) * 64'h9E37_79B9_7F4A_7C15 + 64'(salt) * 64'hC2B2_AE3D_27D4_EB4F;
    x = x ^ (x >> 29);
    x = x * 64'hBF58_476D_1CE4_E5B9;
    x = x ^ (x >> 32);
    return x;
  endfunction
  function automatic int region(longint n);  // 0 normal, 1 store-heavy, 2 branch-heavy
    return int'((n / 9000) % 3);
  endfunction
  function automatic bit is_store(longint n);
    return (region(n) == 1) ? (h(n, 1) % 5 == 0) : (h(n, 1) % 40 == 0);
  endfunction
  function automatic bit is_branch(longint n);
    return !is_store(n) && ((region(n) == 2) ? (h(n, 2) % 3 == 0) : (h(n, 2) % 8 == 0));
  endfunction
  function automatic bit is_load(longint n);
    return !is_store(n) && !is_branch(n) && (h(n, 3) % 24 == 0);
  endfunction
  function automatic waddr_t st_a(longint n);
    return waddr_t'(BASE + h(n, 4) % 192);
  endfunction
  function automatic word_t st_d(longint n);
    return h(n, 5);
  endfunction
  function automatic waddr_t ld_a(longint n);
    return waddr_t'(BASE + h(n, 6) % 256);
  endfunction
  function automatic word_t regv(longint n, int r);
    return h(n * 64 + r, 7);
  endfunction
  function automatic word_t mem_init(waddr_t a);
    return h(longint'(a), 99);
  endfunction
  function automatic logic [63:0] br_target(longint n);
    return h(n, 8);
  endfunction

  // stores of the program in order, as (n, addr, data), kept for the expected
  // memory image; trimmed on roll-back
  longint hist_n [waddr_t][$];
  word_t  hist_d [waddr_t][$];
  function automatic word_t expected(waddr_t a, longint m);
    if (hist_n.exists(a))
      for (int i = hist_n[a].size() - 1; i >= 0; i--)
        if (hist_n[a][i] < m) return hist_d[a][i];
    return mem_init(a);
  endfunction

  // committed lead stores not yet written back
  longint wq_n [$]; waddr_t wq_a [$]; word_t wq_d [$];

  // ---------------------------------------------------------------- L2 stand-in
  word_t l2mem [waddr_t];
  int    l2_t  [NC];
  line_t l2_q  [NC];
  assign wb_ready = 1'b1;
  always @(posedge clk) begin
    if (rst_n && wb_valid) begin
      l2mem[wb_addr] = wb_data;
      check(wq_a.size() > 0 && wb_addr == wq_a[0] && wb_data == wq_d[0],
            "write-back is the oldest committed store");
      if (wq_a.size() > 0) begin
        void'(wq_n.pop_front()); void'(wq_a.pop_front()); void'(wq_d.pop_front());
      end
      n_wb++;
    end
    for (int c = 0; c < NC; c++) begin
      l2_rsp_valid[c] <= 1'b0;
      if (l2_req_valid[c] && l2_req_ready[c]) begin
        l2_t[c] = 19;
        for (int w = 0; w < LINE_WORDS; w++) begin
          waddr_t a;
          a = {l2_req_line[c], LW_W'(w)};
          l2_q[c][w] = l2mem.exists(a) ? l2mem[a] : mem_init(a);
        end
      end else if (l2_t[c] > 0) l2_t[c]--;
      else if (l2_t[c] == 0) begin
        l2_t[c] = -1;
        l2_rsp_valid[c] <= 1'b1;
        l2_rsp_data[c]  <= l2_q[c];
      end
    end
  end
  assign l2_req_ready = '1;

  // ---------------------------------------------------------------- mechanism counters
  int n_end_insts = 0, n_end_stores = 0, n_end_eiq = 0, n_ckpt = 0, n_full_stall = 0;
  int n_verified = 0, n_rollback = 0, n_wb = 0, n_pcb_hit = 0, n_filter_skip = 0;
  int n_multi_probe = 0, n_fwd_vol = 0, n_qinv = 0, n_skip_inv = 0, n_parallel = 0;
  int n_idle = 0, n_ld_hit = 0, n_ld_miss = 0, n_restore = 0, n_eiq_miss = 0;
  int n_st_fault_caught = 0, n_reg_fault_caught = 0, n_vol_set = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.chunk_end) begin
      if (dut.u_ctrl.insts == 12'd2048) n_end_insts++;
      else if (dut.u_ctrl.stores == 8'd128) n_end_stores++;
      else n_end_eiq++;
    end
    if (lead_ckpt_req && lead_ckpt_beat == 4'd15) n_ckpt++;
    if (dut.u_ctrl.lst == 3'd1 && dut.pcb_full) n_full_stall++;
    if (chunk_verified) n_verified++;
    if (chunk_failed) n_rollback++;
    if (dut.u_pcb.rsp_valid && dut.u_pcb.rsp_hit) n_pcb_hit++;
    if (dut.g_core[0].u_fill.state == 3'd1 && !dut.g_core[0].u_fill.p_sent && !dut.flt_maybe[0]) n_filter_skip++;
    if (dut.g_core[1].u_fill.state == 3'd1 && !dut.g_core[1].u_fill.p_sent && !dut.flt_maybe[1]) n_filter_skip++;
    if (dut.g_core[2].u_fill.state == 3'd1 && !dut.g_core[2].u_fill.p_sent && !dut.flt_maybe[2]) n_filter_skip++;
    if (dut.g_core[0].u_fill.state == 3'd3 && dut.pr_valid[0]) n_multi_probe++;
    if (dut.g_core[1].u_fill.state == 3'd3 && dut.pr_valid[1]) n_multi_probe++;
    if (dut.g_core[2].u_fill.state == 3'd3 && dut.pr_valid[2]) n_multi_probe++;
    if (dut.g_core[1].fill_valid && dut.g_core[1].fill_volatile) n_fwd_vol++;
    if (dut.g_core[2].fill_valid && dut.g_core[2].fill_volatile) n_fwd_vol++;
    if (dut.qinv_valid) n_qinv++;
    if (dut.qinv_valid && (dut.g_core[1].u_l1.q_hit || dut.g_core[2].u_l1.q_hit)) n_vol_set++;
    if (dut.chk_inv_volatile != '0) n_skip_inv++;
    if (dut.u_ctrl.cst[0] == 3'd2 && dut.u_ctrl.cst[1] == 3'd2) n_parallel++;
    if (chk_idle != '0) n_idle++;
    if (lead_restore_done) n_restore++;
  end

  // ---------------------------------------------------------------- lead core
  longint n_lead = 0;          // next instruction to retire
  bit     lead_ld_busy = 0, lead_ld_missed = 0, lead_ld_msent = 0, lead_waitrst = 0;
  int     lead_ld_t = 0;
  waddr_t lead_ld_a;
  int     rst_beats = 0;

  always_comb begin
    for (int r = 0; r < NREGB; r++) lead_ckpt_regs[r] = regv(n_lead, int'(lead_ckpt_beat) * NREGB + r);
    lead_pc = word_t'(n_lead * 4);
  end

  task automatic lead_commit_store(longint n);
    st_valid[0] = 1; st_addr[0] = st_a(n); st_data[0] = st_d(n);
    if (!hist_n.exists(st_a(n))) begin hist_n[st_a(n)] = {}; hist_d[st_a(n)] = {}; end
    hist_n[st_a(n)].push_back(n); hist_d[st_a(n)].push_back(st_d(n));
    wq_n.push_back(n); wq_a.push_back(st_a(n)); wq_d.push_back(st_d(n));
  endtask

  task automatic trim_history(longint from_n);
    foreach (hist_n[a])
      while (hist_n[a].size() > 0 && hist_n[a][hist_n[a].size() - 1] >= from_n) begin
        void'(hist_n[a].pop_back()); void'(hist_d[a].pop_back());
      end
    while (wq_n.size() > 0 && wq_n[wq_n.size() - 1] >= from_n) begin
      void'(wq_n.pop_back()); void'(wq_a.pop_back()); void'(wq_d.pop_back());
    end
  endtask

  initial begin
    forever begin
      @(posedge clk); #1;
      lead_ret_cnt = '0; st_valid[0] = 0; lead_ei_valid = 0; ld_valid[0] = 0; miss_valid[0] = 0;
      if (!rst_n) continue;
      if (lead_rollback) begin
        lead_waitrst = 1; lead_ld_busy = 0; rst_beats = 0;
        continue;
      end
      if (lead_waitrst) begin
        if (lead_rst_valid) begin
          if (rst_beats == 0) begin
            n_lead = longint'(lead_rst_pc / 4);
            trim_history(n_lead);
          end
          for (int r = 0; r < NREGB; r++)
            check(lead_rst_regs[r] == regv(n_lead, rst_beats * NREGB + r), "lead restored registers");
          rst_beats++;
        end
        if (lead_restore_done) begin
          check(rst_beats == 16, "lead restore took 16 beats");
          lead_waitrst = 0;
        end
        continue;
      end
      if (lead_ld_busy) begin
        // load in flight: the L1 answers two cycles after the request
        lead_ld_t++;
        if (!lead_ld_missed && ld_rsp_valid[0]) begin
          if (ld_hit[0]) begin
            n_ld_hit++;
            check(ld_data[0] == expected(lead_ld_a, n_lead), "lead load hit data");
            lead_ld_busy = 0;
          end else begin
            lead_ld_missed = 1;
            n_ld_miss++;
          end
        end
        else if (lead_ld_missed && !lead_ld_msent && miss_ready[0]) begin
          lead_ld_msent = 1;
          miss_valid[0] = 1; miss_addr[0] = lead_ld_a;
          lead_ei_valid = 1;
          lead_ei_entry = '{kind: EI_MISS, taken: 1'b0, addr: {lead_ld_a, 3'b000}};
        end
        if (lead_ld_missed && crit_valid[0]) begin
          check(crit_data[0] == expected(lead_ld_a, n_lead), "lead load miss data");
          lead_ld_busy = 0;
        end
        if (!lead_ld_busy) begin
          // the load instruction retires now if the chunk still has room
          if (!lead_freeze && lead_room_insts != 0) begin
            lead_ret_cnt = 5'd1;
            n_lead++;
          end
        end
        continue;
      end
      if (lead_freeze) continue;
      begin
        int budget, k, ns, nb;
        budget = $urandom_range(0, 12);
        if (budget > int'(lead_room_insts)) budget = int'(lead_room_insts);
        k = 0; ns = 0; nb = 0;
        while (k < budget) begin
          longint n;
          n = n_lead;
          if (is_store(n) && (ns == 1 || lead_room_stores == 0)) break;
          if (is_branch(n) && nb == 1) break;
          if (is_load(n)) begin
            if (k == 0) begin
              lead_ld_busy = 1; lead_ld_missed = 0; lead_ld_msent = 0; lead_ld_t = 0; lead_ld_a = ld_a(n);
              ld_valid[0] = 1; ld_addr[0] = ld_a(n);
            end
            break;
          end
          if (is_store(n)) begin lead_commit_store(n); ns++; end
          if (is_branch(n)) begin
            lead_ei_valid = 1;
            lead_ei_entry = '{kind: EI_BRANCH, taken: br_target(n)[0], addr: br_target(n)};
            nb++;
          end
          n_lead++; k++;
        end
        lead_ret_cnt = 5'(k);
      end
    end
  end

  // ---------------------------------------------------------------- checker cores
  longint c_n [NUM_CHK];
  bit     c_inject_reg [NUM_CHK];
  always_comb begin
    for (int c = 0; c < NUM_CHK; c++) begin
      for (int r = 0; r < NREGB; r++) begin
        chk_cmp_regs[c][r] = regv(c_n[c], int'(chk_cmp_beat[c]) * NREGB + r);
        // injected register fault
        if (c_inject_reg[c] && chk_cmp_beat[c] == 4'd7 && r == 2) chk_cmp_regs[c][r] = ~chk_cmp_regs[c][r];
      end
      chk_cmp_pc[c] = word_t'(c_n[c] * 4);
    end
  end

  bit st_fault_done = 0, reg_fault_done = 0;

  typedef enum {K_IDLE, K_LOAD, K_WAITGO, K_RUN, K_LD, K_CMP} kst_e;
  kst_e   dbg_st [NUM_CHK];
  longint dbg_end [NUM_CHK];
  task automatic run_checker(int c);
    kst_e st;
    longint n_end;
    int beats, ld_t, seqn;
    bit ld_missed, ld_msent, inject_st;
    waddr_t la;
    st = K_IDLE; n_end = 0; beats = 0; ld_t = 0; seqn = 0; ld_missed = 0; ld_msent = 0; inject_st = 0;
    forever begin
      @(posedge clk); #1;
      st_valid[c+1] = 0; ld_valid[c+1] = 0; miss_valid[c+1] = 0; chk_ei_pop[c] = 0; chk_end[c] = 0;
      if (!rst_n) continue;
      if (chk_abort[c]) begin
        st = K_IDLE; c_inject_reg[c] = 0;
        continue;
      end
      if (chk_start[c]) begin
        if (st == K_CMP && c_inject_reg[c]) reg_fault_done = 1;
        st = K_LOAD; beats = 0; seqn = int'(chk_seq[c]);
          inject_st = (seqn == FAULT_ST_SEQ) && !st_fault_done;
          c_inject_reg[c] = (seqn == FAULT_REG_SEQ) && !reg_fault_done;
        continue;
      end
      dbg_st[c] = st; dbg_end[c] = n_end;
      case (st)
        K_IDLE: ;
        K_LOAD: if (chk_ld_valid[c]) begin
          if (beats == 0) c_n[c] = longint'(chk_ld_pc[c] / 4);
          for (int r = 0; r < NREGB; r++)
            check(chk_ld_regs[c][r] == regv(c_n[c], beats * NREGB + r), "checker loaded registers");
          beats++;
          if (beats == 16) st = K_WAITGO;
          if (chk_go[c]) begin
            n_end = c_n[c] + longint'(chk_len[c]);
            st = K_RUN;
          end
        end
        K_WAITGO: if (chk_go[c]) begin
          n_end = c_n[c] + longint'(chk_len[c]);
          st = K_RUN;
        end
        K_RUN: begin
          // the lead's miss addresses are taken off the EIQ as they reach the front
          if (chk_ei_valid[c] && chk_ei_entry[c].kind == EI_MISS) begin
            chk_ei_pop[c] = 1; n_eiq_miss++;
          end else if (c_n[c] == n_end) begin
            chk_end[c] = 1; st = K_CMP;
            if (c_inject_reg[c]) reg_fault_done = 1;
          end else if (cycle % 2 == 0) begin
            int budget, k, ns;
            budget = $urandom_range(0, 4);
            k = 0; ns = 0;
            while (k < budget && c_n[c] < n_end) begin
              longint n;
              n = c_n[c];
              if (is_store(n) && ns == 1) break;
              if (is_load(n)) begin
                if (k == 0) begin
                  st = K_LD; ld_t = 0; ld_missed = 0; ld_msent = 0; la = ld_a(n);
                  ld_valid[c+1] = 1; ld_addr[c+1] = la;
                end
                break;
              end
              if (is_branch(n)) begin
                if (k > 0) break;
                check(chk_ei_valid[c] && chk_ei_entry[c].kind == EI_BRANCH &&
                      chk_ei_entry[c].addr == br_target(n) && chk_ei_entry[c].taken == br_target(n)[0],
                      "checker branch outcome from the EIQ");
                chk_ei_pop[c] = 1;
              end
              if (is_store(n)) begin
                st_valid[c+1] = 1; st_addr[c+1] = st_a(n); st_data[c+1] = st_d(n);
                if (inject_st && ns == 0) begin
                  st_data[c+1] = ~st_data[c+1];
                  inject_st = 0; st_fault_done = 1;
                end
                ns++;
              end
              c_n[c]++; k++;
            end
          end
        end
        K_LD: begin
          ld_t++;
          if (!ld_missed && ld_rsp_valid[c+1]) begin
            if (ld_hit[c+1]) begin
              n_ld_hit++;
              check(ld_data[c+1] == expected(la, c_n[c]), $sformatf("checker %0d load hit data", c));
              c_n[c]++; st = K_RUN;
            end else begin
              ld_missed = 1; n_ld_miss++;
            end
          end
          else if (ld_missed && !ld_msent && miss_ready[c+1]) begin
            ld_msent = 1;
            miss_valid[c+1] = 1; miss_addr[c+1] = la;
          end
          if (ld_missed && crit_valid[c+1]) begin
            check(crit_data[c+1] == expected(la, c_n[c]), $sformatf("checker %0d load miss data", c));
            c_n[c]++; st = K_RUN;
          end
        end
        K_CMP: begin
          if (chunk_verified || chunk_failed || dut.u_ctrl.cst[c] == 3'd0) begin
            if (dut.u_ctrl.cst[c] == 3'd0) begin
              if (c_inject_reg[c]) reg_fault_done = 1;
              c_inject_reg[c] = 0;
              st = K_IDLE;
            end
          end
        end
        default: st = K_IDLE;
      endcase
    end
  endtask

  // which injected fault a roll-back answers
  always @(posedge clk) if (rst_n && chunk_failed) begin
    if (int'(dut.u_ctrl.sseq[dut.u_ctrl.rb_target]) == FAULT_ST_SEQ) n_st_fault_caught++;
    if (int'(dut.u_ctrl.sseq[dut.u_ctrl.rb_target]) == FAULT_REG_SEQ) n_reg_fault_caught++;
  end

  // ---------------------------------------------------------------- run
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, verified %0d chunks", n_verified);
    $display("  lead state %0d at instruction %0d; checker states %0d %0d at %0d %0d; PCB full %0d",
             dut.u_ctrl.lst, n_lead, dut.u_ctrl.cst[0], dut.u_ctrl.cst[1], c_n[0], c_n[1], dut.pcb_full);
    $display("  tb checker states %0d %0d ends %0d %0d ei_valid %b kind0 %0d", dbg_st[0], dbg_st[1], dbg_end[0], dbg_end[1],
             chk_ei_valid, chk_ei_entry[0].kind);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_valid = '0; miss_valid = '0; st_valid = '0; chk_ei_pop = '0; chk_end = '0;
    lead_ret_cnt = '0; lead_ei_valid = 0; lead_ei_entry = '0;
    for (int c = 0; c < NC; c++) begin
      ld_addr[c] = '0; miss_addr[c] = '0; st_addr[c] = '0; st_data[c] = '0;
      l2_t[c] = -1; l2_rsp_data[c] = '0;
    end
    for (int c = 0; c < NUM_CHK; c++) begin c_n[c] = 0; c_inject_reg[c] = 0; end
    l2_rsp_valid = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      run_checker(0);
      run_checker(1);
    join_none
    wait (n_verified >= RUN_CHUNKS);
    repeat (10) @(posedge clk);
    $display("chunks: verified %0d, ended by instructions %0d / stores %0d / EIQ %0d, checkpoints %0d",
             n_verified, n_end_insts, n_end_stores, n_end_eiq, n_ckpt);
    $display("roll-backs %0d (store fault %0d, register fault %0d), restores %0d, write-backs %0d",
             n_rollback, n_st_fault_caught, n_reg_fault_caught, n_restore, n_wb);
    $display("PCB-full stall cycles %0d, PCB hits %0d, filter skips %0d, extra probes %0d, volatile fills %0d",
             n_full_stall, n_pcb_hit, n_filter_skip, n_multi_probe, n_fwd_vol);
    $display("quasi-invalidations %0d (volatile set %0d), skip invalidations %0d, parallel cycles %0d, idle cycles %0d",
             n_qinv, n_vol_set, n_skip_inv, n_parallel, n_idle);
    $display("loads: L1 hits %0d, misses %0d; EIQ miss entries %0d", n_ld_hit, n_ld_miss, n_eiq_miss);
    check(n_end_insts > 0,  "a chunk ended on the instruction limit");
    check(n_end_stores > 0, "a chunk ended on the store limit");
    check(n_end_eiq > 0,    "a chunk ended on a full EIQ section");
    check(n_ckpt > RUN_CHUNKS, "checkpoints were created");
    check(n_full_stall > 0, "the lead stalled on a full PCB");
    check(n_st_fault_caught == 1, "the store fault caused a roll-back");
    check(n_reg_fault_caught == 1, "the register fault caused a roll-back");
    check(n_rollback == 2 && n_restore == 2, "exactly the two injected faults rolled back");
    check(n_wb > 0, "verified stores were written back");
    check(n_pcb_hit > 0, "PCB searches hit");
    check(n_filter_skip > 0, "the filter skipped PCB searches");
    check(n_multi_probe > 0, "lines needed several PCB probes");
    check(n_fwd_vol > 0, "fills were marked volatile");
    check(n_qinv > 0 && n_vol_set > 0, "quasi-invalidations marked lines volatile");
    check(n_skip_inv > 0, "checkers skipping chunks dropped volatile lines");
    check(n_parallel > 0, "two checkers verified in parallel");
    check(n_idle > 0, "a checker was idle");
    check(n_ld_hit > 0 && n_ld_miss > 0, "loads hit and missed");
    check(n_eiq_miss > 0, "miss addresses reached the checkers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
