// tb_pcb: self-checking testbench for the post-commit buffer.
//
// A model of the buffer kept in the testbench (one queue of stores per section,
// the tail/head pointers and each checker's position) predicts every result.
// The test appends random stores from a small address pool so that lines and
// words repeat, binds checkers to sections, verifies matching and corrupted
// stores, issues lead and checker searches (checking youngest-word data, the
// line mask, the forward flag and the NUM_SEC+1 cycle latency), drains the
// oldest section to L2 in order, squashes younger sections, and fills the
// buffer to check the full flag.
module tb_pcb;
  import rmt_pkg::*;
  localparam int NUM_SEC = 8, SEC_ENTRIES = 128, NUM_CHK = 2;
  localparam int SEC_W = 3, CNT_W = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic app_valid = 0;  waddr_t app_addr = '0;  word_t app_data = '0;
  logic open_valid = 0, full, empty;
  logic [SEC_W-1:0] head_sec, tail_sec;
  logic [CNT_W-1:0] sec_cnt [NUM_SEC];
  logic assign_valid = 0; logic assign_chk = 0; logic [SEC_W-1:0] assign_sec = '0;
  logic [NUM_CHK-1:0] vfy_valid = '0, vfy_err;
  waddr_t vfy_addr [NUM_CHK];  word_t vfy_data [NUM_CHK];
  logic [CNT_W-1:0] chk_cnt [NUM_CHK];
  logic drain_req = 0, drain_done, wb_valid, wb_ready = 1;
  waddr_t wb_addr; word_t wb_data;
  logic squash_req = 0, squash_busy; logic [SEC_W-1:0] squash_sec = '0;
  logic rm_valid; waddr_t rm_addr;
  logic srch_valid = 0, srch_ready; logic [1:0] srch_req = '0; waddr_t srch_addr = '0;
  logic rsp_valid, rsp_hit, rsp_fwd; logic [1:0] rsp_req; word_t rsp_data;
  logic [LINE_WORDS-1:0] rsp_line_mask;

  pcb #(.NUM_SEC(NUM_SEC), .SEC_ENTRIES(SEC_ENTRIES), .NUM_CHK(NUM_CHK)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------ model
  waddr_t m_a [NUM_SEC][$];
  word_t  m_d [NUM_SEC][$];
  int m_head = NUM_SEC - 1, m_tail = 0, m_used = 0;
  int m_csec [NUM_CHK], m_cidx [NUM_CHK];

  function automatic int posm(int s);
    return (s - m_tail + NUM_SEC) % NUM_SEC;
  endfunction

  task automatic expect_search(int req, waddr_t a, output bit hit, output word_t d,
                               output logic [LINE_WORDS-1:0] mask, output bit fwd);
    hit = 0; d = '0; mask = '0; fwd = 0;
    for (int k = 0; k < m_used; k++) begin
      int s = (m_tail + k) % NUM_SEC;
      for (int i = 0; i < m_a[s].size(); i++) begin
        bit bwd;
        if (req == 0) bwd = 1;
        else bwd = (k < posm(m_csec[req-1])) || (k == posm(m_csec[req-1]) && i < m_cidx[req-1]);
        if ((m_a[s][i] >> 2) == (a >> 2)) begin
          if (bwd) begin
            mask[m_a[s][i][1:0]] = 1'b1;
            if (m_a[s][i] == a) begin hit = 1; d = m_d[s][i]; end
          end else fwd = 1;
        end
      end
    end
  endtask

  // ------------------------------------------------ drivers
  task automatic tick(); @(posedge clk); #1; endtask

  task automatic do_open();
    open_valid = 1; tick(); open_valid = 0;
    m_head = (m_head + 1) % NUM_SEC; m_used++;
    m_a[m_head].delete(); m_d[m_head].delete();
  endtask

  task automatic do_append(waddr_t a, word_t d);
    app_valid = 1; app_addr = a; app_data = d; tick(); app_valid = 0;
    m_a[m_head].push_back(a); m_d[m_head].push_back(d);
  endtask

  task automatic do_assign(int c, int s);
    assign_valid = 1; assign_chk = c[0]; assign_sec = SEC_W'(s); tick(); assign_valid = 0;
    m_csec[c] = s; m_cidx[c] = 0;
  endtask

  task automatic do_verify(int c, bit corrupt);
    int s = m_csec[c], i = m_cidx[c];
    vfy_valid[c] = 1;
    vfy_addr[c] = (i < m_a[s].size()) ? m_a[s][i] : '0;
    vfy_data[c] = ((i < m_d[s].size()) ? m_d[s][i] : '0) ^ (corrupt ? 64'h10 : 64'h0);
    tick(); vfy_valid[c] = 0;
    m_cidx[c]++;
    #0;
    check(vfy_err[c] == corrupt, $sformatf("verify err chk%0d corrupt=%0d got %0d", c, corrupt, vfy_err[c]));
  endtask

  task automatic do_search(int req, waddr_t a);
    bit ehit, efwd; word_t ed; logic [LINE_WORDS-1:0] emask;
    int t0, n;
    while (!srch_ready) tick();
    expect_search(req, a, ehit, ed, emask, efwd);
    srch_valid = 1; srch_req = 2'(req); srch_addr = a;
    t0 = cycle;
    tick(); srch_valid = 0;
    n = 0;
    while (!rsp_valid && n < 40) begin tick(); n++; end
    check(rsp_valid && (cycle - t0 == NUM_SEC + 1), $sformatf("search latency %0d", cycle - t0));
    check(rsp_req == 2'(req), "search requester");
    check(rsp_hit == ehit, $sformatf("search hit req%0d a=%h exp %0d got %0d", req, a, ehit, rsp_hit));
    if (ehit) check(rsp_data == ed, $sformatf("search data exp %h got %h", ed, rsp_data));
    check(rsp_line_mask == emask, $sformatf("line mask exp %b got %b", emask, rsp_line_mask));
    check(rsp_fwd == efwd, $sformatf("forward exp %0d got %0d", efwd, rsp_fwd));
  endtask

  int rm_seen = 0;
  always @(posedge clk) if (rst_n && rm_valid) rm_seen++;

  task automatic do_drain();
    int i = 0, guard = 0;
    drain_req = 1; tick(); drain_req = 0;
    while (!drain_done && guard < 1000) begin
      if (wb_valid && wb_ready) begin
        check(wb_addr == m_a[m_tail][i] && wb_data == m_d[m_tail][i], $sformatf("writeback order entry %0d", i));
        i++;
      end
      tick(); guard++;
    end
    check(i == m_a[m_tail].size(), "writeback count");
    tick();
    m_a[m_tail].delete(); m_d[m_tail].delete();
    m_tail = (m_tail + 1) % NUM_SEC; m_used--;
    check(tail_sec == SEC_W'(m_tail), "tail advanced after drain");
  endtask

  task automatic do_squash(int s);
    int rm0 = rm_seen, expect_rm = 0, guard = 0;
    for (int k = posm(s); k < m_used; k++) expect_rm += m_a[(m_tail + k) % NUM_SEC].size();
    squash_req = 1; squash_sec = SEC_W'(s); tick(); squash_req = 0;
    while (squash_busy && guard < 3000) begin tick(); guard++; end
    tick();
    check(rm_seen - rm0 == expect_rm, $sformatf("squash removed %0d exp %0d", rm_seen - rm0, expect_rm));
    for (int k = posm(s); k < m_used; k++) begin
      m_a[(m_tail + k) % NUM_SEC].delete(); m_d[(m_tail + k) % NUM_SEC].delete();
    end
    m_used = posm(s) + 1; m_head = s;
    check(head_sec == SEC_W'(s) && sec_cnt[s] == 0, "head after squash");
  endtask

  function automatic waddr_t raddr();
    // 4 lines x 4 words: plenty of repeats
    return waddr_t'(64'h1000 + $urandom_range(0, 15));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NUM_CHK; c++) begin vfy_addr[c] = '0; vfy_data[c] = '0; end
    repeat (3) tick();
    rst_n = 1; tick();
    check(empty && !full, "empty after reset");

    // three chunks of random stores
    for (int ch = 0; ch < 3; ch++) begin
      do_open();
      for (int i = 0; i < 20; i++) do_append(raddr(), {$urandom, $urandom});
    end
    check(sec_cnt[0] == 20 && sec_cnt[2] == 20, "section counts");
    // lead searches see every store
    for (int i = 0; i < 6; i++) do_search(0, raddr());
    // checkers on sections 0 and 1, partly through
    do_assign(0, 0);
    do_assign(1, 1);
    for (int i = 0; i < 7; i++) do_verify(0, 0);
    for (int i = 0; i < 12; i++) do_verify(1, 0);
    for (int i = 0; i < 10; i++) do_search(1 + (i % 2), raddr());
    // a store that differs
    do_verify(0, 1);
    // finish checker 0 and write section 0 back
    while (m_cidx[0] < 20) do_verify(0, 0);
    do_verify(0, 1);   // one store too many is an error too
    do_drain();
    for (int i = 0; i < 4; i++) do_search(2, raddr());
    // squash sections 2.. (roll-back) and refill
    do_squash(2);
    for (int i = 0; i < 10; i++) do_append(raddr(), {$urandom, $urandom});
    for (int i = 0; i < 6; i++) do_search(i % 3, raddr());
    // fill all sections
    while (m_used < NUM_SEC) begin
      do_open();
      do_append(raddr(), {$urandom, $urandom});
    end
    check(full, "full when all sections are in use");
    // a section at its capacity
    for (int i = m_a[m_head].size(); i < SEC_ENTRIES; i++) do_append(raddr(), {$urandom, $urandom});
    check(sec_cnt[m_head] == CNT_W'(SEC_ENTRIES), "section capacity");
    do_search(0, raddr());
    do_drain();
    check(!full, "not full after a drain");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
