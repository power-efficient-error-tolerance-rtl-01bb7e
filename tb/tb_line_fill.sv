// tb_line_fill: self-checking testbench for the miss handler and merge unit.
//
// Stand-ins for the L2 (fixed 20-cycle answer, line content derived from the
// address) and for the PCB (a table of newer words per line, answered 9 cycles
// after each probe with the word, the mask of words present and a forward
// flag) drive the unit through random misses. For each miss the testbench
// checks the critical word, the merged line written to the L1, the volatile
// flag, that every PCB word of the line was probed exactly once in wrap-around
// order after the critical word, and that no probe is sent when the membership
// filter rules the line out.
module tb_line_fill;
  import rmt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic miss_valid = 0, miss_ready, crit_valid; waddr_t miss_addr = '0; word_t crit_data;
  logic l2_req_valid, l2_req_ready = 1, l2_rsp_valid = 0; laddr_t l2_req_line; line_t l2_rsp_data;
  laddr_t flt_line; logic flt_maybe;
  logic ps_valid, ps_ready = 1, pr_valid = 0, pr_hit = 0, pr_fwd = 0; waddr_t ps_addr;
  word_t pr_data = '0; logic [LINE_WORDS-1:0] pr_mask = '0;
  logic fill_valid, fill_volatile; laddr_t fill_line; line_t fill_data;

  logic flush = 0, qinv_valid = 0; laddr_t qinv_line = '0;
  logic st_valid = 0; waddr_t st_addr = '0; word_t st_data = '0;

  line_fill dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------ stand-in memories
  logic [LINE_WORDS-1:0] pmask;   // words of the current line held by the PCB
  word_t  pword [LINE_WORDS];
  bit     pfwd, fmaybe;
  function automatic word_t l2w(laddr_t l, int w);
    return {32'(l) ^ 32'h0bad_f00d, 32'(w)};
  endfunction
  assign flt_maybe = fmaybe;

  int l2_timer = -1;  laddr_t l2_line_q;
  int p_timer  = -1;  waddr_t p_addr_q;
  waddr_t probes [$];

  always @(posedge clk) begin
    l2_rsp_valid <= 1'b0;
    pr_valid     <= 1'b0;
    if (l2_req_valid && l2_req_ready) begin l2_timer = 19; l2_line_q = l2_req_line; end
    else if (l2_timer > 0) l2_timer--;
    else if (l2_timer == 0) begin
      l2_timer = -1;
      l2_rsp_valid <= 1'b1;
      for (int w = 0; w < LINE_WORDS; w++) l2_rsp_data[w] <= l2w(l2_line_q, w);
    end
    if (ps_valid && ps_ready) begin
      p_timer = 8; p_addr_q = ps_addr; probes.push_back(ps_addr);
    end else if (p_timer > 0) p_timer--;
    else if (p_timer == 0) begin
      p_timer = -1;
      pr_valid <= 1'b1;
      pr_hit   <= pmask[p_addr_q[1:0]];
      pr_data  <= pword[p_addr_q[1:0]];
      pr_mask  <= pmask;
      pr_fwd   <= pfwd;
    end
  end

  int n_probed = 0, n_skipped = 0, n_multi = 0, n_vol = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    l2_rsp_data = '{default: '0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      laddr_t l;
      logic [LW_W-1:0] cw;
      line_t exp_line;
      int guard, exp_probes;
      bit got_crit;
      l  = {$urandom, $urandom};
      cw = LW_W'($urandom);
      pmask = ($urandom_range(0, 2) == 0) ? '0 : LINE_WORDS'($urandom);
      pfwd = 1'($urandom);
      fmaybe = (pmask != 0) || pfwd || ($urandom_range(0, 3) == 0);
      if (!fmaybe) pfwd = 0;
      for (int w = 0; w < LINE_WORDS; w++) begin
        pword[w] = {$urandom, $urandom};
        exp_line[w] = pmask[w] ? pword[w] : l2w(l, w);
      end
      exp_probes = !fmaybe ? 0 : 1 + $countones(pmask & ~(LINE_WORDS'(1) << cw));
      probes.delete();
      while (!miss_ready) @(posedge clk);
      #1;
      miss_valid = 1; miss_addr = {l, cw};
      @(posedge clk); #1; miss_valid = 0;
      guard = 0; got_crit = 0;
      while (!fill_valid && guard < 500) begin
        if (crit_valid) begin
          got_crit = 1;
          check(crit_data == exp_line[cw], "critical word");
        end
        @(posedge clk); #1; guard++;
      end
      check(got_crit, "critical word delivered before the fill");
      check(fill_valid && fill_line == l, "fill line address");
      check(fill_data == exp_line, "merged line");
      check(fill_volatile == (fmaybe && pfwd), "volatile flag");
      check(probes.size() == exp_probes, $sformatf("probe count %0d exp %0d", probes.size(), exp_probes));
      if (probes.size() == exp_probes && exp_probes > 0) begin
        int k;
        k = 0;
        check(probes[0] == {l, cw}, "critical word probed first");
        for (int d = 1; d < LINE_WORDS; d++) begin
          logic [LW_W-1:0] w;
          w = LW_W'(int'(cw) + d);
          if (pmask[w]) begin
            k++;
            check(probes[k] == {l, w}, "wrap-around probe order");
          end
        end
      end
      if (!fmaybe) n_skipped++; else n_probed++;
      if (exp_probes > 1) n_multi++;
      if (fill_volatile) n_vol++;
      @(posedge clk); #1;
    end
    check(n_skipped > 10 && n_multi > 10 && n_vol > 10, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
