// tb_l1_dcache: self-checking testbench for the L1 data cache.
//
// Directed checks, with a small cache (8 sets, 2 ways) so that sets fill up:
// 2-cycle load latency, hit data after a fill, store update of a present line,
// no allocation on a store miss, LRU replacement with the victim discarded,
// volatile marking by quasi-invalidation and by fill, flash invalidation of
// volatile lines only, and flash invalidation of everything.
module tb_l1_dcache;
  import rmt_pkg::*;
  localparam int SETS = 8, WAYS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_valid = 0, ld_rsp_valid, ld_hit; waddr_t ld_addr = '0; word_t ld_data;
  logic st_valid = 0; waddr_t st_addr = '0; word_t st_data = '0;
  logic fill_valid = 0, fill_volatile = 0; laddr_t fill_line = '0; line_t fill_data;
  logic qinv_valid = 0, inv_volatile = 0, inv_all = 0; laddr_t qinv_line = '0;

  l1_dcache #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask

  // lines mapping to set 3
  function automatic laddr_t ln(int k);
    return laddr_t'(k * SETS + 3);
  endfunction
  function automatic word_t pat(laddr_t l, int w);
    return {32'(l), 32'(w)} ^ 64'h5a5a_0000_0000_a5a5;
  endfunction

  task automatic fill(laddr_t l, bit vol);
    fill_valid = 1; fill_line = l; fill_volatile = vol;
    for (int w = 0; w < LINE_WORDS; w++) fill_data[w] = pat(l, w);
    tick(); fill_valid = 0;
  endtask

  task automatic load(waddr_t a, bit exp_hit, word_t exp_data);
    ld_valid = 1; ld_addr = a; tick(); ld_valid = 0;
    check(!ld_rsp_valid, "no response after one cycle");
    tick();
    check(ld_rsp_valid, "response after two cycles");
    check(ld_hit == exp_hit, $sformatf("hit for %h exp %0d", a, exp_hit));
    if (exp_hit) check(ld_data == exp_data, $sformatf("data for %h", a));
  endtask

  task automatic store(waddr_t a, word_t d);
    st_valid = 1; st_addr = a; st_data = d; tick(); st_valid = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fill_data = '{default: '0};
    repeat (2) tick();
    rst_n = 1; tick();
    load({ln(0), 2'd1}, 0, '0);
    fill(ln(0), 0);
    for (int w = 0; w < LINE_WORDS; w++) load({ln(0), 2'(w)}, 1, pat(ln(0), w));
    store({ln(0), 2'd2}, 64'h1234);
    load({ln(0), 2'd2}, 1, 64'h1234);
    store({ln(5), 2'd0}, 64'h99);          // miss: not allocated
    load({ln(5), 2'd0}, 0, '0);
    fill(ln(1), 0);
    load({ln(0), 2'd0}, 1, pat(ln(0), 0)); // ln(0) most recent
    fill(ln(2), 0);                         // evicts ln(1)
    load({ln(1), 2'd0}, 0, '0);
    load({ln(0), 2'd2}, 1, 64'h1234);
    load({ln(2), 2'd3}, 1, pat(ln(2), 3));
    // volatile lines
    qinv_valid = 1; qinv_line = ln(0); tick(); qinv_valid = 0;
    qinv_valid = 1; qinv_line = ln(7); tick(); qinv_valid = 0;  // absent: no effect
    fill(laddr_t'(64'h11), 1);              // other set, volatile fill
    fill(laddr_t'(64'h12), 0);
    inv_volatile = 1; tick(); inv_volatile = 0;
    load({ln(0), 2'd0}, 0, '0);
    load({ln(2), 2'd0}, 1, pat(ln(2), 0));
    load({laddr_t'(64'h11), 2'd1}, 0, '0);
    load({laddr_t'(64'h12), 2'd1}, 1, pat(laddr_t'(64'h12), 1));
    // a refilled line is not volatile any more
    fill(ln(0), 0);
    inv_volatile = 1; tick(); inv_volatile = 0;
    load({ln(0), 2'd3}, 1, pat(ln(0), 3));
    // everything
    inv_all = 1; tick(); inv_all = 0;
    load({ln(0), 2'd3}, 0, '0);
    load({ln(2), 2'd0}, 0, '0);
    load({laddr_t'(64'h12), 2'd1}, 0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
