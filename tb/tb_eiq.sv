// tb_eiq: self-checking testbench for the execution information queue.
//
// Fills several sections with random branch and miss entries, binds the two
// checkers to different sections and reads them back in order, checks the
// section-full flag, and checks that a squash empties the squashed sections
// and makes the squashed section the new head.
module tb_eiq;
  import rmt_pkg::*;
  localparam int NUM_SEC = 8, SEC_ENTRIES = 16, NUM_CHK = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic open_valid = 0, squash_valid = 0, app_valid = 0, head_full;
  logic [2:0] squash_sec = '0;
  ei_entry_t app_entry;
  logic assign_valid = 0; logic assign_chk = 0; logic [2:0] assign_sec = '0;
  logic [NUM_CHK-1:0] rd_valid, rd_pop = '0;
  ei_entry_t rd_entry [NUM_CHK];

  eiq #(.NUM_SEC(NUM_SEC), .SEC_ENTRIES(SEC_ENTRIES), .NUM_CHK(NUM_CHK)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask

  ei_entry_t model [NUM_SEC][$];
  int head = NUM_SEC - 1;

  task automatic open_sec();
    open_valid = 1; tick(); open_valid = 0;
    head = (head + 1) % NUM_SEC; model[head].delete();
  endtask

  task automatic add(int n);
    for (int i = 0; i < n; i++) begin
      ei_entry_t e;
      e.kind = ($urandom_range(0, 1) == 0) ? EI_BRANCH : EI_MISS;
      e.taken = 1'($urandom);
      e.addr = {$urandom, $urandom};
      app_valid = 1; app_entry = e; tick(); app_valid = 0;
      model[head].push_back(e);
    end
  endtask

  task automatic bind_chk(int c, int s);
    assign_valid = 1; assign_chk = c[0]; assign_sec = 3'(s); tick(); assign_valid = 0;
  endtask

  task automatic drain_chk(int c, int s);
    for (int i = 0; i < model[s].size(); i++) begin
      check(rd_valid[c], $sformatf("entry %0d available", i));
      check(rd_entry[c] == model[s][i], $sformatf("chk%0d sec%0d entry %0d", c, s, i));
      rd_pop[c] = 1; tick(); rd_pop[c] = 0;
    end
    check(!rd_valid[c], "section consumed");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    app_entry = '0;
    repeat (2) tick();
    rst_n = 1; tick();
    check(rd_valid == '0, "nothing to read after reset");
    open_sec(); add(5);
    open_sec(); add(9);
    open_sec(); add(SEC_ENTRIES);
    check(head_full, "head section full");
    bind_chk(0, 1);
    bind_chk(1, 0);
    drain_chk(0, 1);
    drain_chk(1, 0);
    bind_chk(0, 2);
    drain_chk(0, 2);
    // roll back to section 1: sections 1 and 2 discarded, 1 is the new head
    squash_valid = 1; squash_sec = 3'd1; tick(); squash_valid = 0;
    head = 1; model[1].delete(); model[2].delete();
    check(!head_full, "head empty after squash");
    add(3);
    bind_chk(1, 1);
    drain_chk(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
