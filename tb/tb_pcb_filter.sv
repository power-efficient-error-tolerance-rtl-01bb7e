// tb_pcb_filter: self-checking testbench for the membership hash table.
//
// Inserts and removes random line addresses while keeping an exact multiset of
// the lines present. A query must answer "maybe" for every present line (no
// false negatives) and, computed independently as line % 257, "no" for lines
// whose bucket holds nothing. Also checks that a saturated bucket sticks and
// that clr empties the table.
module tb_pcb_filter;
  import rmt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   clr = 0, ins_valid = 0, rm_valid = 0;
  laddr_t ins_line = '0, rm_line = '0;
  laddr_t q_line [1];
  logic   q_maybe [1];

  pcb_filter #(.ENTRIES(257), .CNT_W(8), .NUM_Q(1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask

  laddr_t present [$];
  int     bcount [257];

  function automatic int bkt(laddr_t l);
    return int'(l % 257);
  endfunction

  function automatic laddr_t rline();
    return {$urandom, $urandom};
  endfunction

  task automatic query(laddr_t l, bit must_maybe, bit must_no);
    q_line[0] = l; #1;
    if (must_maybe) check(q_maybe[0], $sformatf("false negative for %h", l));
    if (must_no)    check(!q_maybe[0], $sformatf("bucket %0d should be empty", bkt(l)));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q_line[0] = '0;
    repeat (2) tick();
    rst_n = 1; tick();
    for (int it = 0; it < 3000; it++) begin
      int op;
      op = $urandom_range(0, 2);
      ins_valid = 0; rm_valid = 0;
      if ((op == 0 || present.size() == 0) && present.size() < 200) begin
        ins_valid = 1; ins_line = rline();
        present.push_back(ins_line); bcount[bkt(ins_line)]++;
      end else if (op == 1 && present.size() > 0) begin
        int k;
        k = $urandom_range(0, present.size() - 1);
        rm_valid = 1; rm_line = present[k];
        bcount[bkt(rm_line)]--; present.delete(k);
      end else if (present.size() > 0) begin
        // insert and remove in the same cycle
        int k;
        k = $urandom_range(0, present.size() - 1);
        rm_valid = 1; rm_line = present[k];
        bcount[bkt(rm_line)]--; present.delete(k);
        ins_valid = 1; ins_line = rline();
        present.push_back(ins_line); bcount[bkt(ins_line)]++;
      end
      tick();
      ins_valid = 0; rm_valid = 0;
      if (present.size() > 0) query(present[$urandom_range(0, present.size() - 1)], 1, 0);
      begin
        laddr_t l;
        l = rline();
        query(l, bcount[bkt(l)] > 0, bcount[bkt(l)] == 0);
      end
    end
    // saturation: 300 inserts of one line, then 300 removals; stays "maybe"
    for (int i = 0; i < 300; i++) begin ins_valid = 1; ins_line = 59'h5; tick(); end
    ins_valid = 0;
    for (int i = 0; i < 300; i++) begin rm_valid = 1; rm_line = 59'h5; tick(); end
    rm_valid = 0;
    query(59'h5, 1, 0);
    // clr empties everything
    clr = 1; tick(); clr = 0;
    for (int i = 0; i < 20; i++) query(rline(), 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
