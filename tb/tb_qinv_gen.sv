// tb_qinv_gen: self-checking testbench for the quasi-invalidation generator.
//
// Streams random stores over a small set of lines and checks that a message is
// sent, one cycle later, exactly for the first store to each line since the
// last clr, and that clr (a new chunk) makes every line "first" again.
module tb_qinv_gen;
  import rmt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clr = 0, st_valid = 0, qinv_valid;
  laddr_t st_line = '0, qinv_line;

  qinv_gen #(.DEPTH(128)) dut (.*);

  int checks = 0, failures = 0, sent = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask

  bit seen [laddr_t];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) tick();
    rst_n = 1; tick();
    for (int chunk = 0; chunk < 6; chunk++) begin
      for (int i = 0; i < 100; i++) begin
        laddr_t l;
        bit first;
        l = laddr_t'(64'h40 + $urandom_range(0, 40));
        first = !seen.exists(l);
        st_valid = ($urandom_range(0, 3) != 0);
        st_line = l;
        tick();
        if (st_valid) begin
          check(qinv_valid == first, $sformatf("message for line %h first=%0d", l, first));
          if (first) begin
            check(qinv_line == l, "message line");
            seen[l] = 1;
            sent++;
          end
        end else check(!qinv_valid, "no message without a store");
        st_valid = 0;
      end
      clr = 1; tick(); clr = 0;
      seen.delete();
    end
    check(sent > 100, "messages were sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
