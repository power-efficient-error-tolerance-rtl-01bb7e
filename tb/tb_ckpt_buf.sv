// tb_ckpt_buf: self-checking testbench for the checkpoint buffer.
//
// Writes random register snapshots into every slot (16 beats of 4 registers,
// PC at beat 0), reads them back on all read ports with the one-cycle latency,
// and runs the compare port with identical state (must pass), with one
// register changed (must fail), with the PC changed (must fail), and two
// comparisons back to back (the mismatch flag must not leak between them).
module tb_ckpt_buf;
  import rmt_pkg::*;
  localparam int SLOTS = 9, NREGS = 64, RPB = 4, NRD = 3, NCMP = 2, BEATS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_valid = 0; logic [3:0] wr_slot = '0; logic [3:0] wr_beat = '0;
  word_t wr_regs [RPB]; word_t wr_pc = '0;
  logic [NRD-1:0] rd_valid = '0, rd_rvalid;
  logic [3:0] rd_slot [NRD]; logic [3:0] rd_beat [NRD];
  word_t rd_regs [NRD][RPB]; word_t rd_pc [NRD];
  logic [NCMP-1:0] cmp_valid = '0, cmp_done, cmp_ok;
  logic [3:0] cmp_slot [NCMP]; logic [3:0] cmp_beat [NCMP];
  word_t cmp_regs [NCMP][RPB]; word_t cmp_pc [NCMP];

  ckpt_buf #(.NUM_SLOTS(SLOTS), .NUM_REGS(NREGS), .REGS_PER_BEAT(RPB), .NUM_RD(NRD), .NUM_CMP(NCMP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask

  word_t ref_regs [SLOTS][NREGS];
  word_t ref_pc   [SLOTS];

  task automatic write_slot(int s);
    ref_pc[s] = {$urandom, $urandom};
    for (int r = 0; r < NREGS; r++) ref_regs[s][r] = {$urandom, $urandom};
    for (int b = 0; b < BEATS; b++) begin
      wr_valid = 1; wr_slot = 4'(s); wr_beat = 4'(b);
      for (int r = 0; r < RPB; r++) wr_regs[r] = ref_regs[s][b*RPB + r];
      wr_pc = (b == 0) ? ref_pc[s] : 64'hdead;
      tick();
    end
    wr_valid = 0;
  endtask

  task automatic read_slot(int p, int s);
    for (int b = 0; b < BEATS; b++) begin
      rd_valid[p] = 1; rd_slot[p] = 4'(s); rd_beat[p] = 4'(b);
      tick();
      rd_valid[p] = 0;
      check(rd_rvalid[p], "read valid one cycle later");
      for (int r = 0; r < RPB; r++)
        check(rd_regs[p][r] == ref_regs[s][b*RPB + r], $sformatf("read p%0d slot%0d reg%0d", p, s, b*RPB + r));
      if (b == 0) check(rd_pc[p] == ref_pc[s], "read pc");
    end
  endtask

  // bad_reg: register index to corrupt (-1 none); bad_pc: corrupt the PC
  task automatic compare(int c, int s, int bad_reg, bit bad_pc);
    bit expect_ok = (bad_reg < 0) && !bad_pc;
    for (int b = 0; b < BEATS; b++) begin
      cmp_valid[c] = 1; cmp_slot[c] = 4'(s); cmp_beat[c] = 4'(b);
      for (int r = 0; r < RPB; r++)
        cmp_regs[c][r] = ref_regs[s][b*RPB + r] ^ ((b*RPB + r == bad_reg) ? 64'h1 : 64'h0);
      cmp_pc[c] = ref_pc[s] ^ (bad_pc ? 64'h4 : 64'h0);
      tick();
      cmp_valid[c] = 0;
      if (b < BEATS - 1) check(!cmp_done[c], "no early done");
    end
    check(cmp_done[c] && (cmp_ok[c] == expect_ok), $sformatf("compare chk%0d slot%0d bad_reg=%0d bad_pc=%0d ok=%0d", c, s, bad_reg, bad_pc, cmp_ok[c]));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NRD; p++) begin rd_slot[p] = '0; rd_beat[p] = '0; end
    for (int c = 0; c < NCMP; c++) begin
      cmp_slot[c] = '0; cmp_beat[c] = '0; cmp_pc[c] = '0;
      for (int r = 0; r < RPB; r++) cmp_regs[c][r] = '0;
    end
    for (int r = 0; r < RPB; r++) wr_regs[r] = '0;
    repeat (2) tick();
    rst_n = 1; tick();
    for (int s = 0; s < SLOTS; s++) write_slot(s);
    for (int s = 0; s < SLOTS; s++) read_slot(s % NRD, s);
    compare(0, 3, -1, 0);
    compare(1, 8, 37, 0);
    compare(1, 8, -1, 0);     // a fresh compare starts clean
    compare(0, 5, -1, 1);
    compare(0, 0, 63, 0);
    compare(1, 2, 0, 0);
    // overwrite a slot and read it again
    write_slot(4);
    read_slot(2, 4);
    compare(0, 4, -1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
