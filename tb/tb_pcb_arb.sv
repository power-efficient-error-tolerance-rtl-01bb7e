// tb_pcb_arb: self-checking testbench for the PCB search-port arbiter.
//
// Three requesters raise random requests; a stand-in for the PCB accepts one
// request when ready and answers it a few cycles later with the requester id.
// Checks that the granted requester forwards its own address and id, that
// grants rotate round-robin (no requester waits more than NUM_REQ-1 grants
// while asking) and that each response reaches only its requester.
module tb_pcb_arb;
  import rmt_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] ps_valid = '0, ps_ready, pr_valid;
  waddr_t ps_addr [N];
  logic srch_valid, srch_ready = 0, rsp_valid = 0;
  logic [1:0] srch_req, rsp_req = '0;
  waddr_t srch_addr;

  pcb_arb #(.NUM_REQ(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int waited [N];
  int grants [N];
  bit g_any;
  int g_id;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < N; r++) ps_addr[r] = waddr_t'(64'h100 * (r + 1));
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      // requests stay up until granted
      for (int r = 0; r < N; r++)
        if (!ps_valid[r] && $urandom_range(0, 2) == 0) ps_valid[r] = 1;
      srch_ready = ($urandom_range(0, 1) == 1);
      rsp_valid = ($urandom_range(0, 3) == 0);
      rsp_req = 2'($urandom_range(0, N - 1));
      #1;
      // response steering
      for (int r = 0; r < N; r++)
        check(pr_valid[r] == (rsp_valid && rsp_req == 2'(r)), "response steering");
      if (ps_valid != '0) begin
        check(srch_valid, "request forwarded");
        check(ps_valid[srch_req] && srch_addr == ps_addr[srch_req], "winner's address and id");
        check(ps_ready == (srch_ready ? (N'(1) << srch_req) : '0), "ready only to the winner");
      end else check(!srch_valid, "no request");
      g_any = srch_valid && srch_ready;
      g_id  = int'(srch_req);
      @(posedge clk);
      #1;
      if (g_any) begin
        grants[g_id]++;
        for (int r = 0; r < N; r++)
          if (ps_valid[r] && r != g_id) begin
            waited[r]++;
            check(waited[r] < N, $sformatf("requester %0d starved", r));
          end
        waited[g_id] = 0;
        ps_valid[g_id] = 0;
      end
    end
    for (int r = 0; r < N; r++) check(grants[r] > 100, "every requester served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
