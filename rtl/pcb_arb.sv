// pcb_arb: shares the post-commit buffer's single search port.
//
// The PCB has one search port, used by the miss handlers of the lead core and
// of every checker. This arbiter grants the port round-robin among the
// requesters that hold ps_valid, forwards the winner's word address with its
// index as the requester id (0 = lead, c+1 = checker c, which is also what the
// PCB uses to pick the requester's logical time), and steers each response back
// by that id: pr_valid[r] pulses for requester r only; the response fields are
// shared.
//
// The single port follows the document; the round-robin policy is this
// design's own choice.
module pcb_arb
  import rmt_pkg::*;
#(
  parameter int NUM_REQ = 3,
  localparam int REQ_W = $clog2(NUM_REQ)
) (
  input  logic               clk,
  input  logic               rst_n,
  // requesters
  input  logic [NUM_REQ-1:0] ps_valid,
  input  waddr_t             ps_addr [NUM_REQ],
  output logic [NUM_REQ-1:0] ps_ready,
  output logic [NUM_REQ-1:0] pr_valid,
  // PCB side
  output logic               srch_valid,
  output logic [REQ_W-1:0]   srch_req,
  output waddr_t             srch_addr,
  input  logic               srch_ready,
  input  logic               rsp_valid,
  input  logic [REQ_W-1:0]   rsp_req
);
  logic [REQ_W-1:0] last;   // last granted requester
  logic             any;
  logic [REQ_W-1:0] pick;

  always_comb begin
    any  = 1'b0;
    pick = '0;
    // search from last+NUM_REQ-1 down to last+1 so the lowest distance wins
    for (int k = NUM_REQ; k >= 1; k--) begin
      if (ps_valid[(int'(last) + k) % NUM_REQ]) begin
        any  = 1'b1;
        pick = REQ_W'((int'(last) + k) % NUM_REQ);
      end
    end
  end

  assign srch_valid = any;
  assign srch_req   = pick;
  assign srch_addr  = ps_addr[pick];

  always_comb begin
    ps_ready = '0;
    pr_valid = '0;
    if (any && srch_ready) ps_ready[pick] = 1'b1;
    if (rsp_valid) pr_valid[rsp_req] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) last <= REQ_W'(NUM_REQ - 1);
    else if (any && srch_ready) last <= pick;
  end
endmodule
