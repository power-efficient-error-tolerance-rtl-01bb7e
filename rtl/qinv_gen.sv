// qinv_gen: quasi-invalidation generator (lead core side).
//
// When checkers verify different chunks in parallel, a checker does not
// execute the stores of the chunks the other checkers verify, so lines in its
// L1 can go stale. The lead core therefore broadcasts a quasi-invalidation the
// first time it writes each cache line within a chunk; a checker holding the
// line marks it volatile.
//
// This block remembers the lines already written in the current chunk in a
// small associative list of DEPTH entries (a chunk holds at most 128 stores, so
// it never overflows). For each committed store (st_valid, st_line) whose line
// is not in the list, it adds the line and emits qinv_valid/qinv_line on the
// next cycle. clr (new chunk or roll-back) empties the list.
//
// The message and when it is sent follow the document; the list that detects
// the first write is this design's own.
module qinv_gen
  import rmt_pkg::*;
#(
  parameter int DEPTH = 128,
  localparam int CNT_W = $clog2(DEPTH + 1),
  localparam int IDX_W = $clog2(DEPTH)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clr,
  input  logic   st_valid,
  input  laddr_t st_line,
  output logic   qinv_valid,
  output laddr_t qinv_line
);
  laddr_t           lines [DEPTH];
  logic [CNT_W-1:0] n;
  logic             seen;

  always_comb begin
    seen = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if ((CNT_W'(i) < n) && (lines[i] == st_line)) seen = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (st_valid && !seen && (n < CNT_W'(DEPTH))) lines[IDX_W'(n)] <= st_line;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n          <= '0;
      qinv_valid <= 1'b0;
      qinv_line  <= '0;
    end else begin
      qinv_valid <= 1'b0;
      if (clr) begin
        n <= '0;
      end else if (st_valid && !seen) begin
        qinv_valid <= 1'b1;
        qinv_line  <= st_line;
        if (n < CNT_W'(DEPTH)) n <= n + 1'b1;
      end
    end
  end
endmodule
