// l1_dcache: private L1 data cache of a lead or checker core.
//
// Each core keeps in its L1 the memory image as it should see it at its own
// logical time, so that loads only search the store queue and the L1 and reach
// the slow post-commit buffer only on a miss. Three differences from an
// ordinary write-back cache follow from that:
//  * Committed stores update the L1 at once (st_*), before their chunk is
//    verified. There is no dirty state: a replaced line is simply dropped, and
//    verified data reach L2 only through the PCB's write-back. A store to a line
//    that is not present is not allocated (the PCB holds it for later fills).
//  * Lines are filled (fill_*) by the miss/merge unit with L2 data overlaid by
//    PCB words; fill_volatile marks a line that a future chunk will modify.
//  * Volatile bits: a quasi-invalidation (qinv_*) sets the volatile bit of a
//    present line; inv_volatile drops every volatile line (a checker skipping
//    chunks), inv_all drops every line (roll-back).
//
// Organisation: SETS x WAYS lines of LINE_WORDS 64-bit words, LRU replacement.
// Loads (ld_*) take 2 cycles: ld_rsp_valid/ld_hit/ld_data appear two cycles
// after the request. Stores, fills and invalidations act at the clock edge.
//
// Size, associativity, line size and latency (32 KB, 2-way, 32-byte lines, 2
// cycles) follow the document, as do the discard-on-replace rule and the
// volatile bit. No-write-allocate and LRU are this design's own choices.
module l1_dcache
  import rmt_pkg::*;
#(
  parameter int SETS = 512,
  parameter int WAYS = 2,
  localparam int SET_W = $clog2(SETS),
  localparam int TAG_W = LADDR_W - SET_W,
  localparam int WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic   clk,
  input  logic   rst_n,
  // loads
  input  logic   ld_valid,
  input  waddr_t ld_addr,
  output logic   ld_rsp_valid,
  output logic   ld_hit,
  output word_t  ld_data,
  // committed stores
  input  logic   st_valid,
  input  waddr_t st_addr,
  input  word_t  st_data,
  // line fill
  input  logic   fill_valid,
  input  laddr_t fill_line,
  input  line_t  fill_data,
  input  logic   fill_volatile,
  // coherence for checkers
  input  logic   qinv_valid,
  input  laddr_t qinv_line,
  input  logic   inv_volatile,
  input  logic   inv_all
);
  logic [TAG_W-1:0] tags [SETS][WAYS];
  line_t            data [SETS][WAYS];
  logic             vld  [SETS][WAYS];
  logic             vol  [SETS][WAYS];
  logic [WAY_W-1:0] lru  [SETS];     // way to replace next

  function automatic logic [SET_W-1:0] set_of(laddr_t l);
    return l[SET_W-1:0];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(laddr_t l);
    return l[LADDR_W-1:SET_W];
  endfunction

  // ------------------------------------------------ load pipeline (2 cycles)
  logic   ld1_valid;
  waddr_t ld1_addr;
  logic   l_hit;
  word_t  l_data;
  logic [WAY_W-1:0] l_way;

  always_comb begin
    laddr_t l;
    l      = line_of(ld1_addr);
    l_hit  = 1'b0;
    l_data = '0;
    l_way  = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[set_of(l)][w] && (tags[set_of(l)][w] == tag_of(l))) begin
        l_hit  = 1'b1;
        l_way  = WAY_W'(w);
        l_data = data[set_of(l)][w][ld1_addr[LW_W-1:0]];
      end
  end

  // ------------------------------------------------ store lookup
  logic s_hit;
  logic [WAY_W-1:0] s_way;
  always_comb begin
    laddr_t l;
    l     = line_of(st_addr);
    s_hit = 1'b0;
    s_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[set_of(l)][w] && (tags[set_of(l)][w] == tag_of(l))) begin
        s_hit = 1'b1;
        s_way = WAY_W'(w);
      end
  end

  // ------------------------------------------------ fill victim
  logic f_hit;
  logic [WAY_W-1:0] f_way;
  always_comb begin
    f_hit = 1'b0;
    f_way = lru[set_of(fill_line)];
    for (int w = 0; w < WAYS; w++)
      if (vld[set_of(fill_line)][w] && (tags[set_of(fill_line)][w] == tag_of(fill_line))) begin
        f_hit = 1'b1;
        f_way = WAY_W'(w);
      end
    if (!f_hit)
      for (int w = WAYS - 1; w >= 0; w--)
        if (!vld[set_of(fill_line)][w]) begin
          f_way = WAY_W'(w);
        end
  end

  // ------------------------------------------------ quasi-invalidation lookup
  logic q_hit;
  logic [WAY_W-1:0] q_way;
  always_comb begin
    q_hit = 1'b0;
    q_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[set_of(qinv_line)][w] && (tags[set_of(qinv_line)][w] == tag_of(qinv_line))) begin
        q_hit = 1'b1;
        q_way = WAY_W'(w);
      end
  end

  function automatic logic [WAY_W-1:0] other_way(logic [WAY_W-1:0] w);
    return (WAYS == 2) ? ~w : WAY_W'((int'(w) + 1) % WAYS);
  endfunction

  // data array: a store in the same cycle as the fill of its line is merged
  // into the fill data
  line_t fill_merged;
  always_comb begin
    fill_merged = fill_data;
    if (st_valid && (line_of(st_addr) == fill_line)) fill_merged[st_addr[LW_W-1:0]] = st_data;
  end
  always_ff @(posedge clk) begin
    if (st_valid && s_hit && !(fill_valid && (line_of(st_addr) == fill_line)))
      data[set_of(line_of(st_addr))][s_way][st_addr[LW_W-1:0]] <= st_data;
    if (fill_valid) begin
      data[set_of(fill_line)][f_way] <= fill_merged;
      tags[set_of(fill_line)][f_way] <= tag_of(fill_line);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ld1_valid    <= 1'b0;
      ld1_addr     <= '0;
      ld_rsp_valid <= 1'b0;
      ld_hit       <= 1'b0;
      ld_data      <= '0;
      for (int s = 0; s < SETS; s++) begin
        lru[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          vld[s][w] <= 1'b0;
          vol[s][w] <= 1'b0;
        end
      end
    end else begin
      ld1_valid    <= ld_valid;
      ld1_addr     <= ld_addr;
      ld_rsp_valid <= ld1_valid;
      ld_hit       <= ld1_valid && l_hit;
      ld_data      <= l_data;
      if (ld1_valid && l_hit) lru[set_of(line_of(ld1_addr))] <= other_way(l_way);
      if (qinv_valid && q_hit) vol[set_of(qinv_line)][q_way] <= 1'b1;
      if (fill_valid) begin
        vld[set_of(fill_line)][f_way] <= 1'b1;
        vol[set_of(fill_line)][f_way] <= fill_volatile;
        lru[set_of(fill_line)]        <= other_way(f_way);
      end
      if (inv_all) begin
        for (int s = 0; s < SETS; s++)
          for (int w = 0; w < WAYS; w++) vld[s][w] <= 1'b0;
      end else if (inv_volatile) begin
        for (int s = 0; s < SETS; s++)
          for (int w = 0; w < WAYS; w++)
            if (vol[s][w]) begin
              vld[s][w] <= 1'b0;
              vol[s][w] <= 1'b0;
            end
      end
    end
  end
endmodule
