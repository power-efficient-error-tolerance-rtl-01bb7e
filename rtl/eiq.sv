// eiq: execution information queue.
//
// While it runs a chunk, the lead core records information that makes the
// checker's re-execution cheaper: the outcome and target of each branch, and
// the addresses of its L1 data misses (which the checker prefetches at the
// start of the chunk). The queue has one section per chunk, in step with the
// PCB's sections: open_valid starts the next section at head (the chunk
// controller never opens more sections than the PCB has, so a section is reused
// only after its chunk was verified), and squash_valid discards squash_sec..head
// on roll-back, leaving squash_sec as the (empty) head. NUM_SEC must be a power
// of two.
//
// Write: app_valid appends app_entry to the head section; head_full tells the
// chunk controller the section has no room, and it then ends the chunk.
// Read: assign_* binds checker c to a section; rd_valid[c] shows the next entry
// on rd_entry[c] (combinational) and rd_pop[c] consumes it.
//
// The queue and its contents follow the document; its depth per section (512
// entries), the per-chunk sectioning and ending a chunk early when a section
// fills are this design's own choices.
module eiq
  import rmt_pkg::*;
#(
  parameter int NUM_SEC     = 8,
  parameter int SEC_ENTRIES = 512,
  parameter int NUM_CHK     = 2,
  localparam int SEC_W = $clog2(NUM_SEC),
  localparam int CNT_W = $clog2(SEC_ENTRIES + 1),
  localparam int IDX_W = $clog2(SEC_ENTRIES),
  localparam int CHK_W = (NUM_CHK > 1) ? $clog2(NUM_CHK) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               open_valid,
  input  logic               squash_valid,
  input  logic [SEC_W-1:0]   squash_sec,
  input  logic               app_valid,
  input  ei_entry_t          app_entry,
  output logic               head_full,
  input  logic               assign_valid,
  input  logic [CHK_W-1:0]   assign_chk,
  input  logic [SEC_W-1:0]   assign_sec,
  output logic [NUM_CHK-1:0] rd_valid,
  output ei_entry_t          rd_entry [NUM_CHK],
  input  logic [NUM_CHK-1:0] rd_pop
);
  ei_entry_t        mem [NUM_SEC][SEC_ENTRIES];
  logic [CNT_W-1:0] cnt [NUM_SEC];
  logic [SEC_W-1:0] head;
  logic [SEC_W-1:0] c_sec [NUM_CHK];
  logic [CNT_W-1:0] c_idx [NUM_CHK];
  logic [NUM_CHK-1:0] c_bound;

  assign head_full = (cnt[head] == CNT_W'(SEC_ENTRIES));

  always_comb begin
    for (int c = 0; c < NUM_CHK; c++) begin
      rd_valid[c] = c_bound[c] && (c_idx[c] < cnt[c_sec[c]]);
      rd_entry[c] = mem[c_sec[c]][IDX_W'(c_idx[c])];
    end
  end

  always_ff @(posedge clk) begin
    if (app_valid && !head_full) mem[head][IDX_W'(cnt[head])] <= app_entry;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head    <= SEC_W'(NUM_SEC - 1);
      c_bound <= '0;
      for (int s = 0; s < NUM_SEC; s++) cnt[s] <= '0;
      for (int c = 0; c < NUM_CHK; c++) begin
        c_sec[c] <= '0;
        c_idx[c] <= '0;
      end
    end else begin
      if (app_valid && !head_full) cnt[head] <= cnt[head] + 1'b1;
      if (open_valid) begin
        head                  <= head + 1'b1;
        cnt[head + 1'b1]      <= '0;
      end
      if (squash_valid) begin
        head            <= squash_sec;
        cnt[squash_sec] <= '0;
      end
      for (int c = 0; c < NUM_CHK; c++)
        if (rd_pop[c] && rd_valid[c]) c_idx[c] <= c_idx[c] + 1'b1;
      if (assign_valid) begin
        c_sec[assign_chk]   <= assign_sec;
        c_idx[assign_chk]   <= '0;
        c_bound[assign_chk] <= 1'b1;
      end
    end
  end
endmodule
