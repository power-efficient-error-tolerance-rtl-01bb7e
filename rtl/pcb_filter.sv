// pcb_filter: membership hash table in front of the post-commit buffer.
//
// Most PCB searches find nothing, and each one is slow and costly. This table
// keeps, for each of ENTRIES buckets, a count of the PCB entries whose cache line
// hashes to that bucket. A search for a line whose bucket count is zero would
// miss for certain, so the caller skips it. The bucket is the line address
// modulo ENTRIES (257, a prime); the remainder is formed cheaply by adding the
// even bytes of the address and subtracting the odd ones (256 = -1 mod 257).
//
// Interface: ins_* counts a store entering the PCB, rm_* one leaving it (written
// back or squashed); both may happen in the same cycle. q_line is looked up
// combinationally on each of NUM_Q query ports: q_maybe = 0 means "not in the PCB".
// A counter that reaches its maximum sticks there (it can no longer be counted
// down exactly) until clr, which the PCB asserts while it is empty; a stuck
// bucket only costs extra searches.
//
// The table size (257 entries of 8 bits) follows the document; the hash, the
// counting and the saturation rule are this design's own choices.
module pcb_filter
  import rmt_pkg::*;
#(
  parameter int ENTRIES = 257,
  parameter int CNT_W   = 8,
  parameter int NUM_Q   = 1,
  localparam int IDX_W  = $clog2(ENTRIES)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clr,
  input  logic   ins_valid,
  input  laddr_t ins_line,
  input  logic   rm_valid,
  input  laddr_t rm_line,
  input  laddr_t q_line  [NUM_Q],
  output logic   q_maybe [NUM_Q]
);
  localparam int NBYTES = (LADDR_W + 7) / 8;

  logic [CNT_W-1:0] cnt [ENTRIES];

  // line address modulo ENTRIES, using 256 = -1 (mod 257) byte folding when
  // ENTRIES is 257, a plain remainder otherwise
  function automatic logic [IDX_W-1:0] bucket(laddr_t l);
    logic [NBYTES*8-1:0] x;
    int acc;
    x   = (NBYTES*8)'(l);
    acc = 0;
    if (ENTRIES == 257) begin
      for (int b = 0; b < NBYTES; b++)
        acc += (b % 2 == 0) ? int'(x[b*8 +: 8]) : -int'(x[b*8 +: 8]);
      acc = (acc + 257 * NBYTES) % 257;
    end else begin
      acc = int'(l % LADDR_W'(ENTRIES));
    end
    return IDX_W'(acc);
  endfunction

  logic [IDX_W-1:0] bi, br;
  assign bi = bucket(ins_line);
  assign br = bucket(rm_line);
  always_comb begin
    for (int q = 0; q < NUM_Q; q++) q_maybe[q] = (cnt[bucket(q_line[q])] != '0);
  end

  localparam logic [CNT_W-1:0] MAXC = '1;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      for (int i = 0; i < ENTRIES; i++) cnt[i] <= '0;
    end else begin
      if (ins_valid && rm_valid && (bi == br)) begin
        // net change zero
      end else begin
        if (ins_valid && (cnt[bi] != MAXC)) cnt[bi] <= cnt[bi] + 1'b1;
        if (rm_valid && (cnt[br] != MAXC) && (cnt[br] != '0)) cnt[br] <= cnt[br] - 1'b1;
      end
    end
  end
endmodule
