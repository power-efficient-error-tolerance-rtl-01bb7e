// ckpt_buf: checkpoint buffer.
//
// At every chunk boundary the lead core freezes retirement and copies its
// architectural state into a free slot here: the program counter and NUM_REGS
// registers (32 integer + 32 floating point), REGS_PER_BEAT registers per cycle,
// so a checkpoint takes NUM_REGS/REGS_PER_BEAT = 16 cycles to create. A slot is
// used three ways:
//  * a checker loads the chunk's starting checkpoint before re-executing it
//    (read port), and the lead loads it back to roll back after an error;
//  * when a checker ends a chunk it streams its own registers into a compare
//    port, beat by beat, against the checkpoint the lead took at the end of the
//    same chunk. cmp_done pulses one cycle after the last beat with cmp_ok = 1
//    when every register and the PC matched.
// Read ports return the beat's registers one cycle after the request. There are
// NUM_RD read ports (lead and each checker) and NUM_CMP compare ports (one per
// checker). Slot management is the chunk controller's.
//
// Following the document: snapshots of architectural registers, 4 registers
// per cycle, 16 cycles to create or load, comparison of a checker's final state
// with the next checkpoint. This design's own choices: 9 slots (one more than
// the PCB's eight chunk sections, so the end checkpoint of the newest chunk can
// be taken while eight chunks are outstanding), the PC as the only pointer
// stored, and the beat-wise compare port.
module ckpt_buf
  import rmt_pkg::*;
#(
  parameter int NUM_SLOTS     = 9,
  parameter int NUM_REGS      = 64,
  parameter int REGS_PER_BEAT = 4,
  parameter int NUM_RD        = 3,
  parameter int NUM_CMP       = 2,
  localparam int BEATS  = NUM_REGS / REGS_PER_BEAT,
  localparam int SLOT_W = $clog2(NUM_SLOTS),
  localparam int BEAT_W = $clog2(BEATS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // write (checkpoint creation)
  input  logic              wr_valid,
  input  logic [SLOT_W-1:0] wr_slot,
  input  logic [BEAT_W-1:0] wr_beat,
  input  word_t             wr_regs [REGS_PER_BEAT],
  input  word_t             wr_pc,      // taken at beat 0
  // read ports (checkpoint loading)
  input  logic [NUM_RD-1:0] rd_valid,
  input  logic [SLOT_W-1:0] rd_slot [NUM_RD],
  input  logic [BEAT_W-1:0] rd_beat [NUM_RD],
  output logic [NUM_RD-1:0] rd_rvalid,
  output word_t             rd_regs [NUM_RD][REGS_PER_BEAT],
  output word_t             rd_pc   [NUM_RD],
  // compare ports (end-of-chunk verification)
  input  logic [NUM_CMP-1:0] cmp_valid,
  input  logic [SLOT_W-1:0]  cmp_slot [NUM_CMP],
  input  logic [BEAT_W-1:0]  cmp_beat [NUM_CMP],
  input  word_t              cmp_regs [NUM_CMP][REGS_PER_BEAT],
  input  word_t              cmp_pc   [NUM_CMP],
  output logic [NUM_CMP-1:0] cmp_done,
  output logic [NUM_CMP-1:0] cmp_ok
);
  word_t regs [NUM_SLOTS][NUM_REGS];
  word_t pcs  [NUM_SLOTS];
  logic [NUM_CMP-1:0] mism;

  always_ff @(posedge clk) begin
    if (wr_valid) begin
      for (int r = 0; r < REGS_PER_BEAT; r++)
        regs[wr_slot][int'(wr_beat) * REGS_PER_BEAT + r] <= wr_regs[r];
      if (wr_beat == '0) pcs[wr_slot] <= wr_pc;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_rvalid <= '0;
      for (int p = 0; p < NUM_RD; p++) begin
        rd_pc[p] <= '0;
        for (int r = 0; r < REGS_PER_BEAT; r++) rd_regs[p][r] <= '0;
      end
    end else begin
      rd_rvalid <= rd_valid;
      for (int p = 0; p < NUM_RD; p++) begin
        if (rd_valid[p]) begin
          rd_pc[p] <= pcs[rd_slot[p]];
          for (int r = 0; r < REGS_PER_BEAT; r++)
            rd_regs[p][r] <= regs[rd_slot[p]][int'(rd_beat[p]) * REGS_PER_BEAT + r];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mism     <= '0;
      cmp_done <= '0;
      cmp_ok   <= '0;
    end else begin
      for (int c = 0; c < NUM_CMP; c++) begin
        logic bad;
        bad         = 1'b0;
        cmp_done[c] <= 1'b0;
        if (cmp_valid[c]) begin
          for (int r = 0; r < REGS_PER_BEAT; r++)
            if (regs[cmp_slot[c]][int'(cmp_beat[c]) * REGS_PER_BEAT + r] != cmp_regs[c][r])
              bad = 1'b1;
          if ((cmp_beat[c] == '0) && (pcs[cmp_slot[c]] != cmp_pc[c])) bad = 1'b1;
          // a new comparison starts at beat 0
          mism[c] <= ((cmp_beat[c] == '0) ? 1'b0 : mism[c]) | bad;
          if (cmp_beat[c] == BEAT_W'(BEATS - 1)) begin
            cmp_done[c] <= 1'b1;
            cmp_ok[c]   <= !(((cmp_beat[c] == '0) ? 1'b0 : mism[c]) | bad);
          end
        end
      end
    end
  end
endmodule
