// line_fill: L1 miss handler and merge unit of one core.
//
// On an L1 data miss the line must be rebuilt as this core should see it: the
// L2 copy, overlaid with every newer word held in the post-commit buffer (PCB)
// that is older than the core's logical time. The PCB returns one word per
// probe, together with a mask of the other words of the same line it holds, so
// the unit:
//  1. unless the membership filter (flt_maybe, looked up combinationally on
//     flt_line) rules the line out, sends a PCB probe for the missing
//     (critical) word, and then the line read to L2. The L2 read is only sent
//     once the probe has been accepted: the PCB never frees a section while a
//     search is running, so every word is found either in the PCB or in L2;
//  2. returns the critical word to the core (crit_valid/crit_data) as soon as
//     both answers are in;
//  3. probes the PCB again for each other word the mask named, in wrap-around
//     order starting after the critical word;
//  4. writes the merged line into the L1 (fill_*). fill_volatile is set when a
//     forward search found that a later chunk writes the line, or when a
//     quasi-invalidation for the line arrived while the fill was in flight
//     (checkers only; the lead's searches never have a forward part).
// The core's own stores to the line while the miss is in flight (the core
// resumes as soon as it has the critical word) are snooped on st_* and win
// over both PCB and L2 data, so the fill never undoes them.
// flush (roll-back) lets the current miss run to its end without delivering
// the critical word or writing the L1, since its data may include squashed
// stores.
// One miss is handled at a time (miss_ready). All handshakes are valid/ready;
// PCB and L2 responses are single-cycle pulses.
//
// The merge of L2 and PCB data, the one-word probes with wrap-around, the
// critical word first and the volatile bit follow the document; the
// handshakes and the sequencing are this design's own.
module line_fill
  import rmt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // roll-back: the fill in progress is dropped
  input  logic   flush,
  // quasi-invalidations seen while the fill is in flight
  input  logic   qinv_valid,
  input  laddr_t qinv_line,
  // the core's own stores
  input  logic   st_valid,
  input  waddr_t st_addr,
  input  word_t  st_data,
  // miss from the core's load path
  input  logic   miss_valid,
  input  waddr_t miss_addr,
  output logic   miss_ready,
  output logic   crit_valid,
  output word_t  crit_data,
  // L2 line read
  output logic   l2_req_valid,
  output laddr_t l2_req_line,
  input  logic   l2_req_ready,
  input  logic   l2_rsp_valid,
  input  line_t  l2_rsp_data,
  // membership filter
  output laddr_t flt_line,
  input  logic   flt_maybe,
  // PCB search port
  output logic   ps_valid,
  output waddr_t ps_addr,
  input  logic   ps_ready,
  input  logic   pr_valid,
  input  logic   pr_hit,
  input  word_t  pr_data,
  input  logic [LINE_WORDS-1:0] pr_mask,
  input  logic   pr_fwd,
  // L1 fill
  output logic   fill_valid,
  output laddr_t fill_line,
  output line_t  fill_data,
  output logic   fill_volatile
);
  typedef enum logic [2:0] {S_IDLE, S_CRIT, S_PROBE, S_PWAIT, S_FILL} state_e;
  state_e state;

  laddr_t              line;
  logic [LW_W-1:0]     crit_w, probe_w;
  logic                l2_sent, l2_got, p_sent, p_got;
  line_t               l2_line, pcb_words;
  logic [LINE_WORDS-1:0] pcb_have, pend;
  logic                vol;
  logic                killed;
  logic [LINE_WORDS-1:0] own_have;
  line_t               own_words;
  logic                st_here;
  assign st_here = st_valid && (line_of(st_addr) == line) && (state != S_IDLE);

  assign miss_ready   = (state == S_IDLE);
  assign flt_line     = line;
  assign l2_req_valid = (state == S_CRIT) && !l2_sent && p_sent;
  assign l2_req_line  = line;
  assign ps_valid     = ((state == S_CRIT) && !p_sent && flt_maybe) || (state == S_PROBE);
  assign ps_addr      = {line, (state == S_PROBE) ? probe_w : crit_w};

  // first word of mask m in wrap-around order after the critical word
  function automatic logic [LW_W:0] next_word(logic [LINE_WORDS-1:0] m, logic [LW_W-1:0] c);
    logic [LW_W:0] r;
    r = '0;
    for (int k = LINE_WORDS - 1; k >= 1; k--)
      if (m[LW_W'(int'(c) + k)]) r = {1'b1, LW_W'(int'(c) + k)};
    return r;
  endfunction

  logic [LINE_WORDS-1:0] pend_left;
  logic [LW_W:0]         nxt_crit, nxt_probe;
  assign pend_left = pend & ~(LINE_WORDS'(1) << probe_w);
  assign nxt_crit  = next_word(pend, crit_w);
  assign nxt_probe = next_word(pend_left, crit_w);

  line_t merged;
  always_comb begin
    for (int w = 0; w < LINE_WORDS; w++)
      merged[w] = (st_here && (st_addr[LW_W-1:0] == LW_W'(w))) ? st_data :
                  own_have[w] ? own_words[w] :
                  pcb_have[w] ? pcb_words[w] : l2_line[w];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      line       <= '0;
      crit_w     <= '0;
      probe_w    <= '0;
      l2_sent    <= 1'b0;
      l2_got     <= 1'b0;
      p_sent     <= 1'b0;
      p_got      <= 1'b0;
      l2_line    <= '0;
      pcb_words  <= '0;
      pcb_have   <= '0;
      pend       <= '0;
      vol        <= 1'b0;
      killed     <= 1'b0;
      own_have   <= '0;
      own_words  <= '0;
      crit_valid <= 1'b0;
      crit_data  <= '0;
      fill_valid <= 1'b0;
      fill_line  <= '0;
      fill_data  <= '0;
      fill_volatile <= 1'b0;
    end else begin
      crit_valid <= 1'b0;
      fill_valid <= 1'b0;
      if (l2_rsp_valid && l2_sent && !l2_got) begin
        l2_line <= l2_rsp_data;
        l2_got  <= 1'b1;
      end
      if (flush) killed <= 1'b1;
      if (st_here) begin
        own_have[st_addr[LW_W-1:0]]  <= 1'b1;
        own_words[st_addr[LW_W-1:0]] <= st_data;
      end
      if (qinv_valid && (qinv_line == line) && (state != S_IDLE)) vol <= 1'b1;
      unique case (state)
        S_IDLE: if (miss_valid) begin
          state    <= S_CRIT;
          line     <= line_of(miss_addr);
          crit_w   <= miss_addr[LW_W-1:0];
          l2_sent  <= 1'b0;
          l2_got   <= 1'b0;
          p_sent   <= 1'b0;
          p_got    <= 1'b0;
          pcb_have <= '0;
          pend     <= '0;
          vol      <= 1'b0;
          own_have <= '0;
          killed   <= flush;
        end
        S_CRIT: begin
          if (l2_req_valid && l2_req_ready) l2_sent <= 1'b1;
          if (!p_sent && !flt_maybe) begin
            p_sent <= 1'b1;         // filter: the PCB cannot hold this line
            p_got  <= 1'b1;
          end else if (ps_valid && ps_ready) begin
            p_sent <= 1'b1;
          end
          if (pr_valid && p_sent && !p_got) begin
            p_got <= 1'b1;
            if (pr_fwd) vol <= 1'b1;
            pend  <= pr_mask & ~(LINE_WORDS'(1) << crit_w);
            if (pr_hit) begin
              pcb_have[crit_w]  <= 1'b1;
              pcb_words[crit_w] <= pr_data;
            end
          end
          if (l2_got && p_got) begin
            crit_valid <= !killed && !flush;
            crit_data  <= merged[crit_w];
            state      <= nxt_crit[LW_W] ? S_PROBE : S_FILL;
            probe_w    <= nxt_crit[LW_W-1:0];
          end
        end
        S_PROBE: if (ps_ready) state <= S_PWAIT;
        S_PWAIT: if (pr_valid) begin
          vol <= vol | pr_fwd;
          if (pr_hit) begin
            pcb_have[probe_w]  <= 1'b1;
            pcb_words[probe_w] <= pr_data;
          end
          pend    <= pend_left;
          probe_w <= nxt_probe[LW_W-1:0];
          state   <= nxt_probe[LW_W] ? S_PROBE : S_FILL;
        end
        S_FILL: begin
          fill_valid    <= !killed && !flush;
          fill_line     <= line;
          fill_data     <= merged;
          fill_volatile <= vol;
          state         <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
