// rmt_pkg: types and constants shared by the error-tolerance support logic.
//
// The design keeps a lead core's committed stores in a post-commit buffer (PCB)
// until checker cores have re-executed the same chunk of instructions and agreed
// with it. Sizes below are the configuration the design is built around: 64-bit
// Alpha-style words and addresses, 32-byte L1 lines (four words), eight chunk
// sections of 128 stores each, and a 257-entry membership hash table. Addresses
// handled by the PCB and caches are word addresses (byte address >> 3); the
// choice of whole-word stores is this design's own.
package rmt_pkg;
  localparam int ADDR_W      = 64;              // byte address width (Alpha)
  localparam int DATA_W      = 64;              // one word / one register
  localparam int WORD_OFF    = 3;               // log2(bytes per word)
  localparam int WADDR_W     = ADDR_W - WORD_OFF;
  localparam int LINE_WORDS  = 4;               // 32-byte L1 line
  localparam int LW_W        = $clog2(LINE_WORDS);
  localparam int LADDR_W     = WADDR_W - LW_W;  // line address width

  typedef logic [WADDR_W-1:0] waddr_t;
  typedef logic [LADDR_W-1:0] laddr_t;
  typedef logic [DATA_W-1:0]  word_t;
  typedef word_t [LINE_WORDS-1:0] line_t;

  // Execution-information queue entry kinds (lead -> checker assistance).
  typedef enum logic [1:0] {
    EI_BRANCH = 2'd0,   // branch outcome and target address
    EI_MISS   = 2'd1    // lead L1 miss address, used by the checker to prefetch
  } ei_kind_e;

  typedef struct packed {
    ei_kind_e          kind;
    logic              taken;
    logic [ADDR_W-1:0] addr;
  } ei_entry_t;

  // Line address of a word address.
  function automatic laddr_t line_of(waddr_t a);
    return a[WADDR_W-1:LW_W];
  endfunction
endpackage
