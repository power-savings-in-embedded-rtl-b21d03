// dfc_pkg -- constants and types shared by the decode-filter-cache front end.
//
// The front end delivers 4-byte instructions from one of three sources: a
// 16-byte line buffer, a small cache of already decoded instructions (the
// decode filter cache, DFC) or the L1 instruction cache. The DFC is organised
// in sectors of four decoded instructions, one sector per 16-byte block of
// code, so a fetch address splits into
//   [1:0] byte in instruction, [3:2] line (instruction) in sector,
//   [7:4] sector index (16 sectors), [31:8] sector tag.
// The sizes (4 B instructions, 16 B line buffer, 16 sectors of 4 decoded
// instructions of 8 B) follow the evaluated configuration; the 32-bit address
// and the widths of the bus carrying a decoded instruction are choices of
// this design.
package dfc_pkg;

  localparam int unsigned ADDR_W    = 32;  // fetch address width
  localparam int unsigned INSTR_W   = 32;  // 4-byte instructions
  localparam int unsigned UOP_W     = 64;  // one DFC line: 8-byte decoded instruction
  localparam int unsigned DEC_W     = 128; // widest decoded instruction on latch 2
  localparam int unsigned WIDTH_W   = 8;   // decode width in bits, 0..255

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [UOP_W-1:0]   uop_t;
  typedef logic [DEC_W-1:0]   dec_t;

  // Source of a fetch.
  typedef enum logic [1:0] {
    SRC_LB  = 2'd0,  // line buffer
    SRC_DFC = 2'd1,  // decode filter cache
    SRC_IC  = 2'd2   // L1 instruction cache
  } fetch_src_e;

  // Per-cycle activity of the front end, for power and accuracy accounting.
  typedef struct packed {
    logic ic_access;    // I-cache array read this cycle
    logic ic_miss;      // an I-cache refill was started
    logic lb_access;    // line buffer read
    logic lb_hit;
    logic dfc_access;   // DFC read
    logic dfc_hit;
    logic decode;       // decode stage active (not gated)
    logic mispredict;   // predicted source missed; fetch retried from the I-cache
    logic redirect;     // taken branch flushed the front end
    logic nfpt_hit;     // next-line prediction found its partial tag in the table
    logic redir_pred;   // target of a taken branch predicted from the table
  } fe_events_t;

endpackage
