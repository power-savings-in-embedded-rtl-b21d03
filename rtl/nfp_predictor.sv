// nfp_predictor -- predicts the source (line buffer, DFC or I-cache) of the
// next fetch, so that only one source is read per fetch.
//
// State: a next fetch prediction table (NFPT) with one entry per DFC sector,
// each entry a PTAG_W-bit partial tag and a LINES-bit sector_valid mask;
// last_table_entry and last_decode_addr on the decode side; next_fetch_src
// (line buffer or DFC) and cur_sector_valid on the fetch side.
//
// Decode side (upd_en, decode_addr, cacheable): every instruction that leaves
// the decode stage updates the entry pointed to by last_table_entry. When
// decode_addr enters a new 16-byte line, last_table_entry first moves to the
// entry of the line just left (index bits of last_decode_addr). The entry's
// partial tag becomes the low PTAG_W tag bits of decode_addr and its
// sector_valid bit for decode_addr becomes `cacheable`. So the entry of a line
// describes the line that followed it last time.
//
// Fetch side (pred_en, fetch_addr), combinational pred_src for the fetch of
// fetch_addr + 4, state updated at the edge when pred_en is high:
//   * fetch_addr + 4 in the same line: line buffer if next_fetch_src is the
//     line buffer; otherwise DFC if cur_sector_valid has the bit of
//     fetch_addr + 4 set, else I-cache.
//   * next line: the NFPT entry of fetch_addr is read and its partial tag is
//     compared with the low tag bits of fetch_addr. Equal: cur_sector_valid
//     takes the entry's sector_valid, next_fetch_src becomes DFC, and the
//     source is DFC if the first valid bit is set, else I-cache. Not equal:
//     I-cache, and next_fetch_src becomes line buffer (the I-cache line is
//     forwarded there).
// Taken branch (redir_en, branch_addr), combinational redir_src for the
// target fetch: if the branch is the last instruction of its line, the
// next-line rule above is applied to branch_addr, so the first valid bit
// predicts the target; otherwise no prediction exists and the I-cache is
// chosen with next_fetch_src set to line buffer. redir_en has priority.
//
// The table size (one entry per DFC sector), the 4-bit partial tag and all the
// rules above follow the description of the predictor. This design's choices:
// the sector_valid mask is cleared when an entry receives a different partial
// tag, the I-cache is used where no target prediction exists, reset empties
// the table (tags 0, masks 0) and sets next_fetch_src to line buffer.
module nfp_predictor
  import dfc_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,        // = DFC sectors
  parameter int unsigned LINES   = 4,         // instructions per sector
  parameter int unsigned PTAG_W  = 4          // partial tag bits
) (
  input  logic        clk,
  input  logic        rst_n,
  // decode side
  input  logic        upd_en,
  input  addr_t       decode_addr,
  input  logic        cacheable,
  // fetch side
  input  logic        pred_en,
  input  addr_t       fetch_addr,
  output fetch_src_e  pred_src,
  output logic        pred_table_hit,          // next-line lookup found an equal partial tag
  // taken branch
  input  logic        redir_en,
  input  addr_t       branch_addr,
  output fetch_src_e  redir_src,
  output logic        redir_table_hit
);
  localparam int unsigned LINE_W = $clog2(LINES);
  localparam int unsigned IDX_W  = $clog2(ENTRIES);
  localparam int unsigned TAG_LO = 2 + LINE_W + IDX_W;

  typedef struct packed {
    logic [PTAG_W-1:0] ptag;
    logic [LINES-1:0]  sv;
  } nfpt_entry_t;

  nfpt_entry_t        nfpt_q [ENTRIES];
  logic [IDX_W-1:0]   last_table_entry_q;
  addr_t              last_decode_addr_q;
  fetch_src_e         next_fetch_src_q;
  logic [LINES-1:0]   cur_sector_valid_q;

  function automatic logic [IDX_W-1:0] idx_of(addr_t a);
    return a[2+LINE_W +: IDX_W];
  endfunction
  function automatic logic [LINE_W-1:0] line_of(addr_t a);
    return a[2 +: LINE_W];
  endfunction
  function automatic logic [PTAG_W-1:0] ptag_of(addr_t a);
    return a[TAG_LO +: PTAG_W];
  endfunction

  // ---------------- decode side ----------------
  logic             line_change;
  logic [IDX_W-1:0] upd_idx;
  nfpt_entry_t      upd_entry;
  always_comb begin
    line_change = (last_decode_addr_q[ADDR_W-1:2+LINE_W] != decode_addr[ADDR_W-1:2+LINE_W]);
    upd_idx     = line_change ? idx_of(last_decode_addr_q) : last_table_entry_q;
    upd_entry   = nfpt_q[upd_idx];
    if (upd_entry.ptag != ptag_of(decode_addr)) upd_entry.sv = '0;
    upd_entry.ptag = ptag_of(decode_addr);
    upd_entry.sv[line_of(decode_addr)] = cacheable;
  end

  // ---------------- fetch side ----------------
  logic             same_line;
  logic [LINE_W-1:0] next_line;
  nfpt_entry_t      f_entry, r_entry;
  always_comb begin
    same_line      = (line_of(fetch_addr) != LINE_W'(LINES-1));
    next_line      = line_of(fetch_addr) + 1'b1;
    f_entry        = nfpt_q[idx_of(fetch_addr)];
    pred_table_hit = !same_line && (f_entry.ptag == ptag_of(fetch_addr));
    if (same_line) begin
      if (next_fetch_src_q == SRC_LB)        pred_src = SRC_LB;
      else if (cur_sector_valid_q[next_line]) pred_src = SRC_DFC;
      else                                    pred_src = SRC_IC;
    end else if (pred_table_hit) begin
      pred_src = f_entry.sv[0] ? SRC_DFC : SRC_IC;
    end else begin
      pred_src = SRC_IC;
    end

    r_entry         = nfpt_q[idx_of(branch_addr)];
    redir_table_hit = (line_of(branch_addr) == LINE_W'(LINES-1)) &&
                      (r_entry.ptag == ptag_of(branch_addr));
    redir_src       = (redir_table_hit && r_entry.sv[0]) ? SRC_DFC : SRC_IC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) nfpt_q[e] <= '0;
      last_table_entry_q <= '0;
      last_decode_addr_q <= '0;
      next_fetch_src_q   <= SRC_LB;
      cur_sector_valid_q <= '0;
    end else begin
      if (upd_en) begin
        nfpt_q[upd_idx]    <= upd_entry;
        last_table_entry_q <= upd_idx;
        last_decode_addr_q <= decode_addr;
      end
      if (redir_en) begin
        if (redir_table_hit) begin
          cur_sector_valid_q <= r_entry.sv;
          next_fetch_src_q   <= SRC_DFC;
        end else begin
          next_fetch_src_q   <= SRC_LB;
        end
      end else if (pred_en && !same_line) begin
        if (pred_table_hit) begin
          cur_sector_valid_q <= f_entry.sv;
          next_fetch_src_q   <= SRC_DFC;
        end else begin
          next_fetch_src_q   <= SRC_LB;
        end
      end
    end
  end

endmodule
