// decode_filter_cache -- direct-mapped, sectored cache of decoded instructions.
//
// Each of SECTORS sectors covers one 16-byte block of code: one tag shared by
// LINES lines, one line per instruction of the block, and a valid bit per
// line. A line holds one decoded instruction of UOP_W bits. Because only
// cacheable (narrow) instructions are stored, a sector can be partly valid:
// the uncacheable instructions of the block leave their lines invalid.
//
// Read (fetch side, combinational, only when rd_en says the predictor chose
// the DFC): rd_hit is high when the sector selected by rd_addr[7:4] has the tag of rd_addr and the line rd_addr[3:2] is valid;
// rd_uop is that line. The fetch stage registers it into pipeline latch 5.
//
// Write (decode side, at the clock edge): every instruction leaving the decode
// stage is offered with its address, its decoded form and its cacheable flag.
// If the sector holds another block, it is reallocated: the tag is replaced
// and all valid bits cleared. The addressed line's valid bit is then set to
// `cacheable`, and its data written when cacheable. Reset empties the cache.
//
// Sizes follow the evaluated configuration (16 sectors, 4 decoded instructions
// per sector, 8 bytes each, direct mapped). Reallocating a sector on any
// decoded instruction, cacheable or not, is this design's choice; it keeps the
// cache in step with the predictor table, which is updated the same way.
module decode_filter_cache
  import dfc_pkg::*;
#(
  parameter int unsigned SECTORS = 16,
  parameter int unsigned LINES   = 4,
  parameter int unsigned UOP_BITS = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // fetch side
  input  logic                 rd_en,          // DFC chosen for this fetch
  input  addr_t                rd_addr,
  output logic                 rd_hit,
  output logic [UOP_BITS-1:0]  rd_uop,
  // decode side
  input  logic                 wr_en,
  input  addr_t                wr_addr,
  input  logic                 wr_cacheable,
  input  logic [UOP_BITS-1:0]  wr_uop
);
  localparam int unsigned LINE_W = $clog2(LINES);
  localparam int unsigned IDX_W  = $clog2(SECTORS);
  localparam int unsigned TAG_LO = 2 + LINE_W + IDX_W;
  localparam int unsigned TAG_W  = ADDR_W - TAG_LO;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [LINES-1:0] valid;
  } sector_hdr_t;

  sector_hdr_t               hdr_q  [SECTORS];
  logic [UOP_BITS-1:0]       data_q [SECTORS][LINES];

  // address fields
  logic [IDX_W-1:0]  rd_idx, wr_idx;
  logic [LINE_W-1:0] rd_line, wr_line;
  logic [TAG_W-1:0]  rd_tag, wr_tag;
  assign rd_line = rd_addr[2 +: LINE_W];
  assign rd_idx  = rd_addr[2+LINE_W +: IDX_W];
  assign rd_tag  = rd_addr[TAG_LO +: TAG_W];
  assign wr_line = wr_addr[2 +: LINE_W];
  assign wr_idx  = wr_addr[2+LINE_W +: IDX_W];
  assign wr_tag  = wr_addr[TAG_LO +: TAG_W];

  assign rd_hit = rd_en && (hdr_q[rd_idx].tag == rd_tag) && hdr_q[rd_idx].valid[rd_line];
  assign rd_uop = data_q[rd_idx][rd_line];

  // header update
  sector_hdr_t hdr_new;
  always_comb begin
    hdr_new = hdr_q[wr_idx];
    if (hdr_new.tag != wr_tag) begin
      hdr_new.tag   = wr_tag;
      hdr_new.valid = '0;
    end
    hdr_new.valid[wr_line] = wr_cacheable;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SECTORS; s++) hdr_q[s] <= '0;
    end else if (wr_en) begin
      hdr_q[wr_idx] <= hdr_new;
    end
  end

  // data array: no reset, guarded by the valid bits
  always_ff @(posedge clk) begin
    if (wr_en && wr_cacheable) data_q[wr_idx][wr_line] <= wr_uop;
  end

endmodule
