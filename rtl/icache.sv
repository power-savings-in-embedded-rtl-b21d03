// icache -- L1 instruction cache: set associative, line refill from memory.
//
// Geometry by parameters: SIZE_BYTES total, WAYS ways, LINE_BYTES per line
// (defaults 16 KB, 4-way, 32 B: 128 sets). A lookup is combinational on
// req_addr, so with the address presented for the whole fetch-stage cycle the
// word is ready by its end: a 1-cycle access. On a hit (req && hit) the
// addressed word is returned on rd_instr, and the aligned 16-byte half-line
// that contains it on rd_block, for the line buffer; the way is marked most
// recently used. On a miss the cache starts a refill: it raises mem_req with
// the line address and holds it until mem_valid returns the whole line on
// mem_data; the line is written into the least recently used way and the
// cache becomes idle again, so the repeated lookup then hits. While a refill
// is in progress `busy` is high and no lookup hits. A refill that was started
// always completes, even if the requester has moved on.
//
// Sizes and the 1-cycle latency follow the evaluated configuration.
// Replacement (true LRU with per-set age counters), the refill handshake,
// handing the 16-byte half-line to a 16-byte line buffer, and read-only
// operation (no coherence or invalidation besides reset) are this design's
// choices.
module icache
  import dfc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned BLK_BYTES  = 16      // block handed to the line buffer
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // lookup
  input  logic                      req,
  input  addr_t                     req_addr,
  output logic                      hit,
  output logic                      busy,
  output logic                      miss_start,   // pulse: refill started this cycle
  output instr_t                    rd_instr,
  output logic [BLK_BYTES*8-1:0]    rd_block,
  // memory side
  output logic                      mem_req,
  output addr_t                     mem_addr,
  input  logic                      mem_valid,
  input  logic [LINE_BYTES*8-1:0]   mem_data
);
  localparam int unsigned SETS   = SIZE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES);
  localparam int unsigned IDX_W  = $clog2(SETS);
  localparam int unsigned TAG_W  = ADDR_W - OFF_W - IDX_W;
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned BLKS   = LINE_BYTES / BLK_BYTES;
  localparam int unsigned BOFF_W = $clog2(BLK_BYTES);

  logic [TAG_W-1:0]          tag_q   [SETS][WAYS];
  logic [WAYS-1:0]           valid_q [SETS];
  logic [WAY_W-1:0]          age_q   [SETS][WAYS];   // 0 = most recently used
  logic [LINE_BYTES*8-1:0]   data_q  [SETS][WAYS];

  logic                      refill_q;
  addr_t                     refill_addr_q;

  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] tag;
  assign idx = req_addr[OFF_W +: IDX_W];
  assign tag = req_addr[OFF_W+IDX_W +: TAG_W];

  logic             way_hit;
  logic [WAY_W-1:0] hit_way;
  always_comb begin
    way_hit = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[idx][w] && tag_q[idx][w] == tag) begin
        way_hit = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
  end

  assign busy       = refill_q;
  assign hit        = way_hit && !refill_q;
  assign miss_start = req && !way_hit && !refill_q;
  assign mem_req    = refill_q;
  assign mem_addr   = refill_addr_q;

  logic [LINE_BYTES*8-1:0] line;
  assign line     = data_q[idx][hit_way];
  assign rd_instr = line[32*req_addr[OFF_W-1:2] +: 32];
  if (BLKS > 1) begin : g_blk
    assign rd_block = line[BLK_BYTES*8*req_addr[OFF_W-1:BOFF_W] +: BLK_BYTES*8];
  end else begin : g_line
    assign rd_block = line[BLK_BYTES*8-1:0];
  end

  // refill target: least recently used way of the refill set
  logic [IDX_W-1:0] r_idx;
  logic [TAG_W-1:0] r_tag;
  logic [WAY_W-1:0] victim;
  assign r_idx = refill_addr_q[OFF_W +: IDX_W];
  assign r_tag = refill_addr_q[OFF_W+IDX_W +: TAG_W];
  always_comb begin
    victim = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!valid_q[r_idx][w]) begin
        victim = WAY_W'(w);
        break;
      end
      if (age_q[r_idx][w] == WAY_W'(WAYS-1)) victim = WAY_W'(w);
    end
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      refill_q      <= 1'b0;
      refill_addr_q <= '0;
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) age_q[s][w] <= WAY_W'(w);
      end
    end else begin
      if (refill_q) begin
        if (mem_valid) begin
          refill_q <= 1'b0;
          valid_q[r_idx][victim] <= 1'b1;
          tag_q[r_idx][victim]   <= r_tag;
          for (int w = 0; w < WAYS; w++)
            if (age_q[r_idx][w] < age_q[r_idx][victim]) age_q[r_idx][w] <= age_q[r_idx][w] + 1'b1;
          age_q[r_idx][victim] <= '0;
        end
      end else if (req) begin
        if (way_hit) begin
          for (int w = 0; w < WAYS; w++)
            if (age_q[idx][w] < age_q[idx][hit_way]) age_q[idx][w] <= age_q[idx][w] + 1'b1;
          age_q[idx][hit_way] <= '0;
        end else begin
          refill_q      <= 1'b1;
          refill_addr_q <= {req_addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (refill_q && mem_valid) data_q[r_idx][victim] <= mem_data;
  end

endmodule
