// dfc_frontend -- instruction fetch and decode front end with a decode filter
// cache, for a five-stage in-order embedded pipeline (fetch, decode, execute,
// mem, writeback).
//
// Three sources can deliver the instruction at the fetch address pc: the
// 16-byte line buffer, the decode filter cache (DFC) holding already decoded
// instructions, and the L1 I-cache. The predictor names one source per fetch,
// so normally only that one is read:
//   * Line buffer or I-cache: the raw instruction goes into latch 1; in the
//     next cycle the decode stage (the external decoder, ports dec_*) decodes
//     it into latch 2. An I-cache hit also copies the 16-byte block into the
//     line buffer.
//   * DFC: the fetch stage is gated off and the decoded instruction goes from
//     the DFC into latch 5; in the next cycle the decode stage is gated off and
//     latch 5 moves into latch 2. Either way an instruction fetched in cycle
//     N+1 reaches latch 2 at the end of cycle N+2.
// A miss in a predicted line buffer or DFC costs one bubble: the same address
// is fetched from the I-cache in the next cycle. An I-cache miss stalls the
// fetch until the refill from memory (mem_*) is done. Each completed fetch
// asks the predictor for the source of pc + 4.
//
// Every instruction that moves into latch 2 updates the predictor table with
// its address and cacheable flag; if it came through the decoder it is also
// written into the DFC (stored only when the classifier marks it cacheable).
// Instructions that come from latch 5 count as cacheable and are not
// rewritten.
//
// Back-end interface: latch 2 is presented on ex_* to the execute stage.
// ex_redirect, with ex_target, reports that the instruction now in execute
// (the one on ex_*) is a taken branch; branches are predicted not taken, so
// the two younger instructions in latches 1/5 and the fetch stage are squashed
// and fetching restarts at ex_target: a taken branch costs two cycles. The
// predictor supplies the source of the target fetch. be_stall freezes the
// whole front end for a cycle (ex_redirect is ignored while it is high).
// fe_events reports per cycle which arrays were read, for power accounting.
//
// Follows the described pipeline: the predictor, pipeline gating via latch 5,
// line-buffer fill from I-cache hits, DFC fill from the decode stage and the
// not-taken static branch policy with a two-cycle taken-branch penalty. This
// design's choices: retrying a mispredicted fetch from the I-cache, the
// back-end stall input, the reset address and the decoder handshake.
module dfc_frontend
  import dfc_pkg::*;
#(
  parameter addr_t       RESET_PC    = 32'h0000_1000,
  parameter int unsigned DFC_SECTORS = 16,
  parameter int unsigned DFC_LINES   = 4,
  parameter int unsigned IC_BYTES    = 16384,
  parameter int unsigned IC_WAYS     = 4,
  parameter int unsigned IC_LINE     = 32,
  parameter int unsigned LB_BYTES    = 16,
  parameter int unsigned PTAG_W      = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [WIDTH_W-1:0]     max_cacheable_width,  // profiled threshold, bits
  // decode stage (external decoder, combinational)
  output logic                   dec_valid,
  output addr_t                  dec_pc,
  output instr_t                 dec_instr,
  input  dec_t                   dec_uop,
  input  logic [WIDTH_W-1:0]     dec_width,
  // latch 2 -> execute
  output logic                   ex_valid,
  output addr_t                  ex_pc,
  output dec_t                   ex_uop,
  output logic                   ex_from_dfc,
  input  logic                   be_stall,
  input  logic                   ex_redirect,
  input  addr_t                  ex_target,
  // memory
  output logic                   mem_req,
  output addr_t                  mem_addr,
  input  logic                   mem_valid,
  input  logic [IC_LINE*8-1:0]   mem_data,
  // activity
  output fe_events_t             fe_events
);

  // ---------------- state ----------------
  addr_t       pc_q;
  fetch_src_e  src_q;
  // latch 1: fetch -> decode
  logic        l1_valid_q;
  addr_t       l1_pc_q;
  instr_t      l1_instr_q;
  // latch 5: DFC -> latch 2
  logic        l5_valid_q;
  addr_t       l5_pc_q;
  uop_t        l5_uop_q;
  // latch 2: decode -> execute
  logic        l2_valid_q;
  addr_t       l2_pc_q;
  dec_t        l2_uop_q;
  logic        l2_from_dfc_q;

  // ---------------- sources ----------------
  logic                 ic_req, ic_hit, ic_busy, ic_miss_start;
  instr_t               ic_instr;
  logic [LB_BYTES*8-1:0] ic_block;
  logic                 lb_hit;
  instr_t               lb_instr;
  logic                 dfc_hit;
  uop_t                 dfc_uop;

  logic        run;         // front end not frozen
  logic        redirect;
  assign run      = !be_stall;
  assign redirect = run && ex_redirect;

  // read enables from the predicted source: only one array is accessed
  logic lb_rd, dfc_rd;
  assign ic_req = run && !redirect && (src_q == SRC_IC);
  assign lb_rd  = run && !redirect && (src_q == SRC_LB);
  assign dfc_rd = run && !redirect && (src_q == SRC_DFC);

  icache #(
    .SIZE_BYTES (IC_BYTES),
    .WAYS       (IC_WAYS),
    .LINE_BYTES (IC_LINE),
    .BLK_BYTES  (LB_BYTES)
  ) u_icache (
    .clk, .rst_n,
    .req        (ic_req),
    .req_addr   (pc_q),
    .hit        (ic_hit),
    .busy       (ic_busy),
    .miss_start (ic_miss_start),
    .rd_instr   (ic_instr),
    .rd_block   (ic_block),
    .mem_req, .mem_addr, .mem_valid, .mem_data
  );

  logic lb_fill;
  assign lb_fill = ic_req && ic_hit;

  line_buffer #(.BYTES(LB_BYTES)) u_lb (
    .clk, .rst_n,
    .fill_en   (lb_fill),
    .fill_addr (pc_q),
    .fill_data (ic_block),
    .rd_en     (lb_rd),
    .rd_addr   (pc_q),
    .rd_hit    (lb_hit),
    .rd_instr  (lb_instr)
  );

  // decode-side write into the DFC and the predictor
  logic  to_l2_dec, to_l2_dfc, upd_en, cacheable;
  assign to_l2_dfc = run && !redirect && l5_valid_q;
  assign to_l2_dec = run && !redirect && l1_valid_q && !l5_valid_q;
  assign upd_en    = to_l2_dfc || to_l2_dec;

  cacheable_classifier #(.LINE_W(UOP_W)) u_class (
    .decode_width (dec_width),
    .max_width    (max_cacheable_width),
    .cacheable    (cacheable)
  );

  decode_filter_cache #(
    .SECTORS  (DFC_SECTORS),
    .LINES    (DFC_LINES),
    .UOP_BITS (UOP_W)
  ) u_dfc (
    .clk, .rst_n,
    .rd_en        (dfc_rd),
    .rd_addr      (pc_q),
    .rd_hit       (dfc_hit),
    .rd_uop       (dfc_uop),
    .wr_en        (to_l2_dec),
    .wr_addr      (l1_pc_q),
    .wr_cacheable (cacheable),
    .wr_uop       (dec_uop[UOP_W-1:0])
  );

  // ---------------- fetch stage ----------------
  logic        fetch_done;    // instruction for pc delivered this cycle
  logic        retry_ic;      // predicted source missed
  logic        to_l1, to_l5;
  instr_t      f_instr;
  always_comb begin
    fetch_done = 1'b0;
    retry_ic   = 1'b0;
    to_l1      = 1'b0;
    to_l5      = 1'b0;
    f_instr    = ic_instr;
    if (run && !redirect) begin
      unique case (src_q)
        SRC_DFC: begin
          if (dfc_hit) begin fetch_done = 1'b1; to_l5 = 1'b1; end
          else retry_ic = 1'b1;
        end
        SRC_LB: begin
          f_instr = lb_instr;
          if (lb_hit) begin fetch_done = 1'b1; to_l1 = 1'b1; end
          else retry_ic = 1'b1;
        end
        default: begin
          if (ic_hit) begin fetch_done = 1'b1; to_l1 = 1'b1; end
        end
      endcase
    end
  end

  fetch_src_e pred_src, redir_src;
  logic       pred_table_hit, redir_table_hit;

  nfp_predictor #(
    .ENTRIES (DFC_SECTORS),
    .LINES   (DFC_LINES),
    .PTAG_W  (PTAG_W)
  ) u_pred (
    .clk, .rst_n,
    .upd_en          (upd_en),
    .decode_addr     (to_l2_dfc ? l5_pc_q : l1_pc_q),
    .cacheable       (to_l2_dfc ? 1'b1 : cacheable),
    .pred_en         (fetch_done),
    .fetch_addr      (pc_q),
    .pred_src        (pred_src),
    .pred_table_hit  (pred_table_hit),
    .redir_en        (redirect),
    .branch_addr     (l2_pc_q),
    .redir_src       (redir_src),
    .redir_table_hit (redir_table_hit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q          <= RESET_PC;
      src_q         <= SRC_IC;
      l1_valid_q    <= 1'b0;
      l1_pc_q       <= '0;
      l1_instr_q    <= '0;
      l5_valid_q    <= 1'b0;
      l5_pc_q       <= '0;
      l5_uop_q      <= '0;
      l2_valid_q    <= 1'b0;
      l2_pc_q       <= '0;
      l2_uop_q      <= '0;
      l2_from_dfc_q <= 1'b0;
    end else if (run) begin
      // fetch address and source
      if (redirect) begin
        pc_q  <= ex_target;
        src_q <= redir_src;
      end else if (fetch_done) begin
        pc_q  <= pc_q + 32'd4;
        src_q <= pred_src;
      end else if (retry_ic) begin
        src_q <= SRC_IC;
      end
      // latch 1 (held when gated, so the decoder input does not toggle)
      l1_valid_q <= to_l1;
      if (to_l1) begin
        l1_pc_q    <= pc_q;
        l1_instr_q <= f_instr;
      end
      // latch 5
      l5_valid_q <= to_l5;
      if (to_l5) begin
        l5_pc_q  <= pc_q;
        l5_uop_q <= dfc_uop;
      end
      // latch 2
      l2_valid_q <= upd_en;
      if (to_l2_dfc) begin
        l2_pc_q       <= l5_pc_q;
        l2_uop_q      <= DEC_W'(l5_uop_q);
        l2_from_dfc_q <= 1'b1;
      end else if (to_l2_dec) begin
        l2_pc_q       <= l1_pc_q;
        l2_uop_q      <= dec_uop;
        l2_from_dfc_q <= 1'b0;
      end
    end
  end

  // ---------------- outputs ----------------
  assign dec_valid   = l1_valid_q && !l5_valid_q;
  assign dec_pc      = l1_pc_q;
  assign dec_instr   = l1_instr_q;
  assign ex_valid    = l2_valid_q;
  assign ex_pc       = l2_pc_q;
  assign ex_uop      = l2_uop_q;
  assign ex_from_dfc = l2_from_dfc_q;

  always_comb begin
    fe_events            = '0;
    fe_events.ic_access  = ic_req && !ic_busy;
    fe_events.ic_miss    = ic_miss_start;
    fe_events.lb_access  = lb_rd;
    fe_events.lb_hit     = lb_hit;
    fe_events.dfc_access = dfc_rd;
    fe_events.dfc_hit    = dfc_hit;
    fe_events.decode     = to_l2_dec;
    fe_events.mispredict = retry_ic;
    fe_events.redirect   = redirect;
    fe_events.nfpt_hit   = fetch_done && pred_table_hit;
    fe_events.redir_pred = redirect && redir_table_hit;
  end

  // ---------------- rules ----------------
  // A fetch writes at most one of latch 1 and latch 5.
  a_one_latch: assert property (@(posedge clk) disable iff (!rst_n) !(l1_valid_q && l5_valid_q));
  // A taken branch is reported only for an instruction that is in execute.
  a_redirect_valid: assert property (@(posedge clk) disable iff (!rst_n) ex_redirect |-> ex_valid);

endmodule
