// line_buffer -- holds the 16-byte block of code most recently read from the
// I-cache and serves later fetches that fall in the same block.
//
// A fill (fill_en) stores the aligned 16-byte block that contains fill_addr
// and marks the buffer valid; the block comes with the I-cache hit that
// serviced a fetch. A read (rd_en, raised only when the predictor picked the
// line buffer) is combinational: rd_hit is high when the buffer is valid and
// rd_addr lies in the stored block, and rd_instr is the addressed
// 4-byte word. Data is ready in the same cycle as the fetch address, so a
// line-buffer fetch takes the one fetch-stage cycle. The 16-byte size
// follows the evaluated configuration; the reset to empty is this design's
// choice.
module line_buffer
  import dfc_pkg::*;
#(
  parameter int unsigned BYTES = 16            // block size in bytes
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 fill_en,
  input  addr_t                fill_addr,
  input  logic [BYTES*8-1:0]   fill_data,      // word i at bits [32*i +: 32]
  input  logic                 rd_en,          // line buffer chosen for this fetch
  input  addr_t                rd_addr,
  output logic                 rd_hit,
  output instr_t               rd_instr
);
  localparam int unsigned OFF_W = $clog2(BYTES);
  localparam int unsigned WORDS = BYTES / 4;

  logic                    valid_q;
  logic [ADDR_W-1:OFF_W]   tag_q;
  logic [BYTES*8-1:0]      data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      tag_q   <= '0;
      data_q  <= '0;
    end else if (fill_en) begin
      valid_q <= 1'b1;
      tag_q   <= fill_addr[ADDR_W-1:OFF_W];
      data_q  <= fill_data;
    end
  end

  logic [$clog2(WORDS)-1:0] word;
  assign word     = rd_addr[OFF_W-1:2];
  assign rd_hit   = rd_en && valid_q && (tag_q == rd_addr[ADDR_W-1:OFF_W]);
  assign rd_instr = data_q[32*word +: 32];

endmodule
