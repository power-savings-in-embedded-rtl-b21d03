// mem_model -- behavioural next-level memory for testbenches.
// A request (req held high with a line address) is answered LATENCY cycles
// later by a one-cycle `valid` pulse with the whole line. The content of each
// 32-bit word is given by the function word_at, a fixed hash of its address,
// unless the testbench loads a program through the prog array.
module mem_model
  import dfc_pkg::*;
#(
  parameter int unsigned LATENCY    = 30,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned PROG_WORDS = 1024,
  parameter addr_t       PROG_BASE  = 32'h0000_1000
) (
  input  logic                    clk,
  input  logic                    req,
  input  addr_t                   addr,
  output logic                    valid,
  output logic [LINE_BYTES*8-1:0] data
);
  instr_t prog [PROG_WORDS];
  int     cnt = 0;
  int     served = 0;

  function automatic instr_t hash_word(addr_t a);
    return (a * 32'h9E37_79B9) ^ (a >> 7) ^ 32'h1357_9BDF;
  endfunction

  function automatic instr_t word_at(addr_t a);
    if (a >= PROG_BASE && a < PROG_BASE + 4 * PROG_WORDS) return prog[(a - PROG_BASE) >> 2];
    return hash_word(a);
  endfunction

  initial begin
    for (int i = 0; i < PROG_WORDS; i++) prog[i] = hash_word(PROG_BASE + 4 * i);
    valid = 1'b0;
    data  = '0;
  end

  always @(posedge clk) begin
    valid <= 1'b0;
    if (req && !valid) begin
      cnt <= cnt + 1;
      if (cnt == LATENCY - 1) begin
        cnt <= 0;
        served <= served + 1;
        valid <= 1'b1;
        for (int w = 0; w < LINE_BYTES / 4; w++) data[32*w +: 32] <= word_at(addr + 4 * w);
      end
    end
  end
endmodule
