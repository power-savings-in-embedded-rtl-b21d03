// tb_icache -- self-checking test of the 16 KB 4-way I-cache with a
// 30-cycle memory model. Checks: a cold access misses and is answered after
// the memory latency (miss lookup, 30 cycles of memory, line write,
// repeated lookup: 33 cycles); a hit
// returns the word and its 16-byte half-line in the access cycle; five lines
// mapping to one set evict the least recently used one; and random fetches
// over 40 KB always return the memory's word.
module tb_icache;
  import dfc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req, hit, busy, miss_start, mem_req, mem_valid;
  addr_t req_addr, mem_addr;
  instr_t rd_instr;
  logic [127:0] rd_block;
  logic [255:0] mem_data;
  int checks = 0, failures = 0;
  int misses = 0, hits = 0;

  icache dut (.*);
  mem_model #(.LATENCY(30)) u_mem (.clk, .req(mem_req), .addr(mem_addr), .valid(mem_valid), .data(mem_data));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fetch one word, waiting through a refill; returns cycles until the hit.
  task automatic fetch(addr_t a, output int cycles);
    cycles = 0;
    forever begin
      @(negedge clk);
      req = 1; req_addr = a;
      #1;
      cycles++;
      if (hit) break;
      @(posedge clk);
    end
    checks++;
    if (rd_instr !== u_mem.word_at(a)) begin failures++; $display("word mismatch %h", a); end
    checks++;
    for (int w = 0; w < 4; w++)
      if (rd_block[32*w +: 32] !== u_mem.word_at({a[31:4], 4'h0} + 4 * w)) begin
        failures++; $display("block mismatch %h", a); break;
      end
    if (cycles > 1) misses++; else hits++;
    @(posedge clk);
  endtask

  initial begin
    int c;
    req = 0; req_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // cold miss: lookup, request, 30 cycles of memory, line write, lookup again
    fetch(32'h0000_2004, c);
    checks++;
    if (c != 33) begin failures++; $display("miss latency %0d cycles, expected 33", c); end
    fetch(32'h0000_2010, c);
    checks++;
    if (c != 1) begin failures++; $display("hit took %0d cycles", c); end
    // same set (set stride 4 KB): fill ways with 0x2000, 0x3000, 0x4000, 0x5000
    fetch(32'h0000_3000, c); fetch(32'h0000_4000, c); fetch(32'h0000_5000, c);
    fetch(32'h0000_2000, c);               // 0x2000 now most recent; LRU is 0x3000
    fetch(32'h0000_6000, c);               // evicts 0x3000
    fetch(32'h0000_2000, c); checks++; if (c != 1) begin failures++; $display("MRU line evicted"); end
    fetch(32'h0000_4000, c); checks++; if (c != 1) begin failures++; $display("0x4000 evicted"); end
    fetch(32'h0000_3000, c); checks++; if (c == 1) begin failures++; $display("LRU line not evicted"); end
    // random
    for (int i = 0; i < 3000; i++) begin
      addr_t a;
      a = 32'h0001_0000 + (32'($urandom_range(0, 10239)) << 2);
      fetch(a, c);
    end
    checks++;
    if (misses == 0 || hits == 0) failures++;
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
