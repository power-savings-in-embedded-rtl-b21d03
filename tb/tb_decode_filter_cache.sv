// tb_decode_filter_cache -- self-checking test of the sectored DFC.
// A reference model keeps, per sector, the tag, the line valid bits and the
// stored decoded instructions, with the same reallocation rule. Random
// writes (cacheable or not) and reads over a code region four times the
// cache size exercise hits, partly valid sectors and conflict replacement.
module tb_decode_filter_cache;
  import dfc_pkg::*;
  localparam int S = 16, L = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  addr_t rd_addr, wr_addr;
  logic rd_en, rd_hit, wr_en, wr_cacheable;
  logic [63:0] rd_uop, wr_uop;
  int checks = 0, failures = 0;
  int hits = 0, partial = 0, realloc = 0;

  decode_filter_cache dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] m_tag [S];
  logic [L-1:0] m_val [S];
  logic [63:0] m_dat [S][L];

  function automatic addr_t rand_addr();
    return 32'h0000_1000 + (32'($urandom_range(0, 255)) << 2);  // 1 KB region
  endfunction

  initial begin
    for (int s = 0; s < S; s++) begin m_tag[s] = '0; m_val[s] = '0; end
    wr_en = 0; wr_addr = '0; wr_cacheable = 0; wr_uop = '0; rd_addr = '0; rd_en = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 10000; i++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1);
      wr_addr = rand_addr();
      wr_cacheable = ($urandom_range(0, 9) != 0);
      wr_uop = {$urandom, $urandom};
      rd_addr = (i % 3 == 0) ? wr_addr : rand_addr();
      rd_en = ($urandom_range(0, 7) != 0);
      #1;
      begin
        int s, l; logic exp_hit;
        s = int'(rd_addr[7:4]); l = int'(rd_addr[3:2]);
        exp_hit = rd_en && (m_tag[s] == rd_addr[31:8]) && m_val[s][l];
        checks++;
        if (rd_hit !== exp_hit) begin failures++; $display("hit mismatch %h exp %0b", rd_addr, exp_hit); end
        else if (exp_hit) begin
          hits++;
          checks++;
          if (rd_uop !== m_dat[s][l]) begin failures++; $display("data mismatch %h", rd_addr); end
          if (m_val[s] != '1) partial++;
        end
      end
      @(posedge clk);
      if (wr_en) begin
        int s, l;
        s = int'(wr_addr[7:4]); l = int'(wr_addr[3:2]);
        if (m_tag[s] != wr_addr[31:8]) begin m_tag[s] = wr_addr[31:8]; m_val[s] = '0; realloc++; end
        m_val[s][l] = wr_cacheable;
        if (wr_cacheable) m_dat[s][l] = wr_uop;
      end
    end
    if (hits == 0 || partial == 0 || realloc == 0) begin
      failures++; $display("coverage: hits=%0d partial=%0d realloc=%0d", hits, partial, realloc);
    end
    $display("hits=%0d partial-sector hits=%0d reallocations=%0d", hits, partial, realloc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
