// tb_line_buffer -- self-checking test of the 16-byte line buffer.
// Random fills and reads are compared with a reference copy of the last
// filled block: an enabled read hits only inside that block and returns its
// word; a read without enable never hits.
module tb_line_buffer;
  import dfc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fill_en, rd_en;
  addr_t fill_addr, rd_addr;
  logic [127:0] fill_data;
  logic rd_hit;
  instr_t rd_instr;
  int checks = 0, failures = 0;

  line_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         ref_valid;
  logic [27:0]  ref_blk;
  logic [127:0] ref_data;

  initial begin
    fill_en = 0; fill_addr = '0; fill_data = '0; rd_addr = '0; rd_en = 1;
    ref_valid = 0; ref_blk = '0; ref_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // empty after reset
    rd_addr = 32'h0;
    #1 checks++; if (rd_hit) begin failures++; $display("hit after reset"); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      fill_en = ($urandom_range(0, 3) == 0);
      fill_addr = {20'h00001, $urandom_range(0, 255) << 4} | 32'($urandom_range(0, 15));
      fill_data = {$urandom, $urandom, $urandom, $urandom};
      rd_en = ($urandom_range(0, 7) != 0);
      // read near the current block most of the time
      if ($urandom_range(0, 1) == 0 && ref_valid) rd_addr = {ref_blk, 4'(($urandom_range(0, 3)) << 2)};
      else rd_addr = {20'h00001, 12'($urandom_range(0, 4095)) & 12'hffc};
      #1;
      checks++;
      if (rd_hit !== (rd_en && ref_valid && ref_blk == rd_addr[31:4])) begin
        failures++; $display("hit mismatch addr=%h", rd_addr);
      end else if (rd_hit && rd_instr !== ref_data[32*rd_addr[3:2] +: 32]) begin
        failures++; $display("data mismatch addr=%h got=%h", rd_addr, rd_instr);
      end
      @(posedge clk);
      if (fill_en) begin ref_valid = 1; ref_blk = fill_addr[31:4]; ref_data = fill_data; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
