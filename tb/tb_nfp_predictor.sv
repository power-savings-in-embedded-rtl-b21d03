// tb_nfp_predictor -- self-checking test of the next-fetch-source predictor.
// Part 1, directed: a straight run of three 16-byte lines is decoded once
// (the middle instruction of line B uncacheable); fetching the same run again
// must predict I-cache for the unknown first line, DFC / I-cache per valid bit
// afterwards, and the line buffer after a table miss. A taken branch at the
// end of a line uses the table; one in mid-line falls back to the I-cache.
// Part 2, random: decode updates, fetches and redirects are compared every
// cycle with a reference model of the prediction rules.
module tb_nfp_predictor;
  import dfc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic upd_en, cacheable, pred_en, redir_en;
  addr_t decode_addr, fetch_addr, branch_addr;
  fetch_src_e pred_src, redir_src;
  logic pred_table_hit, redir_table_hit;
  int checks = 0, failures = 0;

  nfp_predictor dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [3:0] m_ptag [16];
  logic [3:0] m_sv   [16];
  logic [3:0] m_lte;
  addr_t      m_lda;
  logic       m_nfs_dfc;
  logic [3:0] m_csv;

  task automatic model_reset();
    for (int e = 0; e < 16; e++) begin m_ptag[e] = 0; m_sv[e] = 0; end
    m_lte = 0; m_lda = 0; m_nfs_dfc = 0; m_csv = 0;
  endtask

  function automatic fetch_src_e model_pred(addr_t fa);
    int e = int'(fa[7:4]);
    if (fa[3:2] != 2'd3) begin
      if (!m_nfs_dfc) return SRC_LB;
      return m_csv[fa[3:2] + 2'd1] ? SRC_DFC : SRC_IC;
    end
    if (m_ptag[e] == fa[11:8]) return m_sv[e][0] ? SRC_DFC : SRC_IC;
    return SRC_IC;
  endfunction

  function automatic fetch_src_e model_redir(addr_t ba);
    int e = int'(ba[7:4]);
    if (ba[3:2] == 2'd3 && m_ptag[e] == ba[11:8] && m_sv[e][0]) return SRC_DFC;
    return SRC_IC;
  endfunction

  // state update at a clock edge
  task automatic model_step(logic u, addr_t da, logic c, logic p, addr_t fa, logic r, addr_t ba);
    logic [3:0] n_ptag [16];
    logic [3:0] n_sv   [16];
    n_ptag = m_ptag; n_sv = m_sv;
    if (r) begin
      int e = int'(ba[7:4]);
      if (ba[3:2] == 2'd3 && m_ptag[e] == ba[11:8]) begin m_csv = m_sv[e]; m_nfs_dfc = 1; end
      else m_nfs_dfc = 0;
    end else if (p && fa[3:2] == 2'd3) begin
      int e = int'(fa[7:4]);
      if (m_ptag[e] == fa[11:8]) begin m_csv = m_sv[e]; m_nfs_dfc = 1; end
      else m_nfs_dfc = 0;
    end
    if (u) begin
      int e;
      e = (m_lda[31:4] != da[31:4]) ? int'(m_lda[7:4]) : int'(m_lte);
      if (n_ptag[e] != da[11:8]) n_sv[e] = 0;
      n_ptag[e] = da[11:8];
      n_sv[e][da[3:2]] = c;
      m_lte = 4'(e);
      m_lda = da;
    end
    m_ptag = n_ptag; m_sv = n_sv;
  endtask

  task automatic drive(logic u, addr_t da, logic c, logic p, addr_t fa, logic r, addr_t ba);
    @(negedge clk);
    upd_en = u; decode_addr = da; cacheable = c;
    pred_en = p; fetch_addr = fa; redir_en = r; branch_addr = ba;
    #1;
    checks++;
    if (pred_src !== model_pred(fa)) begin
      failures++; $display("pred mismatch fa=%h got=%s exp=%s", fa, pred_src.name(), model_pred(fa).name());
    end
    checks++;
    if (redir_src !== model_redir(ba)) begin
      failures++; $display("redir mismatch ba=%h got=%s", ba, redir_src.name());
    end
    @(posedge clk);
    model_step(u, da, c, p, fa, r, ba);
  endtask

  task automatic expect_src(string what, fetch_src_e got, fetch_src_e exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %s expected %s", what, got.name(), exp.name()); end
  endtask

  localparam addr_t A = 32'h0000_1340;   // lines A, B, C at 0x1340, 0x1350, 0x1360

  initial begin
    upd_en = 0; cacheable = 0; pred_en = 0; redir_en = 0;
    decode_addr = '0; fetch_addr = '0; branch_addr = '0;
    model_reset();
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- directed: decode A, B, C once (B+8 uncacheable) ----
    for (int i = 0; i < 12; i++) begin
      addr_t a;
      a = A + 32'(4 * i);
      drive(1, a, !(a == A + 32'h18), 0, '0, 0, '0);
    end
    // fetch A again: leaving the line before A (0x103c) has no table entry
    @(negedge clk); pred_en = 0; upd_en = 0; fetch_addr = A - 4; #1;
    expect_src("entry into A", pred_src, SRC_IC);
    // end of line A: entry of A describes B, all but B+8 valid
    drive(0, '0, 0, 1, A - 4, 0, '0);            // table miss -> line buffer mode
    @(negedge clk); fetch_addr = A; #1;
    expect_src("inside A after table miss", pred_src, SRC_LB);
    @(negedge clk); fetch_addr = A + 12; #1;
    expect_src("A end -> B first", pred_src, SRC_DFC);
    drive(0, '0, 0, 1, A + 12, 0, '0);
    @(negedge clk); fetch_addr = A + 16; #1;
    expect_src("B+4", pred_src, SRC_DFC);
    @(negedge clk); fetch_addr = A + 20; #1;
    expect_src("B+8 uncacheable", pred_src, SRC_IC);
    @(negedge clk); fetch_addr = A + 24; #1;
    expect_src("B+12", pred_src, SRC_DFC);
    // taken branch at the end of line A: uses entry of A
    @(negedge clk); branch_addr = A + 12; #1;
    expect_src("branch at line end", redir_src, SRC_DFC);
    @(negedge clk); branch_addr = A + 4; #1;
    expect_src("branch mid-line", redir_src, SRC_IC);

    // ---- random against the model ----
    for (int i = 0; i < 20000; i++) begin
      addr_t da, fa, ba;
      da = 32'h1000 + (32'($urandom_range(0, 1023)) << 2);
      fa = 32'h1000 + (32'($urandom_range(0, 1023)) << 2);
      ba = 32'h1000 + (32'($urandom_range(0, 1023)) << 2);
      if (i % 4 != 0) da = m_lda + 4;    // mostly sequential decode
      if (i % 5 == 0) fa[3:2] = 2'd3;
      if (i % 7 == 0) ba[3:2] = 2'd3;
      drive($urandom_range(0, 3) != 0, da, $urandom_range(0, 9) != 0,
            $urandom_range(0, 1), fa, $urandom_range(0, 15) == 0, ba);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
