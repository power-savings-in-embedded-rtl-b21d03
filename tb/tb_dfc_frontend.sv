// tb_dfc_frontend -- end-to-end test of the decode-filter-cache front end at
// its default sizes (16 KB I-cache, 16-sector DFC, 16-byte line buffer,
// 30-cycle memory).
//
// The testbench supplies what surrounds the front end: a 30-cycle memory
// holding a generated program, a decoder for a small test instruction set and
// an execute stage. Test instructions: top nibble 0xB is a branch, bits
// [27:16] a trip count and [15:0] a signed word offset; it is taken trip-count
// times in a row, then falls through once. Other words are plain operations;
// low nibble 0xF gives a 96-bit decoded form (uncacheable), otherwise 48 or
// 64 bits. The program runs three passes over: a 16-instruction loop whose
// branch ends a 16-byte line, a loop that starts and ends mid-line, and a
// 768-byte loop that is larger than the DFC and so conflicts with itself.
//
// Checked: every instruction reaching execute has the expected address (so no
// wrong-path instruction slips through) and the expected decoded form,
// whether it came from the decoder or from the DFC; the target of a taken
// branch never reaches execute earlier than three cycles after the redirect
// (two bubbles) and reaches it exactly then when its fetch hits; every
// mechanism (DFC hit, line-buffer hit, I-cache miss, mispredicted DFC
// fetch, table-based prediction, predicted branch target,
// decode gating, uncacheable instruction, back-end stall) occurs; and fewer
// than 10 % of fetches go to a wrongly predicted source.
// Prints fetch, decode and prediction statistics at the end.
module tb_dfc_frontend;
  import dfc_pkg::*;

  localparam addr_t BASE   = 32'h0000_1000;
  localparam addr_t END_PC = 32'h0000_1600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [WIDTH_W-1:0] max_cacheable_width;
  logic dec_valid; addr_t dec_pc; instr_t dec_instr;
  dec_t dec_uop; logic [WIDTH_W-1:0] dec_width;
  logic ex_valid; addr_t ex_pc; dec_t ex_uop; logic ex_from_dfc;
  logic be_stall, ex_redirect; addr_t ex_target;
  logic mem_req, mem_valid; addr_t mem_addr; logic [255:0] mem_data;
  fe_events_t fe_events;

  dfc_frontend dut (.*);
  mem_model #(.LATENCY(30), .PROG_WORDS(1024), .PROG_BASE(BASE)) u_mem (
    .clk, .req(mem_req), .addr(mem_addr), .valid(mem_valid), .data(mem_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired at pc %h", ex_pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- decoder of the test instruction set ----------------
  function automatic logic [WIDTH_W-1:0] width_of(instr_t i);
    if (i[31:28] == 4'hB) return 8'd48;
    if (i[3:0] == 4'hF)   return 8'd96;
    return i[4] ? 8'd64 : 8'd48;
  endfunction
  function automatic dec_t decode_ref(instr_t i);
    dec_t u;
    u = '0;
    u[63:0] = {i, i ^ 32'hA5A5_A5A5};
    if (width_of(i) > 64) u[127:64] = {~i, i};
    return u;
  endfunction
  always_comb begin
    dec_uop   = decode_ref(dec_instr);
    dec_width = width_of(dec_instr);
  end

  // ---------------- program ----------------
  function automatic instr_t op_word(int k);
    instr_t w;
    w = $urandom;
    if (w[31:28] == 4'hB) w[31:28] = 4'hA;
    if ($urandom_range(0, 9) == 0) w[3:0] = 4'hF;
    else if (w[3:0] == 4'hF) w[3:0] = 4'hE;
    return w ^ instr_t'(k & 0);
  endfunction
  function automatic instr_t br_word(addr_t pc, addr_t target, int trips);
    int off;
    off = (int'(target) - int'(pc)) / 4;
    return {4'hB, 12'(trips), 16'(off)};
  endfunction
  task automatic put(addr_t a, instr_t w);
    u_mem.prog[(a - BASE) >> 2] = w;
  endtask

  // ---------------- execute stage model ----------------
  int     trips_done [addr_t];
  addr_t  exp_pc;
  longint redirect_cycle;
  logic   wait_target;
  int     retired = 0, from_dfc = 0, uncacheable = 0, stalls = 0, taken = 0;
  int     min_gap = 1000, gap3 = 0;
  int     n_dfc_hit = 0, n_lb_hit = 0, n_ic_access = 0, n_ic_miss = 0;
  int     n_dfc_miss = 0, n_lb_miss = 0, n_nfpt_hit = 0, n_redir_pred = 0, n_decode = 0;
  int     n_fetch = 0;

  initial begin
    max_cacheable_width = 8'd64;
    be_stall = 0; ex_redirect = 0; ex_target = '0;
    #1;
    // program image
    for (int k = 0; k < 1024; k++) put(BASE + 32'(4 * k), op_word(k));
    put(32'h103C, br_word(32'h103C, 32'h1000, 30));   // loop 1: branch ends a line
    put(32'h1074, br_word(32'h1074, 32'h1048, 30));   // loop 2: starts and ends mid-line
    put(32'h13FC, br_word(32'h13FC, 32'h1100, 5));    // loop 3: 768 bytes
    put(32'h1400, br_word(32'h1400, 32'h1000, 2));    // three passes
    exp_pc = BASE;
    wait_target = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    while (exp_pc != END_PC) begin
      @(negedge clk);
      be_stall    = ($urandom_range(0, 19) == 0);
      ex_redirect = 0;
      if (ex_valid && !be_stall) begin
        instr_t w;
        w = u_mem.word_at(exp_pc);
        checks++;
        if (ex_pc !== exp_pc) begin
          failures++;
          $display("cycle %0d: execute got pc %h, expected %h", cycle, ex_pc, exp_pc);
          exp_pc = ex_pc;   // resynchronise to limit the noise
        end else begin
          checks++;
          if (ex_uop !== decode_ref(w)) begin
            failures++; $display("pc %h: decoded form %h expected %h", ex_pc, ex_uop, decode_ref(w));
          end
        end
        if (wait_target) begin
          int gap;
          gap = int'(cycle - redirect_cycle);
          if (gap < min_gap) min_gap = gap;
          if (gap == 3) gap3++;
          wait_target = 0;
        end
        retired++;
        if (ex_from_dfc) from_dfc++;
        if (w[31:28] != 4'hB && w[3:0] == 4'hF) uncacheable++;
        if (w[31:28] == 4'hB) begin
          if (!trips_done.exists(exp_pc)) trips_done[exp_pc] = 0;
          if (trips_done[exp_pc] < int'(w[27:16])) begin
            trips_done[exp_pc]++;
            ex_redirect = 1;
            ex_target   = exp_pc + {{14{w[15]}}, w[15:0], 2'b00};
            exp_pc      = ex_target;
            redirect_cycle = cycle;
            wait_target = 1;
            taken++;
          end else begin
            trips_done[exp_pc] = 0;
            exp_pc = exp_pc + 4;
          end
        end else begin
          exp_pc = exp_pc + 4;
        end
      end
      #1;
      if (be_stall) stalls++;
      if (fe_events.dfc_hit)  n_dfc_hit++;
      if (fe_events.lb_hit)   n_lb_hit++;
      if (fe_events.ic_access) n_ic_access++;
      if (fe_events.ic_miss)  n_ic_miss++;
      if (fe_events.dfc_access && !fe_events.dfc_hit) n_dfc_miss++;
      if (fe_events.lb_access && !fe_events.lb_hit)   n_lb_miss++;
      if (fe_events.nfpt_hit) n_nfpt_hit++;
      if (fe_events.redir_pred) n_redir_pred++;
      if (fe_events.decode) n_decode++;
      if (fe_events.dfc_hit || fe_events.lb_hit || (fe_events.ic_access && dut.ic_hit)) n_fetch++;
    end

    // branch penalty
    checks++;
    if (min_gap < 3) begin failures++; $display("taken-branch target reached execute after %0d cycles", min_gap); end
    checks++;
    if (gap3 == 0) begin failures++; $display("no taken branch completed in two bubbles"); end
    // prediction accuracy: wrong-source fetches stay rare
    checks++;
    if (10 * (n_dfc_miss + n_lb_miss) > n_fetch) begin failures++; $display("more than 10%% of fetches mispredicted"); end
    // every instruction came through exactly one path
    checks++;
    if (n_decode + from_dfc < retired) begin failures++; $display("decode count %0d + dfc %0d < retired %0d", n_decode, from_dfc, retired); end

    // mechanisms
    begin
      string names [10] = '{"dfc hit", "line-buffer hit", "i-cache miss", "dfc mispredict",
                            "table prediction", "predicted branch target",
                            "gated decode", "uncacheable instruction", "back-end stall", "taken branch"};
      int counts [10];
      counts = '{n_dfc_hit, n_lb_hit, n_ic_miss, n_dfc_miss, n_nfpt_hit, n_redir_pred,
                 from_dfc, uncacheable, stalls, taken};
      // The line buffer always holds the line of the I-cache fetch that set
      // it up, so a line-buffer misprediction is reported but not required.
      $display("  %-24s %0d", "line-buffer mispredict", n_lb_miss);
      foreach (counts[i]) begin
        checks++;
        $display("  %-24s %0d", names[i], counts[i]);
        if (counts[i] == 0) begin failures++; $display("mechanism never happened: %s", names[i]); end
      end
    end
    $display("retired %0d instructions in %0d cycles", retired, cycle);
    $display("fetches %0d: i-cache reads %0d (%0.1f%% of fetches avoided), decodes avoided %0.1f%%, mispredicted fetches %0.2f%%",
             n_fetch, n_ic_access, 100.0 * (1.0 - real'(n_ic_access) / real'(n_fetch)),
             100.0 * real'(from_dfc) / real'(retired), 100.0 * real'(n_dfc_miss + n_lb_miss) / real'(n_fetch));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
