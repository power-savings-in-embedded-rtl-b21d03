// tb_cacheable_ratio_sweep -- runs one program through the full-size front
// end four times, with the cacheable threshold set so that about 90, 80, 70
// and 60 % of the executed instructions are cacheable.
//
// Test instruction set as in tb_dfc_frontend, but every operation has a
// width class c = bits [3:0] in 0..9, set to its word index modulo 10, and a
// decode width of 24 + 4c bits; branches are class 0. Loop bodies are
// multiples of 10 instructions, so each class is executed about equally often. A threshold of 24 + 4k bits therefore
// makes classes 0..k cacheable, (k+1)/10 of the instructions. Between runs
// the front end is reset. Each run checks the address and decoded form of
// every instruction reaching execute; across the runs the measured cacheable
// share must be within 5 points of the target, and the share of
// instructions that skip decode (served from the DFC) must not grow as the
// ratio falls and must be clearly lower at 60 % than at 90 %.
module tb_cacheable_ratio_sweep;
  import dfc_pkg::*;

  localparam addr_t BASE   = 32'h0000_1000;
  localparam addr_t END_PC = 32'h0000_1500;

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int class_of(instr_t i);
    if (i[31:28] == 4'hB) return 0;
    return int'(i[3:0]);
  endfunction
  function automatic dec_t decode_ref(instr_t i);
    dec_t u;
    u = '0;
    u[63:0] = {i, ~i};
    return u;
  endfunction
  always_comb begin
    dec_uop   = decode_ref(dec_instr);
    dec_width = WIDTH_W'(24 + 4 * class_of(dec_instr));
  end

  // width class = word index modulo 10, so every loop body whose length is
  // a multiple of 10 instructions holds each class equally often
  function automatic instr_t op_word(int idx);
    instr_t w;
    w = $urandom;
    if (w[31:28] == 4'hB) w[31:28] = 4'hA;
    w[3:0] = 4'(idx % 10);
    return w;
  endfunction
  function automatic instr_t br_word(addr_t pc, addr_t target, int trips);
    int off;
    off = (int'(target) - int'(pc)) / 4;
    return {4'hB, 12'(trips), 16'(off)};
  endfunction
  task automatic put(addr_t a, instr_t w);
    u_mem.prog[(a - BASE) >> 2] = w;
  endtask

  // One complete run of the program; returns counts.
  task automatic run_program(input int k, output int retired, output int cacheable_n,
                             output int from_dfc);
    int    trips_done [addr_t];
    addr_t exp_pc;
    retired = 0; cacheable_n = 0; from_dfc = 0;
    max_cacheable_width = WIDTH_W'(24 + 4 * k);
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    exp_pc = BASE;
    while (exp_pc != END_PC) begin
      @(negedge clk);
      be_stall    = 0;
      ex_redirect = 0;
      if (ex_valid) begin
        instr_t w;
        w = u_mem.word_at(exp_pc);
        checks++;
        if (ex_pc !== exp_pc || ex_uop !== decode_ref(w)) begin
          failures++;
          $display("k=%0d: execute got %h/%h, expected %h/%h", k, ex_pc, ex_uop, exp_pc, decode_ref(w));
          exp_pc = ex_pc;
          w = u_mem.word_at(exp_pc);
        end
        retired++;
        if (class_of(w) <= k) cacheable_n++;
        if (ex_from_dfc) from_dfc++;
        if (w[31:28] == 4'hB) begin
          if (!trips_done.exists(exp_pc)) trips_done[exp_pc] = 0;
          if (trips_done[exp_pc] < int'(w[27:16])) begin
            trips_done[exp_pc]++;
            ex_redirect = 1;
            ex_target   = exp_pc + {{14{w[15]}}, w[15:0], 2'b00};
            exp_pc      = ex_target;
          end else begin
            trips_done[exp_pc] = 0;
            exp_pc = exp_pc + 4;
          end
        end else begin
          exp_pc = exp_pc + 4;
        end
      end
    end
  endtask

  initial begin
    int ks [4] = '{8, 7, 6, 5};          // 90, 80, 70, 60 % cacheable
    real share [4];
    be_stall = 0; ex_redirect = 0; ex_target = '0; max_cacheable_width = '0;
    #1;
    for (int i = 0; i < 1024; i++) put(BASE + 32'(4 * i), op_word(i));
    put(32'h104C, br_word(32'h104C, 32'h1000, 40));   // 20 instructions, ends a line
    put(32'h1078, br_word(32'h1078, 32'h1054, 40));   // 10, mid-line to mid-line
    put(32'h1124, br_word(32'h1124, 32'h1080, 20));   // 40, fits the DFC
    put(32'h14F4, br_word(32'h14F4, 32'h1200, 2));    // 190, larger than the DFC
    foreach (ks[r]) begin
      int ret, cach, dfc;
      real ratio;
      run_program(ks[r], ret, cach, dfc);
      ratio    = real'(cach) / real'(ret);
      share[r] = real'(dfc) / real'(ret);
      $display("threshold %0d bits: %0d instructions, %0.1f%% cacheable, %0.1f%% served decoded from the DFC",
               24 + 4 * ks[r], ret, 100.0 * ratio, 100.0 * share[r]);
      checks++;
      if (ratio < real'(ks[r] + 1) / 10.0 - 0.05 || ratio > real'(ks[r] + 1) / 10.0 + 0.05) begin
        failures++; $display("cacheable share off target");
      end
      if (r > 0) begin
        checks++;
        if (share[r] > share[r-1] + 0.005) begin failures++; $display("DFC share grew as the ratio fell"); end
      end
    end
    checks++;
    if (share[3] > share[0] - 0.05) begin failures++; $display("DFC share not lower at 60%%"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
