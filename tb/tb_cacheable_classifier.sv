// tb_cacheable_classifier -- exhaustive check of the cacheable decision:
// cacheable exactly when the decode width is at most the profiled threshold
// and at most the 64-bit DFC line, for every width and several thresholds.
module tb_cacheable_classifier;
  import dfc_pkg::*;
  logic [WIDTH_W-1:0] decode_width, max_width;
  logic cacheable;
  int checks = 0, failures = 0;

  cacheable_classifier dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int thr [5] = '{0, 32, 48, 64, 200};
    foreach (thr[t]) begin
      for (int w = 0; w < 256; w++) begin
        decode_width = WIDTH_W'(w);
        max_width    = WIDTH_W'(thr[t]);
        #1;
        checks++;
        if (cacheable !== (w <= thr[t] && w <= 64)) begin
          failures++;
          $display("width %0d threshold %0d: got %0b", w, thr[t], cacheable);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
