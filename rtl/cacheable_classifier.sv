// cacheable_classifier -- decides whether a decoded instruction may be kept
// in the decode filter cache.
//
// Instructions are classified by decode width. Offline profiling sorts the
// decode widths by size, accumulates their execution frequencies and picks the
// widths whose accumulated frequency stays within the chosen cacheable ratio;
// because the table is ordered by width, that choice is one width threshold.
// This block applies it: an instruction is cacheable when its decode width is
// at most max_width (the profiled threshold, a configuration input) and at
// most LINE_W, the width of one DFC line, so it can be stored. Purely
// combinational. Representing the profiled set as a single threshold register
// input is this design's reading of the ordered frequency table.
module cacheable_classifier
  import dfc_pkg::*;
#(
  parameter int unsigned LINE_W = 64            // bits in one DFC line (8 B)
) (
  input  logic [WIDTH_W-1:0] decode_width,      // width of this decoded instruction, bits
  input  logic [WIDTH_W-1:0] max_width,         // profiled cacheable threshold, bits
  output logic               cacheable
);
  always_comb begin
    cacheable = (decode_width <= max_width) &&
                (32'(decode_width) <= LINE_W);
  end
endmodule
