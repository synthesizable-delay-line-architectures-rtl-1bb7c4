// Mapper: converts the duty word into the tap that gives that fraction of
// the clock period in the current corner.
//
//   cal_sel = tap_sel * word / (NCELLS / 2)
//
// tap_sel is the number of cells that span half a period, so 2*tap_sel
// cells span a full period and word/2^WORD_W of it is tap_sel*word/2^(WORD_W-1).
// With WORD_W = log2(NCELLS) the divisor NCELLS/2 is a power of two and
// the division is a right shift. In the fastest corner tap_sel is about
// NCELLS/2 and cal_sel = word; in a corner four times slower many words
// share one tap. Results past the last tap are clamped to it (this clamp
// is this design's own).
//
// Purely combinational. Interface: tap_sel, word -> cal_sel.
module ddl_mapper #(
  parameter int NCELLS = 256,
  parameter int WORD_W = $clog2(NCELLS),
  localparam int SEL_W = $clog2(NCELLS)
) (
  input  logic [SEL_W-1:0]  tap_sel,
  input  logic [WORD_W-1:0] word,
  output logic [SEL_W-1:0]  cal_sel
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int PROD_W = SEL_W + WORD_W;
  localparam int SHIFT  = SEL_W - 1;

  logic [PROD_W-1:0] prod;
  logic [PROD_W-1:0] scaled;

  always_comb begin
    prod   = PROD_W'(tap_sel) * PROD_W'(word);
    scaled = prod >> SHIFT;
    if (scaled > PROD_W'(NCELLS - 1)) cal_sel = SEL_W'(NCELLS - 1);
    else                              cal_sel = scaled[SEL_W-1:0];
  end

endmodule
