// Calibration multiplexer (MUX 1): picks the delay-line tap the controller
// is currently testing.
//
// It has a two-bit output: bit 0 is taps[tap_sel], the tap whose level at
// the clock edge decides the up/down step; bit 1 is the next tap,
// taps[tap_sel+1] (the last tap again when tap_sel is the last one), which
// the controller uses only to see that the half-period edge falls between
// two adjacent taps. The two-bit width follows the description of the
// design; the choice of the next tap as the second bit is this design's own.
//
// Purely combinational. Interface: taps, tap_sel -> sel_taps.
module cal_mux #(
  parameter int NCELLS = 256,
  localparam int SEL_W = $clog2(NCELLS)
) (
  input  logic [NCELLS-1:0] taps,
  input  logic [SEL_W-1:0]  tap_sel,
  output logic [1:0]        sel_taps
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [SEL_W-1:0] LAST = SEL_W'(NCELLS - 1);

  always_comb begin
    sel_taps[0] = taps[tap_sel];
    if (tap_sel >= LAST) sel_taps[1] = taps[LAST];
    else                 sel_taps[1] = taps[tap_sel + 1'b1];
  end

endmodule
