// Output multiplexer (MUX 2): passes the mapped tap, taps[cal_sel], to the
// trailing-edge flip-flop.
//
// The selection is re-registered on the falling clock edge (sel_q). At that
// instant every tap delayed by less than half a period is high and has
// already made its rising edge, and every tap delayed by more is low and
// has not; switching between two taps of the same group therefore makes
// no new rising edge, and switching across the groups can only produce an
// edge at mid-period, where the two taps' own edges lie anyway. Changing
// the selection at the rising edge instead could make a false edge at the
// start of the period. The falling-edge register is this design's own.
//
// Interface: clk, rst (asynchronous, sel_q = 0), taps, cal_sel -> out_tap,
// sel_q. Timing: a new cal_sel takes effect at the next falling clock edge.
module out_mux #(
  parameter int NCELLS = 256,
  localparam int SEL_W = $clog2(NCELLS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NCELLS-1:0] taps,
  input  logic [SEL_W-1:0]  cal_sel,
  output logic              out_tap,
  output logic [SEL_W-1:0]  sel_q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(negedge clk or posedge rst) begin
    if (rst) sel_q <= '0;
    else     sel_q <= cal_sel;
  end

  assign out_tap = taps[sel_q];

endmodule
