// Lock controller of the delay line.
//
// The clock that launches the line is also the clock of this controller.
// On each rising edge the selected tap is sampled: a tap that has already
// fallen again (value 0) is delayed by less than half a clock period, so
// tap_sel moves one tap up; a tap that is still high (value 1) is delayed by
// more than half a period, so tap_sel moves one tap down. tap_sel therefore
// settles at the number of cells that span half a clock period, and keeps
// following it as temperature or the clock frequency change: calibration
// never stops. The decision is made every clock cycle.
//
// The sampled taps pass a synchronizer (sync_ff, SYNC_STAGES flip-flops,
// the first of which is the sampling flip-flop). Each step thus acts on the
// tap that was selected SYNC_STAGES+1 cycles earlier, and once locked
// tap_sel circles within a few taps of the lock point L, the first tap
// delayed by more than half a period (L-3 .. L+2 with two stages), rather
// than toggling between two neighbours; the mapper sees this dither.
//
// Saturation at both ends of the line, the at_limit flag and the lock
// indicator are this design's own. locked is high while, within the last
// LOCK_WINDOW cycles, the sampled pair {next tap, selected tap} read 1,0:
// the half-period edge fell between two adjacent taps.
//
// Interface: clk, rst (active high, asynchronous; tap_sel = 0, the first
// tap), sel_taps from cal_mux; tap_sel, up_down (ddl_pkg::dir_e), locked,
// at_limit.
module ddl_controller
  import ddl_pkg::*;
#(
  parameter int NCELLS      = 256,
  parameter int SYNC_STAGES = 2,
  parameter int LOCK_WINDOW = 8,
  localparam int SEL_W = $clog2(NCELLS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [1:0]       sel_taps,
  output logic [SEL_W-1:0] tap_sel,
  output dir_e             up_down,
  output logic             locked,
  output logic             at_limit
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [SEL_W-1:0] LAST  = SEL_W'(NCELLS - 1);
  localparam int               CNT_W = $clog2(LOCK_WINDOW + 1);
  localparam logic [CNT_W-1:0] WIN   = CNT_W'(LOCK_WINDOW);

  logic [1:0]       sampled;
  logic             bracket;
  logic [CNT_W-1:0] since_bracket;

  sync_ff #(.WIDTH(2), .STAGES(SYNC_STAGES)) u_sync (
    .clk(clk),
    .rst(rst),
    .d  (sel_taps),
    .q  (sampled)
  );

  assign up_down = sampled[0] ? DIR_DOWN : DIR_UP;
  assign bracket = (sampled == 2'b10);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      tap_sel <= '0;
    end else if (up_down == DIR_UP) begin
      if (tap_sel != LAST) tap_sel <= tap_sel + 1'b1;
    end else begin
      if (tap_sel != '0) tap_sel <= tap_sel - 1'b1;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                 since_bracket <= WIN;
    else if (bracket)        since_bracket <= '0;
    else if (since_bracket != WIN) since_bracket <= since_bracket + 1'b1;
  end

  assign locked   = (since_bracket != WIN);
  assign at_limit = (tap_sel == LAST) && (up_down == DIR_UP);

endmodule
