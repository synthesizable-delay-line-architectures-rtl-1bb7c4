// Synthesizable self-calibrating delay-line DPWM for a digitally
// controlled voltage regulator.
//
// A fixed line of NCELLS identical, non-tunable cells is launched by the
// switching clock. Process, voltage and temperature change the cell delay
// by up to 4x, so instead of tuning the cells the design measures how many
// of them span half a clock period (tap_sel, found by ddl_controller
// through the calibration multiplexer) and rescales the duty word to that
// count (ddl_mapper: cal_sel = tap_sel * word / (NCELLS/2)). The output
// multiplexer passes taps[cal_sel] to a trailing-edge modulator, so DPWM is
// high from the clock edge for word / 2^WORD_W of the period. The line is
// sized for the fastest corner: 256 cells of two buffers cover 10.24 ns,
// one 100 MHz period, with 20 ps buffers.
//
// Two phases follow reset: locking (tap_sel climbs one tap per cycle from
// the first tap) and mapping; locking continues afterwards to follow
// temperature and frequency changes.
//
// Interface: clk (switching clock), rst (active high), word (duty) ->
// dpwm, and for observation the selected tap, tap_sel, cal_sel (the value
// the output multiplexer uses), up_down, locked, at_limit.
// BUF_DELAY_PS only sets the simulated corner of the behavioural buffers.
module ddl_top
  import ddl_pkg::*;
#(
  parameter int NCELLS        = 256,
  parameter int BUFS_PER_CELL = 2,
  parameter int BUF_DELAY_PS  = 40,
  parameter int SYNC_STAGES   = 2,
  parameter int LOCK_WINDOW   = 8,
  parameter int WORD_W        = $clog2(NCELLS),
  localparam int SEL_W = $clog2(NCELLS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [WORD_W-1:0] word,
  output logic              dpwm,
  output logic              tap_out,
  output logic [SEL_W-1:0]  tap_sel,
  output logic [SEL_W-1:0]  cal_sel,
  output dir_e              up_down,
  output logic              locked,
  output logic              at_limit
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [NCELLS-1:0] taps;
  logic [1:0]        sel_taps;
  logic [SEL_W-1:0]  mapped;

  delay_line #(
    .NCELLS       (NCELLS),
    .BUFS_PER_CELL(BUFS_PER_CELL),
    .BUF_DELAY_PS (BUF_DELAY_PS)
  ) u_line (
    .line_in(clk),
    .taps   (taps)
  );

  cal_mux #(.NCELLS(NCELLS)) u_cal_mux (
    .taps    (taps),
    .tap_sel (tap_sel),
    .sel_taps(sel_taps)
  );

  ddl_controller #(
    .NCELLS     (NCELLS),
    .SYNC_STAGES(SYNC_STAGES),
    .LOCK_WINDOW(LOCK_WINDOW)
  ) u_ctrl (
    .clk     (clk),
    .rst     (rst),
    .sel_taps(sel_taps),
    .tap_sel (tap_sel),
    .up_down (up_down),
    .locked  (locked),
    .at_limit(at_limit)
  );

  ddl_mapper #(.NCELLS(NCELLS), .WORD_W(WORD_W)) u_mapper (
    .tap_sel(tap_sel),
    .word   (word),
    .cal_sel(mapped)
  );

  out_mux #(.NCELLS(NCELLS)) u_out_mux (
    .clk    (clk),
    .rst    (rst),
    .taps   (taps),
    .cal_sel(mapped),
    .out_tap(tap_out),
    .sel_q  (cal_sel)
  );

  dpwm_ff u_dpwm (
    .clk    (clk),
    .rst    (rst),
    .tap_out(tap_out),
    .dpwm   (dpwm)
  );

endmodule
