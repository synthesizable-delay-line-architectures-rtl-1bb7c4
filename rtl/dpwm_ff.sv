// Trailing-edge pulse width modulator.
//
// DPWM goes high at every rising edge of the switching clock and low at the
// rising edge of the selected delay-line tap, so its duty cycle is the
// delay of that tap over the clock period. The conventional form is a
// flip-flop with its D input tied high, clocked by the switching clock and
// cleared by the tap. A tap is a delayed copy of the clock and stays high
// for half a period, so a level-sensitive clear would still be active at
// the next clock edge whenever the delay exceeds half a period. Here the
// clear acts on the tap's rising edge instead: set_t toggles on each clock
// edge, clr_t copies set_t on each tap edge, and DPWM is their XOR. This
// two-flip-flop form is this design's own.
//
// Interface: clk, rst (active high, asynchronous, DPWM low), tap_out ->
// dpwm. Timing: dpwm rises with clk and falls with the next rising edge of
// tap_out.
module dpwm_ff (
  input  logic clk,
  input  logic rst,
  input  logic tap_out,
  output logic dpwm
);
  timeunit 1ps;
  timeprecision 1ps;

  logic set_t;
  logic clr_t;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) set_t <= 1'b0;
    else     set_t <= ~set_t;
  end

  always_ff @(posedge tap_out or posedge rst) begin
    if (rst) clr_t <= 1'b0;
    else     clr_t <= set_t;
  end

  assign dpwm = set_t ^ clr_t;

endmodule
