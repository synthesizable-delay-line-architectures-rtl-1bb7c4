// Behavioural model of the unit delay element of the line: a buffer built
// from two inverters in series (d_in -> inverter -> inverter -> d_out).
//
// Logically the buffer is the identity; what matters is its propagation
// delay, which this model represents with a transport delay of
// BUF_DELAY_PS picoseconds, split over the two inverters. The delay stands
// for a process corner of the target library: with a typical buffer delay
// d, the fast corner is d/2 and the slow corner 2d (20, 40 and 80 ps for the
// 32 nm library the numbers come from). In a synthesis flow the two
// inverters must be kept (a don't-touch cell or attribute of the flow);
// the delay values are ignored by synthesis.
//
// Interface: d_in, d_out. Timing: d_out follows d_in after BUF_DELAY_PS.
module delay_buffer #(
  parameter int BUF_DELAY_PS = 40
) (
  input  logic d_in,
  output logic d_out
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int INV1_PS = BUF_DELAY_PS / 2;
  localparam int INV2_PS = BUF_DELAY_PS - INV1_PS;

  logic mid;

  assign #(INV1_PS) mid   = ~d_in;
  assign #(INV2_PS) d_out = ~mid;

endmodule
