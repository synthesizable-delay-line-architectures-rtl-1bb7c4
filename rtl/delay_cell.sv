// One cell of the calibrated delay line: a single, non-tunable branch of
// BUFS_PER_CELL buffers in series.
//
// Unlike a tunable cell, there is no multiplexer and no control input: all
// cells of the line are identical, which is what keeps the line linear.
// The number of buffers per cell is chosen from the clock frequency so that
// the whole line covers a clock period in the fastest corner: 4 at 50 MHz,
// 2 at 100 MHz (the default) and 1 at 200 MHz for a 256-cell line.
//
// Interface: d_in, d_out. Timing: d_out = d_in delayed by
// BUFS_PER_CELL * BUF_DELAY_PS.
module delay_cell #(
  parameter int BUFS_PER_CELL = 2,
  parameter int BUF_DELAY_PS  = 40
) (
  input  logic d_in,
  output logic d_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [BUFS_PER_CELL:0] chain;

  assign chain[0] = d_in;

  for (genvar b = 0; b < BUFS_PER_CELL; b++) begin : g_buf
    delay_buffer #(.BUF_DELAY_PS(BUF_DELAY_PS)) u_buf (
      .d_in (chain[b]),
      .d_out(chain[b+1])
    );
  end

  assign d_out = chain[BUFS_PER_CELL];

endmodule
