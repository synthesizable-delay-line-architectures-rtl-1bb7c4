// The delay line: NCELLS identical delay cells in series, launched by the
// clock, with a tap after every cell.
//
// taps[k] is the clock delayed by k+1 cells. The line is sized for the
// fastest corner, where all cells are needed to cover one clock period
// (256 cells of 2 x 20 ps = 10.24 ns at 100 MHz); in slower corners the
// upper cells are simply not used. Which taps cover the period is found at
// run time by ddl_controller, not by tuning the cells.
//
// Interface: line_in (the clock), taps[NCELLS-1:0].
module delay_line #(
  parameter int NCELLS        = 256,
  parameter int BUFS_PER_CELL = 2,
  parameter int BUF_DELAY_PS  = 40
) (
  input  logic              line_in,
  output logic [NCELLS-1:0] taps
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [NCELLS:0] node;

  assign node[0] = line_in;

  for (genvar c = 0; c < NCELLS; c++) begin : g_cell
    delay_cell #(
      .BUFS_PER_CELL(BUFS_PER_CELL),
      .BUF_DELAY_PS (BUF_DELAY_PS)
    ) u_cell (
      .d_in (node[c]),
      .d_out(node[c+1])
    );
  end

  assign taps = node[NCELLS:1];

endmodule
