// End-to-end testbench of ddl_top: 100 MHz clock, 2-buffer cells, typical corner (40 ps buffers).
// One ddl_run scenario (see ddl_run): lock from reset, duty-word sweep,
// re-lock after a 20 % clock period change, saturation at the end of the
// line. Full 256-cell line.
module tb_ddl_top;
  timeunit 1ps;
  timeprecision 1ps;

  int checks, failures;
  bit done;

  ddl_run #(.BUF_DELAY_PS(40), .BUFS_PER_CELL(2), .PERIOD_PS(10000), .PERIOD2_PS(8000), .NAME("100MHz typical"))
    run (.checks(checks), .failures(failures), .done(done));

  initial begin
    #100000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
