// ddl_top at 100 MHz with 2-buffer cells in the fast corner (20 ps buffers), where nearly the whole line spans one period.
// One ddl_run scenario (see ddl_run): lock from reset, duty-word sweep,
// re-lock after a 20 % clock period change, saturation at the end of the
// line. Full 256-cell line.
module tb_ddl_fast_100;
  timeunit 1ps;
  timeprecision 1ps;

  int checks, failures;
  bit done;

  ddl_run #(.BUF_DELAY_PS(20), .BUFS_PER_CELL(2), .PERIOD_PS(10000), .PERIOD2_PS(8000), .NAME("100MHz fast"))
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
