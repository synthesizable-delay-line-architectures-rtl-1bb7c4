// Linearity of the mapped delay line at 100 MHz in the fast corner
// (20 ps buffers): mean DPWM pulse width for every duty word 1..224,
// against the ideal word/256 of the period (see ddl_lin).
module tb_ddl_linearity_fast;
  timeunit 1ps;
  timeprecision 1ps;

  int checks, failures;
  bit done;

  ddl_lin #(.BUF_DELAY_PS(20), .MIN_STEPS(180), .MAX_STEPS(256), .NAME("fast corner"))
    lin (.checks(checks), .failures(failures), .done(done));

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
