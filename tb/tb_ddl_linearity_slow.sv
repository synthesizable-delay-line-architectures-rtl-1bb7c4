// Linearity of the mapped delay line at 100 MHz in the slow corner
// (80 ps buffers): mean DPWM pulse width for every duty word 1..224,
// against the ideal word/256 of the period (see ddl_lin).
module tb_ddl_linearity_slow;
  timeunit 1ps;
  timeprecision 1ps;

  int checks, failures;
  bit done;

  ddl_lin #(.BUF_DELAY_PS(80), .MIN_STEPS(40), .MAX_STEPS(90), .NAME("slow corner"))
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
