// Testbench for delay_cell: the cell delay must be BUFS_PER_CELL buffer
// delays. Checked for the 100 MHz cell (2 x 40 ps), the 50 MHz cell
// (4 x 20 ps) and the 200 MHz cell (1 x 80 ps), rising and falling edges.
module tb_delay_cell;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic d_in = 1'b0;
  logic q2, q4, q1;
  time t_in;

  delay_cell                                           dut2 (.d_in(d_in), .d_out(q2));
  delay_cell #(.BUFS_PER_CELL(4), .BUF_DELAY_PS(20))   dut4 (.d_in(d_in), .d_out(q4));
  delay_cell #(.BUFS_PER_CELL(1), .BUF_DELAY_PS(80))   dut1 (.d_in(d_in), .d_out(q1));

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  always @(q2) if ($time > 100) check($time - t_in == 80, "2 x 40 ps cell delay");
  always @(q4) if ($time > 100) check($time - t_in == 80, "4 x 20 ps cell delay");
  always @(q1) if ($time > 100) check($time - t_in == 80, "1 x 80 ps cell delay");

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    for (int i = 0; i < 30; i++) begin
      t_in = $time;
      d_in = ~d_in;
      #(100 + $urandom_range(0, 400));
    end
    check(checks == 90, "every edge reached every output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
