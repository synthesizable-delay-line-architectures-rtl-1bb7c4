// Testbench for delay_buffer: checks that the output follows the input,
// with the same value, exactly BUF_DELAY_PS later, for a typical (40 ps)
// and a fast-corner (20 ps) buffer and for an odd delay (25 ps).
module tb_delay_buffer;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic d_in = 1'b0;
  logic q40, q20, q25;

  delay_buffer                      dut40 (.d_in(d_in), .d_out(q40));
  delay_buffer #(.BUF_DELAY_PS(20)) dut20 (.d_in(d_in), .d_out(q20));
  delay_buffer #(.BUF_DELAY_PS(25)) dut25 (.d_in(d_in), .d_out(q25));

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500;
    for (int i = 0; i < 20; i++) begin
      logic v;
      v = ~d_in;
      d_in = v;
      #19;
      check(q20 == ~v && q25 == ~v && q40 == ~v, "no output change before the delay");
      #1;
      check(q20 == v, "20 ps buffer at 20 ps");
      check(q25 == ~v, "25 ps buffer unchanged at 20 ps");
      #5;
      check(q25 == v, "25 ps buffer at 25 ps");
      check(q40 == ~v, "40 ps buffer unchanged at 25 ps");
      #14;
      check(q40 == ~v, "40 ps buffer unchanged at 39 ps");
      #1;
      check(q40 == v, "40 ps buffer at 40 ps");
      #($urandom_range(60, 300));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
