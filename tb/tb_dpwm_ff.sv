// Testbench for dpwm_ff: with a 10 ns switching clock and a reset tap that
// is the clock delayed by D, DPWM must be high for exactly D each period,
// for D below and above half a period, and low while rst is high.
module tb_dpwm_ff;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 10000;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, tap = 1'b0, dpwm;
  int   d_ps = 1000;
  time  t_rise;
  int   rises, falls;

  dpwm_ff dut (.clk(clk), .rst(rst), .tap_out(tap), .dpwm(dpwm));

  always #(T / 2) clk = ~clk;
  // Reset tap: the clock delayed by d_ps (0 < d_ps < T, so each edge is
  // reproduced before the clock makes its next edge of the same kind)
  initial forever begin
    @(posedge clk);
    #(d_ps) tap = 1'b1;
  end
  initial forever begin
    @(negedge clk);
    #(d_ps) tap = 1'b0;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  always @(posedge dpwm) begin
    t_rise = $time;
    rises++;
    check(clk == 1'b1 && ($time % T) == T / 2, "DPWM rises at the clock edge");
  end
  always @(negedge dpwm) if (!rst) begin
    falls++;
    check($time - t_rise == time'(d_ps), $sformatf("high time %0t for D=%0d", $time - t_rise, d_ps));
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ds [6] = '{1000, 2500, 4900, 5100, 7500, 9600};
    rises = 0; falls = 0;
    repeat (3) @(posedge clk);
    check(dpwm == 1'b0, "low in reset");
    foreach (ds[i]) begin
      @(negedge clk);
      rst = 1'b1;
      d_ps = ds[i];
      #100;
      rst = 1'b0;
      rises = 0; falls = 0;
      repeat (10) @(posedge clk);
      #(T - 50);
      check(rises == 10 && falls == 10, $sformatf("one pulse per period for D=%0d", ds[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
