// ddl_top with every parameter at its default (256 cells of two 40 ps
// buffers, two synchronizer stages, 8-bit word) driven by a 100 MHz
// switching clock through one complete operation: reset, locking phase,
// then the mapping phase for three duty words, each DPWM pulse compared
// with word/256 of the period and with the delay of the tap in use.
module tb_ddl_top_full;
  timeunit 1ps;
  timeprecision 1ps;
  import ddl_pkg::*;

  localparam int T    = 10000;  // 100 MHz
  localparam int CELL = 80;     // 2 buffers x 40 ps
  localparam int L    = (T / 2) / CELL;

  int checks = 0, failures = 0;
  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] word = 8'd0;
  logic       dpwm, tap_out, locked, at_limit;
  logic [7:0] tap_sel, cal_sel;
  dir_e       up_down;
  time        t_rise;
  bit         measuring = 1'b0;
  int         n_pulse = 0, n_lock_cycles = 0;

  ddl_top dut (
    .clk(clk), .rst(rst), .word(word), .dpwm(dpwm), .tap_out(tap_out),
    .tap_sel(tap_sel), .cal_sel(cal_sel), .up_down(up_down),
    .locked(locked), .at_limit(at_limit)
  );

  always #(T / 2) clk = ~clk;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (tap_sel=%0d cal_sel=%0d word=%0d)", what, $time, tap_sel, cal_sel, word);
    end
  endfunction

  always @(posedge dpwm) t_rise = $time;
  always @(negedge dpwm) if (measuring) begin
    int high, ideal, tol;
    high  = int'($time - t_rise);
    ideal = (int'(word) * T) / 256;
    tol   = (3 * int'(word) / 128 + 3) * CELL;
    n_pulse++;
    check(high == (int'(cal_sel) + 1) * CELL || high == T / 2, "pulse width is the selected tap delay");
    check(high >= ideal - tol && high <= ideal + tol, $sformatf("duty %0d ps, ideal %0d", high, ideal));
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] words [3] = '{8'd32, 8'd128, 8'd192};
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    // locking phase: one tap per cycle from the first tap
    while (!(locked && int'(tap_sel) >= L - 3 && int'(tap_sel) <= L + 2) && n_lock_cycles < L + 12) begin
      @(negedge clk);
      n_lock_cycles++;
    end
    check(n_lock_cycles < L + 12, $sformatf("locked after %0d cycles", n_lock_cycles));
    // mapping phase
    foreach (words[i]) begin
      @(posedge clk);
      #1;
      word = words[i];
      repeat (4) @(posedge clk);
      #1;
      measuring = 1'b1;
      repeat (8) @(posedge clk);
      #(T - 10);
      measuring = 1'b0;
    end
    // each window sees the pulse of the period it opens in plus eight more
    check(n_pulse == 27, "one DPWM pulse per measured period");
    $display("lock after %0d cycles, %0d pulses measured", n_lock_cycles, n_pulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
