// End-to-end scenario for one configuration of ddl_top (used by the
// testbenches, not a design block).
//
// Runs the switching clock at PERIOD_PS and:
//  1. resets, checks that tap_sel climbs from the first tap and locks at
//     the number of cells spanning half a period (computed here from the
//     cell delay), with locked asserted;
//  2. for a set of duty words, measures every DPWM pulse: its width must
//     equal the delay of the tap in use, (cal_sel+1) cell delays, and be
//     within a few cells of word/2^WORD_W of the period (the mapping);
//  3. changes the clock period to PERIOD2_PS and checks that the loop
//     re-locks and the duty stays right (continuous calibration);
//  4. slows the clock until half a period is longer than the whole line
//     and checks that tap_sel saturates with at_limit.
// It counts how often each mechanism occurred (up steps, down steps, lock,
// re-lock, at_limit, measured pulses) and fails any that never did.
module ddl_run #(
  parameter int BUF_DELAY_PS  = 40,
  parameter int BUFS_PER_CELL = 2,
  parameter int PERIOD_PS     = 10000,
  parameter int PERIOD2_PS    = 8000,
  parameter string NAME       = "run"
) (
  output int checks,
  output int failures,
  output bit done
);
  timeunit 1ps;
  timeprecision 1ps;
  import ddl_pkg::*;

  localparam int N    = 256;
  localparam int CELL = BUF_DELAY_PS * BUFS_PER_CELL;

  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] word = 8'd0;
  logic       dpwm, tap_out, locked, at_limit;
  logic [7:0] tap_sel, cal_sel;
  dir_e       up_down;

  int  period = PERIOD_PS;
  time t_rise;
  int  n_up, n_down, n_lock, n_relock, n_limit, n_pulse, n_rise;
  bit  measuring;

  ddl_top #(
    .BUF_DELAY_PS (BUF_DELAY_PS),
    .BUFS_PER_CELL(BUFS_PER_CELL)
  ) dut (
    .clk(clk), .rst(rst), .word(word), .dpwm(dpwm), .tap_out(tap_out),
    .tap_sel(tap_sel), .cal_sel(cal_sel), .up_down(up_down),
    .locked(locked), .at_limit(at_limit)
  );

  initial forever begin
    #(period / 2) clk = 1'b1;
    #(period - period / 2) clk = 1'b0;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [%s] %s at %0t (tap_sel=%0d cal_sel=%0d word=%0d)",
                                  NAME, what, $time, tap_sel, cal_sel, word);
    end
  endfunction

  // first tap whose delay exceeds half the period
  function automatic int lock_point(int p);
    return (p / 2) / CELL;
  endfunction

  always @(posedge clk) if (!rst) begin
    if (up_down == DIR_UP) n_up++;
    else                   n_down++;
    if (at_limit) n_limit++;
  end

  always @(posedge dpwm) begin
    t_rise = $time;
    if (measuring) n_rise++;
  end
  always @(negedge dpwm) if (measuring) begin
    int high, exact, ideal, tol;
    high  = int'($time - t_rise);
    exact = (int'(cal_sel) + 1) * CELL;
    ideal = (int'(word) * period) / 256;
    tol   = (3 * int'(word) / 128 + 3) * CELL;
    n_pulse++;
    check(high == exact || high == period / 2, "pulse width is the delay of the selected tap");
    check(high >= ideal - tol && high <= ideal + tol,
          $sformatf("duty %0d ps for word %0d, ideal %0d +- %0d", high, word, ideal, tol));
  end

  task automatic wait_lock(int p, int max_cycles, string what, output bit ok);
    int l;
    l  = lock_point(p);
    ok = 0;
    for (int c = 0; c < max_cycles; c++) begin
      @(negedge clk);
      if (locked && int'(tap_sel) >= l - 3 && int'(tap_sel) <= l + 2) begin ok = 1; break; end
    end
    check(ok, {what, ": locked at the half-period tap"});
    repeat (12) @(negedge clk);
    for (int c = 0; c < 30; c++) begin
      @(negedge clk);
      check(int'(tap_sel) >= l - 3 && int'(tap_sel) <= l + 2, {what, ": stays in the lock band"});
    end
  endtask

  task automatic sweep_words();
    logic [7:0] words [7] = '{8'd16, 8'd48, 8'd96, 8'd128, 8'd160, 8'd200, 8'd224};
    foreach (words[i]) begin
      @(posedge clk);
      #1;
      word = words[i];
      repeat (4) @(posedge clk);
      #1;
      measuring = 1'b1;
      n_rise = 0;
      repeat (12) @(posedge clk);
      #(period - 10);
      measuring = 1'b0;
      check(n_rise == 12, "one DPWM pulse per period");
    end
  endtask

  initial begin
    bit ok;
    checks = 0; failures = 0; done = 1'b0;
    n_up = 0; n_down = 0; n_lock = 0; n_relock = 0; n_limit = 0; n_pulse = 0;
    measuring = 1'b0;
    // let the line settle before releasing reset
    repeat (4) @(posedge clk);
    check(tap_sel == 8'd0 && !dpwm, "reset state");
    @(negedge clk);
    rst = 1'b0;
    // 1. lock from reset: one tap per cycle, so about lock_point cycles
    wait_lock(period, lock_point(period) + 12, "initial lock", ok);
    if (ok) n_lock++;
    // 2. mapping
    sweep_words();
    // 3. clock period change: continuous calibration re-locks
    period = PERIOD2_PS;
    wait_lock(period, 300, "relock after frequency change", ok);
    if (ok) n_relock++;
    sweep_words();
    // 4. half period longer than the line
    period = 2 * N * CELL + 4000;
    repeat (N + 20) @(negedge clk);
    check(tap_sel == 8'(N - 1) && at_limit, "saturation at the end of the line");
    check(n_up > 0,     "mechanism: up steps");
    check(n_down > 0,   "mechanism: down steps");
    check(n_lock > 0,   "mechanism: lock");
    check(n_relock > 0, "mechanism: re-lock");
    check(n_limit > 0,  "mechanism: at_limit");
    check(n_pulse > 100, "mechanism: DPWM pulses measured");
    $display("[%s] cell=%0d ps up=%0d down=%0d lock=%0d relock=%0d at_limit=%0d pulses=%0d",
             NAME, CELL, n_up, n_down, n_lock, n_relock, n_limit, n_pulse);
    done = 1'b1;
  end
endmodule
