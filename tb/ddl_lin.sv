// Linearity sweep of ddl_top at 100 MHz for one process corner (used by
// the linearity testbenches, not a design block).
//
// After locking, every duty word from 1 to 224 is applied for eight
// periods. The mean DPWM pulse width over the last six is compared with
// word/256 of the period (within the mapping error bound), must not fall
// as the word grows by more than the dither can explain, and the number of
// distinct output steps is counted. In the fast corner nearly every word
// must give its own step; in the slow corner about four words share one.
module ddl_lin #(
  parameter int BUF_DELAY_PS = 40,
  parameter int MIN_STEPS    = 50,
  parameter int MAX_STEPS    = 256,
  parameter string NAME      = "lin"
) (
  output int checks,
  output int failures,
  output bit done
);
  timeunit 1ps;
  timeprecision 1ps;
  import ddl_pkg::*;

  localparam int T    = 10000;
  localparam int CELL = 2 * BUF_DELAY_PS;

  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] word = 8'd0;
  logic       dpwm, tap_out, locked, at_limit;
  logic [7:0] tap_sel, cal_sel;
  dir_e       up_down;
  time        t_rise;
  bit         measuring = 1'b0;
  longint     sum_w;
  int         n_w;

  ddl_top #(.BUF_DELAY_PS(BUF_DELAY_PS)) dut (
    .clk(clk), .rst(rst), .word(word), .dpwm(dpwm), .tap_out(tap_out),
    .tap_sel(tap_sel), .cal_sel(cal_sel), .up_down(up_down),
    .locked(locked), .at_limit(at_limit)
  );

  always #(T / 2) clk = ~clk;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [%s] %s at %0t", NAME, what, $time);
    end
  endfunction

  always @(posedge dpwm) t_rise = $time;
  always @(negedge dpwm) if (measuring) begin
    sum_w += longint'($time - t_rise);
    n_w++;
  end

  initial begin
    int prev_mean, mean, ideal, tol, steps, prev_sel_mean;
    checks = 0; failures = 0; done = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    repeat (T / 2 / CELL + 20) @(posedge clk);
    check(locked, "locked before the sweep");
    prev_mean = 0;
    steps = 0;
    for (int w = 1; w <= 224; w++) begin
      @(posedge clk);
      #1;
      word = 8'(w);
      repeat (2) @(posedge clk);
      #1;
      sum_w = 0; n_w = 0;
      measuring = 1'b1;
      repeat (6) @(posedge clk);
      #1;
      measuring = 1'b0;
      check(n_w == 6, "one pulse per period");
      mean  = (n_w > 0) ? int'(sum_w / longint'(n_w)) : 0;
      ideal = (w * T) / 256;
      tol   = (3 * w / 128 + 3) * CELL;
      check(mean >= ideal - tol && mean <= ideal + tol,
            $sformatf("word %0d mean width %0d, ideal %0d", w, mean, ideal));
      check(mean >= prev_mean - 2 * CELL, $sformatf("word %0d: width does not fall", w));
      if (mean - prev_mean >= CELL / 2) steps++;
      prev_mean = mean;
    end
    $display("[%s] cell=%0d ps: %0d distinct output steps over 224 words", NAME, CELL, steps);
    check(steps >= MIN_STEPS && steps <= MAX_STEPS, "number of output steps for this corner");
    done = 1'b1;
  end
endmodule
