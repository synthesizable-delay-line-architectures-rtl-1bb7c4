// Testbench for ddl_controller with a behavioural stand-in for the line:
// tap k reads 1 at the sampling edge when k >= L, i.e. when its delay
// exceeds half a clock period. A reference model (two sampling stages,
// then +1 / -1 per cycle with saturation) runs beside the controller and
// tap_sel and up_down are compared every cycle. Also checked: locking from
// reset within L + 4 cycles, the dither band L-3 .. L+2 afterwards, the
// locked flag, re-locking when L moves (temperature / frequency change),
// saturation and at_limit at the end of the line, and the floor at tap 0.
module tb_ddl_controller;
  timeunit 1ps;
  timeprecision 1ps;
  import ddl_pkg::*;

  localparam int N = 256;

  int checks = 0, failures = 0;
  logic       clk = 1'b0, rst = 1'b1;
  logic [1:0] sel_taps;
  logic [7:0] tap_sel;
  dir_e       up_down;
  logic       locked, at_limit;
  int         L;

  // reference model
  int   ref_sel;
  logic ref_s1, ref_s2;

  ddl_controller dut (.clk(clk), .rst(rst), .sel_taps(sel_taps), .tap_sel(tap_sel),
                      .up_down(up_down), .locked(locked), .at_limit(at_limit));

  always #5000 clk = ~clk;

  function automatic logic tap_at(int k);
    return logic'(k >= L);
  endfunction

  always_comb begin
    sel_taps[0] = tap_at(int'(tap_sel));
    sel_taps[1] = tap_at((tap_sel == 8'(N - 1)) ? N - 1 : int'(tap_sel) + 1);
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t (tap_sel=%0d ref=%0d L=%0d)", what, $time, tap_sel, ref_sel, L);
    end
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      ref_sel <= 0; ref_s1 <= 1'b0; ref_s2 <= 1'b0;
    end else begin
      ref_s1 <= tap_at(ref_sel);
      ref_s2 <= ref_s1;
      if (!ref_s2) ref_sel <= (ref_sel == N - 1) ? ref_sel : ref_sel + 1;
      else         ref_sel <= (ref_sel == 0) ? 0 : ref_sel - 1;
    end
  end

  // cycle-by-cycle comparison, between edges
  always @(negedge clk) if (!rst) begin
    check(int'(tap_sel) == ref_sel, "tap_sel matches the reference");
    check((up_down == DIR_DOWN) == ref_s2, "up_down matches the sampled tap");
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_lock(int new_l, int max_cycles, string what);
    int c;
    bit reached, saw_unlocked;
    L = new_l;
    reached = 0;
    saw_unlocked = 0;
    for (c = 0; c < max_cycles; c++) begin
      @(negedge clk);
      if (!locked) saw_unlocked = 1;
      if (int'(tap_sel) == L - 1) begin reached = 1; break; end
    end
    check(reached, {what, ": reached the lock point in time"});
    check(saw_unlocked, {what, ": locked was low while moving"});
    // steady state: dither inside L-3 .. L+2 and locked asserted
    repeat (6) @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      check(int'(tap_sel) >= L - 3 && int'(tap_sel) <= L + 2, {what, ": dither band"});
      check(locked, {what, ": locked"});
      check(!at_limit, {what, ": no at_limit while locked"});
    end
  endtask

  initial begin
    int seen_up, seen_down;
    L = 40;
    repeat (3) @(posedge clk);
    #100;
    check(tap_sel == 8'd0, "reset selects the first tap");
    rst = 1'b0;
    run_lock(40, 40 + 4, "lock from reset");
    run_lock(20, 20 + 6, "relock down");
    run_lock(150, 130 + 6, "relock up");
    // line too short for half a period: saturate at the last tap
    L = 400;
    repeat (N) @(negedge clk);
    check(tap_sel == 8'(N - 1), "saturates at the last tap");
    check(at_limit, "at_limit at the end of the line");
    check(up_down == DIR_UP, "still asking for more delay");
    // every tap too long: floor at tap 0
    L = 0;
    repeat (N + 10) @(negedge clk);
    check(tap_sel == 8'd0, "floor at tap 0");
    check(up_down == DIR_DOWN, "asking for less delay at tap 0");
    // reset in the middle of operation
    L = 60;
    repeat (80) @(negedge clk);
    rst = 1'b1;
    #100;
    check(tap_sel == 8'd0 && !locked, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
