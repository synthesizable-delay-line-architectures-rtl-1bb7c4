// Testbench for out_mux: out_tap must be taps[s] where s is the cal_sel
// present at the last falling clock edge; a change of cal_sel must not
// reach the output before that edge.
module tb_out_mux;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N = 256;

  int checks = 0, failures = 0;
  logic         clk = 1'b0, rst = 1'b1;
  logic [N-1:0] taps;
  logic [7:0]   cal_sel, sel_q, held;
  logic         out_tap;

  out_mux dut (.clk(clk), .rst(rst), .taps(taps), .cal_sel(cal_sel),
               .out_tap(out_tap), .sel_q(sel_q));

  always #5000 clk = ~clk;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N / 32; i++) taps[i*32 +: 32] = $urandom;
    cal_sel = 8'd77;
    #12000;
    check(sel_q == 8'd0 && out_tap == taps[0], "reset selects tap 0");
    rst = 1'b0;
    held = 8'd0;
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      #100;
      cal_sel = 8'($urandom);
      for (int j = 0; j < 4; j++) begin
        for (int k = 0; k < N / 32; k++) taps[k*32 +: 32] = $urandom;
        #500;
        check(out_tap == taps[held], "output still follows the old selection before the falling edge");
      end
      @(negedge clk);
      held = cal_sel;
      #100;
      for (int j = 0; j < 4; j++) begin
        for (int k = 0; k < N / 32; k++) taps[k*32 +: 32] = $urandom;
        #500;
        check(out_tap == taps[held], "output follows the new selection after the falling edge");
      end
      check(sel_q == held, "sel_q");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
