// Testbench for cal_mux: for random tap patterns and every selection,
// bit 0 must be taps[tap_sel] and bit 1 taps[tap_sel+1], or the last tap
// when tap_sel is the last one.
module tb_cal_mux;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N = 256;

  int checks = 0, failures = 0;
  logic [N-1:0] taps;
  logic [7:0]   tap_sel;
  logic [1:0]   sel_taps;
  logic         exp0, exp1;

  cal_mux dut (.taps(taps), .tap_sel(tap_sel), .sel_taps(sel_taps));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int w = 0; w < N / 32; w++) taps[w*32 +: 32] = $urandom;
      for (int s = 0; s < N; s++) begin
        tap_sel = 8'(s);
        #10;
        exp0 = (taps >> s) & 1'b1;
        exp1 = (s == N - 1) ? taps[N-1] : ((taps >> (s + 1)) & 1'b1);
        checks++;
        if (sel_taps !== {exp1, exp0}) begin
          failures++;
          $display("FAIL sel=%0d got %b exp %b", s, sel_taps, {exp1, exp0});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
