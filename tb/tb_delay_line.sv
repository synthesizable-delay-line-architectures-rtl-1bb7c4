// Testbench for delay_line at its full size (256 cells of 2 x 40 ps):
// a clock edge entering the line must reach tap k exactly (k+1) cell
// delays later, on every tap, for rising and falling edges, and a 100 MHz
// clock (10 ns) must propagate as a clean delayed copy.
module tb_delay_line;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N    = 256;
  localparam int CELL = 80;

  int checks = 0, failures = 0;
  logic          line_in = 1'b0;
  logic [N-1:0]  taps;
  time           t_edge;
  int            seen;
  bit            armed = 1'b0;

  delay_line dut (.line_in(line_in), .taps(taps));

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  for (genvar k = 0; k < N; k++) begin : g_mon
    always @(taps[k]) begin
      if (armed) begin
        check($time - t_edge == time'((k + 1) * CELL), $sformatf("tap %0d delay", k));
        check(taps[k] == line_in, $sformatf("tap %0d value", k));
        seen++;
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = 0;
    #(N * CELL + 1000);
    check(taps == '0, "line settled low");
    armed = 1'b1;
    // Edges spaced far enough apart that each travels the whole line alone
    for (int i = 0; i < 4; i++) begin
      t_edge  = $time;
      line_in = ~line_in;
      #(N * CELL + 500);
      check(taps == {N{line_in}}, "line settled after an edge");
    end
    check(seen == 4 * N, "every tap saw every edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
