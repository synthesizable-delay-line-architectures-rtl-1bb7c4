// Testbench for sync_ff: q must equal d as sampled STAGES clock edges
// earlier (2 and 3 stages), and reset must clear every stage.
module tb_sync_ff;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic       clk = 1'b0, rst = 1'b1;
  logic [1:0] d;
  logic [1:0] q2, q3;
  logic [1:0] hist [$];

  sync_ff                 dut2 (.clk(clk), .rst(rst), .d(d), .q(q2));
  sync_ff #(.STAGES(3))   dut3 (.clk(clk), .rst(rst), .d(d), .q(q3));

  always #5000 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 2'b11;
    repeat (3) @(posedge clk);
    #1000;
    checks++;
    if (q2 !== 2'b00 || q3 !== 2'b00) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    for (int i = 0; i < 3; i++) hist.push_front(2'b00);
    for (int i = 0; i < 300; i++) begin
      d = 2'($urandom);
      @(posedge clk);
      hist.push_front(d);
      #1000;
      checks++;
      if (q2 !== hist[1]) begin failures++; $display("FAIL 2-stage cycle %0d", i); end
      checks++;
      if (q3 !== hist[2]) begin failures++; $display("FAIL 3-stage cycle %0d", i); end
      void'(hist.pop_back());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
