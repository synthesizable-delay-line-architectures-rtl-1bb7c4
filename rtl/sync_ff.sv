// Flip-flop synchronizer: STAGES flip-flops in series on the same clock.
//
// The first flip-flop samples an asynchronous input (here the level of a
// delay-line tap at the clock edge, which is the actual phase comparison);
// the following ones give a metastable first stage a full clock cycle to
// settle before the value is used. Two stages is the usual choice and the
// default.
//
// Interface: clk, rst (active high, asynchronous, clears all stages), d, q.
// Timing: q is d as sampled STAGES rising edges earlier.
module sync_ff #(
  parameter int WIDTH  = 2,
  parameter int STAGES = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [WIDTH-1:0] stage [STAGES];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int s = 0; s < STAGES; s++) stage[s] <= '0;
    end else begin
      stage[0] <= d;
      for (int s = 1; s < STAGES; s++) stage[s] <= stage[s-1];
    end
  end

  assign q = stage[STAGES-1];

endmodule
