// jk_counter: synchronous up counter built from JK flip-flops (6 bits by default).
//
// Stage 0 has J = K = 1; stage i toggles when stage i-1 toggles and its output is
// 1 (AND chain), so the counter increments by one on every rising clock edge and
// wraps from all ones to zero. An asynchronous active-low reset clears all stages.
// This is the structure of the design's 6-bit counter that counts DCO clock edges
// for the frequency detector. The synchronous restart input is this design's
// choice in place of an asynchronous reset pulse: while restart is 1 the JK inputs
// are forced (stage 0: J = 1, K = 0; other stages: J = 0, K = 1), so the edge that
// restarts the counter is itself counted and the counter reads 1 after it.
module jk_counter #(
  parameter int unsigned WIDTH = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  output logic [WIDTH-1:0] q
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [WIDTH-1:0] t, j, k;

  assign t[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_t
    assign t[i] = t[i-1] & q[i-1];
  end

  always_comb begin
    if (restart) begin
      j    = '0;
      k    = '1;
      j[0] = 1'b1;
      k[0] = 1'b0;
    end else begin
      j = t;
      k = t;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= (j & ~q) | (~k & q);
  end
endmodule
