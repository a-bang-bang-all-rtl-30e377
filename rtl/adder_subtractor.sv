// adder_subtractor: ripple-carry two's-complement adder/subtractor with overflow flag.
//
// A chain of full adders computes a + b when sub = 0. When sub = 1 every bit of b
// is inverted through an XOR and the carry into bit 0 is set, which adds the two's
// complement of b, so the chain computes a - b. Overflow is the usual signed rule
// (carry into the sign bit differs from the carry out of it). With NONNEG_ONLY = 1
// the block is used where a negative result is not a valid value, and a result
// whose sign bit is set also counts as overflow. This XOR-inverted ripple-carry
// structure and the "negative result is overflow" option follow the design
// description; the width is a parameter (the design uses 7 bits, 6 plus sign, for
// the frequency path and a 10-bit version for the phase path, where the 10-bit
// word is unsigned and WIDTH = 11 carries its sign bit). Purely combinational.
module adder_subtractor #(
  parameter int unsigned WIDTH       = 7,
  parameter bit          NONNEG_ONLY = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,       // 1: a - b, 0: a + b
  output logic [WIDTH-1:0] sum,
  output logic             overflow
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] b_x;

  assign carry[0] = sub;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    assign b_x[i]     = b[i] ^ sub;
    assign sum[i]     = a[i] ^ b_x[i] ^ carry[i];
    assign carry[i+1] = (a[i] & b_x[i]) | (carry[i] & (a[i] ^ b_x[i]));
  end

  logic signed_ovf;
  assign signed_ovf = carry[WIDTH] ^ carry[WIDTH-1];
  assign overflow   = signed_ovf | (NONNEG_ONLY & sum[WIDTH-1]);
endmodule
