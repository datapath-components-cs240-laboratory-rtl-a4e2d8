// Unsigned adder of parameterised width, carry out discarded.
//
// Used twice in instruction fetch: PC + 2, and (PC + 2) + 2*offset for
// the branch target. Results wrap modulo 2^WIDTH, so a backward branch
// (negative offset in two's complement) works. Combinational. The
// default width of 8 is the address-bus width.
module adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);
  always_comb sum = a + b;
endmodule
