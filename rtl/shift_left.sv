// Logical left shift by a fixed amount, zeros shifted in.
//
// Turns the branch offset, counted in instructions, into a byte offset:
// instructions are two address units apart, so the offset is shifted left
// by one. Bits shifted out of the top are lost. Combinational. Defaults
// (8 bits, shift 1) are the branch-address path's.
module shift_left #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned SHIFT = 1
) (
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  always_comb dout = din << SHIFT;
endmodule
