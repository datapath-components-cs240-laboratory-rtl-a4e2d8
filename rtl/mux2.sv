// Two-to-one multiplexer of parameterised width.
//
// The Mini-MIPS uses four of them: the 2x8 next-PC selector, the 2x4
// write-register selector (RegDst), the 2x16 ALU B-operand selector
// (ALUSrc) and the 2x16 write-back selector (MemtoReg). sel = 0 passes
// d0, sel = 1 passes d1. Purely combinational. The default width of 16
// is the data-bus width.
module mux2 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
