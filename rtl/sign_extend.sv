// Sign extension from IN_W to OUT_W bits (two's complement).
//
// The 4-bit offset field of LW, SW and BEQ is widened by copying its top
// bit: to 16 bits as the ALU's second operand, to 8 bits before it is
// added to the PC. Combinational. Defaults 4 -> 16 are the datapath's.
module sign_extend #(
  parameter int unsigned IN_W  = 4,
  parameter int unsigned OUT_W = 16
) (
  input  logic [IN_W-1:0]  din,
  output logic [OUT_W-1:0] dout
);
  always_comb dout = {{(OUT_W-IN_W){din[IN_W-1]}}, din};
endmodule
