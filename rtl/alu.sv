// 16-bit ALU of the Mini-MIPS.
//
// A 4-bit ALUOp selects one of five functions of inputs a (always Rs) and
// b (Rt or the sign-extended offset):
//   0 a AND b, 1 a OR b, 2 a + b, 6 a - b, 7 set on less than (result 1
//   if a < b, else 0).
// Zero is 1 when the result is 0; BEQ uses it after a subtraction to test
// Rs = Rt. The code table and Zero follow the architecture. This
// design's own choices: the comparison of set-on-less-than is signed
// (two's complement); undefined ALUOp codes give 0; Carry and Overflow
// are reported for add and subtract (Carry is the adder's carry out, on
// subtraction 1 means no borrow; Overflow is two's-complement overflow)
// and are 0 for the other functions. Purely combinational.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_t          alu_op,
  output logic [WIDTH-1:0] result,
  output logic             zero,
  output logic             carry,
  output logic             overflow
);
  logic [WIDTH:0] sum_ext;   // a + b with carry
  logic [WIDTH:0] diff_ext;  // a + ~b + 1 with carry

  always_comb begin
    sum_ext  = {1'b0, a} + {1'b0, b};
    diff_ext = {1'b0, a} + {1'b0, ~b} + {{WIDTH{1'b0}}, 1'b1};
    result   = '0;
    carry    = 1'b0;
    overflow = 1'b0;
    unique case (alu_op)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: begin
        result   = sum_ext[WIDTH-1:0];
        carry    = sum_ext[WIDTH];
        overflow = (a[WIDTH-1] == b[WIDTH-1]) && (result[WIDTH-1] != a[WIDTH-1]);
      end
      ALU_SUB: begin
        result   = diff_ext[WIDTH-1:0];
        carry    = diff_ext[WIDTH];
        overflow = (a[WIDTH-1] != b[WIDTH-1]) && (result[WIDTH-1] != a[WIDTH-1]);
      end
      ALU_SLT: result = {{(WIDTH-1){1'b0}}, ($signed(a) < $signed(b))};
      default: result = '0;
    endcase
    zero = (result == '0);
  end
endmodule
