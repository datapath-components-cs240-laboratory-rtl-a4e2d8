// Main decoder: opcode -> control lines of the single-cycle datapath.
//
//   op   instr  RegDst RegWr ALUSrc MemRd MemWr MemtoReg ALUOp Branch Jump
//   0000 LW       1      1     1      0     1      1       add    0     0
//   0001 SW       1      0     1      1     0      0       add    0     0
//   0010 ADD      0      1     0      1     1      0       add    0     0
//   0011 SUB      0      1     0      1     1      0       sub    0     0
//   0100 AND      0      1     0      1     1      0       and    0     0
//   0101 OR       0      1     0      1     1      0       or     0     0
//   0110 SLT      0      1     0      1     1      0       slt    0     0
//   0111 BEQ      0      0     0      1     1      0       sub    1     0
//   1000 JMP      0      0     0      1     1      0       add    0     1
// MemRd/MemWr are active low. The LW, SW and ADD rows match the
// architecture's worked examples; the others follow from the meaning of
// each line. Don't-care lines (RegDst of SW, BEQ and JMP; ALUOp of JMP)
// are fixed at the values shown, which is this design's choice, and
// unused opcodes 1001-1111 decode as a no-operation (nothing written,
// PC + 2). Purely combinational. Immediate assertions guard the rules
// every decode must keep: no register write together with a memory write,
// no memory read and write at once, never Branch and Jump together.
module control_unit
  import mips_pkg::*;
(
  input  logic [3:0] opcode,
  output ctrl_t      ctrl
);
  always_comb begin
    // Defaults: nothing written, memory idle, PC + 2.
    ctrl.reg_dst    = 1'b0;
    ctrl.reg_wr     = 1'b0;
    ctrl.alu_src    = 1'b0;
    ctrl.mem_rd_n   = 1'b1;
    ctrl.mem_wr_n   = 1'b1;
    ctrl.mem_to_reg = 1'b0;
    ctrl.alu_op     = ALU_ADD;
    ctrl.branch     = 1'b0;
    ctrl.jump       = 1'b0;
    case (opcode)
      OP_LW: begin
        ctrl.reg_dst    = 1'b1;
        ctrl.reg_wr     = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.mem_rd_n   = 1'b0;
        ctrl.mem_to_reg = 1'b1;
      end
      OP_SW: begin
        ctrl.reg_dst  = 1'b1;
        ctrl.alu_src  = 1'b1;
        ctrl.mem_wr_n = 1'b0;
      end
      OP_ADD: begin ctrl.reg_wr = 1'b1; ctrl.alu_op = ALU_ADD; end
      OP_SUB: begin ctrl.reg_wr = 1'b1; ctrl.alu_op = ALU_SUB; end
      OP_AND: begin ctrl.reg_wr = 1'b1; ctrl.alu_op = ALU_AND; end
      OP_OR:  begin ctrl.reg_wr = 1'b1; ctrl.alu_op = ALU_OR;  end
      OP_SLT: begin ctrl.reg_wr = 1'b1; ctrl.alu_op = ALU_SLT; end
      OP_BEQ: begin ctrl.branch = 1'b1; ctrl.alu_op = ALU_SUB; end
      OP_JMP: ctrl.jump = 1'b1;
      default: ;
    endcase
  end

  always_comb begin
    assert (!(ctrl.reg_wr && !ctrl.mem_wr_n))    else $error("RegWr with MemWr");
    assert (!(!ctrl.mem_rd_n && !ctrl.mem_wr_n)) else $error("MemRd with MemWr");
    assert (!(ctrl.branch && ctrl.jump))         else $error("Branch with Jump");
  end
endmodule
