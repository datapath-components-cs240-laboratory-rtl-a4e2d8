// Self-checking test of the main decoder: every 4-bit opcode is applied
// and the control lines are compared with a table written out here from
// the instruction meanings (active-low MemRd/MemWr; LW, SW and ADD rows
// as in the architecture's worked examples; undefined opcodes write
// nothing).
module tb_control_unit;
  import mips_pkg::*;
  logic [3:0] opcode;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.opcode, .ctrl);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {RegDst, RegWr, ALUSrc, MemRd_n, MemWr_n, MemtoReg, ALUOp[3:0], Branch, Jump}
  function automatic logic [11:0] expected(input int op);
    case (op)
      0: return {6'b111011, 4'd2, 2'b00};  // LW
      1: return {6'b101100, 4'd2, 2'b00};  // SW
      2: return {6'b010110, 4'd2, 2'b00};  // ADD
      3: return {6'b010110, 4'd6, 2'b00};  // SUB
      4: return {6'b010110, 4'd0, 2'b00};  // AND
      5: return {6'b010110, 4'd1, 2'b00};  // OR
      6: return {6'b010110, 4'd7, 2'b00};  // SLT
      7: return {6'b000110, 4'd6, 2'b10};  // BEQ
      8: return {6'b000110, 4'd2, 2'b01};  // JMP
      default: return {6'b000110, 4'd2, 2'b00};
    endcase
  endfunction

  initial begin
    for (int op = 0; op < 16; op++) begin
      logic [11:0] got, exp;
      opcode = 4'(op);
      #1;
      got = {ctrl.reg_dst, ctrl.reg_wr, ctrl.alu_src, ctrl.mem_rd_n, ctrl.mem_wr_n,
             ctrl.mem_to_reg, 4'(ctrl.alu_op), ctrl.branch, ctrl.jump};
      exp = expected(op);
      checks++;
      if (got !== exp) begin
        failures++; $display("FAIL op=%0d got=%b exp=%b", op, got, exp);
      end
      // Rules that must hold whatever the don't-cares are.
      checks++;
      if ((ctrl.reg_wr && !ctrl.mem_wr_n) || (!ctrl.mem_rd_n && !ctrl.mem_wr_n) ||
          (ctrl.branch && ctrl.jump)) begin
        failures++; $display("FAIL op=%0d conflicting lines", op);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
