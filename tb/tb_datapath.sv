// Self-checking test of the execution datapath driven by explicit control
// lines, as on a lab bench. It first replays the architecture's three
// worked examples (ADD R1+R1 -> R5 = 2; SW R5 to address 0; LW address 0
// into R3 = 2) with the control values of those examples, then runs
// random R-type, LW and SW operations against a reference model of the
// registers and the memory, checking the ALU result, the write-back value
// and the register contents read back through both ports.
module tb_datapath;
  import mips_pkg::*;
  logic        clk = 0, reset;
  logic [3:0]  rs, rt, rd;
  ctrl_t       ctrl;
  logic [15:0] read_data1, read_data2, alu_result, write_back;
  logic        zero, carry, overflow;
  logic [15:0] regs [16];
  logic [15:0] mem  [256];
  logic        mem_valid [256];
  int checks = 0, failures = 0;

  datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_ctrl(input logic [3:0] aluop, input logic rw, rdst, asrc, mrd, mwr, m2r);
    ctrl.alu_op = alu_op_t'(aluop); ctrl.reg_wr = rw; ctrl.reg_dst = rdst;
    ctrl.alu_src = asrc; ctrl.mem_rd_n = mrd; ctrl.mem_wr_n = mwr; ctrl.mem_to_reg = m2r;
    ctrl.branch = 0; ctrl.jump = 0;
  endtask

  task automatic expect16(input string what, input logic [15:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  task automatic read_reg(input logic [3:0] r, output logic [15:0] v);
    rs = r; set_ctrl(4'd2, 0, 0, 0, 1, 1, 0);
    #1 v = read_data1;
  endtask

  function automatic logic [15:0] alu_model(input int op, input logic [15:0] a, b);
    case (op)
      0: return a & b;
      1: return a | b;
      2: return a + b;
      6: return a - b;
      7: return {15'b0, $signed(a) < $signed(b)};
      default: return 16'h0;
    endcase
  endfunction

  initial begin
    logic [15:0] v;
    reset = 1; rs = 0; rt = 0; rd = 0; set_ctrl(4'd2, 0, 0, 0, 1, 1, 0);
    @(posedge clk); #1 reset = 0;
    foreach (regs[i]) regs[i] = '0;
    regs[1] = 16'd1;
    foreach (mem_valid[i]) mem_valid[i] = 0;

    // Worked example 1: ALUop 2, Rs 1, Rt 1, Rd 5, RegWrite 1, RegDst 0,
    // ALUSrc 0, MemRead 1, MemWrite 1, MemtoReg 0 -> ALU result 2, R5 = 2.
    rs = 1; rt = 1; rd = 5; set_ctrl(4'd2, 1, 0, 0, 1, 1, 0);
    #1 expect16("ex1 alu", alu_result, 16'd2);
    @(posedge clk); #1;
    read_reg(5, v); expect16("ex1 R5", v, 16'd2);
    regs[5] = 16'd2;

    // Worked example 2 (SW): ALUop 2, Rs 0, Rt 5, Rd 0, RegWrite 0,
    // RegDst 1, ALUSrc 1, MemRead 1, MemWrite 0 -> address 0 gets R5 = 2.
    rs = 0; rt = 5; rd = 0; set_ctrl(4'd2, 0, 1, 1, 1, 0, 0);
    #1 expect16("ex2 alu", alu_result, 16'd0);
    @(posedge clk); #1;
    mem[0] = 16'd2; mem_valid[0] = 1;

    // Worked example 3 (LW): ALUop 2, Rs 0, Rt 3, Rd 0, RegWrite 1,
    // RegDst 1, ALUSrc 1, MemRead 0, MemWrite 1, MemtoReg 1 -> R3 = 2.
    rs = 0; rt = 3; rd = 0; set_ctrl(4'd2, 1, 1, 1, 0, 1, 1);
    #1 expect16("ex3 alu", alu_result, 16'd0);
    expect16("ex3 wb", write_back, 16'd2);
    @(posedge clk); #1;
    read_reg(3, v); expect16("ex3 R3", v, 16'd2);
    regs[3] = 16'd2;

    // Random operations against the reference model.
    for (int n = 0; n < 2000; n++) begin
      int kind;
      logic [15:0] a, b, exp_alu, offx, exp_wb;
      logic [3:0]  dst;
      logic [7:0]  adr;
      kind = int'($urandom % 7);
      rs = 4'($urandom); rt = 4'($urandom); rd = 4'($urandom);
      a = regs[rs];
      offx = {{12{rd[3]}}, rd};
      case (kind)
        0, 1, 2, 3, 4: begin  // R-type: AND, OR, ADD, SUB, SLT
          int code;
          code = (kind == 0) ? 0 : (kind == 1) ? 1 : (kind == 2) ? 2 : (kind == 3) ? 6 : 7;
          b = regs[rt];
          exp_alu = alu_model(code, a, b);
          set_ctrl(4'(code), 1, 0, 0, 1, 1, 0);
          #1 expect16("rtype alu", alu_result, exp_alu);
          expect16("rtype zero", {15'b0, zero}, {15'b0, exp_alu == 0});
          @(posedge clk); #1;
          dst = rd;
          if (dst > 1) regs[dst] = exp_alu;
        end
        5: begin  // SW Rt, offset(Rs)
          exp_alu = a + offx;
          adr = exp_alu[7:0];
          set_ctrl(4'd2, 0, 1, 1, 1, 0, 0);
          #1 expect16("sw alu", alu_result, exp_alu);
          @(posedge clk); #1;
          mem[adr] = regs[rt]; mem_valid[adr] = 1;
        end
        default: begin  // LW Rt, offset(Rs) from an address written before
          exp_alu = a + offx;
          adr = exp_alu[7:0];
          if (mem_valid[adr]) begin
            exp_wb = mem[adr];
            set_ctrl(4'd2, 1, 1, 1, 0, 1, 1);
            #1 expect16("lw alu", alu_result, exp_alu);
            expect16("lw wb", write_back, exp_wb);
            @(posedge clk); #1;
            if (rt > 1) regs[rt] = exp_wb;
          end
        end
      endcase
      // Read two registers back through both ports.
      rs = 4'($urandom); rt = 4'($urandom); set_ctrl(4'd2, 0, 0, 0, 1, 1, 0);
      #1 expect16("port1", read_data1, regs[rs]);
      expect16("port2", read_data2, regs[rt]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
