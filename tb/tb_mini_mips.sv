// End-to-end test of the Mini-MIPS processor at its default sizes.
//
// Phase 1 runs a hand-written program that contains the architecture's
// three worked examples (ADD R1,R1,R5; SW R5,0(R0); LW R3,0(R0)) and a
// counting loop closed by BEQ and JMP, and checks the final registers
// and memory against values worked out by hand, including the cycle count
// (one instruction per clock).
//
// Phase 2 loads random programs and, cycle by cycle, compares the PC,
// the ALU result and the write-back value with a reference instruction-
// set model in this file; after each run all registers are compared.
//
// Every mechanism must occur at least once: each of the nine
// instructions, BEQ taken and not taken, a backward branch, JMP, a write
// aimed at R0 or R1 (which must be ignored), reset returning the PC to 0.
module tb_mini_mips;
  import mips_pkg::*;
  logic        clk = 0, reset, load_we;
  logic [7:0]  load_addr, pc;
  logic [15:0] load_data, instruction, alu_result, write_back;
  logic        zero, carry, overflow;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_op [16];
  int n_taken = 0, n_not_taken = 0, n_backward = 0, n_const_write = 0, n_reset = 0;

  mini_mips dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- instruction encoders: {op, rs, rt, rd/offset} ----
  function automatic logic [15:0] rtype(input logic [3:0] op, rs, rt, rd);
    return {op, rs, rt, rd};
  endfunction
  function automatic logic [15:0] lw(input logic [3:0] rt, input int off, input logic [3:0] rs);
    return {4'b0000, rs, rt, 4'(off)};
  endfunction
  function automatic logic [15:0] sw(input logic [3:0] rt, input int off, input logic [3:0] rs);
    return {4'b0001, rs, rt, 4'(off)};
  endfunction
  function automatic logic [15:0] beq(input logic [3:0] rs, rt, input int off);
    return {4'b0111, rs, rt, 4'(off)};
  endfunction
  function automatic logic [15:0] jmp(input int off);
    return {4'b1000, 12'(off)};
  endfunction

  // ---- reference model ----
  logic [15:0] m_regs [16];
  logic [15:0] m_mem  [256];
  logic [15:0] m_prog [128];
  logic [7:0]  m_pc;

  function automatic logic [15:0] m_read(input logic [3:0] r);
    return (r == 0) ? 16'd0 : (r == 1) ? 16'd1 : m_regs[r];
  endfunction

  // Executes one instruction in the model; returns ALU result and
  // write-back value as the hardware should show them this cycle.
  task automatic m_step(output logic [15:0] exp_alu, output logic [15:0] exp_wb);
    logic [15:0] ins, a, b, offx;
    logic [3:0]  op, rs, rt, rd;
    logic [7:0]  next;
    ins = m_prog[m_pc[7:1]];
    {op, rs, rt, rd} = ins;
    a = m_read(rs); b = m_read(rt);
    offx = {{12{rd[3]}}, rd};
    next = m_pc + 8'd2;
    exp_alu = 16'd0; exp_wb = 16'd0;
    n_op[op]++;
    case (op)
      4'd0: begin exp_alu = a + offx; exp_wb = m_mem[exp_alu[7:0]];
                  if (rt > 1) m_regs[rt] = exp_wb; else n_const_write++; end
      4'd1: begin exp_alu = a + offx; exp_wb = exp_alu; m_mem[exp_alu[7:0]] = b; end
      4'd2, 4'd3, 4'd4, 4'd5, 4'd6: begin
        case (op)
          4'd2: exp_alu = a + b;
          4'd3: exp_alu = a - b;
          4'd4: exp_alu = a & b;
          4'd5: exp_alu = a | b;
          default: exp_alu = {15'b0, $signed(a) < $signed(b)};
        endcase
        exp_wb = exp_alu;
        if (rd > 1) m_regs[rd] = exp_alu; else n_const_write++;
      end
      4'd7: begin
        exp_alu = a - b; exp_wb = exp_alu;
        if (a == b) begin
          next = m_pc + 8'd2 + {offx[6:0], 1'b0};
          n_taken++;
          if (rd[3]) n_backward++;
        end else n_not_taken++;
      end
      4'd8: begin exp_alu = 16'd0 + 16'd0; exp_wb = exp_alu; next = {ins[6:0], 1'b0}; end
      default: begin exp_alu = a + b; exp_wb = exp_alu; end
    endcase
    m_pc = next;
  endtask

  task automatic expect16(input string what, input logic [15:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  function automatic logic [15:0] hw_reg(input int r);
    return (r == 0) ? 16'd0 : (r == 1) ? 16'd1 : dut.u_dp.u_rf.regs[r];
  endfunction

  task automatic load_program(input logic [15:0] p [128]);
    reset = 1;
    for (int w = 0; w < 128; w++) begin
      load_we = 1; load_addr = 8'(2 * w); load_data = p[w];
      @(posedge clk); #1;
    end
    load_we = 0;
    @(posedge clk); #1;
    n_reset++;
    checks++;
    if (pc !== 8'h00) begin failures++; $display("FAIL pc after reset = %h", pc); end
    reset = 0;
  endtask

  // Runs `cycles` clock cycles comparing against the model each cycle.
  task automatic run_lockstep(input int cycles);
    logic [15:0] ea, ew;
    m_pc = 0;
    for (int r = 0; r < 16; r++) m_regs[r] = 16'd0;
    for (int c = 0; c < cycles; c++) begin
      expect16("pc", {8'h0, pc}, {8'h0, m_pc});
      expect16("instruction", instruction, m_prog[m_pc[7:1]]);
      m_step(ea, ew);
      // Write-back and ALU result only matter where the hardware uses them.
      if (instruction[15:12] <= 4'd7) expect16("alu", alu_result, ea);
      if (instruction[15:12] == 4'd0 ||
          (instruction[15:12] >= 4'd2 && instruction[15:12] <= 4'd6))
        expect16("write_back", write_back, ew);
      @(posedge clk); #1;
    end
    for (int r = 0; r < 16; r++) expect16($sformatf("R%0d", r), hw_reg(r), m_read(4'(r)));
  endtask

  logic [15:0] prog [128];

  initial begin
    reset = 1; load_we = 0; load_addr = 0; load_data = 0;
    foreach (n_op[i]) n_op[i] = 0;

    // ---------------- Phase 1: directed program ----------------
    foreach (prog[i]) prog[i] = beq(4'd0, 4'd0, -1);     // self-loop filler
    prog[0]  = rtype(4'd2, 4'd1, 4'd1, 4'd5);   // ADD R1,R1,R5   R5 = 2
    prog[1]  = sw(4'd5, 0, 4'd0);               // SW  R5,0(R0)   mem[0] = 2
    prog[2]  = lw(4'd3, 0, 4'd0);               // LW  R3,0(R0)   R3 = 2
    prog[3]  = rtype(4'd2, 4'd3, 4'd1, 4'd3);   // ADD R3,R1,R3   R3 = 3 (loop count)
    prog[4]  = rtype(4'd2, 4'd0, 4'd0, 4'd4);   // ADD R0,R0,R4   R4 = 0 (sum)
    prog[5]  = rtype(4'd2, 4'd4, 4'd3, 4'd4);   // 10: ADD R4,R3,R4  sum += R3
    prog[6]  = rtype(4'd3, 4'd3, 4'd1, 4'd3);   // SUB R3,R1,R3   R3 -= 1
    prog[7]  = beq(4'd3, 4'd0, 1);              // BEQ R3,R0,+1   exit to 18
    prog[8]  = jmp(5);                          // JMP 5          back to 10
    prog[9]  = sw(4'd4, 2, 4'd0);               // 18: SW R4,2(R0)  mem[2] = 6
    prog[10] = lw(4'd6, 2, 4'd0);               // LW  R6,2(R0)   R6 = 6
    prog[11] = rtype(4'd6, 4'd1, 4'd6, 4'd7);   // SLT R1,R6,R7   R7 = 1
    prog[12] = rtype(4'd6, 4'd6, 4'd1, 4'd8);   // SLT R6,R1,R8   R8 = 0
    prog[13] = rtype(4'd4, 4'd6, 4'd5, 4'd9);   // AND R6,R5,R9   R9 = 2
    prog[14] = rtype(4'd5, 4'd6, 4'd1, 4'd10);  // OR  R6,R1,R10  R10 = 7
    prog[15] = rtype(4'd2, 4'd1, 4'd1, 4'd1);   // ADD R1,R1,R1   ignored
    prog[16] = rtype(4'd3, 4'd0, 4'd1, 4'd11);  // SUB R0,R1,R11  R11 = -1
    prog[17] = sw(4'd11, -1, 4'd10);            // SW  R11,-1(R10) mem[6] = FFFF
    prog[18] = lw(4'd12, 6, 4'd0);              // LW  R12,6(R0)  R12 = FFFF
    prog[19] = beq(4'd0, 4'd0, -1);             // 38: halt (branch to itself)
    m_prog = prog;
    m_mem  = dut.u_dp.u_dmem.mem;
    load_program(prog);
    // 5 set-up instructions, loop 4 + 4 + 3 (the last pass skips the JMP),
    // then 10 more: the halt at address 38 is reached after 26 cycles.
    run_lockstep(26);
    expect16("halt pc", {8'h0, pc}, 16'd38);
    @(posedge clk); #1;
    expect16("halt pc stays", {8'h0, pc}, 16'd38);
    expect16("R5", hw_reg(5), 16'd2);
    expect16("R3", hw_reg(3), 16'd0);
    expect16("R4", hw_reg(4), 16'd6);
    expect16("R6", hw_reg(6), 16'd6);
    expect16("R7", hw_reg(7), 16'd1);
    expect16("R8", hw_reg(8), 16'd0);
    expect16("R9", hw_reg(9), 16'd2);
    expect16("R10", hw_reg(10), 16'd7);
    expect16("R11", hw_reg(11), 16'hFFFF);
    expect16("R12", hw_reg(12), 16'hFFFF);
    expect16("mem[0]", dut.u_dp.u_dmem.mem[0], 16'd2);
    expect16("mem[2]", dut.u_dp.u_dmem.mem[2], 16'd6);
    expect16("mem[6]", dut.u_dp.u_dmem.mem[6], 16'hFFFF);

    // ---------------- Phase 2: random programs in lockstep ----------------
    for (int run = 0; run < 20; run++) begin
      for (int w = 0; w < 128; w++) begin
        logic [3:0] op;
        op = 4'($urandom % 10);            // mostly defined opcodes
        if (op == 4'd9) op = 4'($urandom); // sometimes any code
        prog[w] = {op, 4'($urandom), 4'($urandom), 4'($urandom)};
        if (op == 4'd7 && ($urandom % 4 == 0)) prog[w][7:4] = prog[w][11:8]; // BEQ Rs,Rs
        if (op == 4'd7 && prog[w][3:0] == 4'hF) prog[w][3:0] = 4'h1;       // no self-loop
      end
      m_prog = prog;
      m_mem  = dut.u_dp.u_dmem.mem;
      load_program(prog);
      run_lockstep(300);
    end

    // ---------------- Mechanism coverage ----------------
    $display("op counts: LW=%0d SW=%0d ADD=%0d SUB=%0d AND=%0d OR=%0d SLT=%0d BEQ=%0d JMP=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7], n_op[8]);
    $display("beq taken=%0d not_taken=%0d backward=%0d const_reg_writes=%0d resets=%0d",
             n_taken, n_not_taken, n_backward, n_const_write, n_reset);
    for (int i = 0; i <= 8; i++) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL opcode %0d never ran", i); end
    end
    checks += 5;
    if (n_taken == 0)       begin failures++; $display("FAIL no taken branch"); end
    if (n_not_taken == 0)   begin failures++; $display("FAIL no untaken branch"); end
    if (n_backward == 0)    begin failures++; $display("FAIL no backward branch"); end
    if (n_const_write == 0) begin failures++; $display("FAIL no write to R0/R1"); end
    if (n_reset == 0)       begin failures++; $display("FAIL no reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
