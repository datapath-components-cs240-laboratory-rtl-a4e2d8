// Instruction fetch: PC, instruction memory and next-PC logic.
//
// Every cycle the instruction at the PC is read and the next PC is chosen:
//   PC + 2                              normally,
//   PC + 2 + 2*sext(offset)             on BEQ when Branch = 1 and Zero = 1,
//   2*offset12 (low 8 bits)             on JMP.
// The 4-bit offset (instruction bits 3:0) is sign-extended to 8 bits and
// shifted left by one, then added to PC + 2; a 2x8 multiplexer picks
// PC + 2 or that branch target under Branch AND Zero. All of that is the
// architecture's. The architecture defines JMP but its fetch datapath
// shows only the branch path; the jump path is this design's own: a
// second 2x8 multiplexer after the branch one selects the jump address
// (the 12-bit offset times 2, cut to the 8-bit address bus). Zero comes from the ALU in the same cycle, so
// the whole machine completes one instruction per clock. The program is
// written through the instruction memory's load port.
module instruction_fetch
  import mips_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              branch,
  input  logic              zero,
  input  logic              jump,
  output logic [ADDR_W-1:0] pc,
  output logic [DATA_W-1:0] instruction,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [DATA_W-1:0] load_data
);
  logic [ADDR_W-1:0] pc_plus2, offset_ext, offset_x2, branch_target;
  logic [ADDR_W-1:0] pc_after_branch, jump_target, pc_next;
  logic [JOFF_W:0]   jump_full;
  logic              take_branch;
  instr_t            ins;

  always_comb ins = instr_t'(instruction);

  pc_register #(.WIDTH(ADDR_W)) u_pc (
    .clk, .reset, .pc_next, .pc
  );

  instruction_memory #(.WIDTH(DATA_W), .AW(ADDR_W)) u_imem (
    .clk, .read_address(pc), .instruction, .load_we, .load_addr, .load_data
  );

  adder #(.WIDTH(ADDR_W)) u_add_pc2 (
    .a(pc), .b(ADDR_W'(2)), .sum(pc_plus2)
  );

  sign_extend #(.IN_W(OFF_W), .OUT_W(ADDR_W)) u_sext (
    .din(ins.rd), .dout(offset_ext)
  );

  shift_left #(.WIDTH(ADDR_W), .SHIFT(1)) u_shl (
    .din(offset_ext), .dout(offset_x2)
  );

  adder #(.WIDTH(ADDR_W)) u_add_br (
    .a(pc_plus2), .b(offset_x2), .sum(branch_target)
  );

  always_comb take_branch = branch & zero;

  mux2 #(.WIDTH(ADDR_W)) u_mux_br (
    .sel(take_branch), .d0(pc_plus2), .d1(branch_target), .y(pc_after_branch)
  );

  // JMP: absolute address = 12-bit offset * 2, truncated to the address bus.
  always_comb begin
    jump_full   = {instruction[JOFF_W-1:0], 1'b0};
    jump_target = jump_full[ADDR_W-1:0];
  end

  mux2 #(.WIDTH(ADDR_W)) u_mux_jmp (
    .sel(jump), .d0(pc_after_branch), .d1(jump_target), .y(pc_next)
  );
endmodule
