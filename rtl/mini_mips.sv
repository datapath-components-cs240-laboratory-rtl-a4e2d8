// Mini-MIPS: a single-cycle 16-bit processor with an 8-bit address bus.
//
// Nine instructions (LW, SW, ADD, SUB, AND, OR, SLT, BEQ, JMP), sixteen
// registers with R0 = 0 and R1 = 1, separate instruction and data
// memories. Each clock cycle fetches the instruction at the PC, decodes
// its opcode into control lines, reads Rs and Rt, runs the ALU, accesses
// data memory, writes a register and loads the next PC: one instruction
// per cycle. Reset (synchronous, active high) sets the PC to 0, where
// every program starts, and clears R2-R15.
//
// Interface: the program is written into instruction memory through the
// load port (load_we, byte address load_addr, load_data), normally while
// reset is held. pc, instruction, alu_result, write_back and the ALU
// flags are brought out for observation.
module mini_mips
  import mips_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [DATA_W-1:0] load_data,
  output logic [ADDR_W-1:0] pc,
  output logic [DATA_W-1:0] instruction,
  output logic [DATA_W-1:0] alu_result,
  output logic [DATA_W-1:0] write_back,
  output logic              zero,
  output logic              carry,
  output logic              overflow
);
  instr_t            ins;
  ctrl_t             ctrl;

  always_comb ins = instr_t'(instruction);

  instruction_fetch u_fetch (
    .clk, .reset,
    .branch(ctrl.branch), .zero, .jump(ctrl.jump),
    .pc, .instruction,
    .load_we, .load_addr, .load_data
  );

  control_unit u_ctrl (
    .opcode(ins.op), .ctrl
  );

  datapath u_dp (
    .clk, .reset,
    .rs(ins.rs), .rt(ins.rt), .rd(ins.rd),
    .ctrl,
    .read_data1(), .read_data2(),
    .alu_result, .write_back,
    .zero, .carry, .overflow
  );
endmodule
