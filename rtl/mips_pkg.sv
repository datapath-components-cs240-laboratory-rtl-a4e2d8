// Shared widths, encodings and the control-word type of the Mini-MIPS.
//
// The machine has a 16-bit data bus, an 8-bit address bus and sixteen
// 16-bit registers. An instruction is one 16-bit word split into four
// 4-bit fields: opcode, Rs, Rt, Rd (Rd doubles as the 4-bit offset of LW,
// SW and BEQ; Rs/Rt/Rd together form the 12-bit offset of JMP). The
// opcode values and the ALUOp codes below are the architecture's own;
// placing the opcode in bits 15:12 and the fields below it in the order
// they are listed is this design's reading of the instruction table.
package mips_pkg;

  localparam int unsigned DATA_W  = 16;  // data bus
  localparam int unsigned ADDR_W  = 8;   // address bus (PC and memory address)
  localparam int unsigned NREGS   = 16;  // register count
  localparam int unsigned REG_AW  = 4;   // register index width
  localparam int unsigned OFF_W   = 4;   // LW/SW/BEQ offset field
  localparam int unsigned JOFF_W  = 12;  // JMP offset field

  typedef enum logic [3:0] {
    OP_LW  = 4'b0000,
    OP_SW  = 4'b0001,
    OP_ADD = 4'b0010,
    OP_SUB = 4'b0011,
    OP_AND = 4'b0100,
    OP_OR  = 4'b0101,
    OP_SLT = 4'b0110,
    OP_BEQ = 4'b0111,
    OP_JMP = 4'b1000
  } opcode_t;

  // ALUOp is four bits wide; only these five codes are defined.
  typedef enum logic [3:0] {
    ALU_AND = 4'd0,
    ALU_OR  = 4'd1,
    ALU_ADD = 4'd2,
    ALU_SUB = 4'd6,
    ALU_SLT = 4'd7
  } alu_op_t;

  // Instruction word fields.
  typedef struct packed {
    opcode_t             op;
    logic [REG_AW-1:0]   rs;
    logic [REG_AW-1:0]   rt;
    logic [REG_AW-1:0]   rd;   // also the 4-bit offset
  } instr_t;

  // Control lines. MemRd and MemWr are active low, as in the
  // architecture: 0 reads / writes the data memory, 1 leaves it alone.
  typedef struct packed {
    logic    reg_dst;    // 0: write Rd, 1: write Rt
    logic    reg_wr;     // 1: write the register file
    logic    alu_src;    // 0: ALU B is Rt data, 1: sign-extended offset
    logic    mem_rd_n;   // 0: data memory read
    logic    mem_wr_n;   // 0: data memory written
    logic    mem_to_reg; // 0: write back ALU result, 1: memory data
    alu_op_t alu_op;
    logic    branch;     // 1 on BEQ
    logic    jump;       // 1 on JMP
  } ctrl_t;

endpackage
