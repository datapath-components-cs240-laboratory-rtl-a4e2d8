// Execution datapath: register file, ALU, data memory and their muxes.
//
// Given the register fields Rs, Rt, Rd of an instruction and the control
// lines, it completes the instruction in one cycle:
//   - Rs and Rt are read; ALU input A is always Rs data.
//   - ALUSrc picks ALU input B: 0 Rt data, 1 the sign-extended Rd field
//     (the 4-bit offset of LW/SW).
//   - The low 8 bits of the ALU result address the data memory, whose
//     Write data is Rt data; MemRd/MemWr (active low) enable it.
//   - MemtoReg picks the write-back value: 0 ALU result, 1 memory data.
//   - RegDst picks the write register: 0 Rd, 1 Rt (for LW). It is written
//     on the rising clock edge if RegWr = 1.
// Zero, Carry and Overflow come straight from the ALU. Everything here
// follows the architecture. Its block diagram numbers the inputs of the
// register-select multiplexer the other way round (0 Rt, 1 Rd); the sense
// used here is the one its control-line definition and worked examples
// give.
module datapath
  import mips_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic [REG_AW-1:0] rs,
  input  logic [REG_AW-1:0] rt,
  input  logic [REG_AW-1:0] rd,
  input  ctrl_t             ctrl,
  output logic [DATA_W-1:0] read_data1,
  output logic [DATA_W-1:0] read_data2,
  output logic [DATA_W-1:0] alu_result,
  output logic [DATA_W-1:0] write_back,
  output logic              zero,
  output logic              carry,
  output logic              overflow
);
  logic [REG_AW-1:0] write_reg;
  logic [DATA_W-1:0] offset_ext, alu_b, mem_rdata;

  mux2 #(.WIDTH(REG_AW)) u_mux_regdst (
    .sel(ctrl.reg_dst), .d0(rd), .d1(rt), .y(write_reg)
  );

  register_file #(.WIDTH(DATA_W), .NUM(NREGS), .AW(REG_AW)) u_rf (
    .clk, .reset,
    .reg_write (ctrl.reg_wr),
    .read_reg1 (rs),
    .read_reg2 (rt),
    .write_reg,
    .write_data(write_back),
    .read_data1,
    .read_data2
  );

  sign_extend #(.IN_W(OFF_W), .OUT_W(DATA_W)) u_sext (
    .din(rd), .dout(offset_ext)
  );

  mux2 #(.WIDTH(DATA_W)) u_mux_alusrc (
    .sel(ctrl.alu_src), .d0(read_data2), .d1(offset_ext), .y(alu_b)
  );

  alu #(.WIDTH(DATA_W)) u_alu (
    .a(read_data1), .b(alu_b), .alu_op(ctrl.alu_op),
    .result(alu_result), .zero, .carry, .overflow
  );

  data_memory #(.WIDTH(DATA_W), .AW(ADDR_W)) u_dmem (
    .clk,
    .mem_rd_n  (ctrl.mem_rd_n),
    .mem_wr_n  (ctrl.mem_wr_n),
    .address   (alu_result[ADDR_W-1:0]),
    .write_data(read_data2),
    .read_data (mem_rdata)
  );

  mux2 #(.WIDTH(DATA_W)) u_mux_memtoreg (
    .sel(ctrl.mem_to_reg), .d0(alu_result), .d1(mem_rdata), .y(write_back)
  );
endmodule
