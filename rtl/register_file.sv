// Register file: sixteen 16-bit registers, two read ports, one write port.
//
// R0 always reads 0 and R1 always reads 1; R2-R15 are general purpose.
// Reads are combinational (Read register 1/2 -> Read data 1/2). A write
// of Write data into Write register happens on the rising clock edge
// while RegWrite is 1; writes to R0 and R1 are ignored so the two
// constants hold. The constants and the port set follow the
// architecture. This design's own choices: synchronous active-high reset
// that clears R2-R15 to 0, and no bypass of a same-cycle write to the
// read ports (a read sees the old value until the edge).
module register_file
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter int unsigned NUM   = NREGS,
  parameter int unsigned AW    = REG_AW
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             reg_write,
  input  logic [AW-1:0]    read_reg1,
  input  logic [AW-1:0]    read_reg2,
  input  logic [AW-1:0]    write_reg,
  input  logic [WIDTH-1:0] write_data,
  output logic [WIDTH-1:0] read_data1,
  output logic [WIDTH-1:0] read_data2
);
  logic [WIDTH-1:0] regs [NUM];

  function automatic logic [WIDTH-1:0] read_port(input logic [AW-1:0] idx,
                                                 input logic [WIDTH-1:0] stored);
    if (idx == AW'(0))      return '0;
    else if (idx == AW'(1)) return WIDTH'(1);
    else                    return stored;
  endfunction

  always_comb begin
    read_data1 = read_port(read_reg1, regs[read_reg1]);
    read_data2 = read_port(read_reg2, regs[read_reg2]);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < int'(NUM); i++) regs[i] <= '0;
    end else if (reg_write && write_reg > AW'(1)) begin
      regs[write_reg] <= write_data;
    end
  end
endmodule
