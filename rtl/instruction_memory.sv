// Instruction memory: program store addressed by the PC.
//
// The PC is a byte address and instructions are 16 bits, so the program
// occupies even addresses 0, 2, 4, ... and the word index is the PC with
// its lowest bit dropped: 2^(AW-1) = 128 instructions for an 8-bit
// address. Read address -> Instruction is combinational, so an
// instruction is fetched and executed in the same cycle. This design's
// own choice: the program is written through a load port (load_we,
// load_addr as a byte address, load_data) on the rising clock edge,
// normally while the processor is held in reset.
module instruction_memory
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter int unsigned AW    = ADDR_W
) (
  input  logic             clk,
  input  logic [AW-1:0]    read_address,
  output logic [WIDTH-1:0] instruction,
  input  logic             load_we,
  input  logic [AW-1:0]    load_addr,
  input  logic [WIDTH-1:0] load_data
);
  logic [WIDTH-1:0] mem [2**(AW-1)];

  always_comb instruction = mem[read_address[AW-1:1]];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW-1:1]] <= load_data;
  end
endmodule
