// Data memory: 2^AW words of 16 bits for LW and SW.
//
// The address is the low AW bits of the ALU result (Rs + offset); each
// address holds one 16-bit word. Both enables are active low, as the
// architecture defines them: with MemRd = 0 the word at the address
// appears on Read data (combinationally); with MemWr = 0 the Write data
// (Rt) is stored at the address. The write is taken on the rising clock
// edge, so the clock gates the write enable. This design's own choices:
// Read data is 0 while MemRd = 1, a word-per-address organisation, and
// no reset of the contents.
module data_memory
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter int unsigned AW    = ADDR_W
) (
  input  logic             clk,
  input  logic             mem_rd_n,
  input  logic             mem_wr_n,
  input  logic [AW-1:0]    address,
  input  logic [WIDTH-1:0] write_data,
  output logic [WIDTH-1:0] read_data
);
  logic [WIDTH-1:0] mem [2**AW];

  always_comb read_data = mem_rd_n ? '0 : mem[address];

  always_ff @(posedge clk) begin
    if (!mem_wr_n) mem[address] <= write_data;
  end
endmodule
