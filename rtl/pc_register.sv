// Program counter.
//
// An 8-bit register that takes the next-PC value on every rising clock
// edge, so the machine starts one instruction per cycle. A reset loads 0,
// the start address of every program. Reset is synchronous and active
// high; the polarity and synchronous timing are this design's choice.
module pc_register #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] pc_next,
  output logic [WIDTH-1:0] pc
);
  always_ff @(posedge clk) begin
    if (reset) pc <= '0;
    else       pc <= pc_next;
  end
endmodule
