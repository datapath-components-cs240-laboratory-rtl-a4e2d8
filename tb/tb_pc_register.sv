// Self-checking test of pc_register: reset gives 0, then each rising
// edge loads pc_next; a reset in mid-run returns the PC to 0.
module tb_pc_register;
  logic       clk = 0, reset;
  logic [7:0] pc_next, pc;
  int checks = 0, failures = 0;

  pc_register dut (.clk, .reset, .pc_next, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_pc(input logic [7:0] exp);
    checks++;
    if (pc !== exp) begin failures++; $display("FAIL pc=%h exp=%h", pc, exp); end
  endtask

  initial begin
    reset = 1; pc_next = 8'hA5;
    @(posedge clk); #1 expect_pc(8'h00);
    reset = 0;
    for (int i = 0; i < 50; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      pc_next = v;
      @(posedge clk); #1 expect_pc(v);
    end
    reset = 1; pc_next = 8'h3C;
    @(posedge clk); #1 expect_pc(8'h00);
    reset = 0;
    @(posedge clk); #1 expect_pc(8'h3C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
