// Self-checking test of instruction fetch. A random program is loaded,
// then for several hundred cycles Branch, Zero and Jump are driven at
// random (standing in for the decoder and ALU) and, every cycle, the PC
// and the fetched instruction are compared with a reference model of the
// next-PC rule: PC + 2, PC + 2 + 2*sext(offset4) when Branch and Zero,
// 2*offset12 mod 256 on Jump. The PC must advance every cycle (one
// instruction per clock) and return to 0 on reset.
module tb_instruction_fetch;
  logic        clk = 0, reset, branch, zero, jump, load_we;
  logic [7:0]  pc, load_addr;
  logic [15:0] instruction, load_data;
  logic [15:0] prog [128];
  logic [7:0]  pc_model;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0, n_jump = 0, n_seq = 0;

  instruction_fetch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] next_pc(input logic [7:0] p, input logic [15:0] ins,
                                         input logic br, z, j);
    int off;
    off = ins[3] ? int'(ins[3:0]) - 16 : int'(ins[3:0]);
    if (j)           return 8'((int'(ins[11:0]) * 2) % 256);
    else if (br && z) return 8'(int'(p) + 2 + 2 * off);
    else             return 8'(int'(p) + 2);
  endfunction

  initial begin
    reset = 1; branch = 0; zero = 0; jump = 0; load_we = 0; load_addr = 0; load_data = 0;
    for (int w = 0; w < 128; w++) begin
      prog[w] = 16'($urandom);
      load_we = 1; load_addr = 8'(2 * w); load_data = prog[w];
      @(posedge clk); #1;
    end
    load_we = 0;
    @(posedge clk); #1;
    reset = 0;
    pc_model = 0;
    for (int c = 0; c < 600; c++) begin
      checks += 2;
      if (pc !== pc_model) begin failures++; $display("FAIL cycle %0d pc=%h exp %h", c, pc, pc_model); end
      if (instruction !== prog[pc_model[7:1]]) begin
        failures++; $display("FAIL cycle %0d instr=%h exp %h", c, instruction, prog[pc_model[7:1]]);
      end
      branch = 1'($urandom); zero = 1'($urandom); jump = ($urandom % 8 == 0);
      if (jump) n_jump++;
      else if (branch && zero) n_taken++;
      else if (branch) n_not_taken++;
      else n_seq++;
      pc_model = next_pc(pc_model, prog[pc_model[7:1]], branch, zero, jump);
      @(posedge clk); #1;
    end
    reset = 1; @(posedge clk); #1;
    checks++;
    if (pc !== 8'h00) begin failures++; $display("FAIL reset pc=%h", pc); end
    $display("taken=%0d not_taken=%0d jump=%0d sequential=%0d", n_taken, n_not_taken, n_jump, n_seq);
    checks++;
    if (n_taken == 0 || n_not_taken == 0 || n_jump == 0 || n_seq == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
