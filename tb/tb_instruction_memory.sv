// Self-checking test of the instruction memory: all 128 words are loaded
// through the load port at even byte addresses, then read back at every
// byte address; an odd address must return the word of the even address
// below it. A second load overwrites some words.
module tb_instruction_memory;
  logic        clk = 0, load_we;
  logic [7:0]  read_address, load_addr;
  logic [15:0] instruction, load_data;
  logic [15:0] model [128];
  int checks = 0, failures = 0;

  instruction_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int a = 0; a < 256; a++) begin
      read_address = 8'(a);
      #1;
      checks++;
      if (instruction !== model[a / 2]) begin
        failures++; $display("FAIL [%0d]=%h exp %h", a, instruction, model[a / 2]);
      end
    end
  endtask

  initial begin
    load_we = 0; load_addr = 0; load_data = 0; read_address = 0;
    for (int w = 0; w < 128; w++) begin
      load_we = 1; load_addr = 8'(2 * w); load_data = 16'($urandom);
      model[w] = load_data;
      @(posedge clk); #1;
    end
    load_we = 0;
    read_all();
    for (int n = 0; n < 40; n++) begin
      int w;
      w = int'($urandom % 128);
      load_we = 1; load_addr = 8'(2 * w); load_data = 16'($urandom);
      model[w] = load_data;
      @(posedge clk); #1;
    end
    load_we = 0; load_data = 16'hDEAD; load_addr = 8'd10;
    @(posedge clk); #1;  // load_we = 0: no change
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
