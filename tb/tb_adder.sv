// Self-checking test of the 8-bit adder: exhaustive over all operand
// pairs, expecting the sum modulo 256.
module tb_adder;
  logic [7:0] a, b, sum;
  int checks = 0, failures = 0;

  adder dut (.a, .b, .sum);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (sum !== 8'((i + j) % 256)) begin
          failures++; $display("FAIL %0d + %0d = %0d", i, j, sum);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
