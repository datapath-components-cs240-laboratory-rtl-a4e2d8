// Self-checking test of shift_left (8 bits, shift 1): every input value,
// expecting twice the input modulo 256.
module tb_shift_left;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  shift_left dut (.din, .dout);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      din = 8'(v);
      #1;
      checks++;
      if (dout !== 8'((2 * v) % 256)) begin failures++; $display("FAIL %0d -> %0d", v, dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
