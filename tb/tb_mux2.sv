// Self-checking test of mux2 at its default 16-bit width: random data on
// both inputs, both select values, compared with an independent model.
module tb_mux2;
  logic        sel;
  logic [15:0] d0, d1, y;
  int checks = 0, failures = 0;

  mux2 dut (.sel, .d0, .d1, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d0 = 16'($urandom); d1 = 16'($urandom); sel = 1'(i);
      #1;
      checks++;
      if (y !== (i % 2 == 1 ? d1 : d0)) begin
        failures++; $display("FAIL sel=%0b d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
